// tb_obs_compactor: self-checking test of the observation-FF compactor.
//
// 40 inputs, of which those at positions i%5==2 are observed. The reference
// folds the observed inputs onto 16 lines (line i mod 16) and runs the
// X^16+X^15+X^13+X^4+1 MISR; it also checks that changing an unobserved input
// leaves the signature unchanged while a single observed-bit flip changes it.
module tb_obs_compactor;
  localparam int N = 40;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [N-1:0] obs = '0;
  logic [15:0] sig, ref_sig;
  logic [N-1:0] m;
  int checks = 0, failures = 0;

  obs_compactor #(.IN_W(N), .MASK(m_const())) dut (.clk, .rst_n, .clear, .en, .obs, .sig);

  function automatic logic [N-1:0] m_const();
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = (i % 5 == 2);
    return r;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = m_const();
    ref_sig = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] f, n;
      en = 1'($urandom_range(0, 3) != 0);
      obs = {8'($urandom), 32'($urandom)};
      f = '0;
      for (int i = 0; i < N; i++) if (m[i]) f[i % 16] ^= obs[i];
      n = ref_sig;
      if (en) begin
        for (int i = 0; i < 15; i++) n[i] = ref_sig[i+1] ^ f[i];
        n[15] = ref_sig[15] ^ ref_sig[13] ^ ref_sig[4] ^ ref_sig[0] ^ f[15];
      end
      @(negedge clk);
      ref_sig = n;
      checks++;
      if (sig != ref_sig) begin failures++; $display("FAIL t=%0d", t); end
    end
    // unobserved input has no effect, observed one does
    clear = 1; @(negedge clk); clear = 0;
    checks++; if (sig != 0) begin failures++; $display("FAIL clear"); end
    en = 1; obs = 40'h00_0000_0001; @(negedge clk); en = 0;   // bit 0 unobserved
    checks++; if (sig != 0) begin failures++; $display("FAIL unobserved bit counted"); end
    en = 1; obs = 40'h00_0000_0004; @(negedge clk); en = 0;   // bit 2 observed
    checks++; if (sig == 0) begin failures++; $display("FAIL observed bit lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
