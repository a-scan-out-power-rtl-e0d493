// tb_scan_misr: self-checking test of the MISR.
//
// A reference signature is computed here bit by bit from the polynomial
// X^16+X^15+X^13+X^4+1 (next[15] = s15^s13^s4^s0 ^ d15, next[i] = s[i+1] ^ d[i])
// over random input words with random enables, and compared every cycle; clear
// and reset are checked as well.
module tb_scan_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0]  din = '0;
  logic [15:0] sig, ref_sig;
  int checks = 0, failures = 0;

  scan_misr #(.N_IN(8)) dut (.clk, .rst_n, .clear, .en, .din, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sig = '0;
    repeat (2) @(negedge clk);
    checks++; if (sig != 0) failures++;
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic [15:0] n;
      en = 1'($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 500) == 0);
      din = 8'($urandom);
      n = ref_sig;
      if (clear) n = '0;
      else if (en) begin
        for (int i = 0; i < 15; i++) n[i] = ref_sig[i+1] ^ ((i < 8) ? din[i] : 1'b0);
        n[15] = ref_sig[15] ^ ref_sig[13] ^ ref_sig[4] ^ ref_sig[0];
      end
      @(negedge clk);
      ref_sig = n;
      checks++;
      if (sig != ref_sig) begin failures++; $display("FAIL t=%0d sig=%h ref=%h", t, sig, ref_sig); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
