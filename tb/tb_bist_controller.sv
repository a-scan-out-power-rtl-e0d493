// tb_bist_controller: self-checking test of the multi-cycle BIST sequencer.
//
// With small sizes (7-FF chains, 3 slow + 2 fast captures, 4 patterns) the
// expected value of every control output is derived here from the cycle number
// since start and compared each cycle; the session length
// 1 + P*(L+S+F) + L from start to done is checked, and a second session is
// started to check restart.
module tb_bist_controller;
  localparam int L = 7, S = 3, F = 2, P = 4, C = S + F;
  localparam int TOTAL = P * (L + C) + L;
  logic clk = 0, rst_n = 0, start = 0;
  logic lfsr_load, clear, se, lfsr_en, capture, fast, lcap, comp_en, misr_en, busy, done;
  logic [31:0] pattern;
  int checks = 0, failures = 0;

  bist_controller #(.CHAIN_LEN(L), .N_SLOW(S), .N_FAST(F), .NUM_PATTERNS(P)) dut (
    .clk, .rst_n, .start, .lfsr_load, .clear, .se, .lfsr_en, .capture, .fast, .lcap,
    .comp_en, .misr_en, .busy, .done, .pattern);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_session();
    int n_lcap = 0;
    @(negedge clk);
    start = 1;
    #1;
    checks++; if (!(lfsr_load && clear)) begin failures++; $display("FAIL load/clear on start"); end
    @(negedge clk);
    start = 0;
    for (int k = 0; k < TOTAL; k++) begin
      int pat, ph;
      bit e_se, e_cap, e_fast, e_lcap, e_comp, e_misr;
      if (k < P * (L + C)) begin
        pat = k / (L + C); ph = k % (L + C);
        e_se = ph < L; e_cap = !e_se;
        e_fast = e_cap && (ph - L) >= S;
        e_lcap = e_cap && (ph - L) == C - 1;
        e_comp = e_cap && (ph - L) != 0;
        e_misr = e_se && pat != 0;
      end else begin
        pat = P - 1; e_se = 1; e_cap = 0; e_fast = 0; e_lcap = 0; e_comp = 0; e_misr = 1;
      end
      checks++;
      if ({se, lfsr_en, capture, fast, lcap, comp_en, misr_en, busy, done} !=
          {e_se, e_se, e_cap, e_fast, e_lcap, e_comp, e_misr, 1'b1, 1'b0} || pattern != 32'(pat)) begin
        failures++;
        $display("FAIL k=%0d se=%b cap=%b fast=%b lcap=%b comp=%b misr=%b busy=%b done=%b pat=%0d",
                 k, se, capture, fast, lcap, comp_en, misr_en, busy, done, pattern);
      end
      if (lcap) n_lcap++;
      @(negedge clk);
    end
    checks++; if (!(done && !busy)) begin failures++; $display("FAIL done after %0d cycles", TOTAL); end
    checks++; if (n_lcap != P) begin failures++; $display("FAIL lcap count %0d", n_lcap); end
    repeat (3) @(negedge clk);
    checks++; if (!done || se || capture) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (busy || done || se || capture || lcap) begin failures++; $display("FAIL idle outputs"); end
    run_session();
    run_session();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
