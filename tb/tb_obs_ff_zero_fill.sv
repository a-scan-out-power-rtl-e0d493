// tb_obs_ff_zero_fill: self-checking test of obs_ff_zero_fill.
//
// Checks an observation FF with 0-filling: at the last capture it must load 0. Inputs are random; lcap is only raised in capture cycles
// (se = 0). The expected value is tracked by a separate model and compared after
// every clock edge, and the test counts how often each case (shift, capture,
// last capture) occurred.
module tb_obs_ff_zero_fill;
  logic clk = 0, rst_n = 0, se = 0, si = 0, di = 0, adj_di = 0, lcap = 0, q;
  logic exp;
  int checks = 0, failures = 0, n_shift = 0, n_cap = 0, n_lcap_eq = 0, n_lcap_ne = 0;

  obs_ff_zero_fill dut (.clk, .rst_n, .se, .si, .di, .lcap, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      se     = 1'($urandom_range(0, 2) == 0);
      si     = 1'($urandom);
      di     = 1'($urandom);
      adj_di = 1'($urandom);
      lcap   = !se && ($urandom_range(0, 2) == 0);
      if (se) n_shift++;
      else if (!lcap) n_cap++;
      else if (di == exp) n_lcap_eq++;
      else n_lcap_ne++;
      exp = se ? si : (lcap ? 1'b0 : di);
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL t=%0d se=%b si=%b di=%b adj=%b lcap=%b q=%b exp=%b", t, se, si, di, adj_di, lcap, q, exp);
      end
    end
    checks++;
    if (n_shift == 0 || n_cap == 0 || n_lcap_eq == 0 || n_lcap_ne == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
