// tb_lp_bist_full: one complete BIST session at the design's full size.
//
// The BIST with every parameter at its default (8 chains x 100 FFs, 10 slow +
// 10 fast captures, 30000 patterns, adjacent-value filling) runs a whole session
// against the behavioural CUT. The FF state and both signatures are compared
// with the independent reference model every cycle, the session length
// 1 + 30000*120 + 100 clocks is checked, and the mechanisms (shift, slow and
// fast capture, last capture, both kinds of fill, LSWF-FF kept, filter
// smoothing, signature updates) must each have occurred.
module tb_lp_bist_full;
  localparam int NC = 8, L = 100, S = 10, F = 10, P = 30000;
  localparam int TOTAL = P * (L + S + F) + L;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] seed = 16'hB5E3;
  int checks = 0, failures = 0;

  logic [NC-1:0][L-1:0] q, r;
  logic [NC*L-1:0] mq, mr;
  logic [15:0] ms, cs, ems, ecs;
  logic [NC-1:0] so;
  logic se, cap, fast, lcap, busy, done, md;
  logic [31:0] pattern;

  lp_bist_top dut (
    .clk, .rst_n, .start, .seed, .ff_q(q), .cut_resp(r), .scan_out(so), .misr_sig(ms),
    .comp_sig(cs), .se, .capture(cap), .fast, .lcap, .busy, .done, .pattern);

  cut_model #(.N(NC*L)) cut  (.q(q),  .resp(r));
  cut_model #(.N(NC*L)) mcut (.q(mq), .resp(mr));

  lp_bist_model #(.NC(NC), .L(L), .S(S), .F(F), .P(P), .ADJ(1), .CTRL(1)) ref_m (
    .clk, .rst_n, .start, .seed, .q(mq), .resp(mr), .misr(ems), .comp(ecs), .done(md));

  always #5 clk = ~clk;

  initial begin
    repeat (TOTAL + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL: %s", what);
    if (!ok) failures++;
  endtask

  int n_cycles = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && n_cycles < TOTAL + 100) begin
      check(q == mq && ms == ems && cs == ecs, $sformatf("cycle %0d", n_cycles));
      @(negedge clk);
      n_cycles++;
    end
    check(n_cycles == TOTAL, $sformatf("session length %0d, expected %0d", n_cycles, TOTAL));
    check(done && md && ms == ems && cs == ecs, "final signatures");
    $display("signatures: misr %h compactor %h", ms, cs);
    $display("shift %0d slow %0d fast %0d lcap %0d obsfill %0d lswffill %0d lswfkeep %0d filter %0d misr %0d comp %0d",
             ref_m.n_shift, ref_m.n_slow, ref_m.n_fast, ref_m.n_lcap, ref_m.n_obs_fill,
             ref_m.n_lswf_fill, ref_m.n_lswf_keep, ref_m.n_filter, ref_m.n_misr, ref_m.n_comp);
    check(ref_m.n_shift > 0 && ref_m.n_slow > 0 && ref_m.n_fast > 0, "shift and both capture speeds");
    check(ref_m.n_lcap == P, "one last capture per pattern");
    check(ref_m.n_obs_fill > 0 && ref_m.n_lswf_fill > 0 && ref_m.n_lswf_keep > 0, "fills");
    check(ref_m.n_filter > 0 && ref_m.n_misr > 0 && ref_m.n_comp > 0, "filter and signatures");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
