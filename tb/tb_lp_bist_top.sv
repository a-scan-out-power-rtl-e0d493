// tb_lp_bist_top: end-to-end test of the low-power BIST with scan-out control.
//
// Three copies of the BIST at reduced size (4 chains x 20 FFs, 3 slow + 3 fast
// captures, 40 patterns) run the same session against the behavioural CUT:
// adjacent-value filling, 0-filling, and no controllable FFs at all. Each copy
// is compared every cycle with the independent reference model (FF state, both
// signatures) and the session length is checked. The test counts how often
// each mechanism occurred (shift, slow and fast capture, last capture,
// observation-FF fill, LSWF-FF fill, LSWF-FF kept because it switched, filter
// smoothing, MISR and compactor updates) and fails if one never did. Finally it
// computes the weighted transition count of the shifted-out responses (a
// transition between positions p and p+1 weighs CHAIN_LEN-1-p, the number of
// shifts it travels) and requires adjacent filling to lower it.
module tb_lp_bist_top;
  import lpbist_pkg::*;
  localparam int NC = 4, L = 20, S = 3, F = 3, P = 40;
  localparam int TOTAL = P * (L + S + F) + L;
  localparam logic [NC-1:0][L-1:0] NONE = '0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] seed = 16'h1D2C;
  int checks = 0, failures = 0;

  logic [NC*L-1:0] q_a, q_z, q_n, r_a, r_z, r_n, mq_a, mq_z, mq_n, mr_a, mr_z, mr_n;
  logic [15:0] ms_a, ms_z, ms_n, cs_a, cs_z, cs_n, ems_a, ems_z, ems_n, ecs_a, ecs_z, ecs_n;
  logic [NC-1:0] so_a, so_z, so_n;
  logic se_a, cap_a, fast_a, lcap_a, busy_a, done_a, md_a, md_z, md_n;
  logic se_z, cap_z, fast_z, lcap_z, busy_z, done_z, se_n, cap_n, fast_n, lcap_n, busy_n, done_n;
  logic [31:0] pat_a, pat_z, pat_n;

  lp_bist_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_SLOW(S), .N_FAST(F), .NUM_PATTERNS(P),
                .FILL(FILL_ADJ)) dut_a (
    .clk, .rst_n, .start, .seed, .ff_q(q_a), .cut_resp(r_a), .scan_out(so_a), .misr_sig(ms_a),
    .comp_sig(cs_a), .se(se_a), .capture(cap_a), .fast(fast_a), .lcap(lcap_a), .busy(busy_a),
    .done(done_a), .pattern(pat_a));
  lp_bist_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_SLOW(S), .N_FAST(F), .NUM_PATTERNS(P),
                .FILL(FILL_ZERO)) dut_z (
    .clk, .rst_n, .start, .seed, .ff_q(q_z), .cut_resp(r_z), .scan_out(so_z), .misr_sig(ms_z),
    .comp_sig(cs_z), .se(se_z), .capture(cap_z), .fast(fast_z), .lcap(lcap_z), .busy(busy_z),
    .done(done_z), .pattern(pat_z));
  lp_bist_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_SLOW(S), .N_FAST(F), .NUM_PATTERNS(P),
                .OBS_MASK(NONE), .LSWF_MASK(NONE)) dut_n (
    .clk, .rst_n, .start, .seed, .ff_q(q_n), .cut_resp(r_n), .scan_out(so_n), .misr_sig(ms_n),
    .comp_sig(cs_n), .se(se_n), .capture(cap_n), .fast(fast_n), .lcap(lcap_n), .busy(busy_n),
    .done(done_n), .pattern(pat_n));

  cut_model #(.N(NC*L)) cut_a (.q(q_a), .resp(r_a));
  cut_model #(.N(NC*L)) cut_z (.q(q_z), .resp(r_z));
  cut_model #(.N(NC*L)) cut_n (.q(q_n), .resp(r_n));
  cut_model #(.N(NC*L)) mcut_a (.q(mq_a), .resp(mr_a));
  cut_model #(.N(NC*L)) mcut_z (.q(mq_z), .resp(mr_z));
  cut_model #(.N(NC*L)) mcut_n (.q(mq_n), .resp(mr_n));

  lp_bist_model #(.NC(NC), .L(L), .S(S), .F(F), .P(P), .ADJ(1), .CTRL(1)) ref_a (
    .clk, .rst_n, .start, .seed, .q(mq_a), .resp(mr_a), .misr(ems_a), .comp(ecs_a), .done(md_a));
  lp_bist_model #(.NC(NC), .L(L), .S(S), .F(F), .P(P), .ADJ(0), .CTRL(1)) ref_z (
    .clk, .rst_n, .start, .seed, .q(mq_z), .resp(mr_z), .misr(ems_z), .comp(ecs_z), .done(md_z));
  lp_bist_model #(.NC(NC), .L(L), .S(S), .F(F), .P(P), .ADJ(1), .CTRL(0)) ref_n (
    .clk, .rst_n, .start, .seed, .q(mq_n), .resp(mr_n), .misr(ems_n), .comp(ecs_n), .done(md_n));

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

  // weighted transitions of the response present in the chains of one copy
  function automatic longint wtm(input logic [NC*L-1:0] v);
    longint w = 0;
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < L - 1; p++)
        if (v[c*L + p] != v[c*L + p + 1]) w += L - 1 - p;
    return w;
  endfunction

  longint w_a = 0, w_z = 0, w_n = 0;
  int n_cycles = 0, n_unloads = 0;
  bit prev_lcap = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done_a && n_cycles < TOTAL + 100) begin
      check(q_a == mq_a && ms_a == ems_a && cs_a == ecs_a, $sformatf("adjacent copy, cycle %0d", n_cycles));
      check(q_z == mq_z && ms_z == ems_z && cs_z == ecs_z, $sformatf("0-fill copy, cycle %0d", n_cycles));
      check(q_n == mq_n && ms_n == ems_n && cs_n == ecs_n, $sformatf("uncontrolled copy, cycle %0d", n_cycles));
      if (prev_lcap) begin   // the chains now hold the (filled) responses about to be shifted out
        w_a += wtm(q_a); w_z += wtm(q_z); w_n += wtm(q_n); n_unloads++;
      end
      prev_lcap = lcap_a;
      @(negedge clk);
      n_cycles++;
    end
    check(n_cycles == TOTAL, $sformatf("session length %0d, expected %0d", n_cycles, TOTAL));
    check(done_a && done_z && done_n && md_a && md_z && md_n, "all copies done");
    check(ms_a == ems_a && ms_z == ems_z && ms_n == ems_n, "final MISR signatures");
    check(cs_a == ecs_a && cs_z == ecs_z && cs_n == ecs_n, "final compactor signatures");
    check(ms_a != ms_n && ms_z != ms_n && cs_a == cs_z, "fill changes the scan-out signature, not the compactor's");
    $display("signatures: adjacent %h/%h, 0-fill %h/%h, none %h/%h", ms_a, cs_a, ms_z, cs_z, ms_n, cs_n);
    // mechanism counts (from the reference models, which the copies matched)
    $display("shift %0d slow %0d fast %0d lcap %0d obsfill %0d lswffill %0d lswfkeep %0d filter %0d misr %0d comp %0d",
             ref_a.n_shift, ref_a.n_slow, ref_a.n_fast, ref_a.n_lcap, ref_a.n_obs_fill + ref_z.n_obs_fill,
             ref_a.n_lswf_fill + ref_z.n_lswf_fill, ref_a.n_lswf_keep, ref_a.n_filter, ref_a.n_misr, ref_a.n_comp);
    check(ref_a.n_shift > 0 && ref_a.n_slow > 0 && ref_a.n_fast > 0, "shift and both capture speeds");
    check(ref_a.n_lcap == P && n_unloads == P, "one last capture per pattern");
    check(ref_a.n_obs_fill > 0 && ref_z.n_obs_fill > 0, "observation-FF fills");
    check(ref_a.n_lswf_fill > 0 && ref_z.n_lswf_fill > 0, "LSWF-FF fills");
    check(ref_a.n_lswf_keep > 0, "LSWF-FF kept on switching");
    check(ref_a.n_filter > 0, "filter smoothing");
    check(ref_a.n_misr > 0 && ref_a.n_comp > 0, "MISR and compactor updates");
    $display("scan-out weighted transitions: none %0d, 0-fill %0d, adjacent %0d", w_n, w_z, w_a);
    check(w_a < w_n, "adjacent filling lowers scan-out transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
