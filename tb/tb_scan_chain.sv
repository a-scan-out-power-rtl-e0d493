// tb_scan_chain: self-checking test of the scan chain with scan-out control.
//
// 1. The worked example of a 10-FF chain whose 4th and 8th FFs (counted from
//    scan-in) are controllable, capturing 0011111011 (scan-in end first):
//    0-filling must give 0010111011 and adjacent-value filling 0011111111.
//    The filled vectors are then shifted out and checked bit by bit, and the
//    number of transitions in the shifted-out stream is checked: 3 originally,
//    1 after adjacent filling, 5 after 0-filling (which creates a new 1-0-1).
// 2. Random capture/shift/last-capture sequences on 100-FF chains with the default
//    placement in both fill modes, against a model written here.
module tb_scan_chain;
  import lpbist_pkg::*;
  localparam int L = 100;
  localparam logic [9:0] FIG_MASK = 10'b0010001000;  // positions 3 and 7
  localparam logic [L-1:0] OM = L'(default_obs_mask(L));
  localparam logic [L-1:0] LM = L'(default_lswf_mask(L));

  logic clk = 0, rst_n = 0, se = 0, lcap = 0;
  logic [9:0] fdi = '0, fq_z, fq_a;
  logic       fso_z, fso_a, fsi = 0;
  logic [L-1:0] di = '0, q_z, q_a, m_z, m_a;
  logic       si = 0, so_z, so_a;
  int checks = 0, failures = 0;
  int n_fill_obs = 0, n_fill_lswf = 0, n_keep_lswf = 0;

  scan_chain #(.CHAIN_LEN(10), .OBS_MASK(FIG_MASK), .LSWF_MASK('0), .FILL(FILL_ZERO)) u_fz
    (.clk, .rst_n, .se, .lcap, .si(fsi), .di(fdi), .q(fq_z), .so(fso_z));
  scan_chain #(.CHAIN_LEN(10), .OBS_MASK(FIG_MASK), .LSWF_MASK('0), .FILL(FILL_ADJ)) u_fa
    (.clk, .rst_n, .se, .lcap, .si(fsi), .di(fdi), .q(fq_a), .so(fso_a));
  scan_chain #(.CHAIN_LEN(L), .FILL(FILL_ZERO)) u_z
    (.clk, .rst_n, .se, .lcap, .si, .di, .q(q_z), .so(so_z));
  scan_chain #(.CHAIN_LEN(L), .FILL(FILL_ADJ)) u_a
    (.clk, .rst_n, .se, .lcap, .si, .di, .q(q_a), .so(so_a));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // vector written scan-in end first, as a string of 0/1
  function automatic logic [9:0] vec(input string s);
    logic [9:0] v;
    for (int i = 0; i < 10; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  initial begin
    int tz, ta;
    bit pz, pa;
    m_z = '0; m_a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- worked example ----
    fdi = vec("0011111011");
    se = 0; lcap = 1;
    @(negedge clk);
    lcap = 0;
    check(fq_z == vec("0010111011"), $sformatf("0-filling example got %b", fq_z));
    check(fq_a == vec("0011111111"), $sformatf("adjacent example got %b", fq_a));
    // shift out: scan-out end (position 9) first
    se = 1; tz = 0; ta = 0;
    for (int k = 0; k < 10; k++) begin
      check(fso_z == vec("0010111011")[9-k], "0-fill shift-out bit");
      check(fso_a == vec("0011111111")[9-k], "adjacent shift-out bit");
      if (k > 0 && fso_z != pz) tz++;
      if (k > 0 && fso_a != pa) ta++;
      pz = fso_z; pa = fso_a;
      @(negedge clk);
    end
    $display("scan-out transitions: 0-fill %0d, adjacent %0d (original 3; 0-filling adds a 1-0-1)", tz, ta);
    check(ta == 1 && tz == 5, "transition counts of the example");
    // ---- random ----
    se = 1;
    repeat (L) begin si = 1'($urandom); @(negedge clk); m_z = {m_z[L-2:0], si}; m_a = m_z; end
    for (int t = 0; t < 3000; t++) begin
      logic [L-1:0] nz, na;
      se   = 1'($urandom_range(0, 3) == 0);
      lcap = !se && ($urandom_range(0, 2) == 0);
      si   = 1'($urandom);
      for (int p = 0; p < L; p++) di[p] = ($urandom_range(0, 3) == 0);
      if (se) begin
        nz = {m_z[L-2:0], si}; na = {m_a[L-2:0], si};
      end else begin
        nz = di; na = di;
        if (lcap) for (int p = 0; p < L; p++) begin
          if (OM[p]) begin nz[p] = 1'b0; na[p] = di[p-1]; n_fill_obs++; end
          if (LM[p]) begin
            if (di[p] == m_z[p]) nz[p] = 1'b0;
            if (di[p] == m_a[p]) begin na[p] = di[p-1]; n_fill_lswf++; end
            else n_keep_lswf++;
          end
        end
      end
      @(negedge clk);
      m_z = nz; m_a = na;
      check(q_z == m_z && so_z == m_z[L-1], $sformatf("0-fill chain t=%0d", t));
      check(q_a == m_a && so_a == m_a[L-1], $sformatf("adjacent chain t=%0d", t));
    end
    check(n_fill_obs > 0 && n_fill_lswf > 0 && n_keep_lswf > 0, "fill cases covered");
    $display("fills: obs %0d lswf %0d, lswf kept %0d", n_fill_obs, n_fill_lswf, n_keep_lswf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
