// tb_scan_out_power: the six scan-out control configurations side by side.
//
// Seven copies of the BIST, sized like a 245-FF circuit (3 chains x 100 FFs,
// 10 slow + 10 fast captures), run the same 30-pattern session against the
// behavioural CUT: no control, then 0-filling and adjacent-value filling with
// 20% observation FFs plus 0%, 10% and 20% LSWF-FFs. All copies shift in the same
// stimulus and capture the same responses until the last capture, so the
// uncontrolled copy gives, at each last capture, the raw response R and the
// state before it Q. From these the test predicts every controlled copy's chain
// contents (obs FF: 0 or R of its scan-in neighbour; LSWF-FF: the same if
// R == Q, else R) and checks them. It reports the weighted scan-out transition
// count of each copy (a transition between positions p and p+1 weighs 99-p) and
// requires every adjacent-filling copy to be below the uncontrolled one; all
// controlled copies must share one compactor signature.
module tb_scan_out_power;
  import lpbist_pkg::*;
  localparam int NC = 3, L = 100, S = 10, F = 10, P = 30, NCFG = 7;
  localparam int TOTAL = P * (L + S + F) + L;

  function automatic logic [L-1:0] mk(input int md, input int off);
    logic [L-1:0] r;
    for (int p = 0; p < L; p++) r[p] = (md != 0) && (p % md == off);
    return r;
  endfunction

  // configuration table: 0 none; 1..3 zero-fill 20/30/40 %; 4..6 adjacent 20/30/40 %
  localparam int OBS_MOD  [NCFG] = '{0, 5, 5, 5, 5, 5, 5};
  localparam int LSWF_MOD [NCFG] = '{0, 0, 10, 5, 0, 10, 5};
  localparam bit ADJ      [NCFG] = '{1, 0, 0, 0, 1, 1, 1};
  localparam string NAME  [NCFG] = '{"none", "0-fill 20%", "0-fill 30%", "0-fill 40%",
                                     "adjacent 20%", "adjacent 30%", "adjacent 40%"};

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] seed = 16'h4F1B;
  int checks = 0, failures = 0;

  logic [NC*L-1:0] q [NCFG];
  logic [NC*L-1:0] r [NCFG];
  logic [15:0]     ms [NCFG], cs [NCFG];
  logic            lcap [NCFG], done [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic [NC-1:0] so;
    logic se, cap, fast, busy;
    logic [31:0] pat;
    lp_bist_top #(.NUM_CHAINS(NC), .CHAIN_LEN(L), .N_SLOW(S), .N_FAST(F), .NUM_PATTERNS(P),
                  .FILL(ADJ[g] ? FILL_ADJ : FILL_ZERO),
                  .OBS_MASK({NC{mk(OBS_MOD[g], 2)}}), .LSWF_MASK({NC{mk(LSWF_MOD[g], 4)}})) dut (
      .clk, .rst_n, .start, .seed, .ff_q(q[g]), .cut_resp(r[g]), .scan_out(so),
      .misr_sig(ms[g]), .comp_sig(cs[g]), .se, .capture(cap), .fast, .lcap(lcap[g]),
      .busy, .done(done[g]), .pattern(pat));
    cut_model #(.N(NC*L)) cut (.q(q[g]), .resp(r[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (TOTAL + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wtm(input logic [NC*L-1:0] v);
    longint w = 0;
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < L - 1; p++)
        if (v[c*L + p] != v[c*L + p + 1]) w += L - 1 - p;
    return w;
  endfunction

  longint w [NCFG];
  longint wmax;
  int n_unloads = 0, n_cycles = 0;

  initial begin
    logic [NC*L-1:0] qb, rr;
    for (int g = 0; g < NCFG; g++) w[g] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done[0] && n_cycles < TOTAL + 100) begin
      if (lcap[0]) begin
        qb = q[0]; rr = r[0];
        @(negedge clk); n_cycles++;
        n_unloads++;
        checks++;
        if (q[0] != rr) begin failures++; $display("FAIL uncontrolled copy lost its response"); end
        for (int g = 1; g < NCFG; g++) begin
          logic [NC*L-1:0] e;
          e = rr;
          for (int c = 0; c < NC; c++)
            for (int p = 1; p < L; p++) begin
              int i;
              bit fv;
              i = c*L + p;
              fv = ADJ[g] ? rr[i-1] : 1'b0;
              if (p % OBS_MOD[g] == 2) e[i] = fv;
              else if (LSWF_MOD[g] != 0 && p % LSWF_MOD[g] == 4 && rr[i] == qb[i]) e[i] = fv;
            end
          checks++;
          if (q[g] != e) begin failures++; $display("FAIL %s: filled response differs", NAME[g]); end
          w[g] += wtm(q[g]);
        end
        w[0] += wtm(q[0]);
      end else begin
        @(negedge clk); n_cycles++;
      end
    end
    checks++;
    if (n_cycles != TOTAL || n_unloads != P) begin
      failures++; $display("FAIL session length %0d / unloads %0d", n_cycles, n_unloads);
    end
    wmax = longint'(P) * NC * (L * (L - 1) / 2);
    for (int g = 0; g < NCFG; g++)
      $display("%-13s scan-out weighted transitions %0d (%0d.%02d%% of maximum)  misr %h  compactor %h",
               NAME[g], w[g], w[g] * 100 / wmax, (w[g] * 10000 / wmax) % 100, ms[g], cs[g]);
    for (int g = 4; g < NCFG; g++) begin
      checks++;
      if (!(w[g] < w[0])) begin failures++; $display("FAIL %s does not lower scan-out transitions", NAME[g]); end
    end
    for (int g = 2; g < NCFG; g++) begin
      checks++;
      if (cs[g] != cs[1]) begin failures++; $display("FAIL compactor signature differs for %s", NAME[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
