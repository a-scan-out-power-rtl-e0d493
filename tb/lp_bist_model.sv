// lp_bist_model: cycle-accurate reference model of the low-power BIST, for
// testbenches only.
//
// Written independently of the RTL from the behaviour it must have: its own
// session schedule (shift CHAIN_LEN, capture N_SLOW+N_FAST, last capture filled,
// final unload), the LFSR recurrence, phase-shifter taps, majority filter, fill
// rules, MISR and compactor. It exposes the expected FF state, signatures and
// per-mechanism event counters. The CUT response for its own state comes in
// through resp.
module lp_bist_model #(
  parameter int NC = 8,
  parameter int L  = 100,
  parameter int S  = 10,
  parameter int F  = 10,
  parameter int P  = 30000,
  parameter bit ADJ = 1'b1,
  parameter bit CTRL = 1'b1      // 0: no controllable FFs at all
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [15:0]         seed,
  output logic [NC*L-1:0]     q,
  input  logic [NC*L-1:0]     resp,
  output logic [15:0]         misr,
  output logic [15:0]         comp,
  output logic                done
);
  localparam int C = S + F;

  logic [15:0] lfsr;
  bit          running;
  int          k;            // cycle since start
  longint      n_shift, n_slow, n_fast, n_lcap, n_obs_fill, n_lswf_fill, n_lswf_keep,
               n_filter, n_misr, n_comp;

  function automatic bit is_obs(int p);
    return CTRL && (p % 5 == 2);
  endfunction
  function automatic bit is_lswf(int p);
    return CTRL && (p % 5 == 4);
  endfunction

  initial begin
    q = '0; misr = '0; comp = '0; lfsr = 16'h0001; running = 0; done = 0; k = 0;
    n_shift = 0; n_slow = 0; n_fast = 0; n_lcap = 0; n_obs_fill = 0; n_lswf_fill = 0;
    n_lswf_keep = 0; n_filter = 0; n_misr = 0; n_comp = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    logic [NC*L-1:0] nq;
    logic [15:0]     nm, nc, fold;
    int pat, ph;
    bit shift, cap, lcap;
    nq = q; nm = misr; nc = comp;
    if (!rst_n) begin
      q = '0; misr = '0; comp = '0; lfsr = 16'h0001; running = 0; done = 0; k = 0;
    end else if (!running) begin
      if (start) begin
        running = 1; done = 0; k = 0;
        lfsr = (seed == 0) ? 16'h0001 : seed;
        misr = '0; comp = '0;
        q = resp;                  // the FFs capture functionally until the first shift
      end else begin
        q = resp;
      end
    end else begin
      if (k < P * (L + C)) begin pat = k / (L + C); ph = k % (L + C); end
      else begin pat = P - 1; ph = k - P * (L + C); end
      shift = (k >= P * (L + C)) || ph < L;
      cap   = !shift;
      lcap  = cap && (ph - L) == C - 1;
      if (shift) begin
        n_shift++;
        if (k >= P * (L + C) || pat != 0) begin
          for (int i = 0; i < 15; i++) nm[i] = misr[i+1] ^ ((i < NC) ? q[i*L + L-1] : 1'b0);
          nm[15] = misr[15] ^ misr[13] ^ misr[4] ^ misr[0] ^ ((15 < NC) ? q[15*L + L-1] : 1'b0);
          n_misr++;
        end
        for (int c = 0; c < NC; c++) begin
          bit cu, fu, pa, s;
          cu = lfsr[c % 15] ^ lfsr[(c + 5) % 15] ^ lfsr[(c + 11) % 15];
          fu = lfsr[c % 15 + 1] ^ lfsr[(c + 5) % 15 + 1] ^ lfsr[(c + 11) % 15 + 1];
          pa = q[c*L];
          s  = (int'(cu) + int'(fu) + int'(pa)) >= 2;
          if (s != cu) n_filter++;
          for (int p = L - 1; p > 0; p--) nq[c*L + p] = q[c*L + p - 1];
          nq[c*L] = s;
        end
        lfsr = {lfsr[15] ^ lfsr[13] ^ lfsr[4] ^ lfsr[0], lfsr[15:1]};
      end else begin
        if (ph - L < S) n_slow++; else n_fast++;
        if (ph - L != 0) begin
          fold = '0;
          for (int i = 0; i < NC*L; i++) if (is_obs(i % L)) fold[i % 16] ^= q[i];
          for (int i = 0; i < 15; i++) nc[i] = comp[i+1] ^ fold[i];
          nc[15] = comp[15] ^ comp[13] ^ comp[4] ^ comp[0] ^ fold[15];
          n_comp++;
        end
        nq = resp;
        if (lcap) begin
          n_lcap++;
          for (int c = 0; c < NC; c++)
            for (int p = 1; p < L; p++) begin
              int i;
              bit fillv;
              i = c*L + p;
              fillv = ADJ ? resp[i-1] : 1'b0;
              if (is_obs(p)) begin
                nq[i] = fillv;
                if (fillv != resp[i]) n_obs_fill++;
              end else if (is_lswf(p)) begin
                if (resp[i] == q[i]) begin nq[i] = fillv; if (fillv != resp[i]) n_lswf_fill++; end
                else n_lswf_keep++;
              end
            end
        end
      end
      q = nq; misr = nm; comp = nc;
      k++;
      if (k == P * (L + C) + L) begin running = 0; done = 1; end
    end
  end
endmodule
