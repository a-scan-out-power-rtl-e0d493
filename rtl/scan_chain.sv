// scan_chain: one scan chain with scan-out power control.
//
// CHAIN_LEN flip-flops, position 0 at the scan-in end and position CHAIN_LEN-1
// driving the scan output so. Positions flagged in OBS_MASK are observation FFs
// and positions flagged in LSWF_MASK are low-switching-frequency FFs; both are
// "controllable" and get modified at the last capture (lcap) so the vector that
// is then shifted out toggles less:
//   FILL_ZERO: observation FFs load 0; LSWF-FFs load 0 if they would not switch.
//   FILL_ADJ : observation FFs load the value captured by their scan-in-side
//              neighbour; LSWF-FFs do so if they would not switch.
// All other positions are plain scan FFs. Which FFs are controllable is decided
// offline for the actual circuit and passed in through the masks; the default
// (20% + 20%, every fifth FF each) is only a placeholder of this design.
// In FILL_ADJ mode position 0 has no scan-in-side neighbour and may not be
// selected.
//
// Interface: se = 1 shifts one position per clock toward so; se = 0 captures di.
// q exposes all FF outputs (to the circuit under test). lcap must only be
// asserted in a capture cycle.
module scan_chain
  import lpbist_pkg::*;
#(
  parameter int unsigned          CHAIN_LEN = 100,
  parameter logic [CHAIN_LEN-1:0] OBS_MASK  = CHAIN_LEN'(default_obs_mask(CHAIN_LEN)),
  parameter logic [CHAIN_LEN-1:0] LSWF_MASK = CHAIN_LEN'(default_lswf_mask(CHAIN_LEN)),
  parameter fill_mode_e           FILL      = FILL_ADJ
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 se,
  input  logic                 lcap,
  input  logic                 si,
  input  logic [CHAIN_LEN-1:0] di,
  output logic [CHAIN_LEN-1:0] q,
  output logic                 so
);

  logic [CHAIN_LEN-1:0] sin;  // scan input of each position

  assign sin = {q[CHAIN_LEN-2:0], si};
  assign so  = q[CHAIN_LEN-1];

  for (genvar p = 0; p < CHAIN_LEN; p++) begin : g_ff
    if (OBS_MASK[p] && LSWF_MASK[p]) begin : g_bad
      $error("scan_chain: position %0d is in both OBS_MASK and LSWF_MASK", p);
    end
    if (FILL == FILL_ADJ && p == 0 && (OBS_MASK[0] || LSWF_MASK[0])) begin : g_bad0
      $error("scan_chain: position 0 has no scan-in-side neighbour for adjacent filling");
    end

    if (OBS_MASK[p] && FILL == FILL_ZERO) begin : g_obs_z
      obs_ff_zero_fill u_ff (.clk, .rst_n, .se, .si(sin[p]), .di(di[p]), .lcap, .q(q[p]));
    end else if (LSWF_MASK[p] && FILL == FILL_ZERO) begin : g_lswf_z
      lswf_ff_zero_fill u_ff (.clk, .rst_n, .se, .si(sin[p]), .di(di[p]), .lcap, .q(q[p]));
    end else if (OBS_MASK[p] && p > 0) begin : g_obs_a
      obs_ff_adj_fill u_ff (.clk, .rst_n, .se, .si(sin[p]), .di(di[p]),
                            .adj_di(di[(p > 0) ? p-1 : 0]), .lcap, .q(q[p]));
    end else if (LSWF_MASK[p] && p > 0) begin : g_lswf_a
      lswf_ff_adj_fill u_ff (.clk, .rst_n, .se, .si(sin[p]), .di(di[p]),
                             .adj_di(di[(p > 0) ? p-1 : 0]), .lcap, .q(q[p]));
    end else begin : g_plain
      scan_ff u_ff (.clk, .rst_n, .se, .si(sin[p]), .di(di[p]), .q(q[p]));
    end
  end

  // The last-capture control acts on the capture path only.
  a_lcap_not_shift: assert property (@(posedge clk) disable iff (!rst_n) lcap |-> !se);

endmodule
