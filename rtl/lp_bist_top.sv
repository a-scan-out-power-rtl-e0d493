// lp_bist_top: low-power multi-cycle logic BIST with scan-out power reduction.
//
// Pattern path: a 16-bit LFSR feeds a phase shifter, whose current and
// look-ahead bits go through a pseudo low-pass filter (majority of previous,
// current and next bit) into NUM_CHAINS scan chains of CHAIN_LEN FFs each. The
// FFs are the state elements of the circuit under test (CUT), which lies outside
// this module: ff_q drives the CUT and cut_resp carries its next-state response
// back to the FF data inputs. A pattern is shifted in, then captured N_SLOW +
// N_FAST times (multi-cycle test); the observation FFs are compacted after every
// capture; at the last capture (lcap) the controllable FFs are filled (0 or the
// scan-in-side neighbour's value, per FILL) so that the response shifted out
// next, into the scan-out MISR, toggles less. That last step is the scan-out
// power reduction; everything before it is the low-power BIST it builds on.
// Default sizes: 8 chains x 100 FFs, 10 + 10 captures, 30000 patterns; the chain
// count and the FF placement (OBS_MASK/LSWF_MASK, chosen per chain by an
// offline selection on the real CUT) are placeholders of this design.
//
// Interface: pulse start to run one session from seed; done rises when the last
// response has been unloaded, and misr_sig / comp_sig then hold the signatures.
// Timing: 1 + NUM_PATTERNS*(CHAIN_LEN+N_SLOW+N_FAST) + CHAIN_LEN clocks from
// start to done. Primary inputs/outputs of the CUT are not handled here.
module lp_bist_top
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS   = 8,
  parameter int unsigned CHAIN_LEN    = 100,
  parameter int unsigned N_SLOW       = 10,
  parameter int unsigned N_FAST       = 10,
  parameter int unsigned NUM_PATTERNS = 30000,
  parameter fill_mode_e  FILL         = FILL_ADJ,
  // Controllable-FF placement, one mask per chain (bit p = position p from scan-in).
  parameter logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] OBS_MASK  =
    {NUM_CHAINS{CHAIN_LEN'(default_obs_mask(CHAIN_LEN))}},
  parameter logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] LSWF_MASK =
    {NUM_CHAINS{CHAIN_LEN'(default_lswf_mask(CHAIN_LEN))}}
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  logic [LFSR_W-1:0]                     seed,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  ff_q,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]  cut_resp,
  output logic [NUM_CHAINS-1:0]                 scan_out,
  output logic [LFSR_W-1:0]                     misr_sig,
  output logic [LFSR_W-1:0]                     comp_sig,
  output logic                                  se,
  output logic                                  capture,
  output logic                                  fast,
  output logic                                  lcap,
  output logic                                  busy,
  output logic                                  done,
  output logic [31:0]                           pattern
);

  logic                    lfsr_load, clear, lfsr_en, comp_en, misr_en;
  logic [LFSR_W-1:0]       lfsr_state;
  logic [NUM_CHAINS-1:0]   psf_cur, psf_fut, past, scan_in;

  bist_controller #(
    .CHAIN_LEN(CHAIN_LEN), .N_SLOW(N_SLOW), .N_FAST(N_FAST), .NUM_PATTERNS(NUM_PATTERNS)
  ) u_ctrl (
    .clk, .rst_n, .start, .lfsr_load, .clear, .se, .lfsr_en, .capture, .fast, .lcap,
    .comp_en, .misr_en, .busy, .done, .pattern
  );

  bist_lfsr u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .seed, .en(lfsr_en), .state(lfsr_state)
  );

  phase_shifter #(.NUM_CHAINS(NUM_CHAINS)) u_psf (
    .state(lfsr_state), .cur(psf_cur), .fut(psf_fut)
  );

  plpf #(.NUM_CHAINS(NUM_CHAINS)) u_plpf (
    .past, .cur(psf_cur), .fut(psf_fut), .si(scan_in)
  );

  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    assign past[c] = ff_q[c][0];
    scan_chain #(
      .CHAIN_LEN(CHAIN_LEN), .OBS_MASK(OBS_MASK[c]), .LSWF_MASK(LSWF_MASK[c]), .FILL(FILL)
    ) u_chain (
      .clk, .rst_n, .se, .lcap, .si(scan_in[c]), .di(cut_resp[c]), .q(ff_q[c]),
      .so(scan_out[c])
    );
  end

  scan_misr #(.N_IN(NUM_CHAINS)) u_misr (
    .clk, .rst_n, .clear, .en(misr_en), .din(scan_out), .sig(misr_sig)
  );

  obs_compactor #(
    .IN_W(NUM_CHAINS * CHAIN_LEN), .MASK(OBS_MASK)
  ) u_comp (
    .clk, .rst_n, .clear, .en(comp_en), .obs(ff_q), .sig(comp_sig)
  );

endmodule
