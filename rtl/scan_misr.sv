// scan_misr: multiple-input signature register.
//
// Each enabled clock the register shifts toward bit 0 with the feedback of the
// characteristic polynomial TAPS (default X^16+X^15+X^13+X^4+1, the same as the
// pattern generator) and XORs input din[i] into stage i. It compresses the
// scan-out bits of all chains during shifting, and serves as the back end of the
// capture compactor. The MISR itself belongs to the BIST scheme; its width,
// polynomial and input mapping are this design's choices.
//
// Interface: clear (priority) zeroes the signature; en absorbs din. N_IN must not
// exceed WIDTH. Timing: one clock per absorbed input word.
module scan_misr
  import lpbist_pkg::*;
#(
  parameter int unsigned         WIDTH = LFSR_W,
  parameter int unsigned         N_IN  = 8,
  parameter logic [WIDTH-1:0]    TAPS  = LFSR_TAPS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [N_IN-1:0]  din,
  output logic [WIDTH-1:0] sig
);

  if (N_IN > WIDTH) begin : g_bad
    $error("scan_misr: N_IN (%0d) exceeds WIDTH (%0d)", N_IN, WIDTH);
  end

  logic             fb;
  logic [WIDTH-1:0] din_w;

  assign fb    = ^(sig & TAPS);
  assign din_w = WIDTH'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {fb, sig[WIDTH-1:1]} ^ din_w;
  end

endmodule
