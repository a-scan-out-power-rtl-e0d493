// obs_compactor: compactor for the observation flip-flops.
//
// During the capture cycles of the multi-cycle test the observation FFs are
// read after every capture, so a fault whose effect reaches one of them at any
// capture is recorded even though the FF is overwritten later (and filled at the
// last capture). The inputs selected by MASK are XOR-folded onto WIDTH lines
// (input i goes to line i mod WIDTH) and absorbed by a MISR. The fold-and-MISR
// form and the widths are this design's choices.
//
// Interface: obs carries all scan FF outputs; MASK marks the observation FFs.
// clear zeroes the signature, en absorbs one capture. Timing: one clock per
// capture.
module obs_compactor
  import lpbist_pkg::*;
#(
  parameter int unsigned     IN_W  = 800,
  parameter logic [IN_W-1:0] MASK  = {IN_W{1'b1}},
  parameter int unsigned     WIDTH = LFSR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IN_W-1:0]  obs,
  output logic [WIDTH-1:0] sig
);

  logic [WIDTH-1:0] folded;

  always_comb begin
    folded = '0;
    for (int unsigned i = 0; i < IN_W; i++)
      if (MASK[i]) folded[i % WIDTH] ^= obs[i];
  end

  scan_misr #(.WIDTH(WIDTH), .N_IN(WIDTH)) u_misr (
    .clk, .rst_n, .clear, .en, .din(folded), .sig
  );

endmodule
