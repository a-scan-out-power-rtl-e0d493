// plpf: pseudo low-pass filter in front of the scan chain inputs.
//
// The scan-in bit of each chain is the rounded moving average of three bits:
// the previous scan-in bit (fed back from the first FF of the chain), the current
// phase-shifter bit and the next one. The rounded average of three bits is their
// majority, so an isolated 1 or 0 in the random stream is removed and the
// scan-in vector toggles less. Using a three-bit window is this design's choice;
// the filter's purpose, its inputs (past, current, future) and its being
// combinational follow the scheme it belongs to.
//
// Purely combinational, one filter per chain.
module plpf #(
  parameter int unsigned NUM_CHAINS = 8
) (
  input  logic [NUM_CHAINS-1:0] past,
  input  logic [NUM_CHAINS-1:0] cur,
  input  logic [NUM_CHAINS-1:0] fut,
  output logic [NUM_CHAINS-1:0] si
);

  assign si = (past & cur) | (past & fut) | (cur & fut);

endmodule
