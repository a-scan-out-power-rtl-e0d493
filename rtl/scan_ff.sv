// scan_ff: plain mux-D scan flip-flop, used for every uncontrolled position.
//
// In shift mode it takes the scan input, otherwise it captures the circuit
// response di. It has no last-capture control.
//
// Interface: se selects shift (q <= si) over capture; rst_n is an asynchronous
// active-low reset to 0. Timing: one register, updated on the rising clock edge.
module scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic di,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (se) q <= si;
    else         q <= di;
  end

endmodule
