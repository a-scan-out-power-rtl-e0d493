// obs_ff_adj_fill: observation flip-flop with adjacent-value filling.
//
// At the last capture (lcap) the FF takes the value its neighbour on the
// scan-in side is capturing (adj_di, that neighbour's data input) instead of its
// own response, so it repeats its neighbour in the scan-out stream and cannot
// form an isolated 0 or 1. The gate-level form of this cell gates CLK and LCAP through an
// AND gate into two NANDs that drive the FF's asynchronous set and reset from
// adj_di and its inverse; here the same value is selected synchronously at the
// capture edge.
//
// Interface: se selects shift (q <= si) over capture; rst_n is an asynchronous
// active-low reset to 0. Timing: one register, updated on the rising clock edge.
// lcap is only meaningful in capture mode (se = 0).
module obs_ff_adj_fill (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic di,
  input  logic adj_di,
  input  logic lcap,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (se)   q <= si;
    else if (lcap) q <= adj_di;
    else           q <= di;
  end

endmodule
