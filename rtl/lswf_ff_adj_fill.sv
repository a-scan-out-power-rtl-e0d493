// lswf_ff_adj_fill: low-switching-frequency flip-flop with conditional
// adjacent-value filling.
//
// At the last capture (lcap) the cell checks whether it would switch (XNOR of
// di and q). If not, it takes its scan-in-side neighbour's captured value adj_di;
// if it would switch, it keeps its own response so the transition stays
// observable. The gate-level form of this cell drives the FF's asynchronous set and reset
// from NANDs of CLK and LCAP through two AND gates with the XNOR; this
// implementation takes the same decision synchronously at the capture edge.
//
// Interface: se selects shift (q <= si) over capture; rst_n is an asynchronous
// active-low reset to 0. Timing: one register, updated on the rising clock edge.
// lcap is only meaningful in capture mode (se = 0).
module lswf_ff_adj_fill (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic di,
  input  logic adj_di,
  input  logic lcap,
  output logic q
);

  logic no_switch;
  assign no_switch = ~(di ^ q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 q <= 1'b0;
    else if (se)                q <= si;
    else if (lcap && no_switch) q <= adj_di;
    else                        q <= di;
  end

endmodule
