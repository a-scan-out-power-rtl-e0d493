// lswf_ff_zero_fill: low-switching-frequency flip-flop with conditional 0-filling.
//
// An LSWF-FF almost never changes at the last capture, so that capture detects
// little through it. At the last capture (lcap) the cell compares its captured
// value di with its present value q (the XNOR of the gate-level cell). If
// they are equal, the FF would not switch and it is cleared to 0; if they differ,
// the transition is kept so that a delay fault it exposes still reaches scan-out.
// The gate-level form of this cell does this with an asynchronous reset gated by
// AND(CLK, LCAP) and the XNOR, with a buffer on DO for hold timing; this
// implementation makes the same decision synchronously at the capture edge.
//
// Interface: se selects shift (q <= si) over capture; rst_n is an asynchronous
// active-low reset to 0. Timing: one register, updated on the rising clock edge.
// lcap is only meaningful in capture mode (se = 0).
module lswf_ff_zero_fill (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic di,
  input  logic lcap,
  output logic q
);

  logic no_switch;
  assign no_switch = ~(di ^ q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 q <= 1'b0;
    else if (se)                q <= si;
    else if (lcap && no_switch) q <= 1'b0;
    else                        q <= di;
  end

endmodule
