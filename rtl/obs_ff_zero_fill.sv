// obs_ff_zero_fill: observation flip-flop with 0-filling at the last capture.
//
// An observation FF is also read by the capture compactor during the multi-cycle
// test, so its value after the last capture is not needed for fault detection.
// At the last capture (lcap) it is cleared to 0 instead of capturing di, which
// makes the scan-out vector contain more 0s. The gate-level form of this cell drives the
// FF's reset from NAND(CLK, LCAP), an asynchronous pulse right after the last
// capture edge; here the same outcome is produced synchronously by selecting 0 at
// that edge, so the cell needs no gated reset. The 0 value follows the design
// (0 appears more often than 1 in scan-out data); the synchronous form is this
// implementation's choice.
//
// Interface: se selects shift (q <= si) over capture; rst_n is an asynchronous
// active-low reset to 0. Timing: one register, updated on the rising clock edge.
// lcap is only meaningful in capture mode (se = 0).
module obs_ff_zero_fill (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic si,
  input  logic di,
  input  logic lcap,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (se)   q <= si;
    else if (lcap) q <= 1'b0;
    else           q <= di;
  end

endmodule
