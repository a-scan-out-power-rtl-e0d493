// bist_lfsr: 16-bit maximal-length pattern generator, X^16+X^15+X^13+X^4+1.
//
// Fibonacci form shifting toward bit 0: every enabled cycle state[i] <= state[i+1]
// and state[15] <= state[15]^state[13]^state[4]^state[0]. Because of that
// shift, stage i+1 now holds what stage i will hold in the next cycle, which the
// phase shifter uses to produce look-ahead bits. The polynomial is the design's
// given one; the shift direction, the seed load and the reset value are choices
// of this implementation.
//
// Interface: load (priority) copies seed into the register; en advances it.
// A zero seed is replaced by 16'h0001 so the register can never lock up.
// Timing: one clock per step; state is registered.
module bist_lfsr
  import lpbist_pkg::*;
#(
  parameter int unsigned WIDTH = LFSR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic fb;
  assign fb = ^(state & LFSR_TAPS[WIDTH-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= WIDTH'(1);
    else if (load)
      state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (en)
      state <= {fb, state[WIDTH-1:1]};
  end

endmodule
