// phase_shifter: spreads one LFSR over NUM_CHAINS scan chains.
//
// Channel c is the XOR of three LFSR stages (lpbist_pkg::psf_taps). Alongside
// the current bit cur[c] it produces fut[c], the value cur[c] will take one LFSR
// step later: since the LFSR shifts toward bit 0, that is the XOR of the stages
// one position higher. The pseudo low-pass filter needs both. The XOR-network
// form of the phase shifter is standard; the tap choice is this design's own.
//
// Purely combinational.
module phase_shifter
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = 8
) (
  input  logic [LFSR_W-1:0]     state,
  output logic [NUM_CHAINS-1:0] cur,
  output logic [NUM_CHAINS-1:0] fut
);

  always_comb begin
    for (int unsigned c = 0; c < NUM_CHAINS; c++) begin
      cur[c] = ^(state & psf_taps(c));
      fut[c] = ^(state & (psf_taps(c) << 1));
    end
  end

endmodule
