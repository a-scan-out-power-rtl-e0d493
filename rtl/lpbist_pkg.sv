// lpbist_pkg: types and constants shared by the low-power multi-cycle BIST.
//
// The LFSR polynomial X^16+X^15+X^13+X^4+1, the 100-FF scan chain length, the
// 10 slow + 10 fast capture cycles and the 30k pattern count are the values the
// design is built for. The phase-shifter tap choice and the default placement of
// the controllable flip-flops are this design's own choices: in practice the
// placement comes out of an offline selection flow run on the real circuit.
package lpbist_pkg;

  // How the selected ("controllable") flip-flops are filled at the last capture.
  typedef enum logic [0:0] {
    FILL_ZERO = 1'b0,   // 0-filling
    FILL_ADJ  = 1'b1    // adjacent-value filling (value of the scan-in-side neighbour)
  } fill_mode_e;

  localparam int unsigned LFSR_W = 16;

  // Feedback taps of the Fibonacci LFSR for X^16+X^15+X^13+X^4+1 (bit i = x^i term,
  // x^16 implied). See bist_lfsr for the shift direction.
  localparam logic [LFSR_W-1:0] LFSR_TAPS = 16'b1010_0000_0001_0001; // x^15, x^13, x^4, x^0

  // Phase-shifter channel c XORs three LFSR stages. All taps lie at or below
  // stage 14 so that the same channel one cycle in the future is available as the
  // XOR of the stages one position higher.
  function automatic logic [LFSR_W-1:0] psf_taps(input int unsigned c);
    logic [LFSR_W-1:0] m;
    m = '0;
    m[c % 15]        = 1'b1;
    m[(c + 5) % 15]  = 1'b1;
    m[(c + 11) % 15] = 1'b1;
    return m;
  endfunction

  // Default controllable-FF placement: 20% observation FFs at positions p%5==2 and
  // 20% LSWF-FFs at p%5==4 (position 0 is the scan-in end). Neither kind sits next
  // to another controllable FF, so every filled FF copies an uncontrolled neighbour.
  function automatic logic [1023:0] default_obs_mask(input int unsigned len);
    logic [1023:0] m;
    m = '0;
    for (int unsigned p = 0; p < len && p < 1024; p++) m[p] = (p % 5 == 2);
    return m;
  endfunction

  function automatic logic [1023:0] default_lswf_mask(input int unsigned len);
    logic [1023:0] m;
    m = '0;
    for (int unsigned p = 0; p < len && p < 1024; p++) m[p] = (p % 5 == 4);
    return m;
  endfunction

endpackage
