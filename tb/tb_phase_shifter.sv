// tb_phase_shifter: self-checking test of the phase shifter.
//
// Drives random LFSR states and checks each channel against the XOR of its three
// stages (c, c+5, c+11 modulo 15), and that the look-ahead output equals the
// current output of the state one LFSR step later, computed here from the
// polynomial X^16+X^15+X^13+X^4+1.
module tb_phase_shifter;
  localparam int NC = 8;
  logic [15:0]   state;
  logic [NC-1:0] cur, fut;
  logic [15:0]   nstate;
  logic [NC-1:0] ncur, nfut;
  int checks = 0, failures = 0;

  phase_shifter #(.NUM_CHAINS(NC)) dut  (.state(state),  .cur(cur),  .fut(fut));
  phase_shifter #(.NUM_CHAINS(NC)) dut2 (.state(nstate), .cur(ncur), .fut(nfut));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      state  = 16'($urandom);
      nstate = {state[15] ^ state[13] ^ state[4] ^ state[0], state[15:1]};
      #1;
      for (int c = 0; c < NC; c++) begin
        bit e;
        e = state[c % 15] ^ state[(c + 5) % 15] ^ state[(c + 11) % 15];
        checks++;
        if (cur[c] != e) begin failures++; $display("FAIL cur c=%0d state=%h", c, state); end
        checks++;
        if (fut[c] != ncur[c]) begin failures++; $display("FAIL fut c=%0d state=%h", c, state); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
