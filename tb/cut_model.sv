// cut_model: behavioural stand-in for the circuit under test.
//
// Testbench-only. A combinational next-state function over N state bits, mixing
// three kinds of response so that the scan-out control has something to work
// on: bits with i%3==0 mostly toggle (own value inverted unless two other
// bits are both 1), bits with i%3==1
// are rarely 1 (AND of three state bits) and bits with i%3==2 are a
// mostly-stable OR/AND mix. It is not any real benchmark circuit.
module cut_model #(
  parameter int unsigned N = 800
) (
  input  logic [N-1:0] q,
  output logic [N-1:0] resp
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      unique case (i % 3)
        0:       resp[i] = ~q[i] ^ (q[(i + 1) % N] & q[(i + 4) % N]);
        1:       resp[i] = q[(i + 3) % N] & q[(i + 7) % N] & q[(i + 11) % N];
        default: resp[i] = q[(i + 2) % N] | (q[(i + 5) % N] & q[i]);
      endcase
    end
  end
endmodule
