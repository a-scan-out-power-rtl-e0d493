// tb_bist_lfsr: self-checking test of the 16-bit pattern LFSR.
//
// A reference sequence is built independently from the recurrence of
// X^16+X^15+X^13+X^4+1 (a[n+16] = a[n+15]^a[n+13]^a[n+4]^a[n]) on the bit stream
// leaving stage 0, and compared bit by bit with the register for a few hundred
// steps. It also checks seed loading, hold when disabled, the zero-seed guard and
// that the period is the maximal 65535 steps.
module tb_bist_lfsr;
  logic        clk = 0, rst_n = 0, load = 0, en = 0;
  logic [15:0] seed = '0, state;
  int checks = 0, failures = 0;

  bist_lfsr dut (.clk, .rst_n, .load, .seed, .en, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit a[0:1023];
  int unsigned period;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 16'h0001, "reset value");
    seed = 16'hACE1; load = 1;
    @(negedge clk); load = 0;
    check(state == 16'hACE1, "seed load");
    // reference stream: first 16 bits are the seed, LSB first
    for (int i = 0; i < 16; i++) a[i] = seed[i];
    for (int n = 0; n + 16 < 1024; n++) a[n+16] = a[n+15] ^ a[n+13] ^ a[n+4] ^ a[n];
    en = 1;
    for (int n = 1; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++)
        if (state[i] != a[n+i]) begin
          check(0, $sformatf("step %0d stage %0d", n, i));
          break;
        end
      checks++;
    end
    en = 0;
    begin
      logic [15:0] held;
      held = state;
      repeat (3) @(negedge clk);
      check(state == held, "hold when en=0");
    end
    seed = 16'h0000; load = 1;
    @(negedge clk); load = 0;
    check(state == 16'h0001, "zero seed guard");
    en = 1; period = 0;
    do begin @(negedge clk); period++; end while (state != 16'h0001 && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
