// tb_plpf: self-checking test of the pseudo low-pass filter.
//
// Exhaustively checks the rounded average of (past, current, future) for every
// input combination, then feeds a random stream through a one-chain filter with
// its output fed back as "past" and checks that the filtered stream toggles
// clearly less often than the raw one.
module tb_plpf;
  localparam int NC = 4;
  logic [NC-1:0] past, cur, fut, si;
  logic [0:0] p1, c1, f1, s1;
  int checks = 0, failures = 0;

  plpf #(.NUM_CHAINS(NC)) dut (.past, .cur, .fut, .si);
  plpf #(.NUM_CHAINS(1))  one (.past(p1), .cur(c1), .fut(f1), .si(s1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {past, cur, fut} = 12'(v);
      #1;
      for (int c = 0; c < NC; c++) begin
        int sum;
        sum = int'(past[c]) + int'(cur[c]) + int'(fut[c]);
        checks++;
        if (si[c] != (sum * 2 > 3)) begin failures++; $display("FAIL v=%0d c=%0d", v, c); end
      end
    end
    begin
      bit raw [0:4001];
      int raw_t = 0, flt_t = 0;
      bit prev = 0;
      for (int i = 0; i < 4002; i++) raw[i] = 1'($urandom);
      for (int i = 0; i < 4000; i++) begin
        p1 = prev; c1 = raw[i]; f1 = raw[i+1];
        #1;
        if (i > 0 && raw[i] != raw[i-1]) raw_t++;
        if (i > 0 && s1 != prev) flt_t++;
        prev = s1;
      end
      $display("raw toggles %0d, filtered toggles %0d", raw_t, flt_t);
      checks++;
      if (!(flt_t * 10 < raw_t * 8)) begin failures++; $display("FAIL toggle reduction"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
