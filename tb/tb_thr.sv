// tb_thr: self-checking test of the transmitter hold register.
//
// A queue stands in for the buffer (registered output, one-clock read) and
// a random ready signal for the shift register. The test checks that the
// THR reads only when the buffer is not empty and it is empty itself, that
// it never hands over a byte while the TSR is busy, that the bytes reach
// the TSR in buffer order without loss or duplication, and the hand-off
// latency: buffer not empty and TSR ready gives tsr_load two clocks later.
module tb_thr;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       lilo_empty, lilo_rd, tsr_ready = 1'b0, tsr_load, thr_valid;
  logic [7:0] lilo_data = '0, thr_data;
  logic [7:0] buffer[$], sent[$];
  int         checks = 0, failures = 0, next = 0, got = 0;

  always #5 clk = ~clk;

  thr dut (.*);

  assign lilo_empty = (buffer.size() == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // buffer model: a read pops into the registered output
  always @(posedge clk) if (rst_n) begin
    automatic bit r = lilo_rd, l = tsr_load, rdy = tsr_ready, e = lilo_empty;
    automatic logic [7:0] q = thr_data;
    if (r) check(!e, "read from an empty buffer");
    if (l) begin
      check(rdy, "load while TSR busy");
      check(sent.size() > 0 && q == sent[0], $sformatf("byte %0d out of order: %h", got, q));
      if (sent.size() > 0) void'(sent.pop_front());
      got++;
    end
    if (r && !e) lilo_data <= buffer.pop_front();
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // latency from an idle start
    @(negedge clk);
    tsr_ready = 1'b1;
    buffer.push_back(8'h3C); sent.push_back(8'h3C); next++;
    t0 = 0;
    do begin @(posedge clk); #1; t0++; end while (!tsr_load && t0 < 10);
    check(t0 == 2, $sformatf("first tsr_load after %0d clocks, expected 2", t0));
    @(posedge clk);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      tsr_ready = 1'($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 2) == 0 && buffer.size() < 16) begin
        automatic logic [7:0] b = 8'($urandom);
        buffer.push_back(b); sent.push_back(b); next++;
      end
    end
    @(negedge clk);
    tsr_ready = 1'b1;
    repeat (60) @(posedge clk);
    check(got == next, $sformatf("%0d bytes handed over of %0d", got, next));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
