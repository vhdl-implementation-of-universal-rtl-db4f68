// tb_rhr: self-checking test of the receive hold register.
//
// Random words arrive with done while a random fifo_full holds the buffer
// back. A model decides when the held word must be written (first cycle
// the buffer is not full) and when a new word is lost (it arrives while the
// held one cannot leave). Writes, their data and overrun pulses are
// compared every clock.
module tb_rhr;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       done = 1'b0, fifo_full = 1'b0;
  logic [7:0] data_in = '0, data_out;
  logic       fifo_wr, overrun;
  logic       m_full = 1'b0;
  logic [7:0] m_data = '0;
  int         checks = 0, failures = 0, nwr = 0, nov = 0;

  always #5 clk = ~clk;

  rhr dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ewr, eov;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      done      = ($urandom_range(0, 3) == 0);
      data_in   = 8'($urandom);
      fifo_full = ($urandom_range(0, 2) == 0);
      ewr = m_full && !fifo_full;
      eov = done && m_full && !ewr;
      #1;
      check(fifo_wr == ewr, "fifo_wr");
      check(overrun == eov, "overrun");
      if (ewr) check(data_out == m_data, $sformatf("written %h expected %h", data_out, m_data));
      nwr += ewr; nov += eov;
      if (done && !eov) begin
        m_data = data_in;
        m_full = 1'b1;
      end else if (ewr) m_full = 1'b0;
    end
    check(nwr > 100 && nov > 10, "writes and overruns both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
