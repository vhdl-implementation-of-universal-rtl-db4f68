// tb_lilo_fifo: self-checking test of the 16-byte first-in first-out buffer.
//
// Fills the buffer to full (and tries one write too many), drains it and
// checks the order, then runs random reads and writes against a queue
// model, comparing dataout, liloempty and lilofull every clock. Inputs
// change on the falling edge; outputs are checked just after the rising
// edge.
module tb_lilo_fifo;
  localparam int DEPTH = 16;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0, rd = 1'b0;
  logic [7:0] datain = '0, dataout;
  logic       liloempty, lilofull;
  int         checks = 0, failures = 0;
  logic [7:0] model[$];
  logic [7:0] exp_out = '0;

  always #5 clk = ~clk;

  lilo_fifo #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // one clock with the given inputs; the model follows the same rules
  task automatic step(input bit w, input bit r, input logic [7:0] d);
    bit full_now, empty_now;
    @(negedge clk);
    wr = w; rd = r; datain = d;
    full_now  = (model.size() == DEPTH);
    empty_now = (model.size() == 0);
    @(posedge clk);
    #1;
    if (r && !empty_now) exp_out = model.pop_front();
    if (w && !full_now) model.push_back(d);
    check(dataout == exp_out, $sformatf("dataout %h, expected %h", dataout, exp_out));
    check(liloempty == (model.size() == 0), "liloempty");
    check(lilofull == (model.size() == DEPTH), "lilofull");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(liloempty && !lilofull && dataout == 8'h00, "reset state");
    // fill, then one write too many
    for (int i = 0; i < DEPTH + 1; i++) step(1, 0, 8'(8'hA0 + i));
    check(lilofull, "full after 16 writes");
    // drain in order, then one read too many
    for (int i = 0; i < DEPTH; i++) begin
      step(0, 1, 8'h00);
      check(dataout == 8'(8'hA0 + i), $sformatf("order: read %0d gave %h", i, dataout));
    end
    step(0, 1, 8'h00);
    check(dataout == 8'hAF, "read while empty keeps dataout");
    // random traffic
    for (int i = 0; i < 4000; i++)
      step(1'($urandom_range(0, 99) < 55), 1'($urandom_range(0, 99) < 50), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
