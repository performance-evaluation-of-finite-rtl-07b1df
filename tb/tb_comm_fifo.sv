// tb_comm_fifo: self-checking testbench of the communication FIFO.
//
// Random pushes and pops against a queue model, checking the head word, the
// empty and full flags and the overflow/underflow pulses, including filling
// the FIFO to its 32 entries and pushing into it once more.
module tb_comm_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [31:0] din = '0, dout;
  logic empty, full, overflow, underflow;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  comm_fifo #(.DEPTH(32), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit pu, bit po);
    push = pu; pop = po; din = $urandom;
    #1;
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == 32) ||
        overflow != (pu && q.size() == 32) || underflow != (po && q.size() == 0)) begin
      failures++;
      $display("flags: size=%0d empty=%b full=%b ovf=%b udf=%b", q.size(), empty, full, overflow, underflow);
    end
    if (q.size() != 0) begin
      checks++;
      if (dout != q[0]) begin
        failures++;
        $display("head %h want %h", dout, q[0]);
      end
    end
    @(posedge clk);
    begin
      int n;
      n = q.size();
      if (po && n != 0) void'(q.pop_front());
      if (pu && n < 32) q.push_back(din);   // a push into a full FIFO is lost
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    step(0, 1);                              // underflow on empty
    for (int i = 0; i < 33; i++) step(1, 0); // fill, then one overflow
    for (int i = 0; i < 40; i++) step(0, 1); // drain and underflow
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 2) != 0, $urandom_range(0, 2) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
