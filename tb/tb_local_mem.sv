// tb_local_mem: self-checking testbench of the 256 x 32 local memory.
//
// Writes every word, then performs random writes and dual reads against a
// model array, checking that the two read ports are independent and that a
// read in the cycle of a write to the same word returns the old value.
module tb_local_mem;
  logic clk = 1'b0;
  logic [7:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic        we;
  int checks = 0, failures = 0;
  logic [31:0] model [256];

  local_mem #(.WORDS(256), .AW(8), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; raddr1 = '0; raddr2 = '0; waddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      we = 1'b1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      we     = $urandom_range(0, 1) == 1;
      waddr  = 8'($urandom);
      wdata  = $urandom;
      raddr1 = (i % 7 == 0) ? waddr : 8'($urandom);
      raddr2 = 8'($urandom);
      #1;
      checks += 2;
      if (rdata1 != model[raddr1]) begin failures++; $display("rd1 @%0d", raddr1); end
      if (rdata2 != model[raddr2]) begin failures++; $display("rd2 @%0d", raddr2); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
