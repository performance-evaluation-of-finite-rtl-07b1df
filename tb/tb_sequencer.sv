// tb_sequencer: self-checking testbench of the shared sequencer.
//
// Loads a microprogram with two nested loops (outer body run 3 times, inner
// body run 2 times, the inner loop closed by accpbne) through the host port,
// reads it back, runs it with random stall cycles and compares the issued
// microoperation stream, cycle by cycle on unstalled cycles, with the stream
// worked out by hand. Also checks the cycle count to halt (24 issue cycles)
// and that a halted sequencer issues nops.
module tb_sequencer;
  import sca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, stall = 1'b0;
  uop_t uop;
  logic running, halted, loop_taken;
  logic host_we = 1'b0, host_half = 1'b0;
  logic [12:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  sequencer #(.WORDS(8192), .AW(13), .DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic seq_word_t w_op(logic [7:0] tag);
    seq_word_t w = '0;
    w.uop.ra1 = tag;
    w.uop.wb.mem_w = 1'b1;
    return w;
  endfunction
  function automatic seq_word_t w_lset(int num, int addr);
    seq_word_t w = '0;
    w.ctl = SQ_LSET;
    w.addr = 13'(addr);
    w.uop[15:0] = 16'(num);
    return w;
  endfunction

  seq_word_t prog [8];
  logic [7:0] expect_q [$];
  int taken = 0;

  task automatic wr(int a, logic [63:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = 13'(a);
    host_half = 1'b0; host_wdata = d[31:0];
    @(negedge clk);
    host_half = 1'b1; host_wdata = d[63:32];
    @(negedge clk);
    host_we = 1'b0;
  endtask

  initial begin
    prog[0] = w_op(8'h01);
    prog[1] = w_lset(2, 2);            // outer: 3 iterations
    prog[2] = w_op(8'h10);
    prog[3] = w_lset(1, 4);            // inner: 2 iterations
    prog[4] = w_op(8'h20);
    prog[5] = w_op(8'h30); prog[5].ctl = SQ_BNE;   // accpbne
    prog[6] = '0;          prog[6].ctl = SQ_BNE;   // bne
    prog[7] = '0;          prog[7].ctl = SQ_HALT;
    expect_q.push_back(8'h01);
    expect_q.push_back(8'h00);
    repeat (3) begin
      expect_q.push_back(8'h10); expect_q.push_back(8'h00);
      expect_q.push_back(8'h20); expect_q.push_back(8'h30);
      expect_q.push_back(8'h20); expect_q.push_back(8'h30);
      expect_q.push_back(8'h00);
    end
    expect_q.push_back(8'h00);          // halt

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) wr(i, prog[i]);
    // read back
    for (int i = 0; i < 8; i++) begin
      host_addr = 13'(i);
      host_half = 1'b0; #1; checks++;
      if (host_rdata != prog[i][31:0]) failures++;
      host_half = 1'b1; #1; checks++;
      if (host_rdata != prog[i][63:32]) failures++;
    end

    for (int pass = 0; pass < 2; pass++) begin
      int issue, idx;
      issue = 0;
      idx = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!halted && issue < 200) begin
        stall = (pass == 1) && ($urandom_range(0, 2) == 0);
        #1;
        if (!stall) begin
          checks++;
          if (idx >= expect_q.size() || uop.ra1 != expect_q[idx] ||
              uop.wb.mem_w != (expect_q[idx] != 8'h00)) begin
            failures++;
            $display("pass %0d issue %0d: ra1=%h", pass, idx, uop.ra1);
          end
          if (loop_taken) taken++;
          idx++;
          issue++;
        end
        @(negedge clk);
      end
      stall = 1'b0;
      checks++;
      if (idx != 24) begin
        failures++;
        $display("pass %0d: halted after %0d issue cycles, expected 24", pass, idx);
      end
      repeat (3) begin
        @(negedge clk);
        checks++;
        if (uop != UOP_NOP || running) failures++;
      end
    end
    checks++;
    if (taken != 2 * (3 + 2)) begin   // per run: 3 inner + 2 outer branches
      failures++;
      $display("loop branches %0d", taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
