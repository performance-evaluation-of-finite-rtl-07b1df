// tb_array_controller: self-checking testbench of the array controller.
//
// Drives the host bus and stands in for the array and the sequencers. Checks
// the address decoding of the three regions (local memory, sequence memory
// halves, control), the one-cycle read latency, that memory writes are
// refused in computing mode, the start pulse, the computing -> drain -> idle
// sequence after all sequencers halt (eight drain cycles, extended by a
// stall), and the cycle, stall, multiplication and accumulation counters.
module tb_array_controller;
  import sca_pkg::*;
  localparam int NP = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we;
  logic [21:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic idle, pe_we;
  logic [1:0] pe_sel;
  logic [7:0] pe_addr;
  logic [31:0] pe_rdata;
  logic stall, fifo_err;
  logic [NP-1:0] mac_mul_v, mac_acc_v;
  logic seq_start, seq_half;
  logic [NSEQ-1:0] seq_we, seq_halted;
  logic [12:0] seq_addr;
  logic [31:0] seq_rdata [NSEQ];
  logic [31:0] wdata;
  int checks = 0, failures = 0;

  array_controller #(.NPE(NP), .PW(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  function automatic logic [21:0] a_lmem(int pe, int w);
    return {2'd0, 5'd0, 7'(pe), 8'(w)};
  endfunction
  function automatic logic [21:0] a_seq(int s, int w, int half);
    return {2'd1, 2'd0, 4'(s), 13'(w), 1'(half)};
  endfunction
  function automatic logic [21:0] a_ctl(int r);
    return {2'd2, 17'd0, 3'(r)};
  endfunction

  task automatic rd(logic [21:0] a, output logic [31:0] d);
    @(negedge clk);
    host_addr = a; host_we = 1'b0;
    @(negedge clk);
    d = host_rdata;
  endtask

  initial begin
    logic [31:0] d;
    int run_cycles;
    host_we = 1'b0; host_addr = '0; host_wdata = '0; stall = 1'b0; fifo_err = 1'b0;
    mac_mul_v = '0; mac_acc_v = '0; seq_halted = '0;
    pe_rdata = 32'h1234_5678;
    for (int s = 0; s < NSEQ; s++) seq_rdata[s] = 32'(32'hA000_0000 + s);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // local memory write decode
    host_we = 1'b1; host_addr = a_lmem(3, 8'h45); host_wdata = 32'hdead_beef;
    #1;
    checks++;
    if (!(pe_we && pe_sel == 2'd3 && pe_addr == 8'h45 && wdata == 32'hdead_beef && seq_we == '0))
      begin failures++; $display("lmem write decode"); end
    // sequence memory write decode, high half of sequencer 7
    host_addr = a_seq(7, 100, 1);
    #1;
    checks++;
    if (!(seq_we == 9'b010000000 && seq_addr == 13'd100 && seq_half && !pe_we))
      begin failures++; $display("seq write decode %b", seq_we); end
    @(negedge clk);
    host_we = 1'b0;
    rd(a_lmem(1, 3), d);  chk("lmem read", d, 32'h1234_5678);
    rd(a_seq(5, 1, 0), d); chk("seq read", d, 32'hA000_0005);
    rd(a_ctl(0), d);       chk("status idle", d, 32'h1);
    // start
    @(negedge clk);
    host_we = 1'b1; host_addr = a_ctl(0); host_wdata = 32'h1;
    #1;
    checks++;
    if (!seq_start) begin failures++; $display("no start pulse"); end
    @(negedge clk);
    host_we = 1'b0;
    checks++;
    if (idle) begin failures++; $display("not computing after start"); end
    // writes refused while computing
    host_we = 1'b1; host_addr = a_lmem(0, 0);
    #1;
    checks++;
    if (pe_we || seq_start) begin failures++; $display("write accepted while computing"); end
    host_addr = a_seq(0, 0, 0);
    #1;
    checks++;
    if (seq_we != '0) begin failures++; $display("seq write accepted while computing"); end
    host_we = 1'b0;
    // 20 computing cycles: 3 stall, all 4 PEs multiply, 2 accumulate
    for (int i = 0; i < 20; i++) begin
      stall = (i >= 5 && i < 8);
      mac_mul_v = stall ? '0 : '1;
      mac_acc_v = stall ? '0 : 4'b0011;
      @(negedge clk);
    end
    stall = 1'b0; mac_mul_v = '0; mac_acc_v = '0;
    seq_halted = '1;
    @(negedge clk);                     // controller sees all halted: drain
    run_cycles = 21;
    for (int i = 0; i < 10; i++) begin
      stall = (i == 2);
      if (!idle) run_cycles++;
      @(negedge clk);
    end
    stall = 1'b0;
    checks++;
    if (!idle) begin failures++; $display("did not return to idle"); end
    // drain: 8 unstalled cycles + 1 stalled
    rd(a_ctl(1), d); chk("cycle count", d, 32'(20 + 1 + 9));
    rd(a_ctl(2), d); chk("stall count", d, 32'd4);
    rd(a_ctl(3), d); chk("mul count", d, 32'(17 * 4));
    rd(a_ctl(4), d); chk("acc count", d, 32'(17 * 2));
    fifo_err = 1'b1;
    rd(a_ctl(0), d); chk("status halted", d, 32'b1101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
