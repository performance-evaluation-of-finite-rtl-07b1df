// tb_systolic_array: self-checking testbench of the PE mesh (4 x 3 PEs).
//
// Every PE gets a distinct value v = index+1 in M[0] through the host port.
// The nine group sequences (driven directly here) then
//   1. send M[0]*1.0 to all four neighbours in one operation,
//   2. sum what arrived from the existing neighbours, N, S, W and E terms
//      three cycles apart over the accumulation path, into M[2]; a term
//      whose neighbour is missing (border groups) reads the constant 0.0 in
//      M[3] instead of a FIFO, which is why the groups need their own
//      sequences,
//   3. run an operation that waits for the h-active register, which the
//      west neighbour sets in the same cycle: a one-cycle array-wide stall.
// M[2] of every PE is read back and compared with the sum of its
// neighbours' values computed by the testbench.
module tb_systolic_array;
  import sca_pkg::*;
  localparam int NXT = 4, NYT = 3, NP = NXT * NYT;
  logic clk = 1'b0, rst_n = 1'b0;
  uop_t uop_g [NSEQ];
  logic stall, idle, host_we, fifo_err;
  logic [$clog2(NP)-1:0] host_pe;
  logic [7:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic [NP-1:0] mac_mul_v, mac_acc_v;
  int checks = 0, failures = 0, stall_cycles = 0;

  systolic_array #(.NX_P(NXT), .NY_P(NYT), .MEM_WORDS_P(256), .FIFO_DEPTH_P(32),
                   .NPE(NP), .PW($clog2(NP))) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (stall && rst_n) stall_cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // small non-negative integer to single precision
  function automatic logic [31:0] i2f(int n);
    int e;
    if (n == 0) return 32'd0;
    e = 0;
    while ((n >> (e + 1)) != 0) e++;
    return {1'b0, 8'(127 + e), 23'((n << (23 - e)) & 32'h7fffff)};
  endfunction

  function automatic bit has_dir(int g, int d);   // d: 0 N, 1 S, 2 W, 3 E
    bit up, lo, l, r;
    up = (g == G_UPPER) || (g == G_UPPER_LEFT) || (g == G_UPPER_RIGHT);
    lo = (g == G_LOWER) || (g == G_LOWER_LEFT) || (g == G_LOWER_RIGHT);
    l  = (g == G_LEFT)  || (g == G_UPPER_LEFT) || (g == G_LOWER_LEFT);
    r  = (g == G_RIGHT) || (g == G_UPPER_RIGHT) || (g == G_LOWER_RIGHT);
    case (d)
      0: return !up;
      1: return !lo;
      2: return !l;
      default: return !r;
    endcase
  endfunction

  // term d of the neighbour sum for group g
  function automatic uop_t term(int g, int d, bit last);
    uop_t u = UOP_NOP;
    u.sign = 1'b1;
    u.acc_sel = (d != 0);
    if (!has_dir(g, d)) begin
      u.ra1 = 8'd3; u.ra2 = 8'd1;           // 0.0 * 1.0
    end else if (d < 2) begin
      u.asrc = 1'b1; u.vsrc = (d == 1); u.ra2 = 8'd1;   // FIFO * 1.0
    end else begin
      u.bsrc = 1'b1; u.hsrc = (d == 3); u.ra1 = 8'd1;   // 1.0 * FIFO
    end
    if (last) begin u.wb.mem_w = 1'b1; u.wb.waddr = 8'd2; end
    return u;
  endfunction

  task automatic step_all(uop_t u [NSEQ]);
    uop_g = u;
    @(posedge clk);
    #1;
    while (stall) begin @(posedge clk); #1; end
  endtask

  task automatic nops(int n);
    uop_t u [NSEQ];
    for (int g = 0; g < NSEQ; g++) u[g] = UOP_NOP;
    repeat (n) step_all(u);
  endtask

  initial begin
    uop_t u [NSEQ];
    for (int g = 0; g < NSEQ; g++) uop_g[g] = UOP_NOP;
    idle = 1'b1; host_we = 1'b0; host_pe = '0; host_addr = '0; host_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      for (int a = 0; a < 4; a++) begin
        @(negedge clk);
        host_we = 1'b1; host_pe = 4'(p); host_addr = 8'(a);
        host_wdata = (a == 0) ? i2f(p + 1) : (a == 1) ? 32'h3f800000 : 32'd0;
      end
    end
    @(negedge clk);
    host_we = 1'b0;
    idle = 1'b0;
    // 1. broadcast M[0]*1.0 to all neighbours
    for (int g = 0; g < NSEQ; g++) begin
      u[g] = UOP_NOP; u[g].ra1 = 8'd0; u[g].ra2 = 8'd1; u[g].sign = 1'b1;
      u[g].wb.nffw = 1'b1; u[g].wb.sffw = 1'b1; u[g].wb.wffw = 1'b1; u[g].wb.effw = 1'b1;
    end
    step_all(u);
    nops(7);
    // 2. four-term neighbour sum, terms three cycles apart
    for (int d = 0; d < 4; d++) begin
      for (int g = 0; g < NSEQ; g++) u[g] = term(g, d, d == 3);
      step_all(u);
      if (d != 3) nops(2);
    end
    // 3. h-active handshake: one stall cycle
    for (int g = 0; g < NSEQ; g++) begin
      u[g] = UOP_NOP; u[g].hprp = 1'b1; u[g].hchg = 1'b1;
      u[g].hdep = has_dir(g, 2);
    end
    step_all(u);
    nops(10);
    checks++;
    if (stall_cycles != 1) begin failures++; $display("stall cycles %0d, want 1", stall_cycles); end
    checks++;
    if (fifo_err) begin failures++; $display("FIFO error"); end
    @(negedge clk);
    idle = 1'b1;
    for (int y = 0; y < NYT; y++)
      for (int x = 0; x < NXT; x++) begin
        int s;
        s = 0;
        if (y + 1 < NYT) s += (y + 1) * NXT + x + 1;
        if (y > 0)       s += (y - 1) * NXT + x + 1;
        if (x > 0)       s += y * NXT + x - 1 + 1;
        if (x + 1 < NXT) s += y * NXT + x + 1 + 1;
        host_pe = 4'(y * NXT + x); host_addr = 8'd2;
        #1;
        checks++;
        if (host_rdata != i2f(s)) begin
          failures++;
          $display("PE(%0d,%0d) sum %h want %h", x, y, host_rdata, i2f(s));
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
