// tb_array_processor: end-to-end testbench of the array processor at its
// default size (12 x 8 PEs, nine sequencers of 8192 words).
//
// Through the host bus only, it loads every local memory and the nine
// sequence memories, starts the array, waits for it to return to idle mode
// and reads the results and counters back. The microprogram runs the
// difference-scheme update
//     q_new(i,j) = 0.5*q(i,j) + 0.125*(q(i,j+1) + q(i,j-1) + q(i-1,j) + q(i+1,j))
// with one grid point per PE, for (OUTER+1)*(INNER+1) time steps in two
// nested loops (lset/lset ... accpbne/bne). Each step broadcasts q to the
// four neighbours' FIFOs, accumulates five products three cycles apart and
// copies the result back with accpbne. The border and corner groups replace
// the terms of missing neighbours by 0.0 * coefficient, so the nine
// sequencers run nine different programs. Before the loops an h-active
// handshake produces one array-wide stall cycle.
//
// Checked: every PE's final q against a double-precision reference, the
// run length in cycles against the program's cycle count, the stall count,
// the multiplication and accumulation counts, and that each mechanism
// (idle/computing mode switch, stall, inner and outer loop branch, accpbne,
// FIFO transfer, accumulation forwarding, halt) happened at least once.
module tb_array_processor;
  import sca_pkg::*;
  localparam int NPE_T = NX * NY;
  localparam int OUTER = 2, INNER = 1;
  localparam int STEPS = (OUTER + 1) * (INNER + 1);
  localparam int BODY  = 36;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we;
  logic [HOST_AW-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic idle;
  int checks = 0, failures = 0;

  array_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_inner = 0, n_outer = 0, n_accpbne = 0, n_push = 0,
      n_fwd = 0, n_halt = 0, n_to_run = 0, n_to_idle = 0;
  logic idle_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (dut.stall) n_stall++;
    if (dut.g_seq[G_INTERNAL].u_seq.loop_taken) begin
      if (dut.g_seq[G_INTERNAL].u_seq.pc == 13'(2 + BODY)) n_inner++;
      else n_outer++;
    end
    if (dut.g_seq[G_INTERNAL].u_seq.running && !dut.stall &&
        dut.g_seq[G_INTERNAL].u_seq.w.ctl == SQ_BNE &&
        dut.g_seq[G_INTERNAL].u_seq.w.uop.acc_sel) n_accpbne++;
    if (dut.u_array.g_row[3].g_col[5].u_pe.push_w_o) n_push++;
    if (dut.u_array.mac_acc_v[0]) n_fwd++;
    if (dut.u_ctrl.mode == M_RUN && &dut.seq_halted) n_halt++;
    if (idle_q && !idle) n_to_run++;
    if (!idle_q && idle) n_to_idle++;
    idle_q <= idle;
  end

  // ---------------- host bus ----------------
  task automatic hw(logic [HOST_AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask
  task automatic hr(logic [HOST_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    host_we = 1'b0; host_addr = a;
    @(negedge clk);
    d = host_rdata;
  endtask
  function automatic logic [HOST_AW-1:0] a_lmem(int pe, int w);
    return {2'd0, 5'd0, 7'(pe), 8'(w)};
  endfunction
  function automatic logic [HOST_AW-1:0] a_seq(int s, int w, int half);
    return {2'd1, 2'd0, 4'(s), 13'(w), 1'(half)};
  endfunction
  function automatic logic [HOST_AW-1:0] a_ctl(int r);
    return {2'd2, 17'd0, 3'(r)};
  endfunction

  // ---------------- single precision <-> real ----------------
  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction
  function automatic logic [31:0] i2f(int n);   // n > 0
    int e;
    e = 0;
    while ((n >> (e + 1)) != 0) e++;
    return {1'b0, 8'(127 + e), 23'((n << (23 - e)) & 32'h7fffff)};
  endfunction

  // ---------------- microprogram ----------------
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

  // memory map of every PE: M[0] q, M[1] 1.0, M[2] q_new, M[3] 0.0,
  // M[4] 0.5, M[5] 0.125
  function automatic seq_word_t w_uop(uop_t u);
    seq_word_t w = '0;
    w.uop = u;
    return w;
  endfunction
  function automatic seq_word_t w_zn();          // nop whose product is 0
    uop_t u = UOP_NOP;
    u.ra1 = 8'd3; u.ra2 = 8'd3;
    return w_uop(u);
  endfunction

  seq_word_t prog [NSEQ][$];

  task automatic build(int g);
    uop_t u;
    seq_word_t w;
    prog[g].delete();
    // 0: h-active handshake (the west border has no west neighbour)
    u = UOP_NOP; u.hprp = 1'b1; u.hchg = 1'b1; u.hdep = has_dir(g, 2);
    prog[g].push_back(w_uop(u));
    // 1: outer loop, 2: inner loop
    w = '0; w.ctl = SQ_LSET; w.addr = 13'd2; w.uop[15:0] = 16'(OUTER);
    prog[g].push_back(w);
    w = '0; w.ctl = SQ_LSET; w.addr = 13'd3; w.uop[15:0] = 16'(INNER);
    prog[g].push_back(w);
    // body
    repeat (7) prog[g].push_back(w_zn());
    u = UOP_NOP; u.ra1 = 8'd0; u.ra2 = 8'd1; u.sign = 1'b1;
    u.wb.nffw = 1'b1; u.wb.sffw = 1'b1; u.wb.wffw = 1'b1; u.wb.effw = 1'b1;
    prog[g].push_back(w_uop(u));
    repeat (7) prog[g].push_back(w_zn());
    u = UOP_NOP; u.ra1 = 8'd0; u.ra2 = 8'd4; u.sign = 1'b1;      // 0.5*q
    prog[g].push_back(w_uop(u));
    for (int d = 0; d < 4; d++) begin
      repeat (2) prog[g].push_back(w_zn());
      u = UOP_NOP; u.sign = 1'b1; u.acc_sel = 1'b1;
      if (!has_dir(g, d)) begin
        u.ra1 = 8'd3; u.ra2 = 8'd5;
      end else if (d < 2) begin
        u.asrc = 1'b1; u.vsrc = (d == 1); u.ra2 = 8'd5;
      end else begin
        u.bsrc = 1'b1; u.hsrc = (d == 3); u.ra1 = 8'd5;
      end
      if (d == 3) begin u.wb.mem_w = 1'b1; u.wb.waddr = 8'd2; end
      prog[g].push_back(w_uop(u));
    end
    repeat (7) prog[g].push_back(w_zn());
    // accpbne: q := 0 + q_new*1.0, close the inner loop
    u = UOP_NOP; u.ra1 = 8'd2; u.ra2 = 8'd1; u.sign = 1'b1; u.acc_sel = 1'b1;
    u.wb.mem_w = 1'b1; u.wb.waddr = 8'd0;
    w = w_uop(u); w.ctl = SQ_BNE;
    prog[g].push_back(w);
    // close the outer loop, halt
    w = '0; w.ctl = SQ_BNE;  prog[g].push_back(w);
    w = '0; w.ctl = SQ_HALT; prog[g].push_back(w);
  endtask

  real q [NX][NY];

  initial begin
    logic [31:0] d;
    int expect_cycles;
    real qn [NX][NY];
    host_we = 1'b0; host_addr = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // local memories
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        int p;
        p = y * NX + x;
        q[x][y] = real'(p + 1);
        hw(a_lmem(p, 0), i2f(p + 1));
        hw(a_lmem(p, 1), 32'h3f800000);
        hw(a_lmem(p, 3), 32'h00000000);
        hw(a_lmem(p, 4), 32'h3f000000);
        hw(a_lmem(p, 5), 32'h3e000000);
      end
    // sequence memories
    for (int g = 0; g < NSEQ; g++) begin
      build(g);
      checks++;
      if (prog[g].size() != 3 + BODY + 2) begin failures++; $display("program size"); end
      for (int i = 0; i < prog[g].size(); i++) begin
        hw(a_seq(g, i, 0), prog[g][i][31:0]);
        hw(a_seq(g, i, 1), prog[g][i][63:32]);
      end
    end
    hr(a_seq(G_LOWER_RIGHT, 10, 0), d);
    checks++;
    if (d != prog[G_LOWER_RIGHT][10][31:0]) begin failures++; $display("seq readback"); end

    // run
    hw(a_ctl(0), 32'h1);
    do hr(a_ctl(0), d); while (d[0] == 1'b0);
    checks++;
    if (d[2:0] != 3'b101) begin failures++; $display("status %b", d[3:0]); end

    // reference
    for (int s = 0; s < STEPS; s++) begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          real v;
          v = 0.5 * q[x][y];
          if (y + 1 < NY) v += 0.125 * q[x][y+1];
          if (y > 0)      v += 0.125 * q[x][y-1];
          if (x > 0)      v += 0.125 * q[x-1][y];
          if (x + 1 < NX) v += 0.125 * q[x+1][y];
          qn[x][y] = v;
        end
      q = qn;
    end
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        real got, err;
        hr(a_lmem(y * NX + x, 0), d);
        got = f2r(d);
        err = got - q[x][y];
        if (err < 0.0) err = -err;
        checks++;
        if (err > 1.0e-5 * q[x][y]) begin
          failures++;
          $display("PE(%0d,%0d): got %g want %g", x, y, got, q[x][y]);
        end
      end

    // cycle count: handshake + stall, lset, per outer iteration lset +
    // inner iterations + bne, halt, the cycle that sees all halted, drain
    expect_cycles = 1 + 1 + 1 + (OUTER + 1) * (1 + BODY * (INNER + 1) + 1) + 1 + 1 + PIPE_DEPTH;
    hr(a_ctl(1), d);
    checks++;
    if (d != 32'(expect_cycles)) begin
      failures++;
      $display("run took %0d cycles, expected %0d", d, expect_cycles);
    end
    hr(a_ctl(2), d);
    checks++;
    if (d != 32'd1) begin failures++; $display("stall cycles %0d", d); end
    // per step and PE: broadcast, 5 terms, copy, and the zero product the
    // copy accumulates onto: 8 multiplications; 4 terms + copy accumulate
    hr(a_ctl(3), d);
    checks++;
    if (d != 32'(NPE_T * 8 * STEPS)) begin failures++; $display("mul count %0d", d); end
    hr(a_ctl(4), d);
    checks++;
    if (d != 32'(NPE_T * 5 * STEPS)) begin failures++; $display("acc count %0d", d); end

    $display("mechanisms: mode->run %0d, mode->idle %0d, stall %0d, inner bne %0d, outer bne %0d, accpbne %0d, FIFO pushes %0d, forwarded accumulations %0d, halt %0d",
             n_to_run, n_to_idle, n_stall, n_inner, n_outer, n_accpbne, n_push, n_fwd, n_halt);
    checks++;
    if (n_to_run == 0 || n_to_idle == 0 || n_stall == 0 || n_inner == 0 || n_outer == 0 ||
        n_accpbne == 0 || n_push == 0 || n_fwd == 0 || n_halt == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    if (n_inner != (OUTER + 1) * INNER || n_outer != OUTER) begin
      failures++;
      $display("loop branch counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
