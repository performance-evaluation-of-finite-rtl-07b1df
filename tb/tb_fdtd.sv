// tb_fdtd: the 2D FDTD workload on the array processor at its default size.
//
// Runs the two-dimensional FDTD computation (TE mode: Ex, Ey, Hz) on an
// N x N grid, first N = 72 with the wave source at (5, 8), then N = 48 with
// the source at (3, 5), for 1600 time steps each. The grid is split into
// one (N/12) x (N/8) block per PE (6 x 9 points for N = 72). Coefficients
// follow dx = dy = 5 mm, dt = 1/(80 * 2.45e9) s, eps = 8.854e-12, sigma = 0,
// mu = 4*pi*1e-7; the source drives Hz with a square wave of amplitude 1
// and period 80 steps. Per time step:
//   Ex(i,j) = a*Ex(i,j) + b*(Hz(i,j) - Hz(i,j-1))
//   Ey(i,j) = a*Ey(i,j) - c*(Hz(i,j) - Hz(i-1,j))
//   Hz(i,j) = Hz(i,j) - d*(Ey(i+1,j) - Ey(i,j)) + e*(Ex(i,j+1) - Ex(i,j))
//   Hz(source) = +1 or -1
//   Hz(edge) = Hz_old(inner) + k*(Hz(inner) - Hz_old(edge))   (Mur, first
//              order, k = (v*dt - dx)/(v*dt + dx), v = 1/sqrt(eps*mu))
// with values outside the grid taken as 0. "edge" is every Hz point on the
// grid border except the four corners (which keep the plain update), and
// "inner" its neighbour one step into the grid.
//
// The testbench writes the microprogram: each update is an accumulation
// chain of 3 (E) or 5 (H) products, three chains interleaved so the MAC
// takes an operand every cycle. Values of neighbouring blocks arrive
// through the FIFOs: the last operation of a chain on a block edge also
// pushes its result to the neighbour, and the neighbour's chain reads the
// FIFO as an operand. Border and corner groups read 0.0 instead of the
// missing neighbour; only the lower-left group has the source point.
// Mur is split in two chains: Hz_old(inner) - k*Hz_old(edge) is formed
// with the E phase, and k*Hz(inner) is added after the H phase. An edge
// point's regular H chain still runs (it pops its FIFO operands) but its
// result is discarded; the point is sent to its neighbour after the Mur
// step. For that to keep the FIFO order, PEs of the left column walk i
// downwards and PEs of the bottom row walk j downwards, so that such a
// point is always the last one sent in its direction. Every group is padded
// to the same step length. The time-step loop is two nested loops:
// 20 periods x (40 steps at +1, 40 at -1). A short prologue sends the
// initial edge values of Hz that the first E phase of the neighbours reads.
//
// The equations and the run parameters follow the original FDTD runs; the
// schedule, the memory layout and the handling of the grid corners are
// this testbench's own. Checked: the Ex, Ey and Hz of all points against a
// double-precision reference (RMS error below 1e-3 of the RMS field, per
// field), the cycle count of the run against the schedule, and that no FIFO
// error occurred. The cycles per time step and the multiplier and adder
// utilisation are printed.
module tb_fdtd;
  import sca_pkg::*;
  localparam int NSTEP_HALF = 40, NPERIOD = 20;     // 1600 steps
  localparam int ZERO = 240, ONE = 241, CA = 242, CB = 243, CC = 244,
                 CD = 245, CE = 246, PLUS = 247, MINUS = 248, CK = 249;
  localparam int TMPB = 192, SCRATCH = 239;         // Mur terms, discarded results
  localparam int EXB = 0, EYB = 64, HZB = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we;
  logic [HOST_AW-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic idle;
  int checks = 0, failures = 0;

  array_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  // ---------------- number formats ----------------
  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction
  function automatic logic [31:0] r2f(real r);   // normal range, truncating
    logic [63:0] d;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  // ---------------- program generation ----------------
  int nx, ny, xs, ys;            // points per PE block, source point
  seq_word_t prog [NSEQ][$];

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

  function automatic uop_t zn();                 // nop with a zero product
    uop_t u = UOP_NOP;
    u.ra1 = 8'(ZERO); u.ra2 = 8'(ZERO);
    return u;
  endfunction
  function automatic uop_t mop(int ra1, int ra2, bit sign, bit acc);
    uop_t u = UOP_NOP;
    u.ra1 = 8'(ra1); u.ra2 = 8'(ra2); u.sign = sign; u.acc_sel = acc;
    return u;
  endfunction

  // Hz points of this block on the grid edge (global corners excluded),
  // each with the neighbouring point inside the grid
  int bnd_i [$], bnd_j [$], inn_i [$], inn_j [$];
  task automatic find_boundary(int g);
    bnd_i.delete(); bnd_j.delete(); inn_i.delete(); inn_j.delete();
    for (int j = 0; j < ny; j++)
      for (int i = 0; i < nx; i++) begin
        bit el, er, elo, eup;
        el = !has_dir(g, 2) && i == 0;      er  = !has_dir(g, 3) && i == nx - 1;
        elo = !has_dir(g, 1) && j == 0;     eup = !has_dir(g, 0) && j == ny - 1;
        if ((el || er) && (elo || eup)) continue;          // grid corner
        if (el)  begin bnd_i.push_back(i); bnd_j.push_back(j); inn_i.push_back(1);      inn_j.push_back(j); end
        if (er)  begin bnd_i.push_back(i); bnd_j.push_back(j); inn_i.push_back(nx - 2); inn_j.push_back(j); end
        if (elo) begin bnd_i.push_back(i); bnd_j.push_back(j); inn_i.push_back(i);      inn_j.push_back(1); end
        if (eup) begin bnd_i.push_back(i); bnd_j.push_back(j); inn_i.push_back(i);      inn_j.push_back(ny - 2); end
      end
  endtask
  function automatic bit is_bnd(int i, int j);
    foreach (bnd_i[k]) if (bnd_i[k] == i && bnd_j[k] == j) return 1'b1;
    return 1'b0;
  endfunction

  // point order within a block: the left column of PEs walks i downwards
  // and the bottom row walks j downwards, so that an edge point whose
  // value is only final after the Mur step is the last one sent
  int gcur;
  function automatic int io(int k); return has_dir(gcur, 2) ? k : nx - 1 - k; endfunction
  function automatic int jo(int k); return has_dir(gcur, 1) ? k : ny - 1 - k; endfunction

  uop_t chains [$][$];           // chains of the phase being scheduled
  uop_t body [$];                // one time step

  task automatic flush_chains();
    int n;
    n = chains.size();
    for (int c0 = 0; c0 < n; c0 += 3) begin
      int len;
      len = chains[c0].size();
      for (int k = 0; k < len; k++)
        for (int c = c0; c < c0 + 3; c++)
          body.push_back((c < n) ? chains[c][k] : zn());
    end
    chains.delete();
    repeat (7) body.push_back(zn());
  endtask

  function automatic int ex_a(int i, int j); return EXB + j * nx + i; endfunction
  function automatic int ey_a(int i, int j); return EYB + j * nx + i; endfunction
  function automatic int hz_a(int i, int j); return HZB + j * nx + i; endfunction

  // one time step for group g; src_pm: PLUS or MINUS
  task automatic build_step(int g, int src_pm, bit has_src);
    uop_t ch [$];
    uop_t u;
    body.delete();
    gcur = g;
    // E phase: Ex and Ey of every point
    for (int jj = 0; jj < ny; jj++)
      for (int ii = 0; ii < nx; ii++) begin
        int i, j;
        i = io(ii); j = jo(jj);
        ch.delete();
        ch.push_back(mop(ex_a(i, j), CA, 1, 0));
        ch.push_back(mop(hz_a(i, j), CB, 1, 1));
        if (j > 0)                u = mop(hz_a(i, j - 1), CB, 0, 1);
        else if (has_dir(g, 1)) begin u = mop(0, CB, 0, 1); u.asrc = 1; u.vsrc = 1; end
        else                      u = mop(ZERO, CB, 0, 1);
        u.wb.mem_w = 1; u.wb.waddr = 8'(ex_a(i, j)); u.wb.nffw = (j == 0);
        ch.push_back(u);
        chains.push_back(ch);
        ch.delete();
        ch.push_back(mop(ey_a(i, j), CA, 1, 0));
        ch.push_back(mop(hz_a(i, j), CC, 0, 1));
        if (i > 0)                u = mop(hz_a(i - 1, j), CC, 1, 1);
        else if (has_dir(g, 2)) begin u = mop(CC, 0, 1, 1); u.bsrc = 1; u.hsrc = 0; end
        else                      u = mop(ZERO, CC, 1, 1);
        u.wb.mem_w = 1; u.wb.waddr = 8'(ey_a(i, j)); u.wb.effw = (i == 0);
        ch.push_back(u);
        chains.push_back(ch);
      end
    // Mur, first half: tmp = Hz(inner) - k * Hz(edge), both before the H phase
    foreach (bnd_i[k]) begin
      ch.delete();
      ch.push_back(mop(hz_a(inn_i[k], inn_j[k]), ONE, 1, 0));
      u = mop(hz_a(bnd_i[k], bnd_j[k]), CK, 0, 1);
      u.wb.mem_w = 1; u.wb.waddr = 8'(TMPB + k);
      ch.push_back(u);
      chains.push_back(ch);
    end
    flush_chains();
    // H phase
    for (int jj = 0; jj < ny; jj++)
      for (int ii = 0; ii < nx; ii++) begin
        int i, j;
        i = io(ii); j = jo(jj);
        ch.delete();
        if (has_src && i == xs && j == ys) begin
          // the source point still consumes its FIFO operands
          ch.push_back(zn());
          u = zn();
          if (i == nx - 1 && has_dir(g, 3)) begin u.bsrc = 1; u.hsrc = 1; end
          ch.push_back(u);
          ch.push_back(zn());
          u = zn();
          if (j == ny - 1 && has_dir(g, 0)) begin u.asrc = 1; u.vsrc = 0; end
          ch.push_back(u);
          u = mop(ONE, src_pm, 1, 0);
        end else begin
          ch.push_back(mop(hz_a(i, j), ONE, 1, 0));
          if (i < nx - 1)          u = mop(ey_a(i + 1, j), CD, 0, 1);
          else if (has_dir(g, 3)) begin u = mop(CD, 0, 0, 1); u.bsrc = 1; u.hsrc = 1; end
          else                     u = mop(ZERO, CD, 0, 1);
          ch.push_back(u);
          ch.push_back(mop(ey_a(i, j), CD, 1, 1));
          if (j < ny - 1)          u = mop(ex_a(i, j + 1), CE, 1, 1);
          else if (has_dir(g, 0)) begin u = mop(0, CE, 1, 1); u.asrc = 1; u.vsrc = 0; end
          else                     u = mop(ZERO, CE, 1, 1);
          ch.push_back(u);
          u = mop(ex_a(i, j), CE, 0, 1);
        end
        // an edge point's regular result is discarded (its FIFO reads stay)
        // and it is sent after the Mur step instead
        u.wb.mem_w = 1; u.wb.waddr = 8'(is_bnd(i, j) ? SCRATCH : hz_a(i, j));
        u.wb.sffw = (j == ny - 1) && !is_bnd(i, j);
        u.wb.wffw = (i == nx - 1) && !is_bnd(i, j);
        ch.push_back(u);
        chains.push_back(ch);
      end
    flush_chains();
    // Mur, second half: Hz(edge) = tmp + k * Hz(inner, new)
    foreach (bnd_i[k]) begin
      ch.delete();
      ch.push_back(mop(TMPB + k, ONE, 1, 0));
      u = mop(hz_a(inn_i[k], inn_j[k]), CK, 1, 1);
      u.wb.mem_w = 1; u.wb.waddr = 8'(hz_a(bnd_i[k], bnd_j[k]));
      u.wb.sffw = (bnd_j[k] == ny - 1); u.wb.wffw = (bnd_i[k] == nx - 1);
      ch.push_back(u);
      chains.push_back(ch);
    end
    if (chains.size() > 0) flush_chains();
    // the same step length in every group
    while (body.size() < pad_to) body.push_back(zn());
  endtask

  int pad_to;
  task automatic send_hz();
    for (int jj = 0; jj < ny; jj++)
      for (int ii = 0; ii < nx; ii++) begin
        int i, j;
        i = io(ii); j = jo(jj);
        if (j == ny - 1 || i == nx - 1) begin
          uop_t u;
          u = mop(hz_a(i, j), ONE, 1, 0);
          u.wb.sffw = (j == ny - 1); u.wb.wffw = (i == nx - 1);
          body.push_back(u);
        end
      end
    repeat (7) body.push_back(zn());
  endtask

  int step_len, pro_len;

  task automatic build(int g);
    seq_word_t w;
    int loop_start;
    prog[g].delete();
    find_boundary(g);
    gcur = g;
    // prologue: send the initial Hz of the top row and east column, which
    // the first E phase of the neighbours reads
    body.delete();
    send_hz();
    pro_len = body.size();
    foreach (body[k]) begin
      w = '0; w.uop = body[k];
      prog[g].push_back(w);
    end
    w = '0; w.ctl = SQ_LSET; w.addr = 13'(prog[g].size() + 1); w.uop[15:0] = 16'(NPERIOD - 1);
    prog[g].push_back(w);
    for (int half = 0; half < 2; half++) begin
      loop_start = prog[g].size() + 1;
      w = '0; w.ctl = SQ_LSET; w.addr = 13'(loop_start); w.uop[15:0] = 16'(NSTEP_HALF - 1);
      prog[g].push_back(w);
      build_step(g, half == 0 ? PLUS : MINUS, g == G_LOWER_LEFT);
      step_len = body.size();
      foreach (body[k]) begin
        w = '0; w.uop = body[k];
        if (k == body.size() - 1) w.ctl = SQ_BNE;   // last nop closes the loop
        prog[g].push_back(w);
      end
    end
    w = '0; w.ctl = SQ_BNE;  prog[g].push_back(w);
    w = '0; w.ctl = SQ_HALT; prog[g].push_back(w);
  endtask

  // ---------------- reference ----------------
  real ex [72][72], ey [72][72], hz [72][72];
  real ca, cb, cc, cd, ce, ck;

  task automatic ref_run(int n);
    real old [72][72];
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
      ex[i][j] = 0.0; ey[i][j] = 0.0; hz[i][j] = 0.0;
    end
    for (int s = 0; s < 2 * NSTEP_HALF * NPERIOD; s++) begin
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) begin
        ex[i][j] = ca * ex[i][j] + cb * (hz[i][j] - ((j > 0) ? hz[i][j-1] : 0.0));
        ey[i][j] = ca * ey[i][j] - cc * (hz[i][j] - ((i > 0) ? hz[i-1][j] : 0.0));
      end
      old = hz;
      for (int i = 0; i < n; i++) for (int j = 0; j < n; j++)
        hz[i][j] = hz[i][j] - cd * (((i < n - 1) ? ey[i+1][j] : 0.0) - ey[i][j])
                            + ce * (((j < n - 1) ? ex[i][j+1] : 0.0) - ex[i][j]);
      hz[xs + 0][ys + 0] = ((s / NSTEP_HALF) % 2 == 0) ? 1.0 : -1.0;
      // Mur's first-order absorbing boundary on the edge points
      for (int k = 1; k < n - 1; k++) begin
        hz[0][k]     = (old[1][k]     - ck * old[0][k])     + ck * hz[1][k];
        hz[n-1][k]   = (old[n-2][k]   - ck * old[n-1][k])   + ck * hz[n-2][k];
        hz[k][0]     = (old[k][1]     - ck * old[k][0])     + ck * hz[k][1];
        hz[k][n-1]   = (old[k][n-2]   - ck * old[k][n-1])   + ck * hz[k][n-2];
      end
    end
  endtask

  task automatic run_grid(int n, int sx, int sy);
    logic [31:0] d, cyc, mul, acc;
    real se [3], sr [3];
    int expect_cycles;
    nx = n / NX; ny = n / NY;
    xs = sx; ys = sy;                 // inside the lower-left block
    // reset between runs: empties the FIFOs (the memories are reloaded)
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // local memories: fields zero, constants
    for (int p = 0; p < NX * NY; p++) begin
      for (int k = 0; k < nx * ny; k++) begin
        hw(a_lmem(p, EXB + k), 32'd0);
        hw(a_lmem(p, EYB + k), 32'd0);
        hw(a_lmem(p, HZB + k), 32'd0);
      end
      hw(a_lmem(p, ZERO), 32'd0);
      hw(a_lmem(p, ONE), 32'h3f800000);
      hw(a_lmem(p, CA), r2f(ca));
      hw(a_lmem(p, CB), r2f(cb));
      hw(a_lmem(p, CC), r2f(cc));
      hw(a_lmem(p, CD), r2f(cd));
      hw(a_lmem(p, CE), r2f(ce));
      hw(a_lmem(p, PLUS), 32'h3f800000);
      hw(a_lmem(p, MINUS), 32'hbf800000);
      hw(a_lmem(p, CK), r2f(ck));
    end
    pad_to = 0;
    for (int g = 0; g < NSEQ; g++) begin
      find_boundary(g);
      build_step(g, PLUS, g == G_LOWER_LEFT);
      if (body.size() > pad_to) pad_to = body.size();
    end
    for (int g = 0; g < NSEQ; g++) begin
      build(g);
      for (int i = 0; i < prog[g].size(); i++) begin
        hw(a_seq(g, i, 0), prog[g][i][31:0]);
        hw(a_seq(g, i, 1), prog[g][i][63:32]);
      end
    end
    hw(a_ctl(0), 32'h1);
    do hr(a_ctl(0), d); while (d[0] == 1'b0);
    checks++;
    if (d[3]) begin failures++; $display("N=%0d: FIFO error", n); end
    hr(a_ctl(1), cyc);
    hr(a_ctl(3), mul);
    hr(a_ctl(4), acc);
    expect_cycles = pro_len + 1 + NPERIOD * (1 + NSTEP_HALF * step_len + 1 + NSTEP_HALF * step_len + 1)
                    + 1 + 1 + PIPE_DEPTH;
    checks++;
    if (cyc != 32'(expect_cycles)) begin
      failures++;
      $display("N=%0d: %0d cycles, schedule gives %0d", n, cyc, expect_cycles);
    end
    $display("N=%0d: %0d cycles for 1600 steps, %0d cycles per step, multiplier use %0.1f%%, adder use %0.1f%%",
             n, cyc, step_len, 100.0 * real'(mul) / (real'(cyc) * NX * NY),
             100.0 * real'(acc) / (real'(cyc) * NX * NY));
    ref_run(n);
    for (int f = 0; f < 3; f++) begin se[f] = 0.0; sr[f] = 0.0; end
    for (int py = 0; py < NY; py++)
      for (int px = 0; px < NX; px++)
        for (int j = 0; j < ny; j++)
          for (int i = 0; i < nx; i++) begin
            int gi, gj, p;
            real v, r;
            gi = px * nx + i; gj = py * ny + j; p = py * NX + px;
            for (int f = 0; f < 3; f++) begin
              hr(a_lmem(p, (f == 0 ? EXB : f == 1 ? EYB : HZB) + j * nx + i), d);
              v = f2r(d);
              r = (f == 0) ? ex[gi][gj] : (f == 1) ? ey[gi][gj] : hz[gi][gj];
              se[f] += (v - r) * (v - r);
              sr[f] += r * r;
            end
          end
    for (int f = 0; f < 3; f++) begin
      checks++;
      $display("N=%0d: field %s RMS %g, RMS error %g", n, f == 0 ? "Ex" : f == 1 ? "Ey" : "Hz",
               $sqrt(sr[f] / (n * n)), $sqrt(se[f] / (n * n)));
      if (!(sr[f] > 0.0) || se[f] > 1.0e-6 * sr[f]) begin
        failures++;
        $display("N=%0d: field %0d differs from the reference", n, f);
      end
    end
  endtask

  initial begin
    real dt, dx, eps, mu;
    host_we = 1'b0; host_addr = '0; host_wdata = '0;
    dx = 5.0e-3; dt = 1.0 / (80.0 * 2.45e9); eps = 8.854e-12; mu = 4.0 * 3.14159265358979 * 1.0e-7;
    ca = 1.0;                       // sigma = 0
    cb = dt / (eps * dx);
    cc = dt / (eps * dx);
    cd = dt / (mu * dx);
    ce = dt / (mu * dx);
    ck = (dt / $sqrt(eps * mu) - dx) / (dt / $sqrt(eps * mu) + dx);
    // the reference uses the single-precision coefficients of the hardware
    ca = f2r(r2f(ca)); cb = f2r(r2f(cb)); cc = f2r(r2f(cc));
    cd = f2r(r2f(cd)); ce = f2r(r2f(ce)); ck = f2r(r2f(ck));
    run_grid(72, 5, 8);
    run_grid(48, 3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
