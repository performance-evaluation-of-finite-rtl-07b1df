// tb_fp_mac: self-checking testbench of the five-stage floating-point MAC.
//
// Drives random single-precision operands every cycle with random sign and
// accumulate-select bits, and checks each result five cycles later against a
// reference computed in double precision: v2 is 0 or the reference result of
// the operation three cycles earlier (the forwarding distance). Results must
// agree to within the rounding of the pipeline. A stall phase (ce low)
// checks that the pipeline holds its state, and a latency check confirms the
// result is not visible one cycle earlier.
module tb_fp_mac;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [31:0] a, b, out;
  logic sign, acc_sel;
  int checks = 0, failures = 0;

  fp_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] rnd_f();
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(110 + $urandom_range(0, 30));
    if ($urandom_range(0, 15) == 0) f[30:0] = '0;   // zero operand
    return f;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  localparam int N = 3000;
  real ref_v [N];
  real scale [N];

  task automatic check(int t, string what);
    real got, err;
    got = f2r(out);
    err = absr(got - ref_v[t]);
    checks++;
    if (err > scale[t] * 3.0e-7 + 1.0e-30) begin
      failures++;
      if (failures < 10)
        $display("%s mismatch t=%0d got=%g ref=%g", what, t, got, ref_v[t]);
    end
  endtask

  initial begin
    a = '0; b = '0; sign = 1'b1; acc_sel = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ce = 1'b1;
    for (int t = 0; t < N; t++) begin
      real ab, v2, s2;
      a       = rnd_f();
      b       = rnd_f();
      sign    = $urandom_range(0, 1) == 1;
      acc_sel = (t >= 3) && ($urandom_range(0, 3) != 0);
      ab      = f2r(a) * f2r(b);
      v2      = acc_sel ? ref_v[t-3] : 0.0;
      s2      = acc_sel ? scale[t-3] : 0.0;
      ref_v[t] = sign ? v2 + ab : v2 - ab;
      scale[t] = s2 + absr(ab);
      @(negedge clk);
      // inputs of cycle t are visible after five edges, i.e. now at t+5
      // for the operation that entered at t-4 (one edge already taken)
      if (t >= 4) check(t - 4, "result");
      if (t == 200) begin
        // stall: hold everything for 7 cycles, output must not change
        logic [31:0] held;
        ce = 1'b0;
        held = out;
        repeat (7) begin
          @(negedge clk);
          checks++;
          if (out !== held) begin
            failures++;
            $display("output changed during stall");
          end
        end
        ce = 1'b1;
      end
    end
    // latency: a single operation after a bubble-free flush
    a = 32'h3fc00000; b = 32'h40000000; sign = 1'b1; acc_sel = 1'b0; // 1.5*2
    @(negedge clk);
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (out == 32'h40400000) begin
      failures++;
      $display("result visible after four cycles");
    end
    @(negedge clk);
    checks++;
    if (out != 32'h40400000) begin
      failures++;
      $display("latency: got %h want 40400000 after five cycles", out);
    end
    // exact subtraction to zero through the forwarding path
    a = 32'h40000000; b = 32'h40400000; sign = 1'b1; acc_sel = 1'b0; // 6
    @(negedge clk);
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    a = 32'h40400000; b = 32'h40000000; sign = 1'b0; acc_sel = 1'b1; // 6 - 6
    @(negedge clk);
    a = '0; b = '0; acc_sel = 1'b0; sign = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (out != 32'h00000000) begin
      failures++;
      $display("6 - 6 gave %h", out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
