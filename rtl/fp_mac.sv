// fp_mac: five-stage single-precision floating-point multiply-accumulate unit.
//
// Computes out = v2 + a*b (sign = 1) or out = v2 - a*b (sign = 0), where v2 is
// zero (acc_sel = 0) or the result leaving stage 5 in the same cycle
// (acc_sel = 1). The stage 5 result is forwarded to the stage 2 multiplexer,
// so an operation entering three cycles after another accumulates onto that
// one's result: accumulation chains take an operand every three cycles and
// three independent chains can be interleaved to keep the unit busy.
//
//   stage 1  multiply mantissas, add exponents
//   stage 2  normalise the product; choose v2 (0 or forwarded result)
//   stage 3  prepare the add: apply sign, order by magnitude, align
//   stage 4  add or subtract
//   stage 5  normalise and round; result registered on out
//
// Latency: the result of inputs presented in cycle t (with ce high) is on
// out from cycle t+5. ce low freezes every stage (pipeline stall).
//
// The stage roles (multiply, normalise and select, prepare the add, add or
// subtract, normalise), the forwarding path from stage 5 to stage 2 and the
// sign and acc_sel controls follow the design; the sign enters at stage 3
// and the addition or subtraction it selects happens in stage 4. The product is passed to the adder unrounded (48-bit mantissa)
// and rounded once, to nearest with ties away from zero, at stage 5: this is
// one reading of the design's "partially simplified rounding and
// normalisation". As in the design, denormal numbers are not supported
// (inputs and results below the normal range are zero); infinities and NaNs
// are not treated specially, and a result above the range becomes infinity.
module fp_mac (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sign,
  input  logic        acc_sel,
  output logic [31:0] out
);

  typedef logic signed [10:0] exp_t;

  // ---------------- stage 1: multiply ----------------
  typedef struct packed {
    logic        s;
    exp_t        e;
    logic [47:0] m;
    logic        z;
    logic        sign;
    logic        acc_sel;
  } s1_t;
  s1_t s1_d, s1_q;

  always_comb begin
    s1_d.s       = a[31] ^ b[31];
    s1_d.e       = exp_t'({3'b0, a[30:23]}) + exp_t'({3'b0, b[30:23]}) - exp_t'(127);
    s1_d.m       = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    s1_d.z       = (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
    s1_d.sign    = sign;
    s1_d.acc_sel = acc_sel;
  end

  // ---------------- stage 2: normalise product, select v2 ----------------
  typedef struct packed {
    logic        s;
    exp_t        e;
    logic [47:0] m;   // leading one at bit 47, or zero
  } op_t;
  typedef struct packed {
    op_t  v1;
    op_t  v2;
    logic sign;
  } s2_t;
  s2_t s2_d, s2_q;
  logic [31:0] fwd;   // stage 5 result, forwarded

  always_comb begin
    op_t p;
    p.s = s1_q.s;
    if (s1_q.m[47]) begin
      p.m = s1_q.m;
      p.e = s1_q.e + exp_t'(1);
    end else begin
      p.m = {s1_q.m[46:0], 1'b0};
      p.e = s1_q.e;
    end
    if (s1_q.z || p.e <= exp_t'(0)) begin
      p.e = '0;
      p.m = '0;
    end else if (p.e >= exp_t'(255)) begin
      p.e = exp_t'(255);
      p.m = {1'b1, 47'd0};
    end
    s2_d.v1   = p;
    s2_d.sign = s1_q.sign;
    if (s1_q.acc_sel && fwd[30:23] != 8'd0) begin
      s2_d.v2.s = fwd[31];
      s2_d.v2.e = exp_t'({3'b0, fwd[30:23]});
      s2_d.v2.m = {1'b1, fwd[22:0], 24'd0};
    end else begin
      s2_d.v2 = '0;
    end
  end

  // ---------------- stage 3: prepare for add/subtract ----------------
  typedef struct packed {
    logic        s;     // sign of the larger operand
    exp_t        e;     // exponent of the larger operand
    logic [47:0] big;
    logic [47:0] lit;   // smaller operand, aligned
    logic        sub;
  } s3_t;
  s3_t s3_d, s3_q;

  always_comb begin
    op_t  p, q, x, y;
    exp_t diff;
    logic swap;
    p      = s2_q.v1;
    p.s    = s2_q.v1.s ^ ~s2_q.sign;   // sign = 0 subtracts the product
    q      = s2_q.v2;
    swap   = {q.e, q.m} > {p.e, p.m};
    x      = swap ? q : p;             // larger magnitude
    y      = swap ? p : q;
    diff   = x.e - y.e;
    s3_d.s   = x.s;
    s3_d.e   = x.e;
    s3_d.big = x.m;
    s3_d.lit = (diff > exp_t'(47)) ? 48'd0 : (y.m >> diff[5:0]);
    s3_d.sub = x.s ^ y.s;
  end

  // ---------------- stage 4: add / subtract ----------------
  typedef struct packed {
    logic        s;
    exp_t        e;
    logic [48:0] sum;
  } s4_t;
  s4_t s4_d, s4_q;

  always_comb begin
    s4_d.s   = s3_q.s;
    s4_d.e   = s3_q.e;
    s4_d.sum = s3_q.sub ? ({1'b0, s3_q.big} - {1'b0, s3_q.lit})
                        : ({1'b0, s3_q.big} + {1'b0, s3_q.lit});
  end

  // ---------------- stage 5: normalise and round ----------------
  always_comb begin
    logic [48:0] sh;
    logic [24:0] r;
    exp_t        e;
    int unsigned lz;
    lz = 48;
    for (int i = 0; i <= 47; i++) begin
      if (s4_q.sum[i]) lz = 47 - i;
    end
    if (s4_q.sum[48]) begin
      sh = s4_q.sum >> 1;
      e = s4_q.e + exp_t'(1);
    end else begin
      sh = s4_q.sum << lz;
      e = s4_q.e - exp_t'(lz);
    end
    // sh[47] is the leading one; keep 24 bits, round on sh[23]; the bits
    // below are dropped and bit 48 is zero after the shift
    r = {1'b0, sh[47:24]} + 25'(sh[23]);
    if (r[24]) begin
      r = r >> 1;
      e = e + exp_t'(1);
    end
    if (s4_q.sum == 49'd0 || e <= exp_t'(0))
      fwd = 32'd0;
    else if (e >= exp_t'(255))
      fwd = {s4_q.s, 8'hff, 23'd0};
    else
      fwd = {s4_q.s, e[7:0], r[22:0]};
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      s4_q <= '0;
      out  <= '0;
    end else if (ce) begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      s3_q <= s3_d;
      s4_q <= s4_d;
      out  <= fwd;
    end
  end

endmodule
