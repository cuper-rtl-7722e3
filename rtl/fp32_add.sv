// fp32_add: pipelined IEEE-754 single-precision adder, latency 4 cycles.
//
// The accumulator's adder. The document assumes a 4-cycle floating-point
// accumulation latency; the adder is built with exactly four register stages:
//   1. unpack, order the operands so |x| >= |y|, exponent difference
//   2. align y with guard, round and sticky bits
//   3. add or subtract, normalise
//   4. round to nearest even, pack (output register)
// An input presented in cycle t appears on s in cycle t+4. Subnormals are
// flushed to zero, NaN or Inf-Inf gives 0x7FC00000, an exact zero difference
// gives +0. These numeric details are this design's choices.
module fp32_add (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] s
);
  // ---------------- stage 1
  typedef struct packed {
    logic        v;
    logic        special;   // result fixed below
    logic [31:0] special_res;
    logic        sx, sy;
    logic [7:0]  ex;
    logic [7:0]  d;         // exponent difference, saturated
    logic [23:0] mx, my;
  } s1_t;
  s1_t s1, s1_n;

  always_comb begin
    logic [7:0] ea, eb;
    logic       a_big, za, zb;
    logic [31:0] x, y;
    ea = a[30:23]; eb = b[30:23];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    a_big = (a[30:0] >= b[30:0]);
    x = a_big ? a : b;
    y = a_big ? b : a;
    s1_n = '0;
    s1_n.v = in_valid;
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0) ||
        (ea == 8'hFF && eb == 8'hFF && a[31] != b[31])) begin
      s1_n.special = 1'b1; s1_n.special_res = 32'h7FC00000;
    end else if (ea == 8'hFF) begin
      s1_n.special = 1'b1; s1_n.special_res = {a[31], 8'hFF, 23'd0};
    end else if (eb == 8'hFF) begin
      s1_n.special = 1'b1; s1_n.special_res = {b[31], 8'hFF, 23'd0};
    end else if (za && zb) begin
      s1_n.special = 1'b1; s1_n.special_res = {a[31] & b[31], 31'd0};
    end else if (zb) begin
      s1_n.special = 1'b1; s1_n.special_res = a;
    end else if (za) begin
      s1_n.special = 1'b1; s1_n.special_res = b;
    end
    s1_n.sx = x[31];
    s1_n.sy = y[31];
    s1_n.ex = x[30:23];
    s1_n.d  = x[30:23] - y[30:23];
    s1_n.mx = {1'b1, x[22:0]};
    s1_n.my = {1'b1, y[22:0]};
  end

  // ---------------- stage 2: align
  typedef struct packed {
    logic        v;
    logic        special;
    logic [31:0] special_res;
    logic        sx;
    logic        sub;
    logic [7:0]  ex;
    logic [26:0] mx;   // {1, m, G, R, S}
    logic [26:0] my;
  } s2_t;
  s2_t s2, s2_n;

  always_comb begin
    logic [49:0] wide;
    logic [49:0] sh;
    s2_n = '0;
    s2_n.v = s1.v;
    s2_n.special = s1.special;
    s2_n.special_res = s1.special_res;
    s2_n.sx = s1.sx;
    s2_n.sub = s1.sx ^ s1.sy;
    s2_n.ex = s1.ex;
    s2_n.mx = {s1.mx, 3'b000};
    wide = {s1.my, 26'd0};
    sh = '0;
    if (s1.d >= 8'd27) begin
      s2_n.my = {26'd0, 1'b1};            // only sticky remains (my is non-zero)
    end else begin
      sh = wide >> s1.d;
      s2_n.my = {sh[49:24], |sh[23:0]};
    end
  end

  // ---------------- stage 3: add, normalise
  typedef struct packed {
    logic        v;
    logic        special;
    logic [31:0] special_res;
    logic        sign;
    logic        zero;
    logic [9:0]  e;      // signed biased exponent
    logic [26:0] m;      // normalised: m[26] = 1
  } s3_t;
  s3_t s3, s3_n;

  always_comb begin
    logic [27:0] sum;
    logic [4:0]  lz;
    s3_n = '0;
    lz = '0;
    s3_n.v = s2.v;
    s3_n.special = s2.special;
    s3_n.special_res = s2.special_res;
    s3_n.sign = s2.sx;
    if (s2.sub) sum = {1'b0, s2.mx} - {1'b0, s2.my};
    else        sum = {1'b0, s2.mx} + {1'b0, s2.my};
    if (sum == 28'd0) begin
      s3_n.zero = 1'b1;
      s3_n.sign = 1'b0;
    end else if (sum[27]) begin
      s3_n.m = {sum[27:2], sum[1] | sum[0]};
      s3_n.e = {2'b00, s2.ex} + 10'd1;
    end else begin
      lz = 5'd0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      s3_n.m = sum[26:0] << lz;
      s3_n.e = {2'b00, s2.ex} - {5'd0, lz};
    end
  end

  // ---------------- stage 4: round, pack
  logic [31:0] res;
  always_comb begin
    logic        rnd;
    logic [24:0] rm;
    logic [9:0]  re;
    rnd = s3.m[2] & (s3.m[1] | s3.m[0] | s3.m[3]);
    rm  = {1'b0, s3.m[26:3]} + {24'd0, rnd};
    re  = s3.e;
    if (rm[24]) begin
      rm = rm >> 1;
      re = re + 10'd1;
    end
    if (s3.special)                res = s3.special_res;
    else if (s3.zero)              res = 32'd0;
    else if (re[9] || re == 10'd0) res = {s3.sign, 31'd0};
    else if (re >= 10'd255)        res = {s3.sign, 8'hFF, 23'd0};
    else                           res = {s3.sign, re[7:0], rm[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      out_valid <= 1'b0;
      s <= '0;
    end else begin
      s1 <= s1_n;
      s2 <= s2_n;
      s3 <= s3_n;
      out_valid <= s3.v;
      s <= res;
    end
  end
endmodule
