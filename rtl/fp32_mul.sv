// fp32_mul: pipelined IEEE-754 single-precision multiplier of a PE.
//
// Stage 1 registers the 48-bit significand product, the sign and the biased
// exponent sum; stage 2 normalises, rounds to nearest even and packs. Latency
// is 2 cycles, one product per cycle, in_valid travels alongside. Subnormal
// inputs and results are flushed to zero, any NaN or Inf*0 gives the quiet NaN
// 0x7FC00000, overflow gives a signed infinity. The document only says each PE
// multiplies the matrix value by the vector value in FP32; the pipeline depth
// and the special-value handling are this design's choices.
module fp32_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] p
);
  // stage 1
  logic        s1_v, s1_sign, s1_zero, s1_inf, s1_nan;
  logic [9:0]  s1_exp;     // signed, biased
  logic [47:0] s1_prod;

  logic [7:0] ea, eb;
  logic       za, zb, ia, ib, na, nb;
  always_comb begin
    ea = a[30:23]; eb = b[30:23];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (a[22:0] == 23'd0);
    ib = (eb == 8'hFF) && (b[22:0] == 23'd0);
    na = (ea == 8'hFF) && (a[22:0] != 23'd0);
    nb = (eb == 8'hFF) && (b[22:0] != 23'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_sign <= 1'b0; s1_zero <= 1'b0; s1_inf <= 1'b0; s1_nan <= 1'b0;
      s1_exp <= '0; s1_prod <= '0;
    end else begin
      s1_v    <= in_valid;
      s1_sign <= a[31] ^ b[31];
      s1_nan  <= na | nb | (ia & zb) | (ib & za);
      s1_inf  <= ia | ib;
      s1_zero <= za | zb;
      s1_exp  <= {2'b00, ea} + {2'b00, eb} - 10'd127;
      s1_prod <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
    end
  end

  // stage 2: normalise and round
  logic [9:0]  n_exp;
  logic [23:0] n_man;
  logic        g, st, rnd;
  logic [24:0] r_man;
  logic [9:0]  r_exp;
  logic [31:0] res;
  always_comb begin
    if (s1_prod[47]) begin
      n_exp = s1_exp + 10'd1;
      n_man = s1_prod[47:24];
      g     = s1_prod[23];
      st    = |s1_prod[22:0];
    end else begin
      n_exp = s1_exp;
      n_man = s1_prod[46:23];
      g     = s1_prod[22];
      st    = |s1_prod[21:0];
    end
    rnd   = g & (st | n_man[0]);
    r_man = {1'b0, n_man} + {24'd0, rnd};
    r_exp = n_exp;
    if (r_man[24]) begin
      r_man = r_man >> 1;
      r_exp = r_exp + 10'd1;
    end
    if (s1_nan)                          res = 32'h7FC00000;
    else if (s1_inf)                     res = {s1_sign, 8'hFF, 23'd0};
    else if (s1_zero)                    res = {s1_sign, 31'd0};
    else if (r_exp[9] || r_exp == 10'd0) res = {s1_sign, 31'd0};            // underflow: flush
    else if (r_exp >= 10'd255)           res = {s1_sign, 8'hFF, 23'd0};     // overflow
    else                                 res = {s1_sign, r_exp[7:0], r_man[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= s1_v;
      p         <= res;
    end
  end
endmodule
