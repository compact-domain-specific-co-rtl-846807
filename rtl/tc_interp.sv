// tc_interp: pipelined Toom-Cook 4-way interpolation datapath.
//
// Inputs w1..w7 are coefficient i of the seven point-wise products, in the order of
// the evaluation points {inf, 2, 1, -1, 1/2, -1/2, 0} (w5 and w6 carry the factor 64
// that the scaled half-point evaluation introduces). Outputs out[0..6] are the
// contributions of iteration i to coefficients i, i+64, ..., i+384 of the
// 512-coefficient product, i.e. the interpolation matrix applied to the seven values.
// Divisions by odd numbers are multiplications by their inverses modulo 2^16 (1/3, 1/9,
// 1/15); divisions by 2, 4 and 8 are right shifts. Each shift loses one top bit of
// precision, and with 16-bit words at most three are lost along any path, so every
// output is exact modulo 2^13 = q, as the design description requires; the upper three
// bits of the outputs are not meaningful. Because the map is linear, summed products
// (lazy interpolation) are interpolated as one.
//
// Structure: an input register row, two pipeline register rows splitting the long
// add / multiply-by-inverse chain, and an output register row, as in Fig. 3 of the
// design description. The network of adders and constant multipliers inside each stage
// is this implementation's own factorisation of the interpolation matrix, not a copy of
// that figure. Timing: one iteration per cycle, out_valid 4 cycles after in_valid.
module tc_interp
  import saber_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t w   [NPTS],      // w[0] = w1 (inf) ... w[6] = w7 (0)
  output logic  out_valid,
  output coef_t out [NPTS]       // out[j]: contribution to coefficient i + 64*j
);

  // ---------------------------------------------------------------- input registers
  coef_t r [NPTS];
  logic  v0, v1, v2;

  // ---------------------------------------------------------------- stage 1
  coef_t s1_r1, s1_r5, s1_r3, s1_r4a, s1_r4, s1_r2a, s1_r1b, s1_r2;
  always_comb begin
    s1_r1  = r[1] + r[4];
    s1_r5  = r[5] - r[4];
    s1_r3  = (r[3] - r[2]) >> 1;
    s1_r4a = r[4] - r[0] - coef_t'({r[6], 6'd0});
    s1_r4  = coef_t'({s1_r4a, 1'b0}) + s1_r5;
    s1_r2a = r[2] + s1_r3;
    s1_r1b = s1_r1 - coef_t'({s1_r2a, 6'd0}) - s1_r2a;
    s1_r2  = s1_r2a - r[6] - r[0];
  end

  coef_t p1_r0, p1_r6, p1_r3, p1_r5, p1_r4, p1_r2, p1_r1;

  // ---------------------------------------------------------------- stage 2
  coef_t s2_r1, s2_r4, s2_r5, s2_r1d;
  always_comb begin
    s2_r1  = p1_r1 + coef_t'(p1_r2 * 16'd45);
    s2_r4  = coef_t'((p1_r4 - coef_t'({p1_r2, 3'd0})) * INV3) >> 3;
    s2_r5  = p1_r5 + s2_r1;
    s2_r1d = coef_t'((s2_r1 + coef_t'({p1_r3, 4'd0})) * INV9) >> 1;
  end

  coef_t p2_r0, p2_r6, p2_r3, p2_r2, p2_r4, p2_r5, p2_r1;

  // ---------------------------------------------------------------- stage 3
  coef_t s3_r3, s3_r5, s3_r2, s3_r1;
  always_comb begin
    s3_r3 = coef_t'(-(p2_r3 + p2_r1));
    s3_r5 = coef_t'((coef_t'(p2_r1 * 16'd30) - p2_r5) * INV15) >> 2;
    s3_r2 = p2_r2 - p2_r4;
    s3_r1 = p2_r1 - s3_r5;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int k = 0; k < NPTS; k++) begin
        r[k]   <= '0;
        out[k] <= '0;
      end
      {p1_r0, p1_r6, p1_r3, p1_r5, p1_r4, p1_r2, p1_r1} <= '0;
      {p2_r0, p2_r6, p2_r3, p2_r2, p2_r4, p2_r5, p2_r1} <= '0;
    end else begin
      v0 <= in_valid; v1 <= v0; v2 <= v1; out_valid <= v2;
      r  <= w;
      p1_r0 <= r[0];  p1_r6 <= r[6];  p1_r3 <= s1_r3; p1_r5 <= s1_r5;
      p1_r4 <= s1_r4; p1_r2 <= s1_r2; p1_r1 <= s1_r1b;
      p2_r0 <= p1_r0; p2_r6 <= p1_r6; p2_r3 <= p1_r3; p2_r2 <= p1_r2;
      p2_r4 <= s2_r4; p2_r5 <= s2_r5; p2_r1 <= s2_r1d;
      out[0] <= p2_r6;
      out[1] <= s3_r5;
      out[2] <= p2_r4;
      out[3] <= s3_r3;
      out[4] <= s3_r2;
      out[5] <= s3_r1;
      out[6] <= p2_r0;
    end
  end

endmodule
