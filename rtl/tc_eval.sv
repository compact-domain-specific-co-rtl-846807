// tc_eval: Toom-Cook 4-way evaluation datapath.
//
// The four inputs are the coefficients a0[i], a1[i], a2[i], a3[i] of the four
// 64-coefficient quarters of a 256-coefficient polynomial (one 64-bit word of the
// system memory). The seven outputs are coefficient i of the weighted polynomials, the
// evaluations of a0 + a1*y + a2*y^2 + a3*y^3 at the points {inf, 2, 1, -1, 1/2, -1/2, 0},
// the two half points scaled by 8 so that only shifts are needed:
//   aw1 = a3                      (y = inf)
//   aw2 = a0 + 2a1 + 4a2 + 8a3    (y = 2)
//   aw3 = a0 + a1 + a2 + a3       (y = 1)
//   aw4 = a0 - a1 + a2 - a3       (y = -1)
//   aw5 = 8a0 + 4a1 + 2a2 + a3    (8 * value at y = 1/2)
//   aw6 = 8a0 - 4a1 + 2a2 - a3    (8 * value at y = -1/2)
//   aw7 = a0                      (y = 0)
// This is the vertical-scanning evaluation of the design description (its Algorithm 4
// and Fig. 2): shared sums (a0+a2), (a1+a3), (8a0+2a2), (4a1+a3) feed one add/subtract
// pair each, all arithmetic modulo 2^16. No pipeline register is needed inside: the
// adder depth is two. The outputs are registered (the aw registers of Fig. 2); the
// inputs are expected to come straight from the registered output of the system
// memory, which plays the part of the a0..a3 registers.
// Timing: aw and out_valid appear one clock after in_valid and a; one word per cycle.
module tc_eval
  import saber_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t a   [4],
  output logic  out_valid,
  output coef_t aw  [NPTS]     // aw[0] = aw1 ... aw[6] = aw7
);

  coef_t s02, s13, h02, h13;
  coef_t nxt [NPTS];

  always_comb begin
    s02 = a[0] + a[2];
    s13 = a[1] + a[3];
    h02 = coef_t'({a[0], 3'b000}) + coef_t'({a[2], 1'b0});
    h13 = coef_t'({a[1], 2'b00}) + a[3];
    nxt[0] = a[3];
    nxt[1] = coef_t'({a[3], 3'b000}) + coef_t'({a[2], 2'b00}) + coef_t'({a[1], 1'b0}) + a[0];
    nxt[2] = s02 + s13;
    nxt[3] = s02 - s13;
    nxt[4] = h02 + h13;
    nxt[5] = h02 - h13;
    nxt[6] = a[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < NPTS; k++) aw[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) aw <= nxt;
    end
  end

endmodule
