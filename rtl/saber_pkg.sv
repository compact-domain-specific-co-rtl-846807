// saber_pkg: types and constants shared by the Saber polynomial-multiplication
// co-processor.
//
// Coefficients travel through the arithmetic as 16-bit words: Saber works modulo
// q = 2^13, and the interpolation step divides by up to 8, so three guard bits are
// carried (the 16-bit width follows the design description; everything is computed
// modulo 2^16 and the final result is exact modulo 2^13). The command encoding and the
// register map are choices of this implementation.
package saber_pkg;

  localparam int unsigned COEF_W = 16;        // datapath width
  localparam int unsigned LOGQ   = 13;        // q = 2^13
  localparam int unsigned POLY_N = 256;       // Saber ring dimension
  localparam int unsigned SUB_N  = 64;        // Toom-Cook-4 sub-polynomial length
  localparam int unsigned NPTS   = 7;         // evaluation points of Toom-Cook-4

  typedef logic [COEF_W-1:0] coef_t;

  // Inverses modulo 2^16 used by the interpolation (odd divisors).
  localparam coef_t INV3  = 16'd43691;
  localparam coef_t INV9  = 16'd36409;
  localparam coef_t INV15 = 16'd61167;

  // Commands written to the command register.
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,
    CMD_LOAD   = 3'd1,   // DMA stream -> system memory at ADDR_C, LEN words
    CMD_STORE  = 3'd2,   // system memory at ADDR_C, LEN words -> DMA stream
    CMD_EVAL   = 3'd3,   // evaluate operands at ADDR_A and ADDR_B into the schb64 units
    CMD_MUL    = 3'd4,   // point-wise products, result memories overwritten
    CMD_MAC    = 3'd5,   // point-wise products accumulated onto the result memories
    CMD_INTERP = 3'd6    // interpolate the accumulated products into ADDR_C (512 coefficients)
  } cmd_op_e;

  // Register map (word index on the register bus).
  localparam logic [2:0] REG_CMD    = 3'd0;
  localparam logic [2:0] REG_ADDR_A = 3'd1;
  localparam logic [2:0] REG_ADDR_B = 3'd2;
  localparam logic [2:0] REG_ADDR_C = 3'd3;
  localparam logic [2:0] REG_LEN    = 3'd4;
  localparam logic [2:0] REG_STATUS = 3'd5;
  localparam logic [2:0] REG_CYCLES = 3'd6;

  // Position of coefficient k of a polynomial in the system memory (Fig. 4 layout),
  // as an offset in 16-bit words from the polynomial's base: a 64-bit word holds
  // coefficients k, k+64, k+128, k+192, so the low six bits of k select the word and
  // bits 7:6 the 16-bit lane; bit 8 selects the second 256-coefficient half of a
  // 512-coefficient product. Result: {word offset (7 bits), lane (2 bits)}.
  function automatic logic [8:0] coef_pos(input logic [8:0] k);
    return {k[8], k[5:0], k[7:6]};
  endfunction

endpackage
