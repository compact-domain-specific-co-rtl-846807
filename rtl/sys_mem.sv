// sys_mem: system data memory of the co-processor, a true dual-port block RAM of
// DEPTH 64-bit words (two 36-kbit block RAMs side by side at the default 1024 words).
//
// Every 64-bit word holds four 16-bit coefficients. Port A is a read port used by the
// evaluation datapath, which fetches four coefficients (k, k+64, k+128, k+192 of one
// polynomial) per cycle. Port B is shared by the host data transfers (full 64-bit
// words) and the interpolation datapath, which writes single 16-bit coefficients: its
// write enable is per 16-bit lane, so a narrow write is a one-hot lane enable with the
// coefficient placed in that lane. This gives the asymmetric 64-bit read / 16-bit write
// behaviour of the design description. Reads on both ports are synchronous (data one
// cycle after the address, as in a block RAM); a read on port B of a word being written
// on port B returns the old word. Contents are not reset.
module sys_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: 64-bit read
  input  logic [AW-1:0] addr_a,
  output logic [63:0]   rdata_a,
  // port B: 64-bit read, write per 16-bit lane
  input  logic [AW-1:0] addr_b,
  input  logic [3:0]    we_b,
  input  logic [63:0]   wdata_b,
  output logic [63:0]   rdata_b
);

  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    rdata_b <= mem[addr_b];
    for (int l = 0; l < 4; l++)
      if (we_b[l]) mem[addr_b][16*l +: 16] <= wdata_b[16*l +: 16];
  end

endmodule
