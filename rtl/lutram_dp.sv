// lutram_dp: dual-port distributed (LUT) RAM, used for operand b and for the result
// of each 64x64 schoolbook multiplier.
//
// Port A reads and writes, port B only reads, which is what a fabric dual-port LUT RAM
// offers. Operand b uses the two read ports to load two coefficients per cycle into
// the multipliers; the result memory uses port A to write a finished coefficient while
// port B reads the partial sum that enters the rightmost accumulator in the same cycle.
// Writes are synchronous on the rising edge; both reads are asynchronous. A read on
// port B of the address being written returns the old word. Contents are not reset.
module lutram_dp #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
  end

  assign rdata_a = mem[addr_a];
  assign rdata_b = mem[addr_b];

endmodule
