// lutram_sp: single-port distributed (LUT) RAM, used for operand a of each 64x64
// schoolbook multiplier.
//
// Operand a is written once by the evaluation step and then read strictly in order
// during the multiplication, so one port is enough; the 64-word depth matches the depth
// of a fabric LUT, as the design description points out. Write is synchronous (on the
// rising clock edge when we is high); read is asynchronous, as in a LUT RAM, so rdata
// shows the word at addr in the same cycle. Contents are not reset.
module lutram_sp #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
