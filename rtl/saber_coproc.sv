// saber_coproc: top level of the Saber polynomial-multiplication co-processor (the
// "wrapper" of the hardware/software system).
//
// Saber spends most of its time multiplying 256-coefficient polynomials modulo
// x^256 + 1 and q = 2^13, a ring where the NTT cannot be used. The host processor runs
// the protocol and offloads only the polynomial arithmetic here: it streams operands
// into the system memory through a DMA, issues evaluation, multiply, multiply-
// accumulate and interpolation commands for a Toom-Cook 4-way multiplier built on seven
// small schoolbook multipliers, and streams the 512-coefficient result back (the final
// reduction modulo x^256 + 1, c[i] - c[i+256], is left to software).
//
// Contents: cmd_regs (command/status registers on a simple register bus),
// stream_port (DMA stream <-> memory addresses), sys_mem (1024 x 64-bit dual-port
// block RAM) and toom_cook4. Port A of the memory belongs to the evaluation datapath;
// port B is shared between the stream port (LOAD/STORE) and the interpolation writes
// (INTERP). A transfer may run while the arithmetic engine evaluates or multiplies
// (the next operands stream in while the products are computed); INTERP and transfers
// exclude each other, so the owner of port B is simply the unit that is busy. The
// host processor, its DDR memory and the DMA engine are outside: the
// register bus and the two streams are the top-level ports.
// Timing: a command is accepted when its engine is idle (STATUS bits 3 and 4); cycle
// counts per command: EVAL 130, MUL/MAC 1170, INTERP 518, LOAD/STORE one word per cycle.
module saber_coproc
  import saber_pkg::*;
#(
  parameter int unsigned NM        = 4,       // multipliers per schb64
  parameter int unsigned MEM_DEPTH = 1024,    // words of the system memory
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // register bus (host)
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // DMA stream into the co-processor
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic [63:0] s_tdata,
  input  logic        s_tlast,
  // DMA stream out of the co-processor
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [63:0] m_tdata,
  output logic        m_tlast
);

  logic          cmd_valid;
  cmd_op_e       cmd_op;
  logic [AW-1:0] addr_a, addr_b, addr_c;
  logic [AW:0]   len;
  logic          sp_busy, sp_done, tc_busy, tc_done;

  cmd_regs #(.AW(AW)) u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .cmd_valid, .cmd_op, .addr_a, .addr_b, .addr_c, .len,
    .xfer_busy(sp_busy), .arith_busy(tc_busy), .done(sp_done || tc_done));

  // system memory
  logic [AW-1:0] mem_addr_a, mem_addr_b, sp_addr, tc_addr_b;
  logic [63:0]   mem_rdata_a, mem_rdata_b, mem_wdata_b, sp_wdata, tc_wdata_b;
  logic [3:0]    mem_we_b, sp_we, tc_we_b;

  sys_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .addr_a(mem_addr_a), .rdata_a(mem_rdata_a),
    .addr_b(mem_addr_b), .we_b(mem_we_b), .wdata_b(mem_wdata_b), .rdata_b(mem_rdata_b));

  stream_port #(.AW(AW)) u_stream (
    .clk, .rst_n,
    .start_load(cmd_valid && cmd_op == CMD_LOAD),
    .start_store(cmd_valid && cmd_op == CMD_STORE),
    .base(addr_c), .len, .busy(sp_busy), .done(sp_done),
    .s_tvalid, .s_tready, .s_tdata, .s_tlast,
    .m_tvalid, .m_tready, .m_tdata, .m_tlast,
    .mem_addr(sp_addr), .mem_we(sp_we), .mem_wdata(sp_wdata), .mem_rdata(mem_rdata_b));

  toom_cook4 #(.NM(NM), .MEM_DEPTH(MEM_DEPTH)) u_tc (
    .clk, .rst_n,
    .cmd_valid(cmd_valid && cmd_op inside {CMD_EVAL, CMD_MUL, CMD_MAC, CMD_INTERP}),
    .cmd_op, .addr_a, .addr_b, .addr_c, .busy(tc_busy), .done(tc_done),
    .mem_addr_a, .mem_rdata_a,
    .mem_addr_b(tc_addr_b), .mem_we_b(tc_we_b), .mem_wdata_b(tc_wdata_b));

  // port B owner: the stream port while it is transferring, else the interpolation
  // (cmd_regs never lets a transfer and INTERP run together)
  assign mem_addr_b  = sp_busy ? sp_addr  : tc_addr_b;
  assign mem_we_b    = sp_busy ? sp_we    : tc_we_b;
  assign mem_wdata_b = sp_busy ? sp_wdata : tc_wdata_b;

  // port B is never claimed by both units
  assert property (@(posedge clk) disable iff (!rst_n) !(sp_busy && (tc_we_b != '0)));

endmodule
