// cmd_regs: command and status register unit through which the host drives the
// co-processor.
//
// The host writes the operand bases (ADDR_A, ADDR_B), the result / transfer base
// (ADDR_C) and the transfer length in 64-bit words (LEN), then writes an opcode to CMD.
// The co-processor has two engines: the transfer engine (LOAD, STORE through the DMA
// stream) and the arithmetic engine (EVAL, MUL, MAC, INTERP). A command is issued, as a
// one-cycle cmd_valid pulse carrying the opcode and the current register values, when
// its engine is free; a transfer and an arithmetic command may therefore run at the same
// time, so that the next operands stream in while the point-wise products are computed.
// The one exception is INTERP, which writes the system memory through the same port as
// the transfers: INTERP and LOAD/STORE exclude each other. A command that cannot be
// issued is dropped and sets the sticky error flag.
// STATUS reads {arith busy(4), transfer busy(3), error(2), done(1), busy(0)}: done is set
// when a command completes and cleared by the next accepted command, error is cleared
// by the next accepted command. CYCLES counts the busy cycles of the arithmetic engine
// since the last arithmetic command, so software can time it.
// The register map and bit layout are this implementation's choices; the design
// description only states that command and status registers exist and that the host is
// the master. Register bus: synchronous writes (reg_we), combinational read data for
// reg_addr.
module cmd_regs
  import saber_pkg::*;
#(
  parameter int unsigned AW = 10      // system memory word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // register bus from the host
  input  logic          reg_we,
  input  logic [2:0]    reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic [31:0]   reg_rdata,
  // to the command dispatch
  output logic          cmd_valid,
  output cmd_op_e       cmd_op,
  output logic [AW-1:0] addr_a,
  output logic [AW-1:0] addr_b,
  output logic [AW-1:0] addr_c,
  output logic [AW:0]   len,
  // from the units
  input  logic          xfer_busy,
  input  logic          arith_busy,
  input  logic          done
);

  logic        st_done, st_err;
  logic [31:0] cycles;
  logic        wr_cmd;
  cmd_op_e     new_op;
  logic        new_xfer, new_arith;
  logic        x_busy, a_busy, a_interp;  // engine state including a command just issued
  logic        accept;
  cmd_op_e     arith_op;                  // last arithmetic command issued

  assign wr_cmd    = reg_we && (reg_addr == REG_CMD);
  assign new_op    = cmd_op_e'(reg_wdata[2:0]);
  assign new_xfer  = new_op inside {CMD_LOAD, CMD_STORE};
  assign new_arith = new_op inside {CMD_EVAL, CMD_MUL, CMD_MAC, CMD_INTERP};
  assign x_busy    = xfer_busy  || (cmd_valid && cmd_op inside {CMD_LOAD, CMD_STORE});
  assign a_busy    = arith_busy || (cmd_valid && !(cmd_op inside {CMD_LOAD, CMD_STORE}));
  assign a_interp  = a_busy && (arith_op == CMD_INTERP);
  assign accept    = (new_xfer  && !x_busy && !a_interp) ||
                     (new_arith && !a_busy && !(new_op == CMD_INTERP && x_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid <= 1'b0;
      cmd_op    <= CMD_NOP;
      addr_a    <= '0;
      addr_b    <= '0;
      addr_c    <= '0;
      len       <= '0;
      st_done   <= 1'b0;
      st_err    <= 1'b0;
      cycles    <= '0;
      arith_op  <= CMD_NOP;
    end else begin
      cmd_valid <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          REG_ADDR_A: addr_a <= reg_wdata[AW-1:0];
          REG_ADDR_B: addr_b <= reg_wdata[AW-1:0];
          REG_ADDR_C: addr_c <= reg_wdata[AW-1:0];
          REG_LEN:    len    <= reg_wdata[AW:0];
          default: ;
        endcase
      end
      if (arith_busy) cycles <= cycles + 32'd1;
      if (wr_cmd && new_op != CMD_NOP) begin
        if (!accept) st_err <= 1'b1;
        else begin
          cmd_valid <= 1'b1;
          cmd_op    <= new_op;
          st_done   <= 1'b0;
          st_err    <= 1'b0;
          if (new_arith) begin
            arith_op <= new_op;
            cycles   <= '0;
          end
        end
      end
      if (done) st_done <= 1'b1;
    end
  end

  always_comb begin
    unique case (reg_addr)
      REG_CMD:    reg_rdata = {29'd0, cmd_op};
      REG_ADDR_A: reg_rdata = 32'(addr_a);
      REG_ADDR_B: reg_rdata = 32'(addr_b);
      REG_ADDR_C: reg_rdata = 32'(addr_c);
      REG_LEN:    reg_rdata = 32'(len);
      REG_STATUS: reg_rdata = {27'd0, a_busy, x_busy, st_err, st_done, x_busy || a_busy};
      REG_CYCLES: reg_rdata = cycles;
      default:    reg_rdata = 32'd0;
    endcase
  end

endmodule
