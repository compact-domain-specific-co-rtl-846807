// tb_cmd_regs: self-checking testbench of the command/status register unit. Checks
// register write/read-back; that an accepted CMD write issues exactly one cmd_valid
// pulse with the opcode; that a transfer command is accepted while the arithmetic
// engine is busy (and vice versa); that a command for a busy engine, and INTERP during
// a transfer, are refused and flag an error; that done is latched in STATUS and that
// CYCLES counts the busy cycles of the arithmetic engine.
module tb_cmd_regs;
  import saber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic reg_we, cmd_valid, xfer_busy, arith_busy, done;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  cmd_op_e cmd_op;
  logic [9:0] addr_a, addr_b, addr_c;
  logic [10:0] len;
  cmd_regs #(.AW(10)) dut (.*);

  int checks = 0, failures = 0, pulses = 0;
  cmd_op_e last_op;
  always @(posedge clk) if (cmd_valid) begin pulses++; last_op = cmd_op; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic chk_reg(input logic [2:0] a, input logic [31:0] e, input string msg);
    reg_addr = a;
    #1 check(reg_rdata == e, $sformatf("%s: read %0h expected %0h", msg, reg_rdata, e));
  endtask
  // issue a command; expect it to be accepted (one more pulse, opcode) or refused
  task automatic cmd(input cmd_op_e op, input bit accepted);
    int n0 = pulses;
    wr(REG_CMD, 32'(op));
    @(negedge clk);
    check(pulses == n0 + (accepted ? 1 : 0), $sformatf("%s %s", op.name(), accepted ? "not issued" : "issued"));
    if (accepted) check(last_op == op, "opcode");
    reg_addr = REG_STATUS;
    #1 check(reg_rdata[2] == !accepted, $sformatf("%s error flag", op.name()));
  endtask

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; xfer_busy = 0; arith_busy = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(REG_ADDR_A, 32'd64); wr(REG_ADDR_B, 32'd128); wr(REG_ADDR_C, 32'd704); wr(REG_LEN, 32'd1024);
    @(negedge clk);
    chk_reg(REG_ADDR_A, 64, "ADDR_A"); check(addr_a == 64, "addr_a");
    chk_reg(REG_ADDR_B, 128, "ADDR_B"); check(addr_b == 128, "addr_b");
    chk_reg(REG_ADDR_C, 704, "ADDR_C"); check(addr_c == 704, "addr_c");
    chk_reg(REG_LEN, 1024, "LEN"); check(len == 1024, "len");
    chk_reg(REG_STATUS, 0, "STATUS after reset");
    // an arithmetic command: 36 busy cycles, then done
    cmd(CMD_MAC, 1);
    arith_busy = 1;
    repeat (35) @(negedge clk);
    done = 1; @(negedge clk); done = 0; arith_busy = 0;
    @(negedge clk);
    chk_reg(REG_STATUS, 32'b00010, "STATUS done");
    chk_reg(REG_CYCLES, 36, "CYCLES");
    chk_reg(REG_CMD, 32'(CMD_MAC), "CMD read-back");
    // arithmetic busy: a second arithmetic command is refused, a transfer is accepted
    arith_busy = 1;
    cmd(CMD_EVAL, 0);
    chk_reg(REG_STATUS, 32'b10111, "STATUS error while arith busy");
    cmd(CMD_LOAD, 1);
    xfer_busy = 1;
    chk_reg(REG_STATUS, 32'b11001, "STATUS both engines busy");
    cmd(CMD_STORE, 0);
    arith_busy = 0;
    @(negedge clk);
    // transfer busy: INTERP refused, MUL accepted
    cmd(CMD_INTERP, 0);
    cmd(CMD_MUL, 1);
    arith_busy = 1; xfer_busy = 0;
    @(negedge clk); arith_busy = 0;
    // INTERP running: transfers refused
    cmd(CMD_INTERP, 1);
    arith_busy = 1;
    cmd(CMD_LOAD, 0);
    arith_busy = 0;
    @(negedge clk);
    cmd(CMD_STORE, 1);
    xfer_busy = 1;
    chk_reg(REG_STATUS, 32'b01001, "STATUS transfer busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
