// tb_toom_cook4: self-checking testbench of the Toom-Cook-4 multiplier.
//
// A behavioural model of the system memory (64-bit words, one-cycle read latency,
// 16-bit lane writes) is kept here. The test runs
//   1. one product a*b: EVAL, MUL, INTERP;
//   2. a three-term inner product sum a_s*b_s (Saber's l = 3): EVAL, MUL, EVAL, MAC,
//      EVAL, MAC, INTERP, with new operands written to the same slots each time;
// and compares all 512 coefficients written back with an unreduced schoolbook product
// (or sum of products) computed here modulo 2^13. Cycle counts of each command are
// checked: EVAL 130, MUL/MAC 1170, INTERP 518.
module tb_toom_cook4;
  import saber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid, busy, done;
  cmd_op_e cmd_op;
  logic [9:0] addr_a, addr_b, addr_c, mem_addr_a, mem_addr_b;
  logic [63:0] mem_rdata_a, mem_wdata_b;
  logic [3:0] mem_we_b;

  toom_cook4 dut (.*);

  logic [63:0] mem [1024];
  always_ff @(posedge clk) begin
    mem_rdata_a <= mem[mem_addr_a];
    for (int l = 0; l < 4; l++)
      if (mem_we_b[l]) mem[mem_addr_b][16*l +: 16] <= mem_wdata_b[16*l +: 16];
  end

  int checks = 0, failures = 0;
  logic [12:0] a [256], b [256];
  logic [12:0] ref_c [512];

  task automatic put_poly(input int base, input logic [12:0] p [256]);
    for (int k = 0; k < 256; k++)
      mem[base + (k % 64)][16 * (k / 64) +: 16] = {3'b000, p[k]};
  endtask

  task automatic command(input cmd_op_e op, input int exp_cycles);
    automatic int cyc = 0;
    @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; addr_a = 10'd0; addr_b = 10'd64; addr_c = 10'd128;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (busy) begin
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != exp_cycles) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d", op.name(), cyc, exp_cycles);
    end
  endtask

  task automatic new_operands(input logic accumulate);
    if (!accumulate) foreach (ref_c[k]) ref_c[k] = '0;
    foreach (a[k]) begin
      a[k] = 13'($urandom);
      b[k] = 13'($urandom);
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        ref_c[i+j] = ref_c[i+j] + 13'(a[i] * b[j]);
    put_poly(0, a);
    put_poly(64, b);
  endtask

  task automatic check_result(input string what);
    int bad = 0;
    for (int k = 0; k < 512; k++) begin
      automatic logic [15:0] got = mem[128 + (k / 256) * 64 + (k % 64)][16 * ((k / 64) % 4) +: 16];
      checks++;
      if (got !== {3'b000, ref_c[k]}) begin
        failures++; bad++;
        if (bad < 6) $display("FAIL %s c[%0d] = %h expected %h", what, k, got, ref_c[k]);
      end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd_op = CMD_NOP; addr_a = 0; addr_b = 0; addr_c = 0;
    foreach (mem[i]) mem[i] = 64'hDEAD_BEEF_0BAD_F00D;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // single product
    new_operands(1'b0);
    command(CMD_EVAL, 130);
    command(CMD_MUL, 1170);
    command(CMD_INTERP, 518);
    check_result("product");
    // inner product of length 3
    new_operands(1'b0);
    command(CMD_EVAL, 130);
    command(CMD_MUL, 1170);
    for (int s = 1; s < 3; s++) begin
      new_operands(1'b1);
      command(CMD_EVAL, 130);
      command(CMD_MAC, 1170);
    end
    command(CMD_INTERP, 518);
    check_result("inner product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
