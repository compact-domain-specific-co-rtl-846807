// tb_schb64: self-checking testbench of the 64x64 schoolbook multiplier.
//
// Loads random operands, runs a multiplication, a multiply-accumulate and a second
// plain multiplication (which must overwrite, not accumulate), and compares all 127
// result coefficients with a schoolbook product computed here modulo 2^16. It also
// checks that each operation keeps the unit busy for 64/4*(2+4+64+3) = 1168 cycles.
// Instances with eight and sixteen multipliers run the same operations in parallel;
// they must give the same results in 64/8*(4+8+64+7) = 664 and
// 64/16*(8+16+64+15) = 412 cycles.
module tb_schb64;
  import saber_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_a_we, ld_b_we, start, mac, busy, done;
  logic [5:0] ld_addr;
  coef_t ld_data, rd_data;
  logic [6:0] rd_addr;

  schb64 dut (.*);

  logic busy8, done8;
  coef_t rd_data8;
  schb64 #(.NM(8)) dut8 (.clk, .rst_n, .ld_a_we, .ld_b_we, .ld_addr, .ld_data, .start,
                         .mac, .busy(busy8), .done(done8), .rd_addr, .rd_data(rd_data8));

  logic busy16, done16;
  coef_t rd_data16;
  schb64 #(.NM(16)) dut16 (.clk, .rst_n, .ld_a_we, .ld_b_we, .ld_addr, .ld_data, .start,
                           .mac, .busy(busy16), .done(done16), .rd_addr, .rd_data(rd_data16));

  int checks = 0, failures = 0;
  coef_t a [64], b [64];
  coef_t ref_c [128];

  task automatic load_operands();
    for (int i = 0; i < 64; i++) begin
      a[i] = coef_t'($urandom);
      b[i] = coef_t'($urandom);
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      ld_a_we = 1'b1; ld_b_we = 1'b0; ld_addr = 6'(i); ld_data = a[i];
      @(negedge clk);
      ld_a_we = 1'b0; ld_b_we = 1'b1; ld_data = b[i];
    end
    @(negedge clk);
    ld_a_we = 1'b0; ld_b_we = 1'b0;
  endtask

  task automatic run(input logic do_mac);
    int cyc = 0, cyc8 = 0, cyc16 = 0;
    if (!do_mac) foreach (ref_c[k]) ref_c[k] = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        ref_c[i+j] = ref_c[i+j] + coef_t'(a[i] * b[j]);
    @(negedge clk);
    start = 1'b1; mac = do_mac;
    @(negedge clk);
    start = 1'b0; mac = 1'b0;
    while (busy || busy8 || busy16) begin
      if (busy) cyc++;
      if (busy8) cyc8++;
      if (busy16) cyc16++;
      @(negedge clk);
    end
    checks++;
    if (cyc != 1168) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 1168", cyc);
    end
    checks++;
    if (cyc8 != 664) begin
      failures++;
      $display("FAIL NM=8 latency %0d cycles, expected 664", cyc8);
    end
    checks++;
    if (cyc16 != 412) begin
      failures++;
      $display("FAIL NM=16 latency %0d cycles, expected 412", cyc16);
    end
    for (int k = 0; k < 127; k++) begin
      rd_addr = 7'(k);
      #1;
      checks++;
      if (rd_data !== ref_c[k]) begin
        failures++;
        if (failures < 10) $display("FAIL c[%0d] = %h, expected %h (mac=%0b)", k, rd_data, ref_c[k], do_mac);
      end
      checks++;
      if (rd_data8 !== ref_c[k]) begin
        failures++;
        if (failures < 10) $display("FAIL NM=8 c[%0d] = %h, expected %h (mac=%0b)", k, rd_data8, ref_c[k], do_mac);
      end
      checks++;
      if (rd_data16 !== ref_c[k]) begin
        failures++;
        if (failures < 10) $display("FAIL NM=16 c[%0d] = %h, expected %h (mac=%0b)", k, rd_data16, ref_c[k], do_mac);
      end
    end
  endtask

  initial begin
    ld_a_we = 0; ld_b_we = 0; ld_addr = 0; ld_data = 0; start = 0; mac = 0; rd_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_operands(); run(1'b0);
    load_operands(); run(1'b1);
    load_operands(); run(1'b1);
    load_operands(); run(1'b0);
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
