// tb_sys_mem: self-checking testbench of the system memory. Full-word and single-lane
// (16-bit) writes on port B and reads on both ports are driven at random addresses and
// compared with a reference array; reads must return the data one clock after the
// address, and a lane write must leave the other three lanes untouched.
module tb_sys_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [9:0] addr_a, addr_b;
  logic [3:0] we_b;
  logic [63:0] wdata_b, rdata_a, rdata_b;
  sys_mem #(.DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [1024];
  logic [63:0] exp_a, exp_b;

  initial begin
    addr_a = 0; addr_b = 0; we_b = 0; wdata_b = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); addr_b = 10'(i); we_b = 4'hF; wdata_b = {$urandom, $urandom}; model[i] = wdata_b;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr_a = 10'($urandom % 32); addr_b = 10'($urandom % 32);
      we_b = (n % 2) ? 4'b0001 << ($urandom % 4) : ((n % 5 == 0) ? 4'hF : 4'h0);
      wdata_b = {$urandom, $urandom};
      exp_a = model[addr_a]; exp_b = model[addr_b];
      for (int l = 0; l < 4; l++) if (we_b[l]) model[addr_b][16*l +: 16] = wdata_b[16*l +: 16];
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; $display("FAIL port A %h vs %h", rdata_a, exp_a); end
      if (rdata_b !== exp_b) begin failures++; $display("FAIL port B %h vs %h", rdata_b, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
