// tb_lutram_dp: self-checking testbench of the dual-port LUT RAM. Port A writes and
// reads, port B reads, at independent random addresses; both read ports are checked
// against a reference array in the same cycle (asynchronous reads), including reads
// of the address being written (old data until the clock edge).
module tb_lutram_dp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we_a;
  logic [6:0] addr_a, addr_b;
  logic [15:0] wdata_a, rdata_a, rdata_b;
  lutram_dp #(.DEPTH(128), .WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model [128];

  initial begin
    we_a = 0; addr_a = 0; addr_b = 0; wdata_a = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we_a = 1; addr_a = 7'(i); wdata_a = 16'($urandom); model[i] = wdata_a;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we_a = ($urandom % 2) == 0; addr_a = 7'($urandom); wdata_a = 16'($urandom);
      addr_b = (n % 7 == 0) ? addr_a : 7'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[addr_a]) begin
        failures++; $display("FAIL port A [%0d] = %h expected %h", addr_a, rdata_a, model[addr_a]);
      end
      if (rdata_b !== model[addr_b]) begin
        failures++; $display("FAIL port B [%0d] = %h expected %h", addr_b, rdata_b, model[addr_b]);
      end
      if (we_a) model[addr_a] = wdata_a;
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
