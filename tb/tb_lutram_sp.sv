// tb_lutram_sp: self-checking testbench of the single-port LUT RAM. Random writes and
// reads are compared with a reference array; reads are checked in the same cycle as the
// address (asynchronous read) and a write must not change other words.
module tb_lutram_sp;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] addr;
  logic [15:0] wdata, rdata;
  lutram_sp #(.DEPTH(64), .WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model [64];

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; addr = 6'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++; $display("FAIL mem[%0d] = %h expected %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
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
