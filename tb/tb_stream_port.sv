// tb_stream_port: self-checking testbench of the DMA stream port, with a behavioural
// 64-bit memory (one-cycle read latency) on its memory side. A load with random input
// gaps must place the words at base, base+1, ...; a store with random back-pressure must
// return them in order with tlast on the last word, and a store with ready held high
// must deliver one word per cycle.
module tb_stream_port;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start_load, start_store, busy, done;
  logic [9:0] base;
  logic [10:0] len;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [63:0] s_tdata, m_tdata, mem_wdata, mem_rdata;
  logic [9:0] mem_addr;
  logic [3:0] mem_we;
  stream_port #(.AW(10)) dut (.*);

  logic [63:0] mem [1024];
  always_ff @(posedge clk) begin
    mem_rdata <= mem[mem_addr];
    if (mem_we == 4'hF) mem[mem_addr] <= mem_wdata;
  end

  int checks = 0, failures = 0;
  logic [63:0] words [100];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic store(input int b, input int n, input bit full_rate);
    int got = 0, cyc = 0;
    @(negedge clk); base = 10'(b); len = 11'(n); start_store = 1;
    @(negedge clk); start_store = 0;
    while (got < n) begin
      m_tready = full_rate || ($urandom % 2);
      @(posedge clk);
      cyc++;
      if (m_tvalid && m_tready) begin
        check(m_tdata == words[got], $sformatf("store word %0d", got));
        got++;
        check(m_tlast == (got == n), "tlast");
      end
      @(negedge clk);
    end
    m_tready = 0;
    if (full_rate) check(cyc <= n + 2, $sformatf("store of %0d words took %0d cycles", n, cyc));
    check(!busy, "busy after store");
  endtask

  initial begin
    start_load = 0; start_store = 0; base = 0; len = 0;
    s_tvalid = 0; s_tdata = 0; s_tlast = 0; m_tready = 0;
    foreach (mem[i]) mem[i] = '0;
    foreach (words[i]) words[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load 100 words at 300
    @(negedge clk); base = 10'd300; len = 11'd100; start_load = 1;
    @(negedge clk); start_load = 0;
    for (int n = 0; n < 100; n++) begin
      while ($urandom % 3 == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1; s_tdata = words[n]; s_tlast = (n == 99);
      @(posedge clk);
      check(s_tready, "s_tready during load");
      @(negedge clk);
    end
    s_tvalid = 0; s_tlast = 0;
    @(negedge clk);
    check(!busy, "busy after load");
    for (int n = 0; n < 100; n++) check(mem[300 + n] == words[n], $sformatf("mem word %0d", n));
    check(mem[299] == 0 && mem[400] == 0, "write outside the transfer");
    store(300, 100, 0);
    store(300, 100, 1);
    store(300, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
