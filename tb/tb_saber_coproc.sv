// tb_saber_coproc: end-to-end testbench of the co-processor at its default size.
//
// Plays the part of the host software and of the DMA engine: it writes the command
// registers, streams operands in and results out (with random back-pressure on the
// output stream and random gaps on the input stream), and checks the results against
// products computed here.
//   1. one polynomial product a*b (LOAD of both operands as one 128-word transfer,
//      EVAL, MUL, INTERP, STORE); the 512 stored coefficients must equal the unreduced
//      product modulo 2^13, and their reduction c[i] - c[i+256] must equal the
//      product in Z_q[x]/(x^256 + 1) computed directly;
//   2. Saber's matrix-vector product A*s for l = 3 (nine products, three lazy
//      interpolations), checked row by row in the ring;
//      The operands of each product are streamed in while the previous product is
//      being computed (transfer and arithmetic engines overlap);
//   3. an arithmetic command written while the arithmetic engine is busy, and an
//      INTERP written during a transfer, must be refused and flagged; a LOAD ended
//      early by tlast must stop there.
// The cycle counter register is checked against the command latencies (EVAL 130,
// MUL/MAC 1170, INTERP 518). Each mechanism is counted and must occur.
module tb_saber_coproc;
  import saber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        reg_we;
  logic [2:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic        s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [63:0] s_tdata, m_tdata;

  saber_coproc dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_gap = 0, n_mul = 0, n_mac = 0, n_eval = 0, n_interp = 0;
  int n_refused = 0, n_early_last = 0;

  int n_overlap = 0, n_conflict = 0;
  always @(posedge clk) if (m_tvalid && !m_tready) n_stall++;
  // cycles in which a transfer and an arithmetic command run at the same time
  always @(posedge clk) if (dut.sp_busy && dut.tc_busy) n_overlap++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  // STATUS bit 0: anything busy, bit 3: transfer engine busy, bit 4: arithmetic busy
  task automatic wait_clear(input int b);
    logic [31:0] st;
    do rd(REG_STATUS, st); while (st[b]);
  endtask

  task automatic wait_idle();
    wait_clear(0);
  endtask

  // issue an arithmetic command, then (optionally) stream the next operands in while
  // it runs, wait for it and check its cycle count (0: do not check)
  task automatic run_with(input cmd_op_e op, input int exp_cycles, input bit load_next);
    logic [31:0] v;
    wr(REG_CMD, 32'(op));
    if (load_next) dma_in(0, 128, 128);
    wait_clear(4);
    rd(REG_STATUS, v);
    check(v[1] && !v[2], $sformatf("%s status %b", op.name(), v[2:0]));
    if (exp_cycles > 0) begin
      rd(REG_CYCLES, v);
      check(v == 32'(exp_cycles), $sformatf("%s took %0d cycles, expected %0d", op.name(), v, exp_cycles));
    end
    case (op)
      CMD_EVAL: n_eval++;
      CMD_MUL: n_mul++;
      CMD_MAC: n_mac++;
      CMD_INTERP: n_interp++;
      default: ;
    endcase
  endtask

  task automatic run(input cmd_op_e op, input int exp_cycles);
    run_with(op, exp_cycles, 1'b0);
  endtask

  // DMA into the co-processor: words are given as coefficient arrays
  logic [63:0] tx [$];
  logic [63:0] rx [$];

  task automatic dma_in(input int base, input int len_reg, input int nsend);
    wr(REG_ADDR_C, 32'(base));
    wr(REG_LEN, 32'(len_reg));
    wr(REG_CMD, 32'(CMD_LOAD));
    for (int n = 0; n < nsend; n++) begin
      @(negedge clk);
      while ($urandom % 5 == 0) begin
        s_tvalid = 1'b0; n_gap++;
        @(negedge clk);
      end
      s_tvalid = 1'b1; s_tdata = tx.pop_front(); s_tlast = (n == nsend - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
    end
    @(negedge clk);
    s_tvalid = 1'b0; s_tlast = 1'b0;
    wait_clear(3);
  endtask

  task automatic dma_out(input int base, input int len);
    int got = 0;
    wr(REG_ADDR_C, 32'(base));
    wr(REG_LEN, 32'(len));
    wr(REG_CMD, 32'(CMD_STORE));
    while (got < len) begin
      @(negedge clk);
      m_tready = ($urandom % 3) != 0;
      @(posedge clk);
      if (m_tvalid && m_tready) begin
        rx.push_back(m_tdata);
        got++;
        check(m_tlast == (got == len), "tlast position");
      end
    end
    @(negedge clk);
    m_tready = 1'b0;
    wait_idle();
  endtask

  typedef logic [12:0] poly_t [256];

  function automatic void push_poly(input poly_t p);
    for (int w = 0; w < 64; w++)
      tx.push_back({3'b0, p[w+192], 3'b0, p[w+128], 3'b0, p[w+64], 3'b0, p[w]});
  endfunction

  function automatic void rand_poly(output poly_t p, input bit small_coef);
    // small_coef: secret-like coefficients in [-4, 4] (centred binomial range for mu = 8)
    foreach (p[k]) p[k] = small_coef ? 13'(int'($urandom % 9) - 4) : 13'($urandom);
  endfunction

  // fetch the 512 stored coefficients from rx (128 words)
  function automatic void pop_result(output logic [15:0] c [512]);
    for (int h = 0; h < 2; h++)
      for (int w = 0; w < 64; w++) begin
        automatic logic [63:0] d = rx.pop_front();
        for (int l = 0; l < 4; l++) c[256*h + 64*l + w] = d[16*l +: 16];
      end
  endfunction

  // negacyclic product in Z_q[x]/(x^256+1), accumulated onto acc
  function automatic void ring_mac(inout logic [12:0] acc [256], input poly_t a, input poly_t b);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        if (i + j < 256) acc[i+j] = acc[i+j] + 13'(a[i] * b[j]);
        else             acc[i+j-256] = acc[i+j-256] - 13'(a[i] * b[j]);
      end
  endfunction

  poly_t a, b;
  poly_t mat [3][3];
  poly_t sec [3];
  logic [15:0] c [512];
  logic [12:0] ring [256];
  logic [12:0] full [512];
  logic [31:0] v;

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; s_tvalid = 0; s_tdata = 0; s_tlast = 0; m_tready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- 1. one product
    rand_poly(a, 0); rand_poly(b, 0);
    push_poly(a); push_poly(b);
    dma_in(0, 128, 128);
    wr(REG_ADDR_A, 0); wr(REG_ADDR_B, 64); wr(REG_ADDR_C, 128);
    run(CMD_EVAL, 130);
    run(CMD_MUL, 1170);
    run(CMD_INTERP, 518);
    dma_out(128, 128);
    pop_result(c);
    foreach (full[k]) full[k] = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) full[i+j] = full[i+j] + 13'(a[i] * b[j]);
    for (int k = 0; k < 512; k++)
      check(c[k] == {3'b0, full[k]}, $sformatf("product c[%0d] = %h expected %h", k, c[k], full[k]));
    foreach (ring[k]) ring[k] = '0;
    ring_mac(ring, a, b);
    for (int k = 0; k < 256; k++)
      check(13'(c[k] - c[k+256]) == ring[k], $sformatf("ring product [%0d]", k));

    // ---------------- 3a. command while busy is refused
    wr(REG_CMD, 32'(CMD_MUL));
    wr(REG_CMD, 32'(CMD_EVAL));
    rd(REG_STATUS, v);
    check(v[2] == 1'b1 && v[0] == 1'b1, "refused command not flagged");
    if (v[2]) n_refused++;
    wait_idle();

    // ---------------- 2. matrix-vector product A*s, l = 3
    foreach (mat[i, j]) rand_poly(mat[i][j], 0);
    foreach (sec[j]) rand_poly(sec[j], 1);
    // operands of product (i, j) are streamed in while product (i, j-1) is computed
    push_poly(mat[0][0]); push_poly(sec[0]);
    dma_in(0, 128, 128);
    wr(REG_ADDR_A, 0); wr(REG_ADDR_B, 64);
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        run(CMD_EVAL, 130);
        if (!(i == 2 && j == 2)) begin
          push_poly(mat[i + (j + 1) / 3][(j + 1) % 3]);
          push_poly(sec[(j + 1) % 3]);
        end
        if (j == 2) begin
          // the next operands cannot be streamed during INTERP: load after it
          run(CMD_MAC, 1170);
          wr(REG_ADDR_C, 128 + 128 * i);
          run(CMD_INTERP, 518);
          if (i < 2) dma_in(0, 128, 128);
        end
        else run_with(j == 0 ? CMD_MUL : CMD_MAC, 1170, 1'b1);
      end
    end
    for (int i = 0; i < 3; i++) begin
      dma_out(128 + 128 * i, 128);
      pop_result(c);
      foreach (ring[k]) ring[k] = '0;
      for (int j = 0; j < 3; j++) ring_mac(ring, mat[i][j], sec[j]);
      for (int k = 0; k < 256; k++)
        check(13'(c[k] - c[k+256]) == ring[k], $sformatf("A*s row %0d coef %0d", i, k));
    end

    // ---------------- 3c. INTERP refused while a transfer runs
    for (int n = 0; n < 8; n++) tx.push_back(64'(n));
    wr(REG_ADDR_C, 900);
    wr(REG_LEN, 8);
    wr(REG_CMD, 32'(CMD_LOAD));
    wr(REG_CMD, 32'(CMD_INTERP));
    rd(REG_STATUS, v);
    check(v[2] && v[3] && !v[4], $sformatf("INTERP during LOAD not refused, status %b", v[4:0]));
    if (v[2]) n_conflict++;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); s_tvalid = 1'b1; s_tdata = tx.pop_front(); s_tlast = (n == 7);
      @(posedge clk);
    end
    @(negedge clk); s_tvalid = 1'b0; s_tlast = 1'b0;
    wait_idle();

    // ---------------- 3b. LOAD ended early by tlast: 10 of 20 announced words
    for (int n = 0; n < 10; n++) tx.push_back(64'h1111_0000_0000_0000 + 64'(n));
    dma_in(800, 20, 10);
    dma_out(800, 12);
    for (int n = 0; n < 12; n++) begin
      automatic logic [63:0] d = rx.pop_front();
      if (n < 10) check(d == 64'h1111_0000_0000_0000 + 64'(n), "early tlast data");
      else if (n == 10) begin
        check(d != 64'h1111_0000_0000_0000 + 64'(n), "load did not stop at tlast");
        n_early_last++;
      end
    end

    // ---------------- mechanisms
    check(n_stall > 0, "no output back-pressure seen");
    check(n_gap > 0, "no input gap seen");
    check(n_mul > 0 && n_mac > 0 && n_eval > 0 && n_interp > 0, "a command never ran");
    check(n_refused > 0, "no refused command");
    check(n_early_last > 0, "no early tlast");
    check(n_overlap > 0, "no transfer overlapped with arithmetic");
    check(n_conflict > 0, "no refused INTERP during a transfer");
    $display("mechanisms: stall=%0d gap=%0d eval=%0d mul=%0d mac=%0d interp=%0d refused=%0d early_last=%0d overlap=%0d conflict=%0d",
             n_stall, n_gap, n_eval, n_mul, n_mac, n_interp, n_refused, n_early_last, n_overlap, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
