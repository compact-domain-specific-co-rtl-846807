// tb_saber_levels: runs the polynomial arithmetic of Saber encapsulation on the
// co-processor at its default size for the three security levels l = 2, 3, 4
// (LightSaber, Saber, FireSaber). For each level the host (played by this testbench)
// computes b' = A^T * s' (l rows of l products each, lazily interpolated once per row)
// and v' = b^T * s' (l products, one interpolation), l^2 + l products in all, streaming
// the operands of each product in while the previous one is computed. Every result is
// reduced modulo x^256 + 1 in software and compared with ring products computed here.
// The number of products and interpolations per level is checked, and so is the total
// of arithmetic-engine busy cycles, (l^2 + l) * (130 + 1170) + (l + 1) * 518.
module tb_saber_levels;
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

  poly_t mat [4][4];
  poly_t sec [4];
  poly_t bvec [4];
  logic [15:0] c [512];
  logic [12:0] ring [256];
  logic [31:0] v;
  int tc_cycles = 0;
  always @(posedge clk) if (dut.tc_busy) tc_cycles++;

  // sum_j x[j] * y[j] for one output: operands streamed while the previous product runs
  task automatic inner(input int l, input int row, input bit transpose, input bit use_b, input int dst);
    for (int j = 0; j < l; j++) begin
      if (j == 0) begin
        push_poly(use_b ? bvec[0] : (transpose ? mat[0][row] : mat[row][0])); push_poly(sec[0]);
        dma_in(0, 128, 128);
        wr(REG_ADDR_A, 0); wr(REG_ADDR_B, 64);
      end
      run(CMD_EVAL, 130);
      if (j + 1 < l) begin
        push_poly(use_b ? bvec[j+1] : (transpose ? mat[j+1][row] : mat[row][j+1]));
        push_poly(sec[j+1]);
        run_with(j == 0 ? CMD_MUL : CMD_MAC, 1170, 1'b1);
      end else run(j == 0 ? CMD_MUL : CMD_MAC, 1170);
    end
    wr(REG_ADDR_C, dst);
    run(CMD_INTERP, 518);
  endtask

  task automatic check_ring(input int l, input int row, input bit transpose, input bit use_b, input int src);
    dma_out(src, 128);
    pop_result(c);
    foreach (ring[k]) ring[k] = '0;
    for (int j = 0; j < l; j++)
      ring_mac(ring, use_b ? bvec[j] : (transpose ? mat[j][row] : mat[row][j]), sec[j]);
    for (int k = 0; k < 256; k++)
      check(13'(c[k] - c[k+256]) == ring[k], $sformatf("l=%0d row %0d coef %0d", l, row, k));
  endtask

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; s_tvalid = 0; s_tdata = 0; s_tlast = 0; m_tready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 2; l <= 4; l++) begin
      automatic int mul0 = n_mul, mac0 = n_mac, int0 = n_interp, cyc0 = tc_cycles;
      foreach (mat[i, j]) rand_poly(mat[i][j], 0);
      foreach (sec[j]) rand_poly(sec[j], 1);
      foreach (bvec[j]) rand_poly(bvec[j], 0);
      // b' = A^T s': row i uses column i of A; results at 128 + 128 * i
      for (int i = 0; i < l; i++) inner(l, i, 1'b1, 1'b0, 128 + 128 * i);
      // v' = b^T s'
      inner(l, 0, 1'b0, 1'b1, 768);
      for (int i = 0; i < l; i++) check_ring(l, i, 1'b1, 1'b0, 128 + 128 * i);
      check_ring(l, 0, 1'b0, 1'b1, 768);
      check(n_mul + n_mac - mul0 - mac0 == l * l + l, $sformatf("l=%0d products %0d", l, n_mul + n_mac - mul0 - mac0));
      check(n_interp - int0 == l + 1, $sformatf("l=%0d interpolations", l));
      $display("l=%0d: %0d products, %0d interpolations, arithmetic %0d cycles", l,
               n_mul + n_mac - mul0 - mac0, n_interp - int0,
               tc_cycles - cyc0);
      check(tc_cycles - cyc0 == (l * l + l) * (130 + 1170) + (l + 1) * 518, "arithmetic cycle total");
    end
    check(n_overlap > 0, "no transfer overlapped with arithmetic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
