// tb_tc_interp: self-checking testbench of the Toom-Cook-4 interpolation datapath.
// For random cubic polynomials A(y), B(y) the seven point products
// A(p)*B(p) (p = inf, 2, 1, -1, 1/2 and -1/2 scaled by 64, 0) are computed here and fed
// in, one set per cycle, sometimes as the sum of several products (lazy interpolation).
// Each output row must equal the seven coefficients of the product polynomial (the sum
// of products), computed here by direct convolution, modulo 2^13. Also checks the
// 4-cycle latency and one-set-per-cycle throughput.
module tb_tc_interp;
  import saber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  coef_t w [NPTS];
  coef_t out [NPTS];
  tc_interp dut (.*);

  int checks = 0, failures = 0;
  logic [12:0] exp_q [$];
  int in_t [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // evaluations at the seven points of a cubic x, with the half points scaled by 8
  function automatic void evals(input int x [4], output int e [NPTS]);
    e[0] = x[3];
    e[1] = x[0] + 2 * x[1] + 4 * x[2] + 8 * x[3];
    e[2] = x[0] + x[1] + x[2] + x[3];
    e[3] = x[0] - x[1] + x[2] - x[3];
    e[4] = 8 * x[0] + 4 * x[1] + 2 * x[2] + x[3];
    e[5] = 8 * x[0] - 4 * x[1] + 2 * x[2] - x[3];
    e[6] = x[0];
  endfunction

  initial begin
    in_valid = 0; foreach (w[k]) w[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = (n % 5) != 4;
      if (in_valid) begin
        automatic int nsum = 1 + ($urandom % 3);
        longint c [NPTS];
        int acc [NPTS];
        foreach (c[k]) c[k] = 0;
        foreach (acc[k]) acc[k] = 0;
        for (int s = 0; s < nsum; s++) begin
          int x [4], y [4], ex [NPTS], ey [NPTS];
          foreach (x[k]) begin x[k] = $urandom % 8192; y[k] = $urandom % 8192; end
          evals(x, ex); evals(y, ey);
          foreach (acc[k]) acc[k] += ex[k] * ey[k];
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) c[i+j] += longint'(x[i]) * y[j];
        end
        foreach (w[k]) w[k] = coef_t'(acc[k]);
        foreach (c[k]) exp_q.push_back(13'(c[k]));
        in_t.push_back(cyc);
      end
      @(posedge clk); #1;
      if (out_valid) begin
        automatic int t0 = in_t.pop_front();
        checks++;
        if (cyc - t0 != 4) begin
          failures++; $display("FAIL latency %0d", cyc - t0);
        end
        for (int k = 0; k < NPTS; k++) begin
          automatic logic [12:0] e = exp_q.pop_front();
          checks++;
          if (out[k][12:0] !== e) begin
            failures++; $display("FAIL out[%0d] = %h expected %h", k, out[k][12:0], e);
          end
        end
      end
    end
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
