// tb_tc_eval: self-checking testbench of the Toom-Cook-4 evaluation datapath.
// Random coefficient quadruples are streamed one per cycle; each output row is compared
// with the polynomial a0 + a1*y + a2*y^2 + a3*y^3 evaluated here at y = inf, 2, 1, -1
// and (scaled by 8) at 1/2, -1/2, and at 0, modulo 2^16. Also checks the one-cycle latency.
module tb_tc_eval;
  import saber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  coef_t a [4];
  coef_t aw [NPTS];
  tc_eval dut (.*);

  int checks = 0, failures = 0;
  coef_t exp_q [$];

  function automatic int pt(input int x0, x1, x2, x3, input int d0, d1, d2, d3);
    return d0 * x0 + d1 * x1 + d2 * x2 + d3 * x3;
  endfunction

  initial begin
    in_valid = 0; foreach (a[k]) a[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      foreach (a[k]) a[k] = (n < 8) ? 16'hFFFF - coef_t'(n) : coef_t'($urandom);
      if (in_valid) begin
        automatic int x0 = a[0], x1 = a[1], x2 = a[2], x3 = a[3];
        exp_q.push_back(coef_t'(x3));
        exp_q.push_back(coef_t'(pt(x0, x1, x2, x3, 1, 2, 4, 8)));
        exp_q.push_back(coef_t'(pt(x0, x1, x2, x3, 1, 1, 1, 1)));
        exp_q.push_back(coef_t'(pt(x0, x1, x2, x3, 1, -1, 1, -1)));
        exp_q.push_back(coef_t'(pt(x0, x1, x2, x3, 8, 4, 2, 1)));
        exp_q.push_back(coef_t'(pt(x0, x1, x2, x3, 8, -4, 2, -1)));
        exp_q.push_back(coef_t'(x0));
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++; $display("FAIL out_valid latency");
      end
      if (out_valid) for (int k = 0; k < NPTS; k++) begin
        automatic coef_t e = exp_q.pop_front();
        checks++;
        if (aw[k] !== e) begin
          failures++; $display("FAIL aw%0d = %h expected %h", k + 1, aw[k], e);
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
