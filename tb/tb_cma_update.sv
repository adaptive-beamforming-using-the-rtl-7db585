// Self-checking testbench of cma_update (16 antennas). The block's memory
// ports are served from arrays here. For random beam outputs y it checks
//  - the update coefficient against mu*(2(|y|^4-|y|^2) - j sin(4 angle y))/y
//    computed here in floating point, within the precision of the tables;
//  - every new steering weight against phi[k] - coef*x[k] (bit exact);
//  - every new weight against the floating-point update as a whole;
//  - the cycle count from start to done (N_ANT + 26);
// and that the CORDIC's initial rotation and a saturated division-table
// entry each occur. |y| is drawn from 0.3 to 0.98 (plus a few tiny values
// for the saturated entries): |y|^2 >= 1 cannot be held in 1.15, where the
// block's modulus term saturates by design, so no reference is kept there.
module tb_cma_update;
  import bf_pkg::*;
  localparam int  N = 16;
  localparam real MU = 0.005;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, busy, done, rd_en, w_we, prerot, inv_sat;
  logic [3:0] rd_addr, w_addr;
  cplx_t y, x_rdata, w_rdata, w_wdata, coef;
  cplx_t xm [N], wm [N], w0 [N];
  int checks = 0, failures = 0, n_prerot = 0, n_sat = 0, n_wr = 0;

  cma_update #(.N_ANT(N), .MU(MU)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rd_en) begin x_rdata <= xm[rd_addr]; w_rdata <= wm[rd_addr]; end
    if (w_we) begin wm[w_addr] <= w_wdata; n_wr++; end
    if (prerot) n_prerot++;
    if (inv_sat) n_sat++;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic one(input int yr, input int yi);
    int cyc;
    real a, b, p, th, nr, ni, cr, ci, tol, er, ei, gr, gi;
    q15_t c_re, c_im, x_re, x_im, o_re, o_im, n_re, n_im;
    for (int k = 0; k < N; k++) begin
      xm[k].re = 16'($urandom_range(0, 16000) - 8000);
      xm[k].im = 16'($urandom_range(0, 16000) - 8000);
      wm[k].re = 16'($urandom_range(0, 4000) - 2000);
      wm[k].im = 16'($urandom_range(0, 4000) - 2000);
      w0[k] = wm[k];
    end
    y.re = 16'(yr); y.im = 16'(yi);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; n_wr = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N + 26) begin failures++; $display("FAIL cycles %0d", cyc); end
    checks++;
    if (n_wr != N) begin failures++; $display("FAIL %0d writes", n_wr); end
    // coefficient
    c_re = coef.re; c_im = coef.im;
    a = yr / 32768.0; b = yi / 32768.0;
    p = a * a + b * b;
    th = $atan2(b, a);
    nr = 2.0 * (p * p - p);
    ni = -$sin(4.0 * th);
    cr = (p == 0.0) ? 0.0 : MU * (nr * a + ni * b) / p * 32768.0;
    ci = (p == 0.0) ? 0.0 : MU * (ni * a - nr * b) / p * 32768.0;
    if (p > 3.0 / 512.0) begin
      tol = 3.0 + $sqrt(cr * cr + ci * ci) * 2.0 / (512.0 * p) + MU * 0.007 / $sqrt(p) * 32768.0;
      checks++;
      if (fabs(c_re - cr) > tol || fabs(c_im - ci) > tol) begin
        failures++;
        $display("FAIL coef y=(%0d,%0d) got (%0d,%0d) exp (%0f,%0f) tol %0f", yr, yi, c_re, c_im, cr, ci, tol);
      end
    end
    for (int k = 0; k < N; k++) begin
      x_re = xm[k].re; x_im = xm[k].im; o_re = w0[k].re; o_im = w0[k].im; n_re = wm[k].re; n_im = wm[k].im;
      // bit exact against the block's own coefficient
      gr = (real'(o_re) * 32768.0 - (real'(c_re) * x_re - real'(c_im) * x_im)) / 32768.0;
      gi = (real'(o_im) * 32768.0 - (real'(c_re) * x_im + real'(c_im) * x_re)) / 32768.0;
      checks++;
      if (real'(n_re) != $floor(gr + 0.5) || real'(n_im) != $floor(gi + 0.5)) begin
        failures++;
        $display("FAIL w[%0d] got (%0d,%0d) exp (%0f,%0f)", k, n_re, n_im, gr, gi);
      end
      // against the floating-point update
      if (p > 3.0 / 512.0) begin
        er = o_re - (cr * x_re - ci * x_im) / 32768.0;
        ei = o_im - (cr * x_im + ci * x_re) / 32768.0;
        checks++;
        if (fabs(n_re - er) > tol * 0.4 + 1.5 || fabs(n_im - ei) > tol * 0.4 + 1.5) begin
          failures++;
          $display("FAIL w[%0d] vs update: got (%0d,%0d) exp (%0f,%0f)", k, n_re, n_im, er, ei);
        end
      end
    end
  endtask

  initial begin
    y = '0; x_rdata = '0; w_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(23170, 23170);     // |y| = 1 on a QPSK point: coefficient near 0
    checks++;
    if (int'(coef.re) > 2 || int'(coef.re) < -2 || int'(coef.im) > 2 || int'(coef.im) < -2) begin
      failures++; $display("FAIL coef at QPSK point (%0d,%0d)", coef.re, coef.im);
    end
    one(-12000, 5000);
    one(100, -150);        // tiny |y|: saturated table entry
    one(0, 0);
    for (int n = 0; n < 60; n++) begin
      real r, t;
      r = 0.3 + real'($urandom % 680) / 1000.0;
      t = real'($urandom % 100000) / 100000.0 * 2.0 * PI;
      one($rtoi(r * $cos(t) * 32768.0), $rtoi(r * $sin(t) * 32768.0));
    end
    checks += 2;
    if (n_prerot == 0) begin failures++; $display("FAIL no initial rotation"); end
    if (n_sat == 0) begin failures++; $display("FAIL no saturated table entry"); end
    $display("initial rotations %0d, saturated lookups %0d", n_prerot, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
