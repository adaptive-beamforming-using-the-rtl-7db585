// Self-checking testbench of complex_div: random numerators X and
// denominators Y; e = mu/|Y|^2 is formed here (saturated like the table);
// the result must equal (X * conj(Y)) * e, computed here in floating
// point, within 1 LSB, one cycle after valid_in. A second set checks
// against the true quotient mu*X/Y to within the precision of e.
module tb_complex_div;
  import bf_pkg::*;
  localparam real MU = 0.005;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  cplx_t num, den, quo;
  q15_t e;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  complex_div dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, b, c, d, ee, er, ei, m2, tr, ti;
    num = '0; den = '0; e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      num.re = 16'($urandom); num.im = 16'($urandom);
      den.re = 16'($urandom); den.im = 16'($urandom);
      a = num.re / 32768.0; b = num.im / 32768.0; c = den.re / 32768.0; d = den.im / 32768.0;
      m2 = c * c + d * d;
      ee = (m2 * 32768.0 < MU * 32768.0 / 1.0) ? 1.0 : MU / m2;
      if (ee > 32767.0 / 32768.0) ee = 32767.0 / 32768.0;
      e = 16'($rtoi($floor(ee * 32768.0 + 0.5)));
      valid_in = 1;
      @(negedge clk);
      valid_in = 0;
      er = (a * c + b * d) * (e / 32768.0) * 32768.0;
      ei = (b * c - a * d) * (e / 32768.0) * 32768.0;
      if (er > 32767.0) er = 32767.0;
      if (er < -32768.0) er = -32768.0;
      if (ei > 32767.0) ei = 32767.0;
      if (ei < -32768.0) ei = -32768.0;
      checks += 3;
      if (!valid_out) begin failures++; $display("FAIL valid_out"); end
      if (real'(quo.re) - er > 1.0 || er - real'(quo.re) > 1.0 ||
          real'(quo.im) - ei > 1.0 || ei - real'(quo.im) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d,%0d exp %0f,%0f", n, quo.re, quo.im, er, ei);
      end
      // where e is not saturated it approximates mu/|Y|^2: compare with mu*X/Y
      if (MU / m2 < 0.99) begin
        tr = MU * (a * c + b * d) / m2 * 32768.0;
        ti = MU * (b * c - a * d) / m2 * 32768.0;
        if (fabs(real'(quo.re) - tr) > 2.0 + 0.002 * fabs(tr) * 32768.0 / (MU / m2 * 32768.0) ||
            fabs(real'(quo.im) - ti) > 2.0 + 0.002 * fabs(ti) * 32768.0 / (MU / m2 * 32768.0)) begin
          failures++;
          if (failures < 10) $display("FAIL true quotient n=%0d got %0d,%0d exp %0f,%0f", n, quo.re, quo.im, tr, ti);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
