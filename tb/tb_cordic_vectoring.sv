// Self-checking testbench of cordic_vectoring. Random Cartesian inputs in
// all four quadrants (and the axes) are converted and compared with
// atan2 and sqrt computed here in floating point; the angle must be within
// 8 + 30000/r binary-angle units (2^16 per circle; the word keeps fewer
// significant bits for short vectors) and the magnitude within 24 LSB.
// Also checks the latency (done ITER + 3 clock edges after start) and that
// the initial +-pi/2 rotation is used exactly for inputs with x < 0.
module tb_cordic_vectoring;
  import bf_pkg::*;
  localparam int ITER = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, busy, done, prerot;
  q15_t x_in, y_in, mag;
  angle_t angle;
  int checks = 0, failures = 0, n_prerot = 0;

  cordic_vectoring #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int xi, input int yi);
    int lat;
    real ea, em, da, tol;
    x_in = 16'(xi); y_in = 16'(yi); start = 1;
    @(posedge clk); #1; start = 0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != ITER + 3) begin failures++; $display("FAIL latency %0d", lat); end
    ea = $atan2(real'(yi), real'(xi)) / (2.0 * PI) * 65536.0;
    da = real'(angle) - ea;
    if (da > 32768.0) da -= 65536.0;
    if (da < -32768.0) da += 65536.0;
    em = $sqrt(real'(xi) * real'(xi) + real'(yi) * real'(yi));
    if (em > 32767.0) em = 32767.0;
    checks += 3;
    tol = 8.0 + 30000.0 / em;
    if (da > tol || da < -tol) begin
      failures++; $display("FAIL angle x=%0d y=%0d got %0d exp %0f", xi, yi, angle, ea);
    end
    if (real'(mag) - em > 24.0 || em - real'(mag) > 24.0) begin
      failures++; $display("FAIL mag x=%0d y=%0d got %0d exp %0f", xi, yi, mag, em);
    end
    if (prerot != (xi < 0)) begin failures++; $display("FAIL prerot x=%0d", xi); end
    if (prerot) n_prerot++;
  endtask

  initial begin
    x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    one(20000, 0); one(0, 20000); one(-20000, 0); one(0, -20000);
    one(-20000, 1); one(-20000, -1); one(16000, 16000); one(-16000, -16000);
    for (int n = 0; n < 500; n++) begin
      int xi, yi;
      real r, t;
      r = 2000.0 + real'($urandom % 21000);
      t = real'($urandom % 100000) / 100000.0 * 2.0 * PI;
      xi = $rtoi(r * $cos(t)); yi = $rtoi(r * $sin(t));
      one(xi, yi);
    end
    checks++;
    if (n_prerot < 100) begin failures++; $display("FAIL too few initial rotations"); end
    $display("initial rotations: %0d", n_prerot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
