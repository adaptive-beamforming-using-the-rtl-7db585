// Self-checking testbench of sine_lut: looks up every table step (and
// angles between steps, which must round down to the step) back to back,
// and compares with sin() computed here, to 1 LSB, with the output
// arriving exactly two cycles after the request.
module tb_sine_lut;
  import bf_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, req = 0, valid;
  angle_t angle;
  q15_t sin_out;
  int checks = 0, failures = 0;
  real expq[$];

  sine_lut dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results checked as they come out, in request order
  logic req_d1, req_d2;
  always @(posedge clk) begin
    req_d1 <= req; req_d2 <= req_d1;
    if (rst_n) begin
      if (valid !== req_d2) begin checks++; failures++; $display("FAIL valid timing"); end
      if (valid) begin
        real e;
        e = expq.pop_front();
        checks++;
        if (real'(sin_out) - e > 1.0 || e - real'(sin_out) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL sin got %0d exp %0f", sin_out, e);
        end
      end
    end
  end

  initial begin
    angle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk);
      req = 1;
      angle = 16'(k * 64 + ((k % 3) * 21));   // within the step of entry k
      expq.push_back($floor(32768.0 * $sin(2.0 * PI * k / 1024.0) + 0.5) > 32767.0 ? 32767.0
                     : $floor(32768.0 * $sin(2.0 * PI * k / 1024.0) + 0.5));
      if (k % 5 == 4) begin @(negedge clk); req = 0; end
    end
    @(negedge clk); req = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL lost lookups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
