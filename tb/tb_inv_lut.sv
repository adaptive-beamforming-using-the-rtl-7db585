// Self-checking testbench of inv_lut: reads every entry through |y|^2
// values inside each table step and compares with mu*512/k computed here
// (1 LSB), checks that exactly entries 0..2 are saturated with mu = 0.005,
// that negative inputs read entry 0, and the two-cycle latency.
module tb_inv_lut;
  import bf_pkg::*;
  localparam real MU = 0.005;
  localparam int  DEPTH = 512;
  logic clk = 0, rst_n = 0, req = 0, valid, sat;
  q15_t mag2, inv_out;
  int checks = 0, failures = 0, nsat = 0;

  inv_lut #(.DEPTH(DEPTH), .MU(MU)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(input int v, input int k);
    real e;
    mag2 = 16'(v); req = 1;
    @(posedge clk); #1; req = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid after 1 cycle"); end
    @(posedge clk); #1;
    checks += 3;
    if (!valid) begin failures++; $display("FAIL no valid after 2 cycles"); end
    e = (k == 0) ? 1.0e9 : $floor(MU * DEPTH / k * 32768.0 + 0.5);
    if (e > 32767.0) e = 32767.0;
    if (real'(inv_out) - e > 1.0 || e - real'(inv_out) > 1.0) begin
      failures++; $display("FAIL k=%0d got %0d exp %0f", k, inv_out, e);
    end
    if (sat != (k < 3)) begin failures++; $display("FAIL sat flag k=%0d", k); end
    if (sat) nsat++;
  endtask

  initial begin
    mag2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < DEPTH; k++) look(k * 64 + int'($urandom % 64), k);
    look(-100, 0);
    checks++;
    if (nsat != 4) begin failures++; $display("FAIL %0d saturated lookups", nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
