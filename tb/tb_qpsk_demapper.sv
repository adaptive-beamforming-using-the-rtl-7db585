// Self-checking testbench of qpsk_demapper: random matched-filter outputs
// (including zero and the extreme values) for all beams; each decision must
// be {I < 0, Q < 0} one cycle later, with the beam number carried along.
// All four symbols must occur.
module tb_qpsk_demapper;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] in_beam, out_beam, bits;
  cplx_t in_y;
  int checks = 0, failures = 0;
  int seen [4];

  qpsk_demapper #(.N_BEAM(3)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] eb;
    int r, i;
    in_y = '0; in_beam = 0;
    for (int s = 0; s < 4; s++) seen[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      r = (n % 50 == 0) ? 0 : (n % 50 == 1) ? -32768 : int'($urandom % 65536) - 32768;
      i = (n % 50 == 2) ? 0 : (n % 50 == 3) ? 32767 : int'($urandom % 65536) - 32768;
      in_y.re = 16'(r); in_y.im = 16'(i); in_beam = 2'(n % 3);
      in_valid = (n % 9) != 8;
      eb = {r < 0, i < 0};
      @(negedge clk);
      checks++;
      if (out_valid != ((n % 9) != 8)) begin failures++; $display("FAIL valid"); end
      if (out_valid) begin
        checks++;
        if (bits != eb || int'(out_beam) != n % 3) begin
          failures++; $display("FAIL (%0d,%0d) bits %b exp %b", r, i, bits, eb);
        end
        seen[bits]++;
      end
      in_valid = 0;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL symbol %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
