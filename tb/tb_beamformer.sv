// Self-checking testbench of beamformer (8 antennas, 3 beams). Serves the
// snapshot and steering-vector memories from arrays here (one-cycle read
// latency), runs several snapshots with random data and compares every beam
// output with sum_k conj(phi_b[k]) * x[k] computed here (one rounding,
// saturated). Checks that beam b's output appears N_ANT*(b+1) + 2 cycles
// after start, i.e. N_ANT cycles per beam, and that done marks the last.
module tb_beamformer;
  import bf_pkg::*;
  localparam int N = 8, B = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done, x_re, w_re, y_valid;
  logic [2:0] x_addr;
  logic [4:0] w_addr;
  logic [1:0] y_beam;
  cplx_t x_rdata, w_rdata, y;
  cplx_t xm [N], wm [N*B];
  int checks = 0, failures = 0;

  beamformer #(.N_ANT(N), .N_BEAM(B)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (x_re) x_rdata <= xm[x_addr];
    if (w_re) w_rdata <= wm[w_addr];
  end

  function automatic longint rs(input longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    x_rdata = '0; w_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      longint er [B], ei [B];
      int cyc, got;
      int amp;
      amp = (n % 4 == 3) ? 32767 : 6000;   // some snapshots saturate
      for (int k = 0; k < N; k++) begin
        xm[k].re = 16'(int'($urandom % (2 * amp)) - amp); xm[k].im = 16'(int'($urandom % (2 * amp)) - amp);
      end
      for (int i = 0; i < N * B; i++) begin
        wm[i].re = 16'(int'($urandom % 16000) - 8000); wm[i].im = 16'(int'($urandom % 16000) - 8000);
      end
      for (int b = 0; b < B; b++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          longint wr, wi, xr, xi;
          wr = wm[b*N+k].re; wi = wm[b*N+k].im; xr = xm[k].re; xi = xm[k].im;
          sr += wr * xr + wi * xi;
          si += wr * xi - wi * xr;
        end
        er[b] = rs(sr); ei[b] = rs(si);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; got = 0;
      while (got < B && cyc < 200) begin
        if (y_valid) begin
          q15_t gr, gi;
          gr = y.re; gi = y.im;
          checks += 3;
          if (int'(y_beam) != got) begin failures++; $display("FAIL beam order"); end
          if (longint'(gr) != er[got] || longint'(gi) != ei[got]) begin
            failures++;
            $display("FAIL snap %0d beam %0d got (%0d,%0d) exp (%0d,%0d)", n, got, gr, gi, er[got], ei[got]);
          end
          if (cyc != N * (got + 1) + 2) begin failures++; $display("FAIL beam %0d at cycle %0d", got, cyc); end
          checks++;
          if (done != (got == B - 1)) begin failures++; $display("FAIL done"); end
          got++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (got != B) begin failures++; $display("FAIL only %0d beams", got); end
      repeat (int'($urandom % 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
