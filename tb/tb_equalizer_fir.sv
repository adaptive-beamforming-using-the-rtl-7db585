// Self-checking testbench of equalizer_fir (4 antennas, 5 taps). Loads
// random complex coefficients, streams random samples for the antennas in
// turn (with idle gaps), and compares each output with the FIR sum
// computed here from its own copy of each antenna's history (one rounding
// of the exact sum, saturated). Checks that a sample costs exactly F_EQ
// cycles (in_ready low for F_EQ-1 cycles after each accepted sample) and
// that the pass-through reset state holds before configuration.
module tb_equalizer_fir;
  import bf_pkg::*;
  localparam int N = 4, F = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, in_valid = 0, in_ready, out_valid;
  logic [1:0] cfg_ant, in_ant, out_ant;
  logic [2:0] cfg_tap;
  cplx_t cfg_coef, in_sample, out_sample;
  int checks = 0, failures = 0;
  longint hr [N][F], hi [N][F], cr [N][F], ci [N][F];

  equalizer_fir #(.N_ANT(N), .F_EQ(F)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rs(input longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  longint exp_re[$], exp_im[$];
  int     exp_ant[$];
  int     acc_cyc[$];
  int     cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_re.size() == 0) begin failures++; $display("FAIL unexpected output at cycle %0d", cyc); end
      else begin
        longint er, ei; int ea; q15_t gr, gi;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); ea = exp_ant.pop_front();
        gr = out_sample.re; gi = out_sample.im;
        if (longint'(gr) != er || longint'(gi) != ei || int'(out_ant) != ea) begin
          failures++;
          if (failures < 10) $display("FAIL ant %0d got (%0d,%0d) exp (%0d,%0d)", out_ant, gr, gi, er, ei);
        end
      end
    end
  end

  task automatic send(input int a, input int sr, input int si);
    longint sum_r, sum_i;
    // called at a negedge; the sample is taken at the next edge with in_ready
    in_valid = 1; in_ant = 2'(a); in_sample.re = 16'(sr); in_sample.im = 16'(si);
    while (!in_ready) @(negedge clk);
    acc_cyc.push_back(cyc);
    for (int t = F - 1; t > 0; t--) begin hr[a][t] = hr[a][t-1]; hi[a][t] = hi[a][t-1]; end
    hr[a][0] = sr; hi[a][0] = si;
    sum_r = 0; sum_i = 0;
    for (int t = 0; t < F; t++) begin
      sum_r += cr[a][t] * hr[a][t] - ci[a][t] * hi[a][t];
      sum_i += cr[a][t] * hi[a][t] + ci[a][t] * hr[a][t];
    end
    exp_re.push_back(rs(sum_r)); exp_im.push_back(rs(sum_i)); exp_ant.push_back(a);
    @(negedge clk);
  endtask

  initial begin
    cfg_ant = 0; cfg_tap = 0; cfg_coef = '0; in_ant = 0; in_sample = '0;
    for (int a = 0; a < N; a++)
      for (int t = 0; t < F; t++) begin hr[a][t] = 0; hi[a][t] = 0; cr[a][t] = (t == 0) ? 32767 : 0; ci[a][t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // pass-through before configuration
    for (int a = 0; a < N; a++) send(a, int'($urandom % 60000) - 30000, int'($urandom % 60000) - 30000);
    in_valid = 0;
    repeat (6) @(negedge clk);
    // configure
    for (int a = 0; a < N; a++)
      for (int t = 0; t < F; t++) begin
        @(negedge clk);
        cfg_we = 1; cfg_ant = 2'(a); cfg_tap = 3'(t);
        cfg_coef.re = 16'(int'($urandom % 24000) - 12000); cfg_coef.im = 16'(int'($urandom % 24000) - 12000);
        cr[a][t] = longint'(cfg_coef.re); ci[a][t] = longint'(cfg_coef.im);
      end
    @(negedge clk); cfg_we = 0;
    repeat (6) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      // back-to-back snapshots of all antennas
      for (int a = 0; a < N; a++) begin
        send(a, int'($urandom % 65536) - 32768, int'($urandom % 65536) - 32768);
      end
      if (n % 10 == 0) begin in_valid = 0; repeat (3) @(negedge clk); end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_re.size()); end
    // throughput: consecutive accepts within a burst are F cycles apart
    begin
      int bad = 0, good = 0;
      for (int i = 1; i < acc_cyc.size(); i++) begin
        if (acc_cyc[i] - acc_cyc[i-1] < F) bad++;
        if (acc_cyc[i] - acc_cyc[i-1] == F) good++;
      end
      checks++;
      if (bad != 0 || good < 1000) begin failures++; $display("FAIL throughput: %0d too fast, %0d at F", bad, good); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
