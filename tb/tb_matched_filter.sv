// Self-checking testbench of matched_filter (3 beams, 9 taps). Loads random
// real coefficients, feeds samples of the beams in turn and compares each
// output with the I and Q FIR sums computed here from per-beam histories
// (one rounding, saturated). Checks that each sample takes exactly 2*F_MF
// cycles (18; 54 for the three beams of a snapshot) and the pass-through
// reset state.
module tb_matched_filter;
  import bf_pkg::*;
  localparam int B = 3, F = 9;
  logic clk = 0, rst_n = 0, cfg_we = 0, in_valid = 0, in_ready, out_valid;
  logic [3:0] cfg_tap;
  q15_t cfg_coef;
  logic [1:0] in_beam, out_beam;
  cplx_t in_y, out_y;
  int checks = 0, failures = 0;
  longint hr [B][F], hi [B][F], h [F];

  matched_filter #(.N_BEAM(B), .F_MF(F)) dut (.*);

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

  task automatic one(input int b, input int amp);
    longint sr, si;
    int cyc;
    q15_t gr, gi;
    in_y.re = 16'(int'($urandom % (2 * amp)) - amp); in_y.im = 16'(int'($urandom % (2 * amp)) - amp);
    in_beam = 2'(b);
    for (int t = F - 1; t > 0; t--) begin hr[b][t] = hr[b][t-1]; hi[b][t] = hi[b][t-1]; end
    hr[b][0] = longint'(in_y.re); hi[b][0] = longint'(in_y.im);
    sr = 0; si = 0;
    for (int t = 0; t < F; t++) begin sr += h[t] * hr[b][t]; si += h[t] * hi[b][t]; end
    checks++;
    if (!in_ready) begin failures++; $display("FAIL not ready"); end
    in_valid = 1;
    @(negedge clk); in_valid = 0;
    cyc = 1;
    while (!out_valid && cyc < 100) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      @(negedge clk); cyc++;
    end
    gr = out_y.re; gi = out_y.im;
    checks += 3;
    if (cyc != 2 * F) begin failures++; $display("FAIL %0d cycles", cyc); end
    if (int'(out_beam) != b) begin failures++; $display("FAIL beam"); end
    if (longint'(gr) != rs(sr) || longint'(gi) != rs(si)) begin
      failures++;
      if (failures < 10) $display("FAIL beam %0d got (%0d,%0d) exp (%0d,%0d)", b, gr, gi, rs(sr), rs(si));
    end
  endtask

  initial begin
    cfg_tap = 0; cfg_coef = 0; in_beam = 0; in_y = '0;
    for (int b = 0; b < B; b++) for (int t = 0; t < F; t++) begin hr[b][t] = 0; hi[b][t] = 0; end
    for (int t = 0; t < F; t++) h[t] = (t == 0) ? 32767 : 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < B; b++) one(b, 30000);
    for (int t = 0; t < F; t++) begin
      cfg_we = 1; cfg_tap = 4'(t); cfg_coef = 16'(int'($urandom % 20000) - 10000); h[t] = longint'(cfg_coef);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int n = 0; n < 200; n++) one(n % B, (n % 7 == 6) ? 32767 : 12000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
