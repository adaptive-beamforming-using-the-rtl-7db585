// End-to-end testbench of adaptive_beamformer at its default size: 64
// antennas, 3 beams, 5-tap equalizers, 9-tap matched filter and a steering
// update every 250th snapshot.
//
// A QPSK source arrives as a plane wave (phase step pi*sin(20 deg) between
// antennas) plus noise. Beam 0 points at it, beam 1 points at it with a
// 70 degree phase offset, beam 2 starts with all-zero weights. For every
// snapshot the testbench computes, independently of the design,
//  - the equalizer outputs from its own per-antenna history,
//  - each beam output from the weights currently held in the design's
//    weight memory (bit exact),
//  - each matched-filter output from its own per-beam history (bit exact),
//  - the QPSK decisions,
// and checks the snapshot time against 64*5 + 3*64 + 3*18 cycles plus a
// fixed hand-over overhead. On update snapshots it checks every new weight
// against the floating-point update phi - mu*(2(|y|^4-|y|^2) -
// j sin(4 angle y))/y * x within the precision of the tables, and that beam
// 2 (y = 0, saturated division-table entry, zero coefficient) keeps its
// weights. Mechanisms counted, each must occur: input stalls, steering
// updates, CORDIC initial rotations, saturated division-table lookups, all
// four QPSK symbols.
module tb_adaptive_beamformer;
  import bf_pkg::*;
  localparam int  N = 64, B = 3, FE = 5, FM = 9, UP = 250;
  localparam int  SNAPS = 2 * UP + 2;
  localparam int  OVH = 5;                // hand-over cycles per snapshot
  localparam real MU = 0.005;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic eq_cfg_we = 0, mf_cfg_we = 0, w_cfg_we = 0, in_valid = 0, in_ready;
  logic [5:0] eq_cfg_ant;
  logic [2:0] eq_cfg_tap;
  cplx_t eq_cfg_coef, w_cfg_data, in_sample, bf_y, mf_y;
  logic [3:0] mf_cfg_tap;
  q15_t mf_cfg_coef;
  logic [7:0] w_cfg_addr;
  logic bf_valid, mf_valid, sym_valid, snap_done, cma_done;
  logic [1:0] bf_beam, mf_beam, sym_beam, sym_bits;

  adaptive_beamformer dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_upd = 0, n_prerot = 0, n_sat = 0, n_wchecked = 0;
  int seen [4];

  always #5 clk = ~clk;
  initial begin
    repeat (SNAPS * 700 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (dut.u_cma.prerot) n_prerot++;
    if (dut.u_cma.inv_sat) n_sat++;
  end

  function automatic longint rs(input longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // models
  longint ecr [N][FE], eci [N][FE], ehr [N][FE], ehi [N][FE];
  longint mh [FM], mhr [B][FM], mhi [B][FM];
  longint xr [N], xi [N];
  longint wr [N*B], wi [N*B];
  longint yr [B], yi [B], mr [B], mi [B];

  task automatic read_weights();
    for (int i = 0; i < N * B; i++) begin
      wr[i] = longint'($signed(dut.u_mem_wre.mem[i]));
      wi[i] = longint'($signed(dut.u_mem_wim.mem[i]));
    end
  endtask

  initial begin
    real th, g;
    int sym_q [$];
    for (int s = 0; s < 4; s++) seen[s] = 0;
    eq_cfg_ant = 0; eq_cfg_tap = 0; eq_cfg_coef = '0; mf_cfg_tap = 0; mf_cfg_coef = 0;
    w_cfg_addr = 0; w_cfg_data = '0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------------------------------------------------- configuration
    for (int a = 0; a < N; a++)
      for (int t = 0; t < FE; t++) begin
        eq_cfg_we = 1; eq_cfg_ant = 6'(a); eq_cfg_tap = 3'(t);
        if (t == 0) begin
          eq_cfg_coef.re = 16'(24000 + int'($urandom % 2000)); eq_cfg_coef.im = 16'(int'($urandom % 2000) - 1000);
        end else begin
          eq_cfg_coef.re = 16'(int'($urandom % 1600) - 800); eq_cfg_coef.im = 16'(int'($urandom % 1600) - 800);
        end
        ecr[a][t] = longint'(eq_cfg_coef.re); eci[a][t] = longint'(eq_cfg_coef.im);
        ehr[a][t] = 0; ehi[a][t] = 0;
        @(negedge clk);
      end
    eq_cfg_we = 0;
    for (int t = 0; t < FM; t++) begin
      mf_cfg_we = 1; mf_cfg_tap = 4'(t);
      mf_cfg_coef = (t == 0) ? 16'sd20000 : 16'(int'($urandom % 4000) - 2000);
      mh[t] = longint'(mf_cfg_coef);
      @(negedge clk);
    end
    mf_cfg_we = 0;
    for (int b = 0; b < B; b++) for (int t = 0; t < FM; t++) begin mhr[b][t] = 0; mhi[b][t] = 0; end
    g = 4.0 / N;
    for (int b = 0; b < B; b++)
      for (int k = 0; k < N; k++) begin
        th = PI * $sin(20.0 * PI / 180.0) * k + ((b == 1) ? 70.0 * PI / 180.0 : 0.0);
        w_cfg_we = 1; w_cfg_addr = 8'(b * N + k);
        w_cfg_data.re = (b == 2) ? 16'sd0 : 16'($rtoi(g * $cos(th) * 32768.0));
        w_cfg_data.im = (b == 2) ? 16'sd0 : 16'($rtoi(g * $sin(th) * 32768.0));
        @(negedge clk);
      end
    w_cfg_we = 0;

    // ---------------------------------------------------------- snapshots
    for (int n = 0; n < SNAPS; n++) begin
      int sr, si, cyc0, cyc, nbf, nmf, nsym, k;
      logic upd, took;
      q15_t gr, gi;
      longint ar, ai;
      upd = ((n + 1) % UP) == 0;
      read_weights();
      // source symbol (QPSK, amplitude 0.2) and raw samples
      sr = ($urandom % 2) ? 4634 : -4634;
      si = ($urandom % 2) ? 4634 : -4634;
      begin
        int rawr [N], rawi [N];
        for (int k = 0; k < N; k++) begin
          th = PI * $sin(20.0 * PI / 180.0) * k;
          rawr[k] = $rtoi(sr * $cos(th) - si * $sin(th)) + int'($urandom % 600) - 300;
          rawi[k] = $rtoi(sr * $sin(th) + si * $cos(th)) + int'($urandom % 600) - 300;
          for (int t = FE - 1; t > 0; t--) begin ehr[k][t] = ehr[k][t-1]; ehi[k][t] = ehi[k][t-1]; end
          ehr[k][0] = rawr[k]; ehi[k][0] = rawi[k];
          ar = 0; ai = 0;
          for (int t = 0; t < FE; t++) begin
            ar += ecr[k][t] * ehr[k][t] - eci[k][t] * ehi[k][t];
            ai += ecr[k][t] * ehi[k][t] + eci[k][t] * ehr[k][t];
          end
          xr[k] = rs(ar); xi[k] = rs(ai);
        end
        for (int b = 0; b < B; b++) begin
          ar = 0; ai = 0;
          for (int k = 0; k < N; k++) begin
            ar += wr[b*N+k] * xr[k] + wi[b*N+k] * xi[k];
            ai += wr[b*N+k] * xi[k] - wi[b*N+k] * xr[k];
          end
          yr[b] = rs(ar); yi[b] = rs(ai);
          for (int t = FM - 1; t > 0; t--) begin mhr[b][t] = mhr[b][t-1]; mhi[b][t] = mhi[b][t-1]; end
          mhr[b][0] = yr[b]; mhi[b][0] = yi[b];
          ar = 0; ai = 0;
          for (int t = 0; t < FM; t++) begin ar += mh[t] * mhr[b][t]; ai += mh[t] * mhi[b][t]; end
          mr[b] = rs(ar); mi[b] = rs(ai);
        end
        // drive and monitor, one loop iteration per clock cycle
        cyc0 = -1; cyc = 0; nbf = 0; nmf = 0; nsym = 0; k = 0;
        in_valid = 1; in_sample.re = 16'(rawr[0]); in_sample.im = 16'(rawi[0]);
        do begin
          took = in_valid && in_ready;
          @(posedge clk); #1; cyc++;
          if (took) begin
            if (k == 0) cyc0 = cyc - 1;
            k++;
            if (k < N) begin in_sample.re = 16'(rawr[k]); in_sample.im = 16'(rawi[k]); end
            else in_valid = 0;
          end
          if (bf_valid) begin
            gr = bf_y.re; gi = bf_y.im;
            checks++;
            if (int'(bf_beam) != nbf || longint'(gr) != yr[nbf] || longint'(gi) != yi[nbf]) begin
              failures++;
              if (failures < 10) $display("FAIL snap %0d beam %0d y (%0d,%0d) exp (%0d,%0d)", n, bf_beam, gr, gi, yr[nbf], yi[nbf]);
            end
            nbf++;
          end
          if (mf_valid) begin
            gr = mf_y.re; gi = mf_y.im;
            checks++;
            if (int'(mf_beam) != nmf || longint'(gr) != mr[nmf] || longint'(gi) != mi[nmf]) begin
              failures++;
              if (failures < 10) $display("FAIL snap %0d beam %0d mf (%0d,%0d) exp (%0d,%0d)", n, mf_beam, gr, gi, mr[nmf], mi[nmf]);
            end
            nmf++;
          end
          if (sym_valid) begin
            checks++;
            if (int'(sym_beam) != nsym || sym_bits != {mr[nsym] < 0, mi[nsym] < 0}) begin
              failures++; $display("FAIL snap %0d symbol", n);
            end
            seen[sym_bits]++;
            nsym++;
          end
          if (cma_done) n_upd++;
        end while (!snap_done && cyc < 5000);
        checks += 2;
        if (nbf != B || nmf != B || nsym != B) begin failures++; $display("FAIL snap %0d: %0d/%0d/%0d outputs", n, nbf, nmf, nsym); end
        if (!upd && cyc - cyc0 != N * FE + N * B + 2 * FM * B + OVH) begin
          failures++; $display("FAIL snap %0d took %0d cycles", n, cyc - cyc0);
        end
        if (n == 0) $display("snapshot time: %0d cycles (%0d + %0d + %0d + %0d)", cyc - cyc0, N * FE, N * B, 2 * FM * B, OVH);
        if (upd) $display("update snapshot time: %0d cycles", cyc - cyc0);
      end
      // steering update against the floating-point rule
      if (upd) begin
        longint nwr [N*B], nwi [N*B];
        real a, bb, p, thy, nr, ni, cr, ci, tol, er, ei;
        for (int i = 0; i < N * B; i++) begin
          nwr[i] = longint'($signed(dut.u_mem_wre.mem[i]));
          nwi[i] = longint'($signed(dut.u_mem_wim.mem[i]));
        end
        for (int b = 0; b < B; b++) begin
          a = yr[b] / 32768.0; bb = yi[b] / 32768.0;
          p = a * a + bb * bb;
          if (b == 2) begin
            for (int k = 0; k < N; k++) begin
              checks++;
              if (nwr[b*N+k] != wr[b*N+k] || nwi[b*N+k] != wi[b*N+k]) begin failures++; $display("FAIL beam 2 weight changed"); end
            end
          end else if (p > 0.05 && p < 0.97) begin
            thy = $atan2(bb, a);
            nr = 2.0 * (p * p - p);
            ni = -$sin(4.0 * thy);
            cr = MU * (nr * a + ni * bb) / p * 32768.0;
            ci = MU * (ni * a - nr * bb) / p * 32768.0;
            tol = 3.0 + $sqrt(cr * cr + ci * ci) * 2.0 / (512.0 * p) + MU * 0.007 / $sqrt(p) * 32768.0;
            n_wchecked++;
            for (int k = 0; k < N; k++) begin
              er = wr[b*N+k] - (cr * xr[k] - ci * xi[k]) / 32768.0;
              ei = wi[b*N+k] - (cr * xi[k] + ci * xr[k]) / 32768.0;
              checks++;
              if (fabs(nwr[b*N+k] - er) > tol * 0.4 + 1.5 || fabs(nwi[b*N+k] - ei) > tol * 0.4 + 1.5) begin
                failures++;
                if (failures < 20) $display("FAIL beam %0d w[%0d] (%0d,%0d) exp (%0f,%0f)", b, k, nwr[b*N+k], nwi[b*N+k], er, ei);
              end
            end
            $display("update of beam %0d at |y|^2 = %0f checked", b, p);
          end
        end
      end
    end

    // ---------------------------------------------------------- mechanisms
    $display("stalls %0d, updates %0d, initial rotations %0d, saturated lookups %0d, weight sets checked %0d",
             n_stall, n_upd, n_prerot, n_sat, n_wchecked);
    $display("symbols 00:%0d 01:%0d 10:%0d 11:%0d", seen[0], seen[1], seen[2], seen[3]);
    checks += 9;
    if (n_stall == 0) begin failures++; $display("FAIL no input stall"); end
    if (n_upd != 2 * B) begin failures++; $display("FAIL %0d beam updates", n_upd); end
    if (n_prerot == 0) begin failures++; $display("FAIL no CORDIC initial rotation"); end
    if (n_sat == 0) begin failures++; $display("FAIL no saturated division-table lookup"); end
    if (n_wchecked == 0) begin failures++; $display("FAIL no update checked"); end
    for (int s = 0; s < 4; s++) if (seen[s] == 0) begin failures++; $display("FAIL symbol %0d never seen", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
