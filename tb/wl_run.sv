// One array configuration of adaptive_beamformer, driven and checked for
// the application-size testbench (tb_array_sizes).
//
// Instantiates the top with N antennas and B beams, leaves the equalizers
// and the matched filter at their reset pass-through taps, loads plane-wave
// steering vectors (beam b offset by b*40 degrees) and streams SNAPS
// snapshots of a noisy QPSK plane wave. For every snapshot it checks,
// against a model computed here from the weights held in the design's
// weight memory, every beam output and every matched-filter output bit for
// bit, and the snapshot time against N*5 + N*B + 18*B + 5 cycles, or that
// plus B*(N + 27) on a snapshot with a steering update (UP is the
// update period). It also checks that each update changes the weights of
// every beam and fires B update pulses. `finished` rises with the
// accumulated check and failure counts once all snapshots are done.
// Sizes and the update period are given by the instantiating testbench.
module wl_run
  import bf_pkg::*;
#(
  parameter int N     = 64,
  parameter int B     = 3,
  parameter int UP    = 2,
  parameter int SNAPS = 3
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int  AW  = (N > 1) ? $clog2(N) : 1;
  localparam int  WAW = (N * B > 1) ? $clog2(N * B) : 1;
  localparam int  BW  = (B > 1) ? $clog2(B) : 1;
  localparam int  OVH = 5;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic w_cfg_we = 0, in_valid = 0, in_ready;
  logic [WAW-1:0] w_cfg_addr = '0;
  cplx_t w_cfg_data = '0, in_sample = '0, bf_y, mf_y;
  logic bf_valid, mf_valid, sym_valid, snap_done, cma_done;
  logic [BW-1:0] bf_beam, mf_beam, sym_beam;
  logic [1:0] sym_bits;

  adaptive_beamformer #(.N_ANT(N), .N_BEAM(B), .UPDATE_PERIOD(UP)) dut (
    .clk, .rst_n,
    .eq_cfg_we(1'b0), .eq_cfg_ant('0), .eq_cfg_tap('0), .eq_cfg_coef('0),
    .mf_cfg_we(1'b0), .mf_cfg_tap('0), .mf_cfg_coef('0),
    .w_cfg_we, .w_cfg_addr, .w_cfg_data,
    .in_valid, .in_ready, .in_sample,
    .bf_valid, .bf_beam, .bf_y, .mf_valid, .mf_beam, .mf_y,
    .sym_valid, .sym_beam, .sym_bits, .snap_done, .cma_done
  );

  always #5 clk = ~clk;

  function automatic longint rs(input longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  longint xr [N], xi [N];
  longint wr [N*B], wi [N*B];
  longint yr [B], yi [B], mr [B], mi [B];
  int rawr [N], rawi [N];

  task automatic read_weights();
    for (int i = 0; i < N * B; i++) begin
      wr[i] = longint'($signed(dut.u_mem_wre.mem[i]));
      wi[i] = longint'($signed(dut.u_mem_wim.mem[i]));
    end
  endtask

  initial begin
    real th, g;
    int n_upd;
    finished = 0; checks = 0; failures = 0; n_upd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    g = 4.0 / N;
    for (int b = 0; b < B; b++)
      for (int k = 0; k < N; k++) begin
        th = PI * $sin(20.0 * PI / 180.0) * k + b * 40.0 * PI / 180.0;
        w_cfg_we = 1; w_cfg_addr = WAW'(b * N + k);
        w_cfg_data.re = 16'($rtoi(g * $cos(th) * 32768.0));
        w_cfg_data.im = 16'($rtoi(g * $sin(th) * 32768.0));
        @(negedge clk);
      end
    w_cfg_we = 0;

    for (int n = 0; n < SNAPS; n++) begin
      int sr, si, cyc0, cyc, nbf, nmf, k, expc;
      logic upd, took, changed;
      q15_t gr, gi;
      longint ar, ai;
      upd = ((n + 1) % UP) == 0;
      read_weights();
      sr = ($urandom % 2) ? 4634 : -4634;
      si = ($urandom % 2) ? 4634 : -4634;
      for (int k = 0; k < N; k++) begin
        th = PI * $sin(20.0 * PI / 180.0) * k;
        rawr[k] = $rtoi(sr * $cos(th) - si * $sin(th)) + int'($urandom % 600) - 300;
        rawi[k] = $rtoi(sr * $sin(th) + si * $cos(th)) + int'($urandom % 600) - 300;
        xr[k] = rs(32767 * longint'(rawr[k])); xi[k] = rs(32767 * longint'(rawi[k]));
      end
      for (int b = 0; b < B; b++) begin
        ar = 0; ai = 0;
        for (int k = 0; k < N; k++) begin
          ar += wr[b*N+k] * xr[k] + wi[b*N+k] * xi[k];
          ai += wr[b*N+k] * xi[k] - wi[b*N+k] * xr[k];
        end
        yr[b] = rs(ar); yi[b] = rs(ai);
        mr[b] = rs(32767 * yr[b]); mi[b] = rs(32767 * yi[b]);
      end
      cyc0 = -1; cyc = 0; nbf = 0; nmf = 0; k = 0;
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
            if (failures < 10) $display("FAIL N=%0d B=%0d snap %0d beam %0d y (%0d,%0d) exp (%0d,%0d)", N, B, n, bf_beam, gr, gi, yr[nbf], yi[nbf]);
          end
          nbf++;
        end
        if (mf_valid) begin
          gr = mf_y.re; gi = mf_y.im;
          checks++;
          if (int'(mf_beam) != nmf || longint'(gr) != mr[nmf] || longint'(gi) != mi[nmf]) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d B=%0d snap %0d beam %0d mf (%0d,%0d) exp (%0d,%0d)", N, B, n, mf_beam, gr, gi, mr[nmf], mi[nmf]);
          end
          nmf++;
        end
        if (cma_done) n_upd++;
      end while (!snap_done && cyc < 4 * (N * (B + 6) + 100 * B));
      expc = N * 5 + N * B + 18 * B + OVH + (upd ? B * (N + 27) : 0);
      checks += 2;
      if (nbf != B || nmf != B) begin failures++; $display("FAIL N=%0d B=%0d snap %0d: %0d/%0d outputs", N, B, n, nbf, nmf); end
      if (cyc - cyc0 != expc) begin
        failures++; $display("FAIL N=%0d B=%0d snap %0d took %0d cycles, expected %0d", N, B, n, cyc - cyc0, expc);
      end
      $display("N=%0d B=%0d snapshot %0d (%s): %0d cycles", N, B, n, upd ? "with update" : "no update", cyc - cyc0);
      if (upd) begin
        for (int b = 0; b < B; b++) begin
          changed = 0;
          for (int i = b * N; i < (b + 1) * N; i++)
            if (longint'($signed(dut.u_mem_wre.mem[i])) != wr[i] || longint'($signed(dut.u_mem_wim.mem[i])) != wi[i]) changed = 1;
          checks++;
          if (!changed) begin failures++; $display("FAIL N=%0d B=%0d beam %0d not updated", N, B, b); end
        end
      end
    end
    checks++;
    if (n_upd != B * (SNAPS / UP)) begin failures++; $display("FAIL N=%0d B=%0d: %0d beam updates", N, B, n_upd); end
    finished = 1;
  end
endmodule
