// Adaptive multi-beam phased-array receiver for DVB-S satellite tracking.
//
// Processes one snapshot (one complex sample of each of N_ANT antennas) at
// a time through the chain
//   equalizer_fir -> snapshot memory -> beamformer (N_BEAM beams)
//     -> matched_filter -> qpsk_demapper
// and, on every UPDATE_PERIOD-th snapshot, runs the constant-modulus beam
// steering (cma_update) for every beam, which rewrites the steering
// vectors in the weight memory from the snapshot and the beam outputs.
// The stages run one after the other on a shared set of memories, the way
// the processing is scheduled on a single tile processor:
//   T_IN   accept N_ANT raw samples (antenna 0 first) through the
//          equalizer, F_EQ cycles each, and store them (N_ANT*F_EQ cycles)
//   T_BF   form the beams, N_ANT cycles per beam
//   T_MF   matched-filter the beam outputs, 2*F_MF cycles per beam
//   T_CMA  (update snapshots only) steering update of each beam
// With the defaults (64 antennas, 3 beams, 5 and 9 taps) a snapshot
// without update takes 320 + 192 + 54 cycles plus a few cycles of
// hand-over. Snapshot data and steering vectors live in four 16-bit tile
// memories (real and imaginary parts apart).
// Interface: in_valid/in_ready stream the raw samples; eq_cfg_*, mf_cfg_*
// and w_cfg_* load equalizer taps, matched-filter taps and steering
// vectors (address beam*N_ANT + antenna) and should be used only while
// in_ready is high. Outputs: every beam output (bf_*), every filtered
// beam output (mf_*), the demapped QPSK bits (sym_*), and pulses
// snap_done (end of a snapshot), cma_done (end of one beam's update).
// The chain, the default sizes and the update rate 1/250 follow the
// document; the one-stage-at-a-time schedule, the memory arrangement and
// all handshakes are this design's own.
module adaptive_beamformer
  import bf_pkg::*;
#(
  parameter int  N_ANT         = 64,
  parameter int  N_BEAM        = 3,
  parameter int  F_EQ          = 5,
  parameter int  F_MF          = 9,
  parameter int  UPDATE_PERIOD = 250,
  parameter int  CORDIC_ITER   = 14,
  parameter int  INV_DEPTH     = 512,
  parameter int  SIN_BITS      = 10,
  parameter real MU            = 0.005,
  localparam int AW            = (N_ANT > 1) ? $clog2(N_ANT) : 1,
  localparam int WAW           = (N_ANT * N_BEAM > 1) ? $clog2(N_ANT * N_BEAM) : 1,
  localparam int BW            = (N_BEAM > 1) ? $clog2(N_BEAM) : 1,
  localparam int TW            = (F_EQ > 1) ? $clog2(F_EQ) : 1,
  localparam int MW            = (F_MF > 1) ? $clog2(F_MF) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic           eq_cfg_we,
  input  logic [AW-1:0]  eq_cfg_ant,
  input  logic [TW-1:0]  eq_cfg_tap,
  input  cplx_t          eq_cfg_coef,
  input  logic           mf_cfg_we,
  input  logic [MW-1:0]  mf_cfg_tap,
  input  q15_t           mf_cfg_coef,
  input  logic           w_cfg_we,
  input  logic [WAW-1:0] w_cfg_addr,
  input  cplx_t          w_cfg_data,
  // antenna samples
  input  logic           in_valid,
  output logic           in_ready,
  input  cplx_t          in_sample,
  // results
  output logic           bf_valid,
  output logic [BW-1:0]  bf_beam,
  output cplx_t          bf_y,
  output logic           mf_valid,
  output logic [BW-1:0]  mf_beam,
  output cplx_t          mf_y,
  output logic           sym_valid,
  output logic [BW-1:0]  sym_beam,
  output logic [1:0]     sym_bits,
  output logic           snap_done,
  output logic           cma_done
);

  typedef enum logic [2:0] { T_IN, T_BFGO, T_BF, T_MF, T_CMA, T_CMAW } tstate_e;
  tstate_e state;

  // ------------------------------------------------------------ equalizer
  logic          eq_ready, eq_valid, eq_out_valid;
  logic [AW-1:0] eq_out_ant;
  cplx_t         eq_out;
  logic [AW:0]   n_in, n_out;

  assign eq_valid = in_valid && (state == T_IN) && (int'(n_in) < N_ANT);
  assign in_ready = eq_ready && (state == T_IN) && (int'(n_in) < N_ANT);

  equalizer_fir #(.N_ANT(N_ANT), .F_EQ(F_EQ)) u_eq (
    .clk, .rst_n,
    .cfg_we(eq_cfg_we), .cfg_ant(eq_cfg_ant), .cfg_tap(eq_cfg_tap), .cfg_coef(eq_cfg_coef),
    .in_valid(eq_valid), .in_ready(eq_ready), .in_ant(n_in[AW-1:0]), .in_sample(in_sample),
    .out_valid(eq_out_valid), .out_ant(eq_out_ant), .out_sample(eq_out)
  );

  // ------------------------------------------------------------ memories
  logic           x_re, w_re, w_we;
  logic [AW-1:0]  x_raddr;
  logic [WAW-1:0] w_raddr, w_waddr;
  cplx_t          x_rdata, w_rdata, w_wdata;

  montium_mem #(.WIDTH(16), .DEPTH(N_ANT)) u_mem_xre (
    .clk, .we(eq_out_valid), .waddr(eq_out_ant), .wdata(eq_out.re),
    .re(x_re), .raddr(x_raddr), .rdata(x_rdata.re)
  );
  montium_mem #(.WIDTH(16), .DEPTH(N_ANT)) u_mem_xim (
    .clk, .we(eq_out_valid), .waddr(eq_out_ant), .wdata(eq_out.im),
    .re(x_re), .raddr(x_raddr), .rdata(x_rdata.im)
  );
  montium_mem #(.WIDTH(16), .DEPTH(N_ANT * N_BEAM)) u_mem_wre (
    .clk, .we(w_we), .waddr(w_waddr), .wdata(w_wdata.re),
    .re(w_re), .raddr(w_raddr), .rdata(w_rdata.re)
  );
  montium_mem #(.WIDTH(16), .DEPTH(N_ANT * N_BEAM)) u_mem_wim (
    .clk, .we(w_we), .waddr(w_waddr), .wdata(w_wdata.im),
    .re(w_re), .raddr(w_raddr), .rdata(w_rdata.im)
  );

  // ------------------------------------------------------------ beamformer
  logic           bf_start, bf_busy, bf_done, bf_x_re, bf_w_re;
  logic [AW-1:0]  bf_x_addr;
  logic [WAW-1:0] bf_w_addr;

  assign bf_start = (state == T_BFGO);

  beamformer #(.N_ANT(N_ANT), .N_BEAM(N_BEAM)) u_bf (
    .clk, .rst_n, .start(bf_start), .busy(bf_busy), .done(bf_done),
    .x_re(bf_x_re), .x_addr(bf_x_addr), .x_rdata(x_rdata),
    .w_re(bf_w_re), .w_addr(bf_w_addr), .w_rdata(w_rdata),
    .y_valid(bf_valid), .y_beam(bf_beam), .y(bf_y)
  );

  cplx_t yreg [N_BEAM];

  // ------------------------------------------------------------ matched filter
  logic          mf_in_valid, mf_ready;
  logic [BW:0]   mf_cnt, cma_cnt;

  assign mf_in_valid = (state == T_MF) && (int'(mf_cnt) < N_BEAM);

  matched_filter #(.N_BEAM(N_BEAM), .F_MF(F_MF)) u_mf (
    .clk, .rst_n, .cfg_we(mf_cfg_we), .cfg_tap(mf_cfg_tap), .cfg_coef(mf_cfg_coef),
    .in_valid(mf_in_valid), .in_ready(mf_ready), .in_beam(mf_cnt[BW-1:0]),
    .in_y(yreg[mf_cnt[BW-1:0]]),
    .out_valid(mf_valid), .out_beam(mf_beam), .out_y(mf_y)
  );

  qpsk_demapper #(.N_BEAM(N_BEAM)) u_dm (
    .clk, .rst_n, .in_valid(mf_valid), .in_beam(mf_beam), .in_y(mf_y),
    .out_valid(sym_valid), .out_beam(sym_beam), .bits(sym_bits)
  );

  // ------------------------------------------------------------ beam steering
  logic          cma_start, cma_busy, cma_rd, cma_we;
  logic [AW-1:0] cma_raddr, cma_waddr;
  cplx_t         cma_wdata;
  logic [BW-1:0] cma_beam;

  assign cma_beam  = cma_cnt[BW-1:0];
  assign cma_start = (state == T_CMA);

  cma_update #(.N_ANT(N_ANT), .ITER(CORDIC_ITER), .INV_DEPTH(INV_DEPTH), .SIN_BITS(SIN_BITS), .MU(MU)) u_cma (
    .clk, .rst_n, .start(cma_start), .y(yreg[cma_beam]), .busy(cma_busy), .done(cma_done),
    .rd_en(cma_rd), .rd_addr(cma_raddr), .x_rdata(x_rdata), .w_rdata(w_rdata),
    .w_we(cma_we), .w_addr(cma_waddr), .w_wdata(cma_wdata),
    .coef(), .prerot(), .inv_sat()
  );

  function automatic logic [WAW-1:0] waddr_of(input logic [BW-1:0] beam, input logic [AW-1:0] ant);
    return WAW'(int'(beam) * N_ANT + int'(ant));
  endfunction

  // ------------------------------------------------------------ memory ports
  always_comb begin
    if (state == T_BF) begin
      x_re    = bf_x_re;
      x_raddr = bf_x_addr;
      w_re    = bf_w_re;
      w_raddr = bf_w_addr;
    end else begin
      x_re    = cma_rd;
      x_raddr = cma_raddr;
      w_re    = cma_rd;
      w_raddr = waddr_of(cma_beam, cma_raddr);
    end
    if (cma_we) begin
      w_we    = 1'b1;
      w_waddr = waddr_of(cma_beam, cma_waddr);
      w_wdata = cma_wdata;
    end else begin
      w_we    = w_cfg_we;
      w_waddr = w_cfg_addr;
      w_wdata = w_cfg_data;
    end
  end

  // ------------------------------------------------------------ sequencing
  int unsigned snap_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IN;
      n_in      <= '0;
      n_out     <= '0;
      mf_cnt    <= '0;
      cma_cnt   <= '0;
      snap_cnt  <= 0;
      snap_done <= 1'b0;
      for (int b = 0; b < N_BEAM; b++) yreg[b] <= '0;
    end else begin
      snap_done <= 1'b0;
      if (bf_valid) yreg[bf_beam] <= bf_y;
      unique case (state)
        T_IN: begin
          if (eq_valid && eq_ready) n_in <= n_in + 1'b1;
          if (eq_out_valid) begin
            if (int'(n_out) == N_ANT - 1) begin
              n_out <= '0;
              n_in  <= '0;
              state <= T_BFGO;
            end else begin
              n_out <= n_out + 1'b1;
            end
          end
        end
        T_BFGO: state <= T_BF;
        T_BF: if (bf_done) begin
          mf_cnt <= '0;
          state  <= T_MF;
        end
        T_MF: begin
          if (mf_in_valid && mf_ready) mf_cnt <= mf_cnt + 1'b1;
          if (mf_valid && int'(mf_beam) == N_BEAM - 1) begin
            if (int'(snap_cnt) == UPDATE_PERIOD - 1) begin
              snap_cnt <= 0;
              cma_cnt  <= '0;
              state    <= T_CMA;
            end else begin
              snap_cnt  <= snap_cnt + 1;
              snap_done <= 1'b1;
              state     <= T_IN;
            end
          end
        end
        T_CMA: state <= T_CMAW;
        T_CMAW: if (cma_done) begin
          if (int'(cma_cnt) == N_BEAM - 1) begin
            snap_done <= 1'b1;
            state     <= T_IN;
          end else begin
            cma_cnt <= cma_cnt + 1'b1;
            state   <= T_CMA;
          end
        end
        default: state <= T_IN;
      endcase
    end
  end

  // The steering update writes the weight memory; configuration writes
  // must not collide with it.
  assert property (@(posedge clk) disable iff (!rst_n) !(cma_we && w_cfg_we));

endmodule
