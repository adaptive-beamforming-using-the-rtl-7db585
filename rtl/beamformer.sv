// Narrowband phase-shift beamformer for N_BEAM beams.
//
// For each beam b it forms y_b = sum_k conj(phi_b[k]) * x[k] over the
// N_ANT equalized antenna samples of one snapshot: one complex
// multiplication and one addition per antenna per beam per cycle, so
// a beam takes N_ANT cycles and a snapshot N_ANT * N_BEAM cycles.
// Operands come from two memories through address generators: the
// steering-vector memory is walked linearly (address b*N_ANT + k) and the
// snapshot memory by modulo-N_ANT counting. Both memories return data one
// cycle after the address.
// Timing: `start` loads the address generators; reads are issued in the
// next N_ANT*N_BEAM cycles; y_valid pulses with y_beam and y (rounded,
// saturated 1.15) two cycles after the last read of each beam; `done`
// pulses with the last beam's y_valid. Weighting with the conjugate of the
// steering vector is this design's reading of "y = phi * x": it is the form
// for which the document's steering update is a descent step. The handshake
// and the accumulator width (40 bits) are also this design's choices.
module beamformer
  import bf_pkg::*;
#(
  parameter int  N_ANT  = 64,
  parameter int  N_BEAM = 3,
  localparam int XAW    = (N_ANT > 1) ? $clog2(N_ANT) : 1,
  localparam int WAW    = (N_ANT * N_BEAM > 1) ? $clog2(N_ANT * N_BEAM) : 1,
  localparam int BW     = (N_BEAM > 1) ? $clog2(N_BEAM) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           x_re,
  output logic [XAW-1:0] x_addr,
  input  cplx_t          x_rdata,
  output logic           w_re,
  output logic [WAW-1:0] w_addr,
  input  cplx_t          w_rdata,
  output logic           y_valid,
  output logic [BW-1:0]  y_beam,
  output cplx_t          y
);

  logic           run;
  logic [XAW:0]   k;       // antenna of the read issued this cycle
  logic [BW-1:0]  b;       // beam of the read issued this cycle
  logic           rd_q, last_q;
  logic [BW-1:0]  b_q;
  logic signed [39:0] acc_re, acc_im;
  cprod_t         p;

  montium_agu #(.AW(WAW)) u_agu_w (
    .clk, .rst_n, .mode(2'd0), .base('0), .stride(WAW'(1)), .modulus('0), .rev_bits('0),
    .load(start), .step(run), .addr(w_addr)
  );

  montium_agu #(.AW(XAW)) u_agu_x (
    .clk, .rst_n, .mode(2'd2), .base('0), .stride(XAW'(1)), .modulus((XAW+1)'(N_ANT)), .rev_bits('0),
    .load(start), .step(run), .addr(x_addr)
  );

  assign x_re = run;
  assign w_re = run;
  assign busy = run || rd_q || y_valid;
  assign p    = cmul_conj_full(w_rdata, x_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      k       <= '0;
      b       <= '0;
      rd_q    <= 1'b0;
      last_q  <= 1'b0;
      b_q     <= '0;
      acc_re  <= '0;
      acc_im  <= '0;
      y_valid <= 1'b0;
      y_beam  <= '0;
      y       <= '0;
      done    <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      done    <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        k   <= '0;
        b   <= '0;
      end else if (run) begin
        if (int'(k) == N_ANT - 1) begin
          k <= '0;
          b <= b + BW'(1);
          if (int'(b) == N_BEAM - 1) run <= 1'b0;
        end else begin
          k <= k + 1'b1;
        end
      end
      // data of the previous cycle's read
      rd_q   <= run;
      last_q <= run && (int'(k) == N_ANT - 1);
      b_q    <= b;
      if (rd_q) begin
        if (last_q) begin
          y_valid <= 1'b1;
          y_beam  <= b_q;
          y.re    <= rnd_sat(64'(acc_re + 40'(p.re)), 15);
          y.im    <= rnd_sat(64'(acc_im + 40'(p.im)), 15);
          done    <= (int'(b_q) == N_BEAM - 1);
          acc_re  <= '0;
          acc_im  <= '0;
        end else begin
          acc_re <= acc_re + 40'(p.re);
          acc_im <= acc_im + 40'(p.im);
        end
      end
    end
  end

endmodule
