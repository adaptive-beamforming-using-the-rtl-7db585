// Constant-modulus beam-steering update for one beam.
//
// Given the beamformer output y of the current snapshot and read access
// to the snapshot's antenna samples x[k] and the beam's steering vector
// phi[k], it performs one gradient step of the QPSK-aware constant-modulus
// cost E(|y|^2 - 1)^2 + E(sin^2(2*angle(y))):
//   phi[k] <- phi[k] - mu * (2(|y|^4 - |y|^2) - j sin(4*angle(y))) / y * x[k]
// The scalar coefficient is computed once per update, the vector part is
// one complex multiply-subtract per antenna per cycle:
//   S_MAG   |y|^2 from two squares;
//   S_MAG2  |y|^4, numerator real part 2(|y|^4 - |y|^2); starts the
//           CORDIC on y and the mu/|y|^2 table lookup on |y|^2;
//   S_CORD  waits for angle(y); starts the sine lookup at 4*angle(y)
//           (a 2-bit left shift of the binary angle);
//   S_SIN   numerator imaginary part -sin(4*angle(y));
//   S_DIVGO/S_DIV  coefficient mu*X/y by the complex divider;
//   S_UPD   N_ANT reads of x[k], phi[k] and N_ANT writes of phi[k].
// Memory ports: `rd_en`/`rd_addr` read x[k] and phi[k] (the enclosing
// design maps phi[k] to the beam's row); data returns one cycle later on
// x_rdata/w_rdata. The write port w_we/w_addr/w_wdata writes phi[k] two
// cycles after its read. `start` (with y) begins an update, `done` pulses
// at its end, `busy` is high in between. `prerot` and `inv_sat` pulse when
// the CORDIC needed its initial rotation and when the division table hit a
// saturated entry. The update rule, the table-based sine and mu/|y|^2 and
// the CORDIC follow the document; the state sequence, the handshake and the
// one-rounding-per-result arithmetic are this design's own.
module cma_update
  import bf_pkg::*;
#(
  parameter int  N_ANT     = 64,
  parameter int  ITER      = 14,
  parameter int  INV_DEPTH = 512,
  parameter int  SIN_BITS  = 10,
  parameter real MU        = 0.005,
  localparam int AW        = (N_ANT > 1) ? $clog2(N_ANT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cplx_t         y,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  cplx_t         x_rdata,
  input  cplx_t         w_rdata,
  output logic          w_we,
  output logic [AW-1:0] w_addr,
  output cplx_t         w_wdata,
  output cplx_t         coef,
  output logic          prerot,
  output logic          inv_sat
);

  typedef enum logic [3:0] { S_IDLE, S_MAG, S_MAG2, S_CORD, S_SIN, S_DIVGO, S_DIV, S_UPD, S_DONE } state_e;
  state_e state;

  cplx_t  yr, num;
  q15_t   p, e;
  logic   cord_start, cord_done, cord_busy, cord_pre;
  angle_t ang;
  logic   sin_req, sin_valid;
  q15_t   sin_v;
  logic   inv_req, inv_valid, inv_s;
  q15_t   inv_v;
  logic   div_go, div_valid;
  cplx_t  quo;

  cordic_vectoring #(.ITER(ITER)) u_cordic (
    .clk, .rst_n, .start(cord_start), .x_in(yr.re), .y_in(yr.im),
    .busy(cord_busy), .done(cord_done), .angle(ang), .mag(), .prerot(cord_pre)
  );

  sine_lut #(.ABITS(SIN_BITS)) u_sin (
    .clk, .rst_n, .req(sin_req), .angle(angle_t'(ang <<< 2)), .valid(sin_valid), .sin_out(sin_v)
  );

  inv_lut #(.DEPTH(INV_DEPTH), .MU(MU)) u_inv (
    .clk, .rst_n, .req(inv_req), .mag2(p), .valid(inv_valid), .inv_out(inv_v), .sat(inv_s)
  );

  complex_div u_div (
    .clk, .rst_n, .valid_in(div_go), .num(num), .den(yr), .e(e), .valid_out(div_valid), .quo(quo)
  );

  logic [AW-1:0] k;
  logic          rd_q;
  logic [AW-1:0] k_q;
  logic          e_ok;

  assign cord_start = (state == S_MAG2);
  assign inv_req    = (state == S_MAG2);
  assign sin_req    = (state == S_CORD) && cord_done;
  assign div_go     = (state == S_DIVGO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      yr      <= '0;
      num     <= '0;
      p       <= '0;
      e       <= '0;
      e_ok    <= 1'b0;
      coef    <= '0;
      k       <= '0;
      rd_q    <= 1'b0;
      k_q     <= '0;
      w_we    <= 1'b0;
      w_addr  <= '0;
      w_wdata <= '0;
      done    <= 1'b0;
      prerot  <= 1'b0;
      inv_sat <= 1'b0;
    end else begin
      done    <= 1'b0;
      prerot  <= 1'b0;
      inv_sat <= 1'b0;
      w_we    <= 1'b0;
      if (inv_valid) begin
        e       <= inv_v;
        e_ok    <= 1'b1;
        inv_sat <= inv_s;
      end
      unique case (state)
        S_IDLE: if (start) begin
          yr    <= y;
          e_ok  <= 1'b0;
          state <= S_MAG;
        end
        S_MAG: begin
          p     <= rnd_sat(64'(yr.re * yr.re) + 64'(yr.im * yr.im), 15);
          state <= S_MAG2;
        end
        S_MAG2: begin
          // 2(|y|^4 - |y|^2) in 1.15
          num.re <= rnd_sat(64'(p * p) - (64'(p) <<< 15), 14);
          state  <= S_CORD;
        end
        S_CORD: if (cord_done) begin
          prerot <= cord_pre;
          state  <= S_SIN;
        end
        S_SIN: if (sin_valid) begin
          num.im <= sat16(-64'(sin_v));
          state  <= S_DIVGO;
        end
        S_DIVGO: state <= S_DIV;
        S_DIV: if (div_valid) begin
          coef  <= quo;
          k     <= '0;
          state <= S_UPD;
        end
        S_UPD: begin
          k <= k + AW'(1);
          if (int'(k) == N_ANT - 1) state <= S_DONE;
        end
        S_DONE: if (!rd_q) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // Vector part: phi[k] - coef * x[k], one rounding.
      rd_q <= rd_en;
      k_q  <= rd_addr;
      if (rd_q) begin
        w_we       <= 1'b1;
        w_addr     <= k_q;
        w_wdata.re <= rnd_sat((64'(w_rdata.re) <<< 15) - 64'(cmul_full(coef, x_rdata).re), 15);
        w_wdata.im <= rnd_sat((64'(w_rdata.im) <<< 15) - 64'(cmul_full(coef, x_rdata).im), 15);
      end
    end
  end

  assign rd_en   = (state == S_UPD);
  assign rd_addr = k;
  assign busy    = (state != S_IDLE);

  // The table lookup (2 cycles) always ends before the CORDIC does.
  assert property (@(posedge clk) disable iff (!rst_n) div_go |-> e_ok);

endmodule
