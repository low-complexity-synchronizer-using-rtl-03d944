// frequency_synchronizer -- Mengali & Morelli (M&M) data-aided carrier
// frequency estimator working on the shared SOF autocorrelations.
//
// When the frame synchronizer reports a SOF (sof), the autocorrelations
// R(1) .. R(NS) of that SOF window are latched.  For the 26 SOF symbols used
// as pilots (L_p = 26) and NS spans the estimate is
//     w_hat = sum_{k=1}^{NS} l_k * arg{ R(k) R^*(k-1) },
// with R(0) real and positive, so arg{R(1)R^*(0)} = arg R(1), and
//     l_k = 3[(Lp-k)(Lp-k+1) - NS(Lp-NS)] / [NS(4NS^2 - 6NS*Lp + 3Lp^2 - 1)].
// w_hat is the phase advance per symbol, i.e. 2*pi*f*Ts; as an ANG_W-bit
// fraction of a turn it is the frequency word the compensator needs.
// arg{R(k)R^*(k-1)} is formed as arg R(k) - arg R(k-1), wrapped modulo one
// turn by the two's-complement angle word, so no complex multiply is needed.
// One iterative vectoring CORDIC computes the NS arguments in turn and one
// constant multiplier (l_k in Q1.15) accumulates the weighted differences.
//
// Interface: sof with r_re/r_im (R(k) in entry k-1) starts an estimate;
// a sof that arrives while busy is ignored.  est_valid pulses with est.
// An assertion checks that the CORDIC is only started when it is idle.
// Timing: NS*(ITERS+3) + 1 clocks from sof to est_valid (37 by default).
// Using the SOF (26 symbols) as the pilot block and NS = 2 follow the design
// described; the l_k numerator uses (Lp-k), the form whose weights sum to 1.
module frequency_synchronizer
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned RW    = 26,
  parameter int unsigned NS    = NSPAN,
  parameter int unsigned LP    = LSOF,
  parameter int unsigned AW    = ANG_W,
  parameter int unsigned ITERS = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sof,
  input  logic signed [RW-1:0] r_re [NS],
  input  logic signed [RW-1:0] r_im [NS],
  output logic                 busy,
  output logic                 est_valid,
  output logic signed [AW-1:0] est
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_ACC} state_t;

  localparam int unsigned KW = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned AccW = AW + 18 + KW;

  state_t               state;
  logic signed [RW-1:0] lat_re [NS];
  logic signed [RW-1:0] lat_im [NS];
  logic [KW-1:0]        k;                 // span being processed, 0-based
  logic signed [AW-1:0] prev_arg;
  logic signed [AccW-1:0] acc;
  logic                 cv_start, cv_done, cv_busy;
  logic signed [AW-1:0] cv_angle;
  logic signed [RW-1:0] cv_x, cv_y;

  // smoothing weights l_k, Q1.15
  function automatic logic signed [17:0] weight(input int unsigned kk);
    return 18'(mm_weight_q15(int'(LP), int'(NS), int'(kk) + 1));
  endfunction

  assign cv_x     = lat_re[k];
  assign cv_y     = lat_im[k];
  assign cv_start = (state == S_START);
  assign busy     = (state != S_IDLE);

  cordic_vectoring #(
    .XW(RW), .AW(AW), .ITERS(ITERS)
  ) u_arg (
    .clk, .rst_n,
    .start(cv_start),
    .x_in (cv_x),
    .y_in (cv_y),
    .busy (cv_busy),
    .done (cv_done),
    .angle(cv_angle)
  );

  // the CORDIC takes a new vector only when idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) cv_start |-> !cv_busy)
    else $error("CORDIC started while busy");

  logic signed [AW-1:0]   diff;
  logic signed [AccW-1:0] term;
  logic signed [AccW-1:0] acc_next;

  always_comb begin
    diff    = cv_angle - prev_arg;          // wraps modulo one turn
    term    = AccW'(diff) * AccW'(weight(k));
    acc_next = acc + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      prev_arg  <= '0;
      acc       <= '0;
      est_valid <= 1'b0;
      est       <= '0;
      for (int i = 0; i < NS; i++) begin
        lat_re[i] <= '0;
        lat_im[i] <= '0;
      end
    end else begin
      est_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (sof) begin
          for (int i = 0; i < NS; i++) begin
            lat_re[i] <= r_re[i];
            lat_im[i] <= r_im[i];
          end
          k        <= '0;
          prev_arg <= '0;
          acc      <= '0;
          state    <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  if (cv_done) state <= S_ACC;
        S_ACC: begin
          acc      <= acc_next;
          prev_arg <= cv_angle;
          if (k == KW'(NS - 1)) begin
            est       <= AW'((acc_next + (AccW'(1) <<< 14)) >>> 15);
            est_valid <= 1'b1;
            state     <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
