// snr_estimator -- signal and noise power estimator that sets the adaptive
// SOF detection threshold.
//
// Total power P = E|r|^2 is measured on the compensated symbol stream as a
// block average over 2^AVG_LOG2 symbols (accumulate and dump).  Signal power
// S is taken from the common autocorrelator at each detected SOF: with the
// SOF removed, every span-k term has mean S e^(j k w), so the SOF metric
// |R(1)| + |R(2)| is about 49 S (25 + 24 terms).  S_inst = metric * S_SCALE
// / 1024 with S_SCALE = 20 ~= 1024 / (49 * 1.04), 1.04 being the mean
// overestimate of the max + 3/8 min magnitude estimate.  S_inst is smoothed
// from frame to frame with a first-order filter of gain 2^-S_SHIFT (the
// first detection loads it directly).  Noise power is
// N = max(P - S, 0); before the first SOF, S = 0 and N = P (worst case).
//
// The frame synchronizer's threshold follows the noise power:
//     threshold = THR_P * P + THR_N * N
// in the units of the metric |R(1)| + |R(2)| (which is about 49 S at a SOF).
// At high SNR it settles to THR_P * P; as the noise grows it rises with N.
//
// Interface: in_valid/in_i/in_q is the compensated symbol stream; sof and
// peak_metric (the metric of the detected SOF window) come from the frame
// synchronizer.  ready rises after the first full power block and enables
// detection.  Timing: P updates at the end of every block; S one clock
// after sof.  The estimator structure and the threshold rule are this
// implementation's choices: the document only states that the threshold
// tracks the noise power estimated by the SNR estimator.
module snr_estimator
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned W        = SYM_W,
  parameter int unsigned RW       = 26,
  parameter int unsigned TW       = RW + 4,
  parameter int unsigned AVG_LOG2 = 8,        // power block = 256 symbols
  parameter int unsigned S_SHIFT  = 3,        // signal power smoothing
  parameter int unsigned THR_P    = 34,       // threshold weight of P
  parameter int unsigned THR_N    = 6         // threshold weight of N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_i,
  input  logic signed [W-1:0]  in_q,
  input  logic                 sof,
  input  logic [RW:0]          peak_metric,
  output logic                 ready,
  output logic [2*W-1:0]       pow_est,
  output logic [2*W-1:0]       sig_est,
  output logic [2*W-1:0]       noise_est,
  output logic [TW-1:0]        threshold
);

  localparam int unsigned PW = 2 * W;                       // |r|^2 width
  // 2^10 / ((2 LSOF - 3) * 1.04), rounded
  localparam int unsigned S_SCALE = (102400 + (2 * LSOF - 3) * 52) / ((2 * LSOF - 3) * 104);

  logic [PW-1:0]          p_inst;
  logic [PW+AVG_LOG2-1:0] acc;
  logic [AVG_LOG2-1:0]    cnt;
  logic                   s_loaded;
  logic [RW+11:0]         s_scaled;
  logic [PW-1:0]          s_inst;

  always_comb begin
    logic signed [2*W-1:0] ii, qq;
    ii     = in_i * in_i;
    qq     = in_q * in_q;
    p_inst = PW'(unsigned'(ii)) + PW'(unsigned'(qq));
  end

  assign s_scaled = (RW+12)'(peak_metric) * (RW+12)'(S_SCALE);
  assign s_inst   = (s_scaled >> 10) > (RW+12)'({PW{1'b1}}) ? {PW{1'b1}} : PW'(s_scaled >> 10);

  assign noise_est = (pow_est > sig_est) ? pow_est - sig_est : '0;
  assign threshold = TW'(pow_est) * TW'(THR_P) + TW'(noise_est) * TW'(THR_N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      cnt      <= '0;
      pow_est  <= '0;
      ready    <= 1'b0;
      sig_est  <= '0;
      s_loaded <= 1'b0;
    end else begin
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin
          pow_est <= PW'((acc + (PW+AVG_LOG2)'(p_inst)) >> AVG_LOG2);
          acc     <= '0;
          ready   <= 1'b1;
        end else begin
          acc <= acc + (PW+AVG_LOG2)'(p_inst);
        end
      end
      if (sof) begin
        s_loaded <= 1'b1;
        if (!s_loaded)
          sig_est <= s_inst;
        else if (s_inst >= sig_est)
          sig_est <= sig_est + ((s_inst - sig_est) >> S_SHIFT);
        else
          sig_est <= sig_est - ((sig_est - s_inst) >> S_SHIFT);
      end
    end
  end

endmodule
