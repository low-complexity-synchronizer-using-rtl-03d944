// freq_compensator -- carrier frequency compensator (NCO + CORDIC derotator).
//
// Every received symbol r_m is multiplied by e^(-j*theta_m), where theta_m is
// an NCO phase that advances by the frequency word once per symbol.  The
// frequency word starts at zero and, each time the frequency synchronizer
// reports a residual offset (est_valid), the estimate is added to it, scaled
// by 2^-LOOP_SHIFT.  The offset is thus removed step by step, frame after
// frame, which is the closed loop between the compensator and the
// synchronizers sharing the autocorrelator.
//
// Interface: in_valid/in_i/in_q is the symbol stream from the matched filter
// and symbol sampler (one symbol per in_valid).  est (ANG_W bits, signed,
// 2^ANG_W = one turn per symbol) is a residual frequency estimate.
// freq_word (PH_W bits, signed) is the frequency being removed.
// Timing: out_valid follows in_valid by the rotator latency, ITERS+2 clocks.
// The accumulate-the-estimate update and all widths are this implementation's
// choices; the document states only that the compensator keeps mitigating
// the offset.
module freq_compensator
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned W          = SYM_W,
  parameter int unsigned AW         = ANG_W,
  parameter int unsigned PW         = PH_W,
  parameter int unsigned ITERS      = 14,
  parameter int unsigned LOOP_SHIFT = 0    // update gain 2^-LOOP_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_i,
  input  logic signed [W-1:0]  in_q,
  input  logic                 est_valid,
  input  logic signed [AW-1:0] est,
  output logic signed [PW-1:0] freq_word,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_i,
  output logic signed [W-1:0]  out_q
);

  logic [PW-1:0] phase;
  logic [AW-1:0] rot_angle;

  // NCO: phase of the current symbol, advanced after each symbol
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      freq_word <= '0;
    end else begin
      if (in_valid)
        phase <= phase + PW'(freq_word);
      if (est_valid)
        freq_word <= freq_word + ((PW'(est) <<< (PW - AW)) >>> LOOP_SHIFT);
    end
  end

  // derotate by -theta (rounded to AW bits)
  assign rot_angle = -(phase[PW-1 -: AW] + AW'(phase[PW-AW-1]));

  cordic_rotator #(
    .W(W), .AW(AW), .ITERS(ITERS)
  ) u_rot (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_i     (in_i),
    .in_q     (in_q),
    .angle    (rot_angle),
    .out_valid(out_valid),
    .out_i    (out_i),
    .out_q    (out_q)
  );

endmodule
