// dvbs2_sync_pkg -- constants and helper functions shared by the DVB-S2
// frame / frequency synchronizer.
//
// The start-of-frame (SOF) field of a DVB-S2 physical-layer header is 26
// pi/2-BPSK symbols carrying the bit pattern 0x18D2E82, sent MSB first
// (ETSI EN 302 307).  Symbol i (0-based) is
//     c_i = s_i * (1+j)/sqrt(2) * j^(i mod 2),   s_i = 1 - 2*b_i,
// so it can be written as a quarter-turn index q_i = (i mod 2) + 2*b_i
// (mod 4) applied to (1+j)/sqrt(2).  The product c_i^* c_(i-k) that weights a
// span-k differential term is therefore always one of {+1, +j, -1, -j}:
// the correlator needs only multiplexers and negations for it, no multiplier.
//
// Angles are unsigned/signed fractions of a full turn: ANG_W bits, 2^ANG_W
// = 2*pi.  The NCO phase accumulator uses PH_W bits with the same scaling.
//
// The sizes (26 SOF symbols, two autocorrelation spans) follow the design
// described; word widths are this implementation's choice.
package dvbs2_sync_pkg;

  // ---- frame structure ----------------------------------------------------
  localparam int unsigned LSOF      = 26;            // SOF symbols (L_UW)
  localparam logic [25:0] SOF_BITS  = 26'h18D2E82;   // MSB sent first
  localparam int unsigned NSPAN     = 2;             // autocorrelator spans (DPDI, 2-span DPDI)

  // ---- word widths ----------------------------------------------------------
  localparam int unsigned SYM_W     = 10;            // I or Q of a received symbol
  localparam int unsigned ANG_W     = 16;            // angle word, 2^16 = one turn
  localparam int unsigned PH_W      = 24;            // NCO phase / frequency word

  // ---- CORDIC ---------------------------------------------------------------
  localparam int unsigned CORDIC_N  = 16;            // max iterations tabulated
  // atan(2^-i) expressed in 1/65536 of a turn: round(atan(2^-i)/(2*pi)*2^16)
  localparam logic [15:0] ATAN_TAB [CORDIC_N] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0
  };

  // SOF bit b_i, i = 0 is the first symbol sent
  function automatic logic sof_bit(input int unsigned i);
    return SOF_BITS[LSOF-1-i];
  endfunction

  // quarter-turn index of SOF symbol i relative to (1+j)/sqrt(2)
  function automatic logic [1:0] sof_quarter(input int unsigned i);
    logic [1:0] q;
    q = 2'(i % 2) + (sof_bit(i) ? 2'd2 : 2'd0);
    return q;
  endfunction

  // quarter turns of c_i^* * c_(i-k): the weight of the span-k term at SOF
  // position i (0 -> +1, 1 -> +j, 2 -> -1, 3 -> -j)
  function automatic logic [1:0] span_coef(input int unsigned i, input int unsigned k);
    return sof_quarter(i - k) - sof_quarter(i);
  endfunction

  // Mengali & Morelli smoothing weight l_k in Q1.15 for L_p pilot symbols and
  // M spans:  l_k = 3[(Lp-k)(Lp-k+1) - M(Lp-M)] / [M(4M^2 - 6M*Lp + 3Lp^2 - 1)]
  function automatic int mm_weight_q15(input int lp, input int m, input int k);
    longint num, den, l, mm, kk;
    l   = longint'(lp);
    mm  = longint'(m);
    kk  = longint'(k);
    num = 3 * ((l - kk) * (l - kk + 1) - mm * (l - mm));
    den = mm * (4 * mm * mm - 6 * mm * l + 3 * l * l - 1);
    return int'((num * 32768 + den / 2) / den);
  endfunction

endpackage
