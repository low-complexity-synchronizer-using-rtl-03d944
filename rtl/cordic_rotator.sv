// cordic_rotator -- pipelined CORDIC that rotates a complex sample by an angle.
//
// out = in * e^(j*angle), with the CORDIC gain removed.  The angle is a
// fraction of a turn (2^ANG_W = 2*pi).  A first stage folds the angle into
// [-pi/2, pi/2] by negating the sample when |angle| > pi/2; ITERS
// shift-and-add micro-rotations follow, one per pipeline stage; a last stage
// multiplies by 1/K ~= 0.6074 with shifts and adds (1/2 + 1/8 - 1/64 - 1/512),
// rounds away the GUARD fraction bits and saturates to W bits.
//
// Timing: fully pipelined, one sample per clock, latency ITERS+2 clocks.
// in_valid travels with the data and comes out as out_valid.  No multipliers.
// This is the rotator of the frequency compensator; the CORDIC form is this
// implementation's choice.
module cordic_rotator
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned W     = SYM_W,   // I/Q width in and out
  parameter int unsigned AW    = ANG_W,   // angle width
  parameter int unsigned ITERS = 14,      // micro-rotations (<= CORDIC_N)
  parameter int unsigned GUARD = 3        // extra fraction bits inside
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic        [AW-1:0] angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);

  localparam int unsigned IW = W + 2 + GUARD;  // room for sqrt(2)*K growth

  typedef struct packed {
    logic                 v;
    logic signed [IW-1:0] x;
    logic signed [IW-1:0] y;
    logic signed [AW-1:0] z;
  } stage_t;

  stage_t st [ITERS+1];

  // ---- stage 0: fold the angle into [-pi/2, pi/2] --------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].v <= in_valid;
      if (angle[AW-1] ^ angle[AW-2]) begin
        st[0].x <= -(IW'(in_i) <<< GUARD);
        st[0].y <= -(IW'(in_q) <<< GUARD);
        st[0].z <= signed'({~angle[AW-1], angle[AW-2:0]});
      end else begin
        st[0].x <= IW'(in_i) <<< GUARD;
        st[0].y <= IW'(in_q) <<< GUARD;
        st[0].z <= signed'(angle);
      end
    end
  end

  // ---- micro-rotations ------------------------------------------------------
  for (genvar s = 0; s < ITERS; s++) begin : g_iter
    localparam logic signed [AW-1:0] ATAN = AW'(ATAN_TAB[s] >> (16 - AW));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s+1] <= '0;
      end else begin
        st[s+1].v <= st[s].v;
        if (!st[s].z[AW-1]) begin
          st[s+1].x <= st[s].x - (st[s].y >>> s);
          st[s+1].y <= st[s].y + (st[s].x >>> s);
          st[s+1].z <= st[s].z - ATAN;
        end else begin
          st[s+1].x <= st[s].x + (st[s].y >>> s);
          st[s+1].y <= st[s].y - (st[s].x >>> s);
          st[s+1].z <= st[s].z + ATAN;
        end
      end
    end
  end

  // ---- gain removal, rounding, saturation ------------------------------------
  function automatic logic signed [W-1:0] scale_sat(input logic signed [IW-1:0] v);
    logic signed [IW+9:0] a;
    logic signed [IW+9:0] r;
    // v * (1/2 + 1/8 - 1/64 - 1/512), scaled by 2^9
    a = ((IW+10)'(v) <<< 8) + ((IW+10)'(v) <<< 6) - ((IW+10)'(v) <<< 3) - (IW+10)'(v);
    r = (a + ((IW+10)'(1) <<< (GUARD + 8))) >>> (GUARD + 9);
    if (r > (IW+10)'(2**(W-1) - 1))      return {1'b0, {(W-1){1'b1}}};
    else if (r < -(IW+10)'(2**(W-1)))    return {1'b1, {(W-1){1'b0}}};
    else                                 return r[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= st[ITERS].v;
      out_i     <= scale_sat(st[ITERS].x);
      out_q     <= scale_sat(st[ITERS].y);
    end
  end

endmodule
