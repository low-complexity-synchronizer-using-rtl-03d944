// cordic_vectoring -- iterative CORDIC that returns the argument of a complex
// number.
//
// On start the vector (x, y) is taken in; if it lies in the left half-plane
// it is negated and pi is added to the angle.  ITERS micro-rotations, one per
// clock, then drive y to zero while accumulating the rotation in z.  The
// result angle is a fraction of a turn (2^AW = 2*pi), in [-pi, pi).  No
// multipliers.
//
// Timing: start is accepted when busy is low; done pulses for one clock
// ITERS clocks after start; angle is valid from then until the next start.
// The iterative form is this implementation's choice: the frequency
// synchronizer needs only a few arguments per frame.
module cordic_vectoring
  import dvbs2_sync_pkg::*;
#(
  parameter int unsigned XW    = 27,       // input component width
  parameter int unsigned AW    = ANG_W,
  parameter int unsigned ITERS = 15        // <= CORDIC_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  output logic                 busy,
  output logic                 done,
  output logic signed [AW-1:0] angle
);

  localparam int unsigned IW = XW + 2;     // CORDIC gain 1.65 plus sign

  logic signed [IW-1:0]          x, y;
  logic signed [AW-1:0]          z;
  logic [$clog2(ITERS+1)-1:0]    it;

  assign angle = z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          if (x_in < 0) begin
            x <= -IW'(x_in);
            y <= -IW'(y_in);
            z <= {1'b1, {(AW-1){1'b0}}};   // pi
          end else begin
            x <= IW'(x_in);
            y <= IW'(y_in);
            z <= '0;
          end
        end
      end else begin
        if (!y[IW-1]) begin              // y >= 0: rotate clockwise
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + AW'(ATAN_TAB[it] >> (16 - AW));
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - AW'(ATAN_TAB[it] >> (16 - AW));
        end
        if (it == ($clog2(ITERS+1))'(ITERS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;
      end
    end
  end

endmodule
