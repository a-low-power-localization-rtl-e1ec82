// cordic: one time-sequential CORDIC rotator.
//
// A pair (x, y) is turned by ITERS micro-rotations, one per clock cycle, by the
// shift-and-add recurrence
//   d = 1: x <- x + (y >>> i), y <- y - (x >>> i)   (turn clockwise)
//   d = 0: x <- x - (y >>> i), y <- y + (x >>> i)   (turn counter-clockwise)
// In vectoring mode (vec = 1) the unit picks d = (y >= 0) itself, driving y to
// zero so that x ends at the vector's magnitude, and reports each choice on
// d_out; this is how the angle of a Givens rotation is found. In rotation mode
// (vec = 0) it applies the directions presented on d_in, one per cycle, and so
// turns another pair by the same angle. After the last step both results are
// multiplied by 1/K = 0.60725 (K = CORDIC gain for 10 steps) as v * 9949 / 2^14,
// rounded to the nearest integer and saturated to W bits, so the gain does not
// accumulate from one rotation to the next.
//
// Timing: start is a one-cycle pulse with x_in, y_in, vec and the first d_in;
// step 0 is done on that clock edge and step ITERS-1 on the (ITERS-1)-th edge
// after it, when done pulses and x_out, y_out become valid (ITERS cycles per
// rotation). d_in for step i must be present in the cycle that step i is taken
// (iter shows the index of the step taken at the next edge while busy).
// The datapath is GUARD + FRAC bits wider than the stored words: GUARD = 4
// bits above for the internal growth the specification budgets for, and FRAC
// fractional bits below, so that the shifted terms of the micro-rotations are
// not truncated to integers; the result is rounded back to an integer.
// Iteration count and word widths follow the specification; the gain-correction constant, the
// fractional guard bits, the rounding and the saturation are this design's
// choices.
module cordic #(
  parameter int unsigned W      = 16,
  parameter int unsigned ITERS  = 10,
  parameter int unsigned GUARD  = 4,
  parameter int unsigned FRAC   = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        vec,
  input  logic signed [W-1:0]         x_in,
  input  logic signed [W-1:0]         y_in,
  input  logic                        d_in,
  output logic                        d_out,
  output logic                        busy,
  output logic [$clog2(ITERS+1)-1:0]  iter,
  output logic                        done,
  output logic signed [W-1:0]         x_out,
  output logic signed [W-1:0]         y_out
);

  localparam int unsigned IW = W + GUARD + FRAC;
  localparam int unsigned KW = 15;                 // 1/K constant width
  localparam logic signed [KW-1:0] KINV = 15'sd9949; // round(0.607253 * 2^14)

  logic signed [IW-1:0] xr, yr;       // working registers
  logic signed [IW-1:0] xc, yc;       // operands of the current step
  logic signed [IW-1:0] xn, yn;       // results of the current step
  logic                 vec_r;
  logic                 d;
  logic [$clog2(ITERS+1)-1:0] i_cur;
  logic [$clog2(ITERS+1)-1:0] cnt;

  assign i_cur = start ? '0 : cnt;
  assign xc    = start ? (IW'(x_in) <<< FRAC) : xr;
  assign yc    = start ? (IW'(y_in) <<< FRAC) : yr;

  always_comb begin
    d = (start ? vec : vec_r) ? ~yc[IW-1] : d_in;
    if (d) begin
      xn = xc + (yc >>> i_cur);
      yn = yc - (xc >>> i_cur);
    end else begin
      xn = xc - (yc >>> i_cur);
      yn = yc + (xc >>> i_cur);
    end
  end

  assign d_out = d;
  assign iter  = i_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr    <= '0;
      yr    <= '0;
      vec_r <= 1'b0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        xr <= xn;
        yr <= yn;
        if (start) vec_r <= vec;
        if (i_cur == ($clog2(ITERS+1))'(ITERS-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          cnt  <= '0;
        end else begin
          busy <= 1'b1;
          cnt  <= i_cur + 1'b1;
        end
      end
    end
  end

  // Gain correction and saturation back to W bits.
  localparam int unsigned PW = IW + KW;
  localparam logic signed [PW-1:0] MAXV = PW'((64'sd1 <<< (W-1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(64'sd1 <<< (W-1));
  localparam logic signed [PW-1:0] RND  = PW'(64'sd1 <<< (13 + FRAC));

  logic signed [PW-1:0] px, py, sx, sy;

  always_comb begin
    px = PW'(xr) * PW'(KINV) + RND;
    py = PW'(yr) * PW'(KINV) + RND;
    sx = px >>> (14 + FRAC);
    sy = py >>> (14 + FRAC);
    if (sx > MAXV)      sx = MAXV;
    else if (sx < MINV) sx = MINV;
    if (sy > MAXV)      sy = MAXV;
    else if (sy < MINV) sy = MINV;
    x_out = sx[W-1:0];
    y_out = sy[W-1:0];
  end

endmodule
