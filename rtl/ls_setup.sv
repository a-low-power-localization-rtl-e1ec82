// ls_setup: builds the linearised system A u = b from the anchor list.
//
// Subtracting the range equation of a reference anchor (x1, y1, z1, r1) from
// that of every other anchor i gives one linear equation per anchor:
//   A_i = [x1 - xi, y1 - yi, z1 - zi]
//   b_i = 0.5 * ((x1^2 + y1^2 + z1^2 - r1^2) - (xi^2 + yi^2 + zi^2 - ri^2))
// where r is the hop count used as the distance. The block scans the anchor
// list one slot per cycle (r_add = 0 .. N_ANCHORS-1, combinational read),
// skips slots whose anchor_valid bit is clear, keeps the first valid anchor
// as the reference (its coordinates and its sum of squares) and, for each
// later one, writes a row [A_i | b_i] to the matrix memory at address wa,
// rows 0, 1, 2, ... in order. A entries take 9 significant bits and b 19,
// sign-extended to the 16- and 26-bit memory words. The factor 0.5 is an
// arithmetic shift right (rounding toward minus infinity).
// Timing: start is a one-cycle pulse; the scan takes N_ANCHORS cycles and done
// pulses in the cycle after it, with n_rows = number of rows written (number
// of valid anchors - 1; 0 if none is valid).
// The equations follow the specification; the scan order, the choice of the
// lowest-numbered valid anchor as the reference and the rounding of the
// halving are this design's choices.
module ls_setup
  import loc_pkg::*;
#(
  parameter int unsigned N_ANCHORS = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [N_ANCHORS-1:0]           anchor_valid,
  output logic [$clog2(N_ANCHORS)-1:0]   r_add,
  input  coord_t                         x_i,
  input  coord_t                         y_i,
  input  coord_t                         z_i,
  input  hop_t                           r_i,
  output logic                           we,
  output logic [$clog2(N_ANCHORS)-1:0]   wa,
  output mrow_t                          wd,
  output logic                           busy,
  output logic                           done,
  output logic [$clog2(N_ANCHORS)-1:0]   n_rows
);

  localparam int unsigned AIW = $clog2(N_ANCHORS);
  localparam int unsigned SW  = 19;   // width of a sum of squares difference

  logic [AIW-1:0]          idx;
  logic                    have_ref;
  coord_t                  x1, y1, z1;
  logic signed [SW-1:0]    s1;        // x1^2 + y1^2 + z1^2 - r1^2
  logic signed [SW-1:0]    si;        // same for the current anchor
  logic signed [SW-1:0]    bdiff;
  logic                    slot_ok;

  function automatic logic signed [SW-1:0] sq(input logic signed [8:0] v);
    return SW'(v) * SW'(v);
  endfunction

  assign r_add   = idx;
  assign slot_ok = busy && anchor_valid[idx];
  assign si      = sq(9'(x_i)) + sq(9'(y_i)) + sq(9'(z_i)) - sq($signed({4'b0, r_i}));
  assign bdiff   = s1 - si;

  assign we   = slot_ok && have_ref;
  assign wd.a0 = A_W'(10'(x1) - 10'(x_i));
  assign wd.a1 = A_W'(10'(y1) - 10'(y_i));
  assign wd.a2 = A_W'(10'(z1) - 10'(z_i));
  assign wd.b  = B_W'(bdiff >>> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      have_ref <= 1'b0;
      x1 <= '0; y1 <= '0; z1 <= '0; s1 <= '0;
      wa       <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      n_rows   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        idx      <= '0;
        have_ref <= 1'b0;
        wa       <= '0;
      end else if (busy) begin
        if (slot_ok && !have_ref) begin
          have_ref <= 1'b1;
          x1 <= x_i; y1 <= y_i; z1 <= z_i; s1 <= si;
        end
        if (we) wa <= wa + 1'b1;
        if (idx == AIW'(N_ANCHORS-1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          n_rows <= wa + AIW'(we);
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
