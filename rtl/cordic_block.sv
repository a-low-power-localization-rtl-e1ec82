// cordic_block: Givens rotation of two rows of [A | b] with four CORDICs.
//
// The block holds one CORDIC per column of A (x, y and z CORDICs, 16 bits) and
// one for the right-hand side b (r CORDIC, 26 bits). Given rows p and q and a
// pivot column col, it zeroes q[col] against p[col]:
//   cycles  0..9   the pivot column's CORDIC runs in vectoring mode on
//                  (p[col], q[col]); its 10 direction bits, the angle of the
//                  rotation, are stored;
//   cycles 10..19  the other three CORDICs run in rotation mode on
//                  (p[k], q[k]) with the stored directions.
// done pulses 20 cycles after start (a new start may be given in that
// same cycle), with the rotated rows on out_p / out_q;
// out_p[col] is the (gain-corrected) length of the pivot vector and out_q[col]
// is exactly zero. When p[col] is negative both rows are first negated (a
// rotation by 180 degrees, still orthogonal) so that the CORDIC's +-100 degree
// range always suffices. Rows and col are sampled in the start cycle; the
// outputs hold until the next start.
// The serial schedule (one element per 20 cycles, four CORDICs) follows the
// specification; the pre-negation is this design's choice.
module cordic_block
  import loc_pkg::*;
#(
  parameter int unsigned ITERS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  col,
  input  mrow_t       row_p,
  input  mrow_t       row_q,
  output logic        busy,
  output logic        done,
  output mrow_t       out_p,
  output mrow_t       out_q
);

  localparam int unsigned IT_W = $clog2(ITERS+1);

  typedef logic signed [A_W-1:0] aw_t;

  logic        neg_now;
  mrow_t       p_r, q_r;   // sampled (possibly negated) rows
  mrow_t       p_n, q_n;   // start-cycle view of the negated rows
  logic [1:0]  col_r;
  logic [ITERS-1:0] dir;
  logic        phase_rot;  // second half: rotating the other columns

  aw_t         pa [3], qa [3];
  aw_t         pa_r [3], qa_r [3];
  aw_t         xo [3], yo [3];
  logic        c_start [3], c_done [3], c_busy [3], c_dout [3];
  logic [IT_W-1:0] c_iter [3];
  logic [1:0]  col_cur;
  logic        piv_done;

  logic              b_start, b_done, b_busy, b_dout;
  logic [IT_W-1:0]   b_iter;
  logic signed [B_W-1:0] bx, by;

  function automatic mrow_t negrow(input mrow_t r, input logic n);
    mrow_t o;
    o.a0 = n ? -r.a0 : r.a0;
    o.a1 = n ? -r.a1 : r.a1;
    o.a2 = n ? -r.a2 : r.a2;
    o.b  = n ? -r.b  : r.b;
    return o;
  endfunction

  always_comb begin
    case (col)
      2'd0:    neg_now = row_p.a0[A_W-1];
      2'd1:    neg_now = row_p.a1[A_W-1];
      default: neg_now = row_p.a2[A_W-1];
    endcase
  end

  assign p_n = negrow(row_p, neg_now);
  assign q_n = negrow(row_q, neg_now);
  assign col_cur = start ? col : col_r;

  assign pa   = '{p_n.a0, p_n.a1, p_n.a2};
  assign qa   = '{q_n.a0, q_n.a1, q_n.a2};
  assign pa_r = '{p_r.a0, p_r.a1, p_r.a2};
  assign qa_r = '{q_r.a0, q_r.a1, q_r.a2};

  always_comb begin
    piv_done = 1'b0;
    for (int k = 0; k < 3; k++)
      if (col_r == 2'(k)) piv_done = c_done[k] && !phase_rot;
  end

  for (genvar k = 0; k < 3; k++) begin : g_col
    logic is_piv;
    assign is_piv     = (col_cur == 2'(k));
    assign c_start[k] = (start && is_piv) || (piv_done && !is_piv);
    cordic #(.W(A_W), .ITERS(ITERS)) u_cordic (
      .clk   (clk),
      .rst_n (rst_n),
      .start (c_start[k]),
      .vec   (is_piv),
      .x_in  (start ? pa[k] : pa_r[k]),
      .y_in  (start ? qa[k] : qa_r[k]),
      .d_in  (dir[c_iter[k]]),
      .d_out (c_dout[k]),
      .busy  (c_busy[k]),
      .iter  (c_iter[k]),
      .done  (c_done[k]),
      .x_out (xo[k]),
      .y_out (yo[k])
    );
  end

  assign b_start = piv_done;
  cordic #(.W(B_W), .ITERS(ITERS)) u_cordic_r (
    .clk   (clk),
    .rst_n (rst_n),
    .start (b_start),
    .vec   (1'b0),
    .x_in  (p_r.b),
    .y_in  (q_r.b),
    .d_in  (dir[b_iter]),
    .d_out (b_dout),
    .busy  (b_busy),
    .iter  (b_iter),
    .done  (b_done),
    .x_out (bx),
    .y_out (by)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_r       <= '0;
      q_r       <= '0;
      col_r     <= '0;
      dir       <= '0;
      phase_rot <= 1'b0;
      busy      <= 1'b0;
    end else begin
      // record the pivot CORDIC's direction bits while it vectors
      for (int k = 0; k < 3; k++)
        if ((col_cur == 2'(k)) && (start || (c_busy[k] && !phase_rot)))
          dir[c_iter[k]] <= c_dout[k];
      if (piv_done) phase_rot <= 1'b1;
      if (b_done) begin
        busy      <= 1'b0;
        phase_rot <= 1'b0;
      end
      // a new rotation may start in the cycle the previous one is done
      if (start) begin
        p_r       <= p_n;
        q_r       <= q_n;
        col_r     <= col;
        busy      <= 1'b1;
        phase_rot <= 1'b0;
      end
    end
  end

  assign done = b_done;

  // Assemble the rotated rows: the pivot column comes from the vectoring CORDIC.
  assign out_p = '{a0: xo[0], a1: xo[1], a2: xo[2], b: bx};
  assign out_q = '{a0: (col_r == 2'd0) ? '0 : yo[0],
                   a1: (col_r == 2'd1) ? '0 : yo[1],
                   a2: (col_r == 2'd2) ? '0 : yo[2],
                   b:  by};

endmodule
