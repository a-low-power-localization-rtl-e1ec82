// ls_solver: least-squares position solver (setup, Givens QR, back substitution).
//
// Solves the over-determined system A u = b built from the anchor list for the
// node position u = (x, y, z), fully serially:
//   1. setup: ls_setup scans the anchor list and writes the rows [A_i | b_i]
//      into the matrix memory (N_ANCHORS cycles);
//   2. QR: for each column c = 0, 1, 2 the entries below the diagonal are
//      zeroed from the bottom up, each row q rotated against the row q-1 above
//      it by cordic_block (20 cycles per zeroed entry; with m rows that is
//      (m-1) + (m-2) + (m-3) entries, 39 for 16 anchors, 780 cycles). The
//      rotations are applied to b as well, so the system keeps its solution;
//   3. back substitution on the 3x3 triangle left in rows 0..2 (back_sub).
// The next rotation starts in the cycle the previous one finishes; rows it
// needs that are written in that same cycle are forwarded from the rotator.
// Interface: start is a one-cycle pulse, sampled when busy is low. The solver
// reads the anchor list through r_add / x_i..r_i (combinational read) during
// setup only. done pulses when x, y, z, sat and singular are valid; they hold
// until the next start. Fewer than 4 valid anchors give singular = 1 at once
// after setup. A full 16-anchor solve takes about 16 + 780 + 40 cycles.
// The algorithm, the serial schedule and the word sizes follow the
// specification; the rotation order is the one of its QR illustration, and the
// forwarding and the early exit are this design's choices.
module ls_solver
  import loc_pkg::*;
#(
  parameter int unsigned N_ANCHORS = 16,
  parameter int unsigned ITERS     = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [N_ANCHORS-1:0]          anchor_valid,
  output logic [$clog2(N_ANCHORS)-1:0]  r_add,
  input  coord_t                        x_i,
  input  coord_t                        y_i,
  input  coord_t                        z_i,
  input  hop_t                          r_i,
  output logic                          busy,
  output logic                          done,
  output coord_t                        x,
  output coord_t                        y,
  output coord_t                        z,
  output logic                          sat,
  output logic                          singular
);

  localparam int unsigned ROWS = N_ANCHORS - 1;
  localparam int unsigned RAW  = $clog2(N_ANCHORS);  // row address width

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_QR, S_BS, S_FIN} state_e;
  state_e state;

  // setup
  logic            su_start, su_we, su_busy, su_done;
  logic [RAW-1:0]  su_wa, n_rows;
  mrow_t           su_wd;

  // matrix memory ports
  logic [RAW-1:0]  ra0, ra1, wa0, wa1;
  logic            we0, we1;
  mrow_t           rd0, rd1, wd0, wd1;

  // rotator
  logic            cb_start, cb_busy, cb_done;
  logic [1:0]      col, col_n;
  logic [RAW-1:0]  q, q_n;          // row being zeroed; pivot row is q - 1
  logic            more;            // another entry follows the current one
  logic            qr_first;        // first rotation, issued right after setup
  mrow_t           cb_p, cb_q, cb_outp, cb_outq;

  // back substitution
  logic            bs_start, bs_busy, bs_done, bs_sat, bs_sing;
  logic [1:0]      bs_ra;
  coord_t          bs_x, bs_y, bs_z;

  ls_setup #(.N_ANCHORS(N_ANCHORS)) u_setup (
    .clk, .rst_n,
    .start        (su_start),
    .anchor_valid (anchor_valid),
    .r_add        (r_add),
    .x_i, .y_i, .z_i, .r_i,
    .we           (su_we),
    .wa           (su_wa),
    .wd           (su_wd),
    .busy         (su_busy),
    .done         (su_done),
    .n_rows       (n_rows)
  );

  matrix_mem #(.ROWS(ROWS)) u_mem (
    .clk,
    .ra0 (ra0[$clog2(ROWS)-1:0]), .ra1 (ra1[$clog2(ROWS)-1:0]),
    .rd0 (rd0), .rd1 (rd1),
    .we0 (we0), .wa0 (wa0[$clog2(ROWS)-1:0]), .wd0 (wd0),
    .we1 (we1), .wa1 (wa1[$clog2(ROWS)-1:0]), .wd1 (wd1)
  );

  cordic_block #(.ITERS(ITERS)) u_rot (
    .clk, .rst_n,
    .start (cb_start),
    .col   (qr_first ? 2'd0 : col_n),
    .row_p (cb_p),
    .row_q (cb_q),
    .busy  (cb_busy),
    .done  (cb_done),
    .out_p (cb_outp),
    .out_q (cb_outq)
  );

  back_sub #(.QW(QUOT_W)) u_bs (
    .clk, .rst_n,
    .start    (bs_start),
    .ra       (bs_ra),
    .row      (rd0),
    .busy     (bs_busy),
    .done     (bs_done),
    .x        (bs_x),
    .y        (bs_y),
    .z        (bs_z),
    .sat      (bs_sat),
    .singular (bs_sing)
  );

  // Next entry to zero: up the current column, then to the bottom of the next.
  always_comb begin
    more  = 1'b1;
    col_n = col;
    q_n   = q - 1'b1;
    if (q == RAW'(col) + 1'b1) begin
      col_n = col + 2'd1;
      q_n   = n_rows - 1'b1;
      if (col == 2'd2 || n_rows < RAW'(col) + 3) more = 1'b0;
    end
  end

  // Rows handed to the rotator, forwarded from the one just finished.
  function automatic mrow_t fwd(input logic [RAW-1:0] a, input mrow_t m);
    if (cb_done && a == q - 1'b1) return cb_outp;
    if (cb_done && a == q)        return cb_outq;
    return m;
  endfunction

  always_comb begin
    ra0 = (state == S_BS) ? RAW'(bs_ra) : q_n - 1'b1;
    ra1 = q_n;
    if (qr_first) begin
      ra0 = n_rows - RAW'(2);
      ra1 = n_rows - 1'b1;
    end
    cb_p = fwd(ra0, rd0);
    cb_q = fwd(ra1, rd1);
    we0  = (state == S_SETUP) ? su_we : (state == S_QR && cb_done);
    wa0  = (state == S_SETUP) ? su_wa : q - 1'b1;
    wd0  = (state == S_SETUP) ? su_wd : cb_outp;
    we1  = (state == S_QR && cb_done);
    wa1  = q;
    wd1  = cb_outq;
  end

  assign qr_first = (state == S_SETUP) && su_done && (n_rows >= RAW'(3));
  assign su_start = (state == S_IDLE) && start;
  assign cb_start = qr_first || ((state == S_QR) && cb_done && more);
  assign bs_start = (state == S_QR) && cb_done && !more;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      col      <= '0;
      q        <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      x        <= '0;
      y        <= '0;
      z        <= '0;
      sat      <= 1'b0;
      singular <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SETUP;
          busy  <= 1'b1;
          col   <= '0;
          q     <= '0;
        end
        S_SETUP: if (su_done) begin
          if (qr_first) begin
            state <= S_QR;
            col   <= 2'd0;
            q     <= n_rows - 1'b1;
          end else begin
            x <= '0; y <= '0; z <= '0;
            sat      <= 1'b0;
            singular <= 1'b1;
            state    <= S_FIN;
          end
        end
        S_QR: if (cb_done) begin
          if (more) begin
            col <= col_n;
            q   <= q_n;
          end else begin
            state <= S_BS;
          end
        end
        S_BS: if (bs_done) begin
          x        <= bs_x;
          y        <= bs_y;
          z        <= bs_z;
          sat      <= bs_sat;
          singular <= bs_sing;
          state    <= S_FIN;
        end
        S_FIN: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
