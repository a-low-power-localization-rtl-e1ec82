// back_sub: back substitution of the upper-triangular 3x3 system R u = b'.
//
// After the QR decomposition the first three rows of the matrix memory hold
// R (upper triangular) and b'. The unknowns are found bottom-up:
//   u_k = (b'_k - sum_{j>k} R_kj * u_j) / R_kk,   k = 2, 1, 0.
// For each k the block loads b'_k into an accumulator, subtracts one product
// R_kj * u_j per cycle (a single multiplier), then divides by R_kk with the
// serial divider (10-bit quotient magnitude, 10 cycles). The signed quotients
// (range +-1023) are kept for the later products; at the end each is saturated
// to an 8-bit signed coordinate. sat reports that at least one coordinate was
// saturated (the node lies outside the coordinate grid), singular that a
// diagonal entry of R was zero (the anchors do not span 3-D space).
// Interface: the block addresses the matrix memory row it needs through ra and
// reads it on row in the same cycle. start is a one-cycle pulse; done pulses
// when x, y, z, sat and singular are valid, about 40 cycles later; they hold
// until the next start. The division width and the final saturation to 8 bits
// follow the specification; the multiplier and the handling of a zero
// diagonal are this design's choices.
module back_sub
  import loc_pkg::*;
#(
  parameter int unsigned QW = QUOT_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic [1:0]  ra,
  input  mrow_t       row,
  output logic        busy,
  output logic        done,
  output coord_t      x,
  output coord_t      y,
  output coord_t      z,
  output logic        sat,
  output logic        singular
);

  localparam int unsigned UW   = QW + 1;                 // signed quotient
  localparam int unsigned ACCW = B_W + 3;                // b' - 2 products
  localparam int unsigned PW   = A_W + UW;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MAC, S_DIV, S_WAIT, S_FIN} state_e;
  state_e state;

  logic [1:0]               k, j;
  logic signed [ACCW-1:0]   acc;
  logic signed [UW-1:0]     u [3];
  logic signed [A_W-1:0]    r_kj, r_kk;
  logic signed [PW-1:0]     prod;
  logic                     d_start, d_busy, d_done, d_neg, d_ovf, d_dz;
  logic [QW-1:0]            d_q;
  logic                     sing_r;

  assign ra = k;

  always_comb begin
    case (j)
      2'd1:    r_kj = row.a1;
      default: r_kj = row.a2;
    endcase
    case (k)
      2'd0:    r_kk = row.a0;
      2'd1:    r_kk = row.a1;
      default: r_kk = row.a2;
    endcase
  end

  assign prod    = PW'(r_kj) * PW'(u[j]);
  assign d_start = (state == S_DIV);

  serial_divider #(.NW(ACCW), .DW(A_W), .QW(QW)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (d_start),
    .num   (acc),
    .den   (r_kk),
    .busy  (d_busy),
    .done  (d_done),
    .q     (d_q),
    .q_neg (d_neg),
    .ovf   (d_ovf),
    .dz    (d_dz)
  );

  function automatic coord_t sat8(input logic signed [UW-1:0] v);
    if (v > UW'(127))       return 8'sd127;
    else if (v < -UW'(128)) return -8'sd128;
    else                    return v[7:0];
  endfunction

  function automatic logic needs_sat(input logic signed [UW-1:0] v);
    return (v > UW'(127)) || (v < -UW'(128));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k        <= 2'd2;
      j        <= 2'd0;
      acc      <= '0;
      u        <= '{default: '0};
      busy     <= 1'b0;
      done     <= 1'b0;
      x        <= '0;
      y        <= '0;
      z        <= '0;
      sat      <= 1'b0;
      singular <= 1'b0;
      sing_r   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          busy   <= 1'b1;
          k      <= 2'd2;
          u      <= '{default: '0};
          sing_r <= 1'b0;
        end
        S_LOAD: begin
          acc   <= ACCW'($signed(row.b));
          j     <= k + 2'd1;
          state <= (k == 2'd2) ? S_DIV : S_MAC;
        end
        S_MAC: begin
          acc <= acc - ACCW'(prod);
          if (j == 2'd2) state <= S_DIV;
          else           j     <= j + 2'd1;
        end
        S_DIV: state <= S_WAIT;
        S_WAIT: if (d_done) begin
          u[k]   <= d_neg ? -UW'({1'b0, d_q}) : UW'({1'b0, d_q});
          sing_r <= sing_r | d_dz;
          if (k == 2'd0) state <= S_FIN;
          else begin
            k     <= k - 2'd1;
            state <= S_LOAD;
          end
        end
        S_FIN: begin
          x        <= sat8(u[0]);
          y        <= sat8(u[1]);
          z        <= sat8(u[2]);
          sat      <= needs_sat(u[0]) | needs_sat(u[1]) | needs_sat(u[2]);
          singular <= sing_r;
          busy     <= 1'b0;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end


endmodule
