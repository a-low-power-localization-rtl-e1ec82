// serial_divider: fixed-point restoring divider, one quotient bit per cycle.
//
// Divides the signed numerator num by the signed divisor den and delivers a
// QW-bit quotient magnitude q, rounded to the nearest integer (halves away
// from zero), with its sign in q_neg (set only for a non-zero quotient). The
// magnitudes are divided, half the divisor being added to the numerator's
// magnitude first to round: at step k
// (k = QW-1 down to 0) the divisor shifted left by k is subtracted from the
// partial remainder when it fits, and quotient bit k is set. A quotient too
// large for QW bits raises ovf and gives q = all ones; den = 0 raises dz (and
// ovf). Timing: start is a one-cycle pulse with num and den; the first step is
// taken on that edge, so done pulses QW cycles after start (10 cycles for the
// 10-bit quotient of the specification), and q, q_neg, ovf, dz hold until the
// next start. The 10-bit, 10-cycle behaviour follows the specification; the
// restoring algorithm, the rounding and the sign/overflow handling are this
// design's choices.
module serial_divider #(
  parameter int unsigned NW = 29,
  parameter int unsigned DW = 16,
  parameter int unsigned QW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic [QW-1:0]        q,
  output logic                 q_neg,
  output logic                 ovf,
  output logic                 dz
);

  localparam int unsigned RW = NW + QW + 1;  // wide enough for den << (QW-1)
  localparam int unsigned KW = $clog2(QW+1);

  logic [RW-1:0] rem_r, rem_c, dsh;
  logic [DW-1:0] da_r, da_c;
  logic [KW-1:0] k_r, k_c;
  logic [QW-1:0] q_r, q_c;
  logic          sgn_r, ovf_r, dz_r;
  logic          fits;
  logic [NW-1:0] na;
  logic [DW-1:0] da;

  assign na = (num[NW-1] ? NW'(-num) : NW'(num)) + NW'(da >> 1);
  assign da = den[DW-1] ? DW'(-den) : DW'(den);

  assign rem_c = start ? RW'(na) : rem_r;
  assign da_c  = start ? da : da_r;
  assign k_c   = start ? KW'(QW-1) : k_r;
  assign q_c   = start ? '0 : q_r;
  assign dsh   = RW'(da_c) << k_c;
  assign fits  = (rem_c >= dsh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_r <= '0; da_r <= '0; k_r <= '0; q_r <= '0;
      sgn_r <= 1'b0; ovf_r <= 1'b0; dz_r <= 1'b0;
      busy  <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        da_r  <= da;
        sgn_r <= num[NW-1] ^ den[DW-1];
        dz_r  <= (da == '0);
        ovf_r <= (da == '0) || (RW'(na) >= (RW'(da) << QW));
      end
      if (start || busy) begin
        rem_r <= fits ? rem_c - dsh : rem_c;
        q_r   <= q_c | (fits ? (QW'(1) << k_c) : '0);
        if (k_c == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
          k_r  <= k_c - 1'b1;
        end
      end
    end
  end

  assign ovf   = ovf_r;
  assign dz    = dz_r;
  assign q     = ovf_r ? '1 : q_r;
  assign q_neg = sgn_r && (q != '0);

endmodule
