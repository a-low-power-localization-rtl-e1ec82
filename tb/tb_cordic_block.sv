// tb_cordic_block: self-checking test of the Givens rotation unit.
//
// Random row pairs and pivot columns are rotated. The expected rows are an
// exact Givens rotation computed here in floating point:
//   r = sqrt(p_c^2 + q_c^2),  p'_k = (p_c p_k + q_c q_k) / r,
//   q'_k = (p_c q_k - q_c p_k) / r,
// which also covers the pre-negation of a negative pivot. q'[col] must be 0
// exactly, the other entries within the CORDIC's accuracy (0.5 % of the
// entry plus the angle error a small integer pivot leaves, 1/r), and done must come
// 20 cycles after start. Back-to-back starts (start in the done cycle) are used.
module tb_cordic_block;
  import loc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [1:0] col;
  mrow_t row_p, row_q, out_p, out_q;

  cordic_block dut (.*);

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  real pv[4], qv[4];
  int  ncol;

  task automatic make_rows(int lim);
    int a[4], b[4];
    for (int k = 0; k < 3; k++) begin
      a[k] = int'($urandom_range(0, 2*lim)) - lim;
      b[k] = int'($urandom_range(0, 2*lim)) - lim;
    end
    a[3] = int'($urandom_range(0, 200*lim)) - 100*lim;
    b[3] = int'($urandom_range(0, 200*lim)) - 100*lim;
    ncol = int'($urandom_range(0, 2));
    row_p = '{a0: A_W'(a[0]), a1: A_W'(a[1]), a2: A_W'(a[2]), b: B_W'(a[3])};
    row_q = '{a0: A_W'(b[0]), a1: A_W'(b[1]), a2: A_W'(b[2]), b: B_W'(b[3])};
    for (int k = 0; k < 4; k++) begin pv[k] = a[k]; qv[k] = b[k]; end
    col = 2'(ncol);
  endtask

  task automatic check_out();
    real r, ep, eq, gp, gq, tol;
    r = $sqrt(pv[ncol]**2 + qv[ncol]**2);
    for (int k = 0; k < 4; k++) begin
      if (r == 0) begin ep = pv[k]; eq = qv[k]; end
      else begin
        ep = (pv[ncol]*pv[k] + qv[ncol]*qv[k]) / r;
        eq = (pv[ncol]*qv[k] - qv[ncol]*pv[k]) / r;
      end
      case (k)
        0: begin gp = $signed(out_p.a0); gq = $signed(out_q.a0); end
        1: begin gp = $signed(out_p.a1); gq = $signed(out_q.a1); end
        2: begin gp = $signed(out_p.a2); gq = $signed(out_q.a2); end
        default: begin gp = $signed(out_p.b); gq = $signed(out_q.b); end
      endcase
      // the angle found from a small integer pivot is only as exact as that pivot
      tol = 1.5 + $sqrt(pv[k]**2 + qv[k]**2) * (0.005 + (r > 0 ? 1.0 / r : 0.0));
      checks++;
      if (k == ncol ? (gq != 0 || rabs(gp - r) > tol) : (rabs(gp - ep) > tol || rabs(gq - eq) > tol)) begin
        failures++;
        $display("FAIL col %0d k %0d: got (%f,%f) exp (%f,%f)", ncol, k, gp, gq, ep, eq);
      end
    end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    start = 0; col = 0; row_p = '0; row_q = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    make_rows(300);
    start = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 20) begin failures++; $display("FAIL latency %0d", cyc); end
      check_out();
      // next rotation starts in this done cycle
      make_rows((t % 2) ? 30 : 2000);
      start = 1;
    end
    @(negedge clk); start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
