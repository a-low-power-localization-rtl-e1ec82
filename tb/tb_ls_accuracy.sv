// tb_ls_accuracy: accuracy of the fixed-point solver against floating point.
//
// Random networks: a node at a random grid position and 4 to 16 anchors
// around it within the 31-hop range, each reporting its rounded distance as
// hop count. Every case is solved by ls_solver (full size: 16-slot list,
// 16/26-bit words, 10-step CORDICs, 10-bit quotients) and by a floating-point
// least-squares solution of the same linearised equations computed here. The
// position error of the fixed-point result is expressed relative to the mean
// anchor distance of the case. The test reports the mean and largest relative
// error and how many results had to be saturated. It fails if the mean error
// exceeds 12 % over all cases or 9 % over the cases with 8 or more anchors, or
// if a case with 8 or more anchors is off by more than 50 % (with only 4 to 7
// anchors the system is often badly conditioned and single cases can be far
// off). Cases the floating-point solution puts off the 8-bit grid are skipped.
// The error has two main sources: the integer quotients of the back
// substitution, whose rounding is carried into the later unknowns, and the
// angle resolution of a 10-step CORDIC (about 2^-9 rad) applied to the large
// right-hand-side entries b, which grow with the squared distance of the
// anchors from the coordinate origin.
module tb_ls_accuracy;
  import loc_pkg::*;

  localparam int N = 16;
  localparam int CASES = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [3:0]  w_add, r_add;
  coord_t      x_in, y_in, z_in, x_i, y_i, z_i;
  hop_t        r_in, r_i;
  logic [N-1:0] valid;
  logic   start, busy, done, sat, singular;
  coord_t ox, oy, oz;

  anchor_list u_list (.*);
  ls_solver dut (.clk, .rst_n, .start, .anchor_valid(valid), .r_add, .x_i, .y_i, .z_i, .r_i,
                 .busy, .done, .x(ox), .y(oy), .z(oz), .sat, .singular);

  int ax[N], ay[N], az[N], ar[N];

  task automatic put(int i, int x, int y, int z, int r);
    ax[i] = x; ay[i] = y; az[i] = z; ar[i] = r;
    @(negedge clk);
    we = 1; w_add = 4'(i); x_in = 8'(x); y_in = 8'(y); z_in = 8'(z); r_in = 5'(r);
    @(negedge clk);
    we = 0;
    valid[i] = 1'b1;
  endtask

  task automatic ref_ls(output real u[3], output bit ok);
    real m[3][3], v[3], a[3], b, det, mm[3][3];
    int first;
    first = -1;
    for (int r = 0; r < 3; r++) begin v[r] = 0; for (int c = 0; c < 3; c++) m[r][c] = 0; end
    for (int i = 0; i < N; i++) if (valid[i]) begin
      if (first < 0) first = i;
      else begin
        a[0] = ax[first] - ax[i]; a[1] = ay[first] - ay[i]; a[2] = az[first] - az[i];
        b = 0.5 * ((ax[first]**2 + ay[first]**2 + az[first]**2 - ar[first]**2)
                 - (ax[i]**2 + ay[i]**2 + az[i]**2 - ar[i]**2));
        for (int r = 0; r < 3; r++) begin
          v[r] += a[r] * b;
          for (int c = 0; c < 3; c++) m[r][c] += a[r] * a[c];
        end
      end
    end
    det = m[0][0]*(m[1][1]*m[2][2]-m[1][2]*m[2][1]) - m[0][1]*(m[1][0]*m[2][2]-m[1][2]*m[2][0])
        + m[0][2]*(m[1][0]*m[2][1]-m[1][1]*m[2][0]);
    ok = (det > 1.0 || det < -1.0);
    for (int k = 0; k < 3; k++) begin
      mm = m;
      for (int r = 0; r < 3; r++) mm[r][k] = v[r];
      u[k] = ok ? (mm[0][0]*(mm[1][1]*mm[2][2]-mm[1][2]*mm[2][1])
                 - mm[0][1]*(mm[1][0]*mm[2][2]-mm[1][2]*mm[2][0])
                 + mm[0][2]*(mm[1][0]*mm[2][1]-mm[1][1]*mm[2][0])) / det : 0.0;
    end
  endtask

  initial begin
    #40000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real u[3], rel, sumrel, maxrel, dst, meand;
    int n_done, n_sat, n_anch, n_big;
    real sum_big;
    bit ok;
    we = 0; w_add = 0; x_in = 0; y_in = 0; z_in = 0; r_in = 0; start = 0; valid = '0;
    sumrel = 0; maxrel = 0; n_done = 0; n_sat = 0; n_big = 0; sum_big = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CASES; t++) begin
      int px, py, pz;
      px = int'($urandom_range(0, 180)) - 90;
      py = int'($urandom_range(0, 180)) - 90;
      pz = int'($urandom_range(0, 180)) - 90;
      valid = '0;
      n_anch = 4 + int'($urandom_range(0, 12));
      meand = 0;
      for (int i = 0; i < n_anch; i++) begin
        int dx, dy, dz, slot;
        do begin
          dx = int'($urandom_range(0, 60)) - 30;
          dy = int'($urandom_range(0, 60)) - 30;
          dz = int'($urandom_range(0, 60)) - 30;
          dst = $sqrt(real'(dx*dx + dy*dy + dz*dz));
        end while (dst > 31.0 || dst < 3.0);
        slot = int'($urandom_range(0, N-1));
        while (valid[slot]) slot = (slot + 1) % N;
        put(slot, px + dx, py + dy, pz + dz, int'($floor(dst + 0.5)));
        meand += dst / n_anch;
      end
      ref_ls(u, ok);
      if (!ok || u[0] > 127 || u[0] < -128 || u[1] > 127 || u[1] < -128 || u[2] > 127 || u[2] < -128)
        continue;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      if (sat) n_sat++;
      rel = $sqrt((ox - u[0])**2 + (oy - u[1])**2 + (oz - u[2])**2) / meand;
      sumrel += rel;
      if (rel > maxrel) maxrel = rel;
      n_done++;
      if (n_anch >= 8) begin n_big++; sum_big += rel; end
      checks++;
      if ((n_anch >= 8 && rel > 0.50) || singular) begin
        failures++;
        $display("FAIL case %0d: %0d anchors, got (%0d,%0d,%0d) float (%f,%f,%f)", t, n_anch,
                 ox, oy, oz, u[0], u[1], u[2]);
      end
    end
    $display("%0d cases: mean error %f %%, max %f %% of the mean anchor distance, %0d saturated",
             n_done, 100.0 * sumrel / n_done, 100.0 * maxrel, n_sat);
    $display("with 8 to 16 anchors: %0d cases, mean error %f %%", n_big, 100.0 * sum_big / n_big);
    checks++;
    if (n_done < CASES / 2 || sumrel / n_done > 0.12 || sum_big / n_big > 0.09) begin failures++; $display("FAIL mean error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
