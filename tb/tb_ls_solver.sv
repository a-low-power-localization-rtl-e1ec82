// tb_ls_solver: self-checking test of the least-squares solver.
//
// An anchor_list is filled with anchors and ls_solver is run on it. The
// expected position is computed here in floating point from the same
// linearised equations (normal equations solved by Cramer's rule), so it is
// independent of the fixed-point datapath. Cases:
//   - exact geometry: anchors placed at integer offsets of integer length
//     (Pythagorean quadruples) around a known node; the result must be the
//     node position within a small tolerance;
//   - random anchors around a random node with rounded distances, compared
//     with the floating-point solution within a tolerance;
//   - fewer than 4 anchors (singular), and an out-of-grid solution (sat);
//   - the cycle count of a 16-anchor solve (16 setup cycles + 39 x 20 QR
//     cycles + back substitution).
module tb_ls_solver;
  import loc_pkg::*;

  localparam int N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // anchor list write side (driven here) and read side (driven by the solver)
  logic        we;
  logic [3:0]  w_add, r_add;
  coord_t      x_in, y_in, z_in, x_i, y_i, z_i;
  hop_t        r_in, r_i;
  logic [N-1:0] valid;

  logic   start, busy, done, sat, singular;
  coord_t ox, oy, oz;

  anchor_list #(.N_ANCHORS(N)) u_list (.*);

  ls_solver #(.N_ANCHORS(N)) dut (
    .clk, .rst_n, .start, .anchor_valid(valid), .r_add,
    .x_i, .y_i, .z_i, .r_i, .busy, .done, .x(ox), .y(oy), .z(oz),
    .sat, .singular);

  int ax[N], ay[N], az[N], ar[N];

  task automatic put(int i, int x, int y, int z, int r);
    ax[i] = x; ay[i] = y; az[i] = z; ar[i] = r;
    @(negedge clk);
    we = 1; w_add = 4'(i); x_in = 8'(x); y_in = 8'(y); z_in = 8'(z); r_in = 5'(r);
    @(negedge clk);
    we = 0;
    valid[i] = 1'b1;
  endtask

  // floating-point least squares on the linearised system
  task automatic ref_ls(output real ux, output real uy, output real uz, output bit ok);
    real m[3][3], v[3], a[3], b, det, d0, d1, d2;
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
    d0 = v[0]*(m[1][1]*m[2][2]-m[1][2]*m[2][1]) - m[0][1]*(v[1]*m[2][2]-m[1][2]*v[2])
       + m[0][2]*(v[1]*m[2][1]-m[1][1]*v[2]);
    d1 = m[0][0]*(v[1]*m[2][2]-m[1][2]*v[2]) - v[0]*(m[1][0]*m[2][2]-m[1][2]*m[2][0])
       + m[0][2]*(m[1][0]*v[2]-v[1]*m[2][0]);
    d2 = m[0][0]*(m[1][1]*v[2]-v[1]*m[2][1]) - m[0][1]*(m[1][0]*v[2]-v[1]*m[2][0])
       + v[0]*(m[1][0]*m[2][1]-m[1][1]*m[2][0]);
    ok = (det > 1.0 || det < -1.0);
    ux = ok ? d0 / det : 0; uy = ok ? d1 / det : 0; uz = ok ? d2 / det : 0;
  endtask

  task automatic run_solve(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  function automatic int nint(real r);
    return (r >= 0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int clamp8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  // compare with tolerance tol; returns the largest coordinate error
  task automatic check_pos(string tag, int ex, int ey, int ez, int tol, output int err);
    int e;
    err = iabs(int'(ox) - clamp8(ex));
    e = iabs(int'(oy) - clamp8(ey)); if (e > err) err = e;
    e = iabs(int'(oz) - clamp8(ez)); if (e > err) err = e;
    checks++;
    if (err > tol || singular) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d,%0d) expected (%0d,%0d,%0d) sing=%0d",
               tag, ox, oy, oz, ex, ey, ez, singular);
    end
  endtask

  // integer vectors of integer length <= 31 (Pythagorean quadruples)
  int qv[8][4] = '{'{1,2,2,3}, '{2,3,6,7}, '{1,4,8,9}, '{4,4,7,9}, '{2,6,9,11},
                   '{6,6,7,11}, '{2,10,11,15}, '{4,13,16,21}};

  int cyc, err, maxerr, sumerr, nsat;
  real fx, fy, fz;
  bit  ok;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; w_add = 0; x_in = 0; y_in = 0; z_in = 0; r_in = 0; start = 0; valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- exact geometry, 16 anchors ----
    for (int t = 0; t < 6; t++) begin
      int px, py, pz;
      px = int'($urandom_range(0, 120)) - 60;
      py = int'($urandom_range(0, 120)) - 60;
      pz = int'($urandom_range(0, 120)) - 60;
      valid = '0;
      for (int i = 0; i < N; i++) begin
        int k, sx, sy, sz, perm;
        k = (i + t) % 8;
        sx = (i & 1) ? -1 : 1; sy = (i & 2) ? -1 : 1; sz = (i & 4) ? -1 : 1;
        perm = (i >> 3) + t;
        if (perm % 2 == 0) put(i, px + sx*qv[k][0], py + sy*qv[k][1], pz + sz*qv[k][2], qv[k][3]);
        else               put(i, px + sx*qv[k][2], py + sy*qv[k][0], pz + sz*qv[k][1], qv[k][3]);
      end
      run_solve(cyc);
      check_pos("exact", px, py, pz, 2, err);
      if (t == 0) begin
        // 16 anchors: 15 rows, 14+13+12 = 39 rotations of 20 cycles each
        checks++;
        if (cyc < 16 + 39*20 || cyc > 16 + 39*20 + 60) begin
          failures++;
          $display("FAIL cycle count %0d", cyc);
        end
        $display("16-anchor solve: %0d cycles", cyc);
      end
    end

    // ---- random anchors, rounded distances ----
    maxerr = 0; sumerr = 0;
    for (int t = 0; t < 40; t++) begin
      int px, py, pz, n;
      px = int'($urandom_range(0, 160)) - 80;
      py = int'($urandom_range(0, 160)) - 80;
      pz = int'($urandom_range(0, 160)) - 80;
      valid = '0;
      n = 4 + int'($urandom_range(0, 12));
      for (int i = 0; i < n; i++) begin
        int dx, dy, dz, slot;
        real d;
        do begin
          dx = int'($urandom_range(0, 40)) - 20;
          dy = int'($urandom_range(0, 40)) - 20;
          dz = int'($urandom_range(0, 40)) - 20;
          d = $sqrt(real'(dx*dx + dy*dy + dz*dz));
        end while (d > 31.0 || d < 4.0);
        slot = (i * 7 + t) % N;
        while (valid[slot]) slot = (slot + 1) % N;
        put(slot, px + dx, py + dy, pz + dz, nint(d));
      end
      ref_ls(fx, fy, fz, ok);
      if (!ok) continue;
      if (rabs(fx) > 120 || rabs(fy) > 120 || rabs(fz) > 120) continue;
      run_solve(cyc);
      check_pos("random", nint(fx), nint(fy), nint(fz), 6, err);
      if (err > maxerr) maxerr = err;
      sumerr += err;
    end
    $display("random cases: max coordinate error %0d, sum %0d", maxerr, sumerr);

    // ---- fewer than 4 anchors: singular ----
    valid = '0;
    put(3, 10, 10, 10, 5); put(9, -10, 10, 10, 5); put(12, 10, -10, 10, 5);
    run_solve(cyc);
    checks++;
    if (!singular) begin failures++; $display("FAIL 3 anchors not singular"); end

    // ---- coplanar anchors (all z equal): rank deficient ----
    valid = '0;
    put(0, 0, 0, 5, 7); put(1, 10, 0, 5, 7); put(2, 0, 10, 5, 7); put(3, 10, 10, 5, 9); put(4, 5, 5, 5, 3);
    run_solve(cyc);
    checks++;
    if (!singular && oz != 0) begin
      // a zero third column leaves R_22 = 0: the divider reports it
      failures++; $display("FAIL coplanar anchors: sing=%0d z=%0d", singular, oz);
    end

    // ---- solution outside the grid: saturation ----
    nsat = 0;
    for (int t = 0; t < 200 && nsat < 3; t++) begin
      int c;
      valid = '0;
      for (int i = 0; i < 5; i++)
        put(i, 100 + int'($urandom_range(0, 20)), 100 + int'($urandom_range(0, 20)),
            int'($urandom_range(0, 20)), int'($urandom_range(0, 31)));
      ref_ls(fx, fy, fz, ok);
      if (!ok || (rabs(fx) < 200 && rabs(fy) < 200 && rabs(fz) < 200)) continue;
      if (rabs(fx) > 5000 || rabs(fy) > 5000 || rabs(fz) > 5000) continue;
      run_solve(cyc);
      nsat++;
      checks++;
      c = 0;
      if (rabs(fx) >= 200) c += (ox == (fx > 0 ? 8'sd127 : -8'sd128)) ? 0 : 1;
      if (rabs(fy) >= 200) c += (oy == (fy > 0 ? 8'sd127 : -8'sd128)) ? 0 : 1;
      if (rabs(fz) >= 200) c += (oz == (fz > 0 ? 8'sd127 : -8'sd128)) ? 0 : 1;
      if (!sat || c != 0) begin
        failures++;
        $display("FAIL saturation: ref (%f,%f,%f) got (%0d,%0d,%0d) sat=%0d",
                 fx, fy, fz, ox, oy, oz, sat);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL no saturation case generated"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
