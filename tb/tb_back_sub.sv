// tb_back_sub: self-checking test of the back substitution.
//
// A random upper-triangular R (positive diagonal, as the QR leaves it) and a
// random position u are chosen; b' = R u is formed here, so the exact answer
// is known. Coordinates beyond the 8-bit range must come out clipped with sat
// set; a zero diagonal entry must set singular. Also non-exact right-hand
// sides: the result is checked against the same recurrence evaluated here
// with integer division rounded to nearest. Run time must stay under 3 x (10-cycle
// divide + overhead).
module tb_back_sub;
  import loc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, sat, singular;
  logic [1:0] ra;
  mrow_t rows[3], row;
  coord_t x, y, z;

  assign row = rows[ra];
  back_sub dut (.*);

  function automatic int clip(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction
  function automatic int clipq(int v); return v > 1023 ? 1023 : (v < -1023 ? -1023 : v); endfunction

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r[3][3], u[3], b[3], e[3], cyc;
    bit esat, esing;
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        r[i][j] = (j < i) ? 0 : (j == i ? int'($urandom_range(1, 3000)) : int'($urandom_range(0, 4000)) - 2000);
      for (int i = 0; i < 3; i++) u[i] = int'($urandom_range(0, 300)) - 150;
      if (t % 4 != 0) for (int i = 0; i < 3; i++) u[i] = int'($urandom_range(0, 250)) - 125;
      esing = 1'b0;
      if (t % 25 == 3) begin r[2][2] = 0; esing = 1'b1; end
      for (int i = 0; i < 3; i++) begin
        b[i] = 0;
        for (int j = 0; j < 3; j++) b[i] += r[i][j] * u[j];
        if (t % 2) b[i] += int'($urandom_range(0, 400)) - 200;   // not exact
      end
      // expected: the recurrence with rounded division
      for (int i = 2; i >= 0; i--) begin
        int acc;
        acc = b[i];
        for (int j = i + 1; j < 3; j++) acc -= r[i][j] * e[j];
        e[i] = (r[i][i] == 0) ? ((acc == 0) ? 0 : (acc > 0 ? 1023 : -1023))
                             : clipq(((acc < 0 ? -acc : acc) + r[i][i] / 2) / r[i][i] * (acc < 0 ? -1 : 1));
      end
      esat = 1'b0;
      for (int i = 0; i < 3; i++) if (e[i] != clip(e[i])) esat = 1'b1;
      for (int i = 0; i < 3; i++)
        rows[i] = '{a0: A_W'(r[i][0]), a1: A_W'(r[i][1]), a2: A_W'(r[i][2]), b: B_W'(b[i])};
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (cyc > 3 * 10 + 15) begin failures++; $display("FAIL latency %0d", cyc); end
      if (singular != esing) begin failures++; $display("FAIL singular %0d exp %0d", singular, esing); end
      if (!esing) begin
        checks += 2;
        if (x != 8'(clip(e[0])) || y != 8'(clip(e[1])) || z != 8'(clip(e[2]))) begin
          failures++;
          $display("FAIL got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", x, y, z, e[0], e[1], e[2]);
        end
        if (sat != esat) begin failures++; $display("FAIL sat %0d exp %0d", sat, esat); end
        if (t % 2 == 0 && !esat && (x != 8'(u[0]) || y != 8'(u[1]) || z != 8'(u[2]))) begin
          failures++; $display("FAIL exact system");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
