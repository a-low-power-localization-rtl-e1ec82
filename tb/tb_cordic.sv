// tb_cordic: self-checking test of one time-sequential CORDIC.
//
// Vectoring mode: for random (x, y) the result must be the vector length
// (x_out) and close to zero (y_out). Rotation mode: random direction bits are
// applied and the result must match an ideal rotation by the angle they
// encode, sum of -+atan(2^-i), computed here in floating point. Both results
// must be ready exactly 10 cycles after start. The vectoring direction bits
// reported on d_out must, applied as an ideal rotation, zero y as well.
module tb_cordic;
  localparam int W = 16, IT = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, vec, d_in, d_out, busy, done;
  logic [$clog2(IT+1)-1:0] iter;
  logic signed [W-1:0] x_in, y_in, x_out, y_out;

  cordic #(.W(W), .ITERS(IT)) dut (.*);

  bit dirs[IT];
  always @(posedge clk) if (busy || start) begin
    if (vec) dirs[iter] = d_out;
  end
  assign d_in = dirs[iter];

  function automatic real angle_of(input int unused);
    real a = 0;
    for (int i = 0; i < IT; i++) a += (dirs[i] ? -1.0 : 1.0) * $atan(2.0 ** (-i));
    return a;
  endfunction

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  task automatic run(input int x, input int y, input bit v, output int cyc);
    @(negedge clk);
    x_in = W'(x); y_in = W'(y); vec = v; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, x, y;
    real th, ex, ey, mag, tol;
    start = 0; vec = 0; x_in = 0; y_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit v;
      int lim;
      v = t[0];
      lim = (t % 3 == 0) ? 100 : 4000;
      x = int'($urandom_range(0, 2*lim)) - lim;
      y = int'($urandom_range(0, 2*lim)) - lim;
      if (v && x < 0) x = -x;               // vectoring range: right half plane
      if (!v) for (int i = 0; i < IT; i++) dirs[i] = 1'($urandom);
      run(x, y, v, cyc);
      th  = angle_of(0);
      ex  = x * $cos(th) - y * $sin(th);
      ey  = x * $sin(th) + y * $cos(th);
      mag = $sqrt(real'(x*x + y*y));
      tol = 1.5 + 0.002 * mag;
      checks += 2;
      if (cyc != IT) begin failures++; $display("FAIL latency %0d", cyc); end
      if (rabs(x_out - ex) > tol || rabs(y_out - ey) > tol) begin
        failures++;
        $display("FAIL vec=%0d in (%0d,%0d) got (%0d,%0d) exp (%f,%f)", v, x, y, x_out, y_out, ex, ey);
      end
      if (v) begin
        checks++;
        if (rabs(x_out - mag) > tol + 0.003 * mag || rabs(real'(y_out)) > tol + mag * 0.002) begin
          failures++;
          $display("FAIL vectoring (%0d,%0d): got (%0d,%0d) mag %f", x, y, x_out, y_out, mag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
