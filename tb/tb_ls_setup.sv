// tb_ls_setup: self-checking test of the matrix setup.
//
// Fills a model anchor table (answered combinationally on r_add, like the
// anchor list), marks a random subset valid, runs ls_setup and captures the
// rows it writes. Each row must equal [x1-xi, y1-yi, z1-zi | floor(0.5*(s1-si))]
// with s = x^2+y^2+z^2-r^2 and anchor 1 the lowest valid slot, computed here
// with plain integers. Also checks the row count and the N_ANCHORS-cycle scan.
module tb_ls_setup;
  import loc_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, we, busy, done;
  logic [N-1:0] valid;
  logic [3:0] r_add, wa, n_rows;
  coord_t x_i, y_i, z_i;
  hop_t r_i;
  mrow_t wd;

  int ax[N], ay[N], az[N], ar[N];
  assign x_i = 8'(ax[r_add]);
  assign y_i = 8'(ay[r_add]);
  assign z_i = 8'(az[r_add]);
  assign r_i = 5'(ar[r_add]);

  ls_setup #(.N_ANCHORS(N)) dut (.*, .anchor_valid(valid));

  int rows_a0[$], rows_a1[$], rows_a2[$], rows_b[$], rows_wa[$];
  always @(posedge clk) if (we) begin
    rows_a0.push_back(int'($signed(wd.a0))); rows_a1.push_back(int'($signed(wd.a1)));
    rows_a2.push_back(int'($signed(wd.a2))); rows_b.push_back(int'($signed(wd.b))); rows_wa.push_back(int'(wa));
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; valid = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int first, k, cyc, s1, si, e;
      for (int i = 0; i < N; i++) begin
        ax[i] = (t < 2) ? (t ? -128 : 127) : int'($urandom_range(0, 255)) - 128;
        ay[i] = (t < 2) ? (t ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        az[i] = (t < 2) ? (t ? -128 : 127) : int'($urandom_range(0, 255)) - 128;
        ar[i] = (t < 2) ? (t ? 0 : 31) : int'($urandom_range(0, 31));
      end
      if (t < 2) begin ax[5] = t ? 127 : -128; ar[5] = 31 - ar[5]; end
      valid = (t < 3) ? '1 : N'($urandom);
      rows_a0.delete(); rows_a1.delete(); rows_a2.delete(); rows_b.delete(); rows_wa.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
      first = -1; k = 0;
      for (int i = 0; i < N; i++) if (valid[i]) begin
        if (first < 0) first = i;
        else begin
          s1 = ax[first]*ax[first] + ay[first]*ay[first] + az[first]*az[first] - ar[first]*ar[first];
          si = ax[i]*ax[i] + ay[i]*ay[i] + az[i]*az[i] - ar[i]*ar[i];
          e = s1 - si; e = (e >= 0) ? e / 2 : -((-e + 1) / 2);
          checks++;
          if (k >= rows_b.size() || rows_wa[k] != k || rows_a0[k] != ax[first]-ax[i] ||
              rows_a1[k] != ay[first]-ay[i] || rows_a2[k] != az[first]-az[i] || rows_b[k] != e) begin
            failures++;
            if (k < rows_b.size())
              $display("FAIL row %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d", k, rows_a0[k],
                       rows_a1[k], rows_a2[k], rows_b[k], ax[first]-ax[i], ay[first]-ay[i],
                       az[first]-az[i], e);
            else $display("FAIL row %0d missing", k);
          end
          k++;
        end
      end
      checks++;
      if (rows_b.size() != k || int'(n_rows) != k) begin
        failures++; $display("FAIL row count %0d/%0d exp %0d", rows_b.size(), n_rows, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
