// tb_matrix_mem: self-checking test of the matrix memory.
//
// Random rows are written through both write ports (port 1 winning on a
// shared address) into a reference array kept here; both read ports are
// checked against it every cycle.
module tb_matrix_mem;
  import loc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] ra0, ra1, wa0, wa1;
  logic we0, we1;
  mrow_t rd0, rd1, wd0, wd1;
  mrow_t refm[15];

  matrix_mem #(.ROWS(15)) dut (.*);

  function automatic mrow_t rnd_row();
    return '{a0: A_W'($urandom), a1: A_W'($urandom), a2: A_W'($urandom), b: B_W'($urandom)};
  endfunction

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we0 = 0; we1 = 0; wa0 = 0; wa1 = 0; ra0 = 0; ra1 = 0; wd0 = '0; wd1 = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t > 15) begin
        checks += 2;
        if (rd0 != refm[ra0]) begin failures++; $display("FAIL port 0 row %0d", ra0); end
        if (rd1 != refm[ra1]) begin failures++; $display("FAIL port 1 row %0d", ra1); end
      end
      we0 = (t < 15) ? 1'b1 : 1'($urandom);
      wa0 = (t < 15) ? 4'(t) : 4'($urandom_range(0, 14));
      we1 = (t < 15) ? 1'b0 : 1'($urandom);
      wa1 = (t % 9 == 0) ? wa0 : 4'($urandom_range(0, 14));
      wd0 = rnd_row(); wd1 = rnd_row();
      ra0 = 4'($urandom_range(0, 14)); ra1 = 4'($urandom_range(0, 14));
      if (we0) refm[wa0] = wd0;
      if (we1) refm[wa1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
