// tb_anchor_list: self-checking test of the anchor list.
//
// Random writes (with we low in some cycles) update a reference array kept
// here; every cycle a random slot is read and the combinational outputs are
// compared with the reference. Every slot is written once first.
module tb_anchor_list;
  import loc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [3:0] w_add, r_add;
  coord_t     x_in, y_in, z_in, x_i, y_i, z_i;
  hop_t       r_in, r_i;

  anchor_list dut (.*);

  int rx[16], ry[16], rz[16], rr[16];

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; w_add = 0; r_add = 0; x_in = 0; y_in = 0; z_in = 0; r_in = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check the read port against the reference
      if (t > 16) begin
        checks++;
        if (x_i != 8'(rx[r_add]) || y_i != 8'(ry[r_add]) || z_i != 8'(rz[r_add]) || r_i != 5'(rr[r_add])) begin
          failures++;
          $display("FAIL slot %0d: got %0d %0d %0d %0d", r_add, x_i, y_i, z_i, r_i);
        end
      end
      we    = (t < 16) ? 1'b1 : 1'($urandom);
      w_add = (t < 16) ? 4'(t) : 4'($urandom);
      x_in  = 8'($urandom); y_in = 8'($urandom); z_in = 8'($urandom); r_in = 5'($urandom);
      r_add = 4'($urandom);
      if (we) begin
        rx[w_add] = int'(x_in); ry[w_add] = int'(y_in); rz[w_add] = int'(z_in); rr[w_add] = int'(r_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
