// tb_loc_rx: self-checking test of the receive sub-block.
//
// Random flood packets (random anchor ids, positions and hop counts) and some
// non-flood packets are offered with random hold and relay back-pressure. A
// reference model kept here decides for each accepted packet whether it is new
// (empty slot, smaller hop count, or moved anchor); new floods must be written
// to the anchor list with the right address and fields, set anchor_valid,
// pulse updated and be offered for relaying unchanged, in order. The test also
// checks that in_ready is low under hold and while a relay is pending, and
// that clear empties the list. Counts of accepted, dropped and relayed floods
// must all be non-zero.
module tb_loc_rx;
  import loc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, hold, in_valid, in_ready, we, updated, relay_valid, relay_ready;
  loc_pkt_t in_pkt, relay_pkt;
  logic [3:0] w_add;
  coord_t x_in, y_in, z_in;
  hop_t r_in;
  logic [15:0] anchor_valid;

  loc_rx dut (.*);

  bit       mvalid[16];
  loc_pkt_t mstore[16];
  loc_pkt_t relayq[$];
  int n_acc = 0, n_drop = 0, n_relay = 0, n_upd = 0, n_other = 0;

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitor on every rising edge
  always @(posedge clk) if (rst_n) begin
    bit exp_new;
    if (updated) n_upd++;
    if (in_valid && in_ready) begin
      if (in_pkt.ptype != PKT_FLOOD) begin
        exp_new = 1'b0; n_other++;
      end else begin
        exp_new = !mvalid[in_pkt.id] || in_pkt.hop < mstore[in_pkt.id].hop ||
                  in_pkt.x != mstore[in_pkt.id].x || in_pkt.y != mstore[in_pkt.id].y ||
                  in_pkt.z != mstore[in_pkt.id].z;
      end
      checks++;
      if (we != exp_new) begin failures++; $display("FAIL we=%0d exp %0d", we, exp_new); end
      if (exp_new) begin
        n_acc++;
        checks++;
        if (w_add != in_pkt.id || x_in != $signed(in_pkt.x) || y_in != $signed(in_pkt.y) ||
            z_in != $signed(in_pkt.z) || r_in != in_pkt.hop) begin
          failures++; $display("FAIL list write fields");
        end
        mvalid[in_pkt.id] = 1'b1;
        mstore[in_pkt.id] = in_pkt;
        relayq.push_back(in_pkt);
      end else if (in_pkt.ptype == PKT_FLOOD) n_drop++;
    end else begin
      checks++;
      if (we) begin failures++; $display("FAIL write without accepted packet"); end
    end
    if (hold && in_ready) begin failures++; $display("FAIL in_ready under hold"); end
    if (relay_valid && relay_ready) begin
      checks++;
      n_relay++;
      if (relayq.size() == 0 || relay_pkt != relayq.pop_front()) begin
        failures++; $display("FAIL relayed packet mismatch");
      end
    end
  end

  initial begin
    clear = 0; hold = 0; in_valid = 0; in_pkt = '0; relay_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t == 1500) begin
        clear = 1; @(negedge clk); clear = 0;
        for (int i = 0; i < 16; i++) mvalid[i] = 0;
        checks++;
        if (anchor_valid != '0) begin failures++; $display("FAIL clear"); end
      end
      hold        = ($urandom_range(0, 9) == 0);
      relay_ready = ($urandom_range(0, 3) != 0);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_pkt.ptype = ($urandom_range(0, 9) == 0) ? PKT_POSITION : PKT_FLOOD;
        in_pkt.id    = 4'($urandom_range(0, 15));
        in_pkt.hop   = 5'($urandom_range(0, 31));
        if ($urandom_range(0, 3) == 0 || !mvalid[in_pkt.id]) begin
          in_pkt.x = 8'($urandom); in_pkt.y = 8'($urandom); in_pkt.z = 8'($urandom);
        end else begin
          in_pkt.x = mstore[in_pkt.id].x; in_pkt.y = mstore[in_pkt.id].y; in_pkt.z = mstore[in_pkt.id].z;
        end
      end
      // anchor_valid must mirror the model
      for (int i = 0; i < 16; i++) if (anchor_valid[i] != mvalid[i]) begin
        failures++; $display("FAIL anchor_valid[%0d]", i);
      end
      checks++;
    end
    checks += 2;
    if (n_acc == 0 || n_drop == 0 || n_relay == 0 || n_other == 0) begin
      failures++; $display("FAIL coverage acc=%0d drop=%0d relay=%0d other=%0d", n_acc, n_drop, n_relay, n_other);
    end
    if (n_upd != n_acc) begin failures++; $display("FAIL updated pulses %0d vs %0d", n_upd, n_acc); end
    $display("accepted %0d dropped %0d relayed %0d", n_acc, n_drop, n_relay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
