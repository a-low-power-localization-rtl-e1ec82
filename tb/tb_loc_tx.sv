// tb_loc_tx: self-checking test of the transmit sub-block.
//
// Relay requests, own-flood triggers and computed positions are offered at
// random, with random back-pressure from the link layer, for a relaying node
// and for an anchor node. A reference model kept here predicts every packet:
// relays with hop count + 1 (31 stays 31), own floods with hop count 0 and
// the node's id and position, POSITION packets with the computed position;
// an anchor relays nothing and only an anchor floods. The emitted packets are
// checked against the predictions per source in order, and each kind (relay,
// saturated hop, own flood, position) must have occurred.
module tb_loc_tx;
  import loc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic is_anchor, flood_start, relay_valid, relay_ready, pos_valid, pos_ready, out_valid, out_ready;
  anchor_id_t own_id;
  coord_t own_x, own_y, own_z, pos_x, pos_y, pos_z;
  loc_pkt_t relay_pkt, out_pkt;

  loc_tx dut (.*);

  loc_pkt_t q_relay[$], q_flood[$], q_pos[$];
  int n_relay = 0, n_sat = 0, n_flood = 0, n_pos = 0;

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (relay_valid && relay_ready && !is_anchor) begin
      loc_pkt_t p;
      p = relay_pkt;
      p.ptype = PKT_FLOOD;
      p.hop = (relay_pkt.hop == 5'd31) ? 5'd31 : relay_pkt.hop + 5'd1;
      q_relay.push_back(p);
    end
    if (flood_start && is_anchor && dut.fl_pend == 1'b0)
      q_flood.push_back('{ptype: PKT_FLOOD, id: own_id, x: own_x, y: own_y, z: own_z, hop: 5'd0});
    if (pos_valid && pos_ready)
      q_pos.push_back('{ptype: PKT_POSITION, id: own_id, x: pos_x, y: pos_y, z: pos_z, hop: 5'd0});
    if (out_valid && out_ready) begin
      loc_pkt_t e;
      checks++;
      if (out_pkt.ptype == PKT_POSITION) begin
        n_pos++;
        if (q_pos.size() == 0) begin failures++; $display("FAIL unexpected position"); end
        else begin e = q_pos.pop_front(); if (e != out_pkt) begin failures++; $display("FAIL position packet"); end end
      end else if (out_pkt.hop == 0 && q_flood.size() > 0 && q_flood[0] == out_pkt) begin
        n_flood++;
        void'(q_flood.pop_front());
      end else begin
        n_relay++;
        if (out_pkt.hop == 5'd31) n_sat++;
        if (q_relay.size() == 0) begin failures++; $display("FAIL unexpected relay"); end
        else begin e = q_relay.pop_front(); if (e != out_pkt) begin failures++; $display("FAIL relay packet"); end end
      end
    end
  end

  initial begin
    rst_n = 0; is_anchor = 0; flood_start = 0; relay_valid = 0; pos_valid = 0; out_ready = 0;
    own_id = 4'd9; own_x = 8'sd12; own_y = -8'sd40; own_z = 8'sd3;
    relay_pkt = '0; pos_x = 0; pos_y = 0; pos_z = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t == 2000) is_anchor = 1;
      out_ready   = ($urandom_range(0, 2) != 0);
      flood_start = ($urandom_range(0, 30) == 0);
      if (!relay_valid || relay_ready) begin
        relay_valid = ($urandom_range(0, 2) == 0);
        relay_pkt = '{ptype: PKT_FLOOD, id: 4'($urandom), x: 8'($urandom), y: 8'($urandom),
                      z: 8'($urandom), hop: ($urandom_range(0, 4) == 0) ? 5'd31 : 5'($urandom)};
      end
      if (!pos_valid || pos_ready) begin
        pos_valid = ($urandom_range(0, 10) == 0);
        pos_x = 8'($urandom); pos_y = 8'($urandom); pos_z = 8'($urandom);
      end
    end
    relay_valid = 0; pos_valid = 0; flood_start = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    checks += 2;
    if (q_relay.size() || q_flood.size() || q_pos.size()) begin
      failures++; $display("FAIL packets not sent: %0d %0d %0d", q_relay.size(), q_flood.size(), q_pos.size());
    end
    if (!n_relay || !n_sat || !n_flood || !n_pos) begin
      failures++; $display("FAIL coverage relay=%0d sat=%0d flood=%0d pos=%0d", n_relay, n_sat, n_flood, n_pos);
    end
    $display("relays %0d (hop 31: %0d) floods %0d positions %0d", n_relay, n_sat, n_flood, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
