// tb_loc_system: end-to-end test of the localization subsystem, at its
// default size (16 anchors, 10-step CORDICs).
//
// The test bench plays the data link layer of one node in a small network.
// Phase 1 (unknown node): floods from 16 anchors arrive with hop counts equal
// to the rounded anchor distance; repeated floods with no news and floods over
// a shorter path are mixed in. Each accepted flood is relayed with hop + 1,
// every list update from the 4th anchor on triggers a solve during which the
// receiver stalls, and each solve sends a POSITION packet. Phase 1 is run for
// three node positions in different parts of the grid, the list being cleared
// in between. After each, the last position must be within 6 units of the
// true one in every coordinate, 9 for the node far from the origin (the
// rounding of distances and the fixed-point arithmetic both cost accuracy,
// and the right-hand side b grows with the squared distance from the origin,
// which costs more). A solve of 16 anchors must take
// 16 + 39 x 20 cycles plus the back substitution (at most 60 more).
// Phase 2: the list is cleared and refilled with anchors that put the
// solution outside the 8-bit grid (saturation), then with coplanar anchors
// (singular: no POSITION packet).
// Phase 3 (anchor node): flood_start makes it send its own flood with hop 0;
// it neither relays nor solves.
// Every mechanism (relay, drop, stall, solve, position packet, saturation,
// singular result, own flood, hop-count saturation) is counted and must occur.
module tb_loc_system;
  import loc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, is_anchor, flood_start, solve_en, rx_valid, rx_ready, tx_valid, tx_ready;
  logic solving, pos_done, pos_sat, pos_singular;
  anchor_id_t own_id;
  coord_t own_x, own_y, own_z, pos_x, pos_y, pos_z;
  loc_pkt_t rx_pkt, tx_pkt;

  loc_system dut (.*);

  int n_relay = 0, n_drop = 0, n_stall = 0, n_solve = 0, n_pospkt = 0, n_sat = 0,
      n_sing = 0, n_own = 0, n_hop31 = 0, n_sent = 0;
  int last_solve_cycles = 0, solve_cyc = 0, max_solve_cycles = 0;
  loc_pkt_t expect_relay[$];

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // the link layer takes a packet in 3 of 4 cycles
  always @(negedge clk) tx_ready <= ($urandom_range(0, 3) != 0);

  // link-layer monitor
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && !rx_ready) n_stall++;
    if (solving) solve_cyc++;
    if (pos_done) begin
      n_solve++;
      last_solve_cycles = solve_cyc;
      if (solve_cyc > max_solve_cycles) max_solve_cycles = solve_cyc;
      solve_cyc = 0;
      if (pos_sat) n_sat++;
      if (pos_singular) n_sing++;
    end
    if (tx_valid && tx_ready) begin
      checks++;
      if (tx_pkt.ptype == PKT_POSITION) begin
        n_pospkt++;
        if (tx_pkt.x != pos_x || tx_pkt.y != pos_y || tx_pkt.z != pos_z || tx_pkt.id != own_id) begin
          failures++; $display("FAIL position packet contents");
        end
      end else if (is_anchor) begin
        n_own++;
        if (tx_pkt.hop != 0 || tx_pkt.id != own_id || tx_pkt.x != own_x || tx_pkt.y != own_y || tx_pkt.z != own_z) begin
          failures++; $display("FAIL own flood contents");
        end
      end else begin
        loc_pkt_t e;
        n_relay++;
        if (tx_pkt.hop == 5'd31) n_hop31++;
        if (expect_relay.size() == 0) begin failures++; $display("FAIL unexpected relay"); end
        else begin
          e = expect_relay.pop_front();
          if (e != tx_pkt) begin failures++; $display("FAIL relay id %0d hop %0d exp id %0d hop %0d", tx_pkt.id, tx_pkt.hop, e.id, e.hop); end
        end
      end
    end
  end

  int ax[16], ay[16], az[16], ahop[16];
  bit known[16];

  task automatic send(input loc_pkt_t p, input bit expect_new);
    loc_pkt_t r;
    @(negedge clk);
    rx_pkt = p; rx_valid = 1;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    @(negedge clk);
    rx_valid = 0;
    n_sent++;
    
    if (expect_new && !is_anchor) begin
      r = p; r.hop = (p.hop == 5'd31) ? p.hop : p.hop + 5'd1;
      expect_relay.push_back(r);
    end
    if (!expect_new) n_drop++;
  endtask

  function automatic loc_pkt_t flood(int id, int hop);
    return '{ptype: PKT_FLOOD, id: 4'(id), x: 8'(ax[id]), y: 8'(ay[id]), z: 8'(az[id]), hop: 5'(hop)};
  endfunction

  function automatic real rabs(real v); return v < 0 ? -v : v; endfunction

  task automatic wait_idle();
    repeat (3) @(negedge clk);
    while (solving || dut.solve_req || tx_valid) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  int px, py, pz, e;
  real d;

  initial begin
    clear = 0; is_anchor = 0; flood_start = 0; solve_en = 1; rx_valid = 0; rx_pkt = '0;
    tx_ready = 1; own_id = 4'd5; own_x = 8'sd0; own_y = 8'sd0; own_z = 8'sd0;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------------- phase 1: unknown node, 16 anchors, three positions ----------------
    for (int t = 0; t < 3; t++) begin
    if (t > 0) begin @(negedge clk); clear = 1; @(negedge clk); clear = 0; end
    px = (t == 0) ? 17 : (t == 1) ? -60 : 75;
    py = (t == 0) ? -23 : (t == 1) ? 44 : 90;
    pz = (t == 0) ? 31 : (t == 1) ? -8 : -70;
    for (int i = 0; i < 16; i++) begin
      int dx, dy, dz;
      do begin
        dx = int'($urandom_range(0, 44)) - 22;
        dy = int'($urandom_range(0, 44)) - 22;
        dz = int'($urandom_range(0, 44)) - 22;
        d = $sqrt(real'(dx*dx + dy*dy + dz*dz));
      end while (d > 30.4 || d < 6.0);
      ax[i] = px + dx; ay[i] = py + dy; az[i] = pz + dz; ahop[i] = int'($floor(d + 0.5));
    end
    for (int i = 0; i < 16; i++) begin
      // first a longer path, then the true (shorter) one, then a repeat
      send(flood(i, (ahop[i] + 3 > 31) ? 31 : ahop[i] + 3), 1'b1);
      send(flood(i, ahop[i]), 1'b1);
      send(flood(i, ahop[i] + 1), 1'b0);
    end
    wait_idle();
    checks++;
    e = 0;
    if (pos_x - px > e) e = pos_x - px; if (px - pos_x > e) e = px - pos_x;
    if (pos_y - py > e) e = pos_y - py; if (py - pos_y > e) e = py - pos_y;
    if (pos_z - pz > e) e = pos_z - pz; if (pz - pos_z > e) e = pz - pos_z;
    $display("node at (%0d,%0d,%0d): computed (%0d,%0d,%0d), solve %0d cycles",
             px, py, pz, pos_x, pos_y, pos_z, last_solve_cycles);
    if (e > ((t == 2) ? 9 : 6) || pos_singular || pos_sat) begin failures++; $display("FAIL position error %0d", e); end
    checks++;
    if (last_solve_cycles < 16 + 39*20 || last_solve_cycles > 16 + 39*20 + 60) begin
      failures++; $display("FAIL 16-anchor solve took %0d cycles", last_solve_cycles);
    end
    checks++;
    // updates from the 4th anchor on: 2 per anchor for anchors 4..16, one at the 4th's second packet
    if (n_solve < 2*13*(t+1)) begin failures++; $display("FAIL only %0d solves", n_solve); end
    end

    // hop-count saturation on relay: a flood that already took 31 hops
    send(flood(0, 31), 1'b0);   // not better than stored: dropped
    ax[0] = ax[0] + 1;
    send(flood(0, 31), 1'b1);   // moved anchor: accepted, relayed with hop 31
    wait_idle();

    // ---------------- phase 2: saturation and singular ----------------
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    // a node at (150, 0, 0), beyond the 8-bit grid, seen from anchors near its edge
    begin
      int g[7][3] = '{'{127,0,0}, '{127,12,0}, '{127,0,12}, '{127,-12,-12}, '{122,5,-5}, '{124,-8,8}, '{120,0,0}};
      for (int i = 0; i < 7; i++) begin
        ax[i] = g[i][0]; ay[i] = g[i][1]; az[i] = g[i][2];
        d = $sqrt(real'((150 - ax[i])**2 + ay[i]**2 + az[i]**2));
        send(flood(i, int'($floor(d + 0.5))), 1'b1);
      end
    end
    wait_idle();
    checks++;
    if (!pos_sat) begin failures++; $display("FAIL no saturation: (%0d,%0d,%0d)", pos_x, pos_y, pos_z); end

    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 5; i++) begin ax[i] = 10 * i; ay[i] = 7 * (i % 2) + 3 * i; az[i] = 20; end
    for (int i = 0; i < 5; i++) send(flood(i, 5 + i), 1'b1);
    wait_idle();
    checks++;
    if (!pos_singular) begin failures++; $display("FAIL coplanar anchors not singular"); end

    // ---------------- phase 3: anchor node ----------------
    is_anchor = 1; own_x = 8'sd40; own_y = -8'sd7; own_z = 8'sd90;
    begin
      int n_before, own_before;
      n_before = n_solve; own_before = n_own;
      @(negedge clk); flood_start = 1; @(negedge clk); flood_start = 0;
      ax[7] = 1; ay[7] = 2; az[7] = 3;
      send(flood(7, 4), 1'b1);       // stored, but not relayed and no solve
      wait_idle();
      checks++;
      if (n_solve != n_before || n_own != own_before + 1) begin
        failures++; $display("FAIL anchor node: solves %0d own floods %0d", n_solve - n_before, n_own - own_before);
      end
    end

    checks++;
    if (expect_relay.size() != 0) begin failures++; $display("FAIL %0d relays missing", expect_relay.size()); end
    $display("relays %0d drops %0d stall cycles %0d solves %0d position packets %0d saturated %0d singular %0d own floods %0d hop-31 relays %0d",
             n_relay, n_drop, n_stall, n_solve, n_pospkt, n_sat, n_sing, n_own, n_hop31);
    checks++;
    if (!n_relay || !n_drop || !n_stall || !n_solve || !n_pospkt || !n_sat || !n_sing || !n_own || !n_hop31) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
