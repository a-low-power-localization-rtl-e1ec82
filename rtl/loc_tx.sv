// loc_tx: transmit sub-block of the localization system.
//
// Creates the locationing packets handed to the data link layer
// (out_valid / out_ready / out_pkt) from three sources:
//   - own flood: when the node is an anchor (is_anchor) a pulse on flood_start
//     starts a flooding round with the node's own id and position and a hop
//     count of 0;
//   - relay: a flood accepted by the RX sub-block is sent on with its hop count
//     incremented by one (held at 31, the largest 5-bit count). An anchor node
//     does not relay other anchors' floods;
//   - position: the position computed by the least-squares solver is sent as a
//     POSITION packet carrying the node's id.
// Each source has a one-packet holding register and a ready signal that is
// low while its register is occupied. The output register serves the sources
// in the priority own flood, relay, position, one packet per accepted
// transfer. out_pkt is stable while out_valid is high and out_ready low.
// Incrementing or zeroing the hop count is the specification's; the packet
// layout, the priority and the handshakes are this design's choices.
module loc_tx
  import loc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // node configuration
  input  logic        is_anchor,
  input  anchor_id_t  own_id,
  input  coord_t      own_x,
  input  coord_t      own_y,
  input  coord_t      own_z,
  input  logic        flood_start,
  // relay request from RX
  input  logic        relay_valid,
  output logic        relay_ready,
  input  loc_pkt_t    relay_pkt,
  // computed position from the solver
  input  logic        pos_valid,
  output logic        pos_ready,
  input  coord_t      pos_x,
  input  coord_t      pos_y,
  input  coord_t      pos_z,
  // to the data link layer
  output logic        out_valid,
  input  logic        out_ready,
  output loc_pkt_t    out_pkt
);

  logic     fl_pend, rl_pend, ps_pend;
  loc_pkt_t fl_pkt, rl_pkt, ps_pkt;
  logic     out_free;
  hop_t     hop_inc;

  assign relay_ready = !rl_pend;
  assign pos_ready   = !ps_pend;
  assign out_free    = !out_valid || out_ready;
  assign hop_inc     = (relay_pkt.hop == '1) ? relay_pkt.hop : relay_pkt.hop + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_pend <= 1'b0; rl_pend <= 1'b0; ps_pend <= 1'b0;
      fl_pkt  <= '0;   rl_pkt  <= '0;   ps_pkt  <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      // move one pending packet to the output register
      if (out_free) begin
        out_valid <= 1'b0;
        if (fl_pend) begin
          out_valid <= 1'b1; out_pkt <= fl_pkt; fl_pend <= 1'b0;
        end else if (rl_pend) begin
          out_valid <= 1'b1; out_pkt <= rl_pkt; rl_pend <= 1'b0;
        end else if (ps_pend) begin
          out_valid <= 1'b1; out_pkt <= ps_pkt; ps_pend <= 1'b0;
        end
      end
      // accept new requests into the holding registers
      if (flood_start && is_anchor && !fl_pend) begin
        fl_pend <= 1'b1;
        fl_pkt  <= '{ptype: PKT_FLOOD, id: own_id, x: own_x, y: own_y, z: own_z, hop: '0};
      end
      if (relay_valid && relay_ready) begin
        // an anchor ends the relay chain of other anchors' floods
        rl_pend <= !is_anchor;
        rl_pkt  <= '{ptype: PKT_FLOOD, id: relay_pkt.id, x: relay_pkt.x, y: relay_pkt.y,
                     z: relay_pkt.z, hop: hop_inc};
      end
      if (pos_valid && pos_ready) begin
        ps_pend <= 1'b1;
        ps_pkt  <= '{ptype: PKT_POSITION, id: own_id, x: pos_x, y: pos_y, z: pos_z, hop: '0};
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_pkt));

endmodule
