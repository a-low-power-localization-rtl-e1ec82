// loc_rx: receive sub-block of the localization system.
//
// Takes locationing packets from the data link layer (in_valid / in_ready /
// in_pkt) and maintains the anchor list from the flooding messages. A flood
// packet carries an anchor's id, its position and the hop count at which it
// reached this node. The anchor id (4 bits) is used directly as the address of
// the anchor's slot in the list. A flood is accepted when
//   - the slot is still empty, or
//   - its hop count is smaller than the stored one (a shorter path), or
//   - the anchor's position differs from the stored one (the anchor moved);
// an accepted flood is written into the list (we / w_add / x_in..r_in), its
// slot is marked in anchor_valid, updated pulses, and the packet is handed to
// the TX sub-block for relaying (relay_valid / relay_ready / relay_pkt).
// Floods that bring nothing new are dropped, which is what stops a flood from
// circulating for ever. Non-flood packets are dropped.
// To compare without using the list's single read port (which the solver
// uses) the block keeps its own copy of each slot's hop count and position.
// Timing: one packet per cycle is accepted while in_ready is high; in_ready is
// low while hold is high (the solver is reading the list) or while a relay is
// waiting for TX. The list write happens on the clock edge that accepts the
// packet. clear empties the list (all anchor_valid bits to 0). The write data
// x_in..r_in and w_add are taken straight from in_pkt, without a register:
// the list samples them on the accepting edge, and only we carries the
// decision. relay_pkt is registered and held until TX takes it.
// The role of the block follows the specification; the acceptance rule, the
// id-as-address mapping and the handshakes are this design's choices.
module loc_rx
  import loc_pkg::*;
#(
  parameter int unsigned N_ANCHORS = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          hold,
  // from the data link layer
  input  logic                          in_valid,
  output logic                          in_ready,
  input  loc_pkt_t                      in_pkt,
  // anchor list write port
  output logic                          we,
  output logic [$clog2(N_ANCHORS)-1:0]  w_add,
  output coord_t                        x_in,
  output coord_t                        y_in,
  output coord_t                        z_in,
  output hop_t                          r_in,
  output logic [N_ANCHORS-1:0]          anchor_valid,
  output logic                          updated,
  // to the TX sub-block
  output logic                          relay_valid,
  input  logic                          relay_ready,
  output loc_pkt_t                      relay_pkt
);

  localparam int unsigned AIW = $clog2(N_ANCHORS);

  anchor_t              shadow [N_ANCHORS];
  logic [AIW-1:0]       slot;
  logic                 is_flood, is_new, accept, take;

  assign slot     = in_pkt.id[AIW-1:0];
  assign is_flood = (in_pkt.ptype == PKT_FLOOD);
  assign is_new   = !anchor_valid[slot]
                 || (in_pkt.hop < shadow[slot].r)
                 || (in_pkt.x != shadow[slot].x)
                 || (in_pkt.y != shadow[slot].y)
                 || (in_pkt.z != shadow[slot].z);
  assign in_ready = !hold && !relay_valid;
  assign take     = in_valid && in_ready;
  assign accept   = take && is_flood && is_new;

  assign we    = accept;
  assign w_add = slot;
  assign x_in  = $signed(in_pkt.x);
  assign y_in  = $signed(in_pkt.y);
  assign z_in  = $signed(in_pkt.z);
  assign r_in  = in_pkt.hop;

  always_ff @(posedge clk) begin
    if (accept) shadow[slot] <= '{x: in_pkt.x, y: in_pkt.y, z: in_pkt.z, r: in_pkt.hop};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      anchor_valid <= '0;
      updated      <= 1'b0;
      relay_valid  <= 1'b0;
      relay_pkt    <= '0;
    end else begin
      updated <= accept;
      if (relay_valid && relay_ready) relay_valid <= 1'b0;
      if (accept) begin
        anchor_valid[slot] <= 1'b1;
        relay_valid        <= 1'b1;
        relay_pkt          <= in_pkt;
      end
      if (clear) anchor_valid <= '0;
    end
  end

  // A relayed packet must stay stable until TX takes it.
  a_relay_stable: assert property (@(posedge clk) disable iff (!rst_n)
    relay_valid && !relay_ready |=> relay_valid && $stable(relay_pkt));

endmodule
