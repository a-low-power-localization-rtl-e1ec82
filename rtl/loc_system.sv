// loc_system: distributed least-squares localization subsystem of a sensor node.
//
// A node that does not know its position finds it by triangulation from the
// anchors (nodes that do know theirs), using as distance the number of radio
// hops a flood from each anchor took to arrive (Hop-TERRAIN). The subsystem
// is built from four blocks:
//   loc_rx      decodes flood packets from the data link layer, keeps the
//               anchor list up to date and passes new floods on for relaying;
//   anchor_list 16 anchors x (x, y, z, hop count);
//   ls_solver   builds the linearised system A u = b from the list, reduces
//               it by Givens rotations (CORDIC) to a 3x3 triangle and solves
//               that by back substitution with a serial divider;
//   loc_tx      sends relayed floods (hop count + 1), this node's own floods
//               when it is an anchor (hop count 0) and the computed position.
// Every anchor-list update of a non-anchor node with solve_en set and at least
// 4 known anchors starts one solve (about 840 cycles for 16 anchors, 52 us at
// 16 MHz). While the solver reads the list the receiver holds off the link
// layer (rx_ready low), so the list cannot change under it. When the solve
// ends, pos_done pulses with pos_x/y/z, pos_sat (a coordinate was clipped to
// the 8-bit grid) and pos_singular (the anchors do not determine a position);
// a non-singular position is also queued to TX as a POSITION packet.
// Interfaces to the link layer are valid/ready handshakes carrying a
// loc_pkt_t. clear empties the anchor list.
// The block structure and data flow follow the specification; the packet
// format, the handshakes and the rule for when to solve are this design's.
module loc_system
  import loc_pkg::*;
#(
  parameter int unsigned N_ANCHORS    = 16,
  parameter int unsigned CORDIC_ITERS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // node configuration and control
  input  logic        clear,
  input  logic        is_anchor,
  input  anchor_id_t  own_id,
  input  coord_t      own_x,
  input  coord_t      own_y,
  input  coord_t      own_z,
  input  logic        flood_start,
  input  logic        solve_en,
  // data link layer, receive side
  input  logic        rx_valid,
  output logic        rx_ready,
  input  loc_pkt_t    rx_pkt,
  // data link layer, transmit side
  output logic        tx_valid,
  input  logic        tx_ready,
  output loc_pkt_t    tx_pkt,
  // computed position
  output logic        solving,
  output logic        pos_done,
  output coord_t      pos_x,
  output coord_t      pos_y,
  output coord_t      pos_z,
  output logic        pos_sat,
  output logic        pos_singular
);

  localparam int unsigned AIW = $clog2(N_ANCHORS);

  // anchor list ports
  logic               al_we;
  logic [AIW-1:0]     al_wa, al_ra;
  coord_t             al_xw, al_yw, al_zw, al_xr, al_yr, al_zr;
  hop_t               al_rw, al_rr;
  logic [N_ANCHORS-1:0] anchor_valid;
  logic               updated;

  // RX -> TX
  logic               rl_valid, rl_ready;
  loc_pkt_t           rl_pkt;

  // solver
  logic               sv_start, sv_busy, sv_done, sv_sat, sv_sing;
  coord_t             sv_x, sv_y, sv_z;
  logic               solve_req;   // an update is waiting for the solver
  logic               pos_req;     // a position is waiting for TX
  logic               ps_ready;
  logic [AIW:0]       n_known;

  loc_rx #(.N_ANCHORS(N_ANCHORS)) u_rx (
    .clk, .rst_n, .clear,
    .hold         (sv_busy || solve_req),
    .in_valid     (rx_valid),
    .in_ready     (rx_ready),
    .in_pkt       (rx_pkt),
    .we           (al_we),
    .w_add        (al_wa),
    .x_in         (al_xw),
    .y_in         (al_yw),
    .z_in         (al_zw),
    .r_in         (al_rw),
    .anchor_valid (anchor_valid),
    .updated      (updated),
    .relay_valid  (rl_valid),
    .relay_ready  (rl_ready),
    .relay_pkt    (rl_pkt)
  );

  anchor_list #(.N_ANCHORS(N_ANCHORS)) u_list (
    .clk,
    .we    (al_we),
    .w_add (al_wa),
    .r_add (al_ra),
    .x_in  (al_xw), .y_in (al_yw), .z_in (al_zw), .r_in (al_rw),
    .x_i   (al_xr), .y_i  (al_yr), .z_i  (al_zr), .r_i  (al_rr)
  );

  ls_solver #(.N_ANCHORS(N_ANCHORS), .ITERS(CORDIC_ITERS)) u_solver (
    .clk, .rst_n,
    .start        (sv_start),
    .anchor_valid (anchor_valid),
    .r_add        (al_ra),
    .x_i          (al_xr), .y_i (al_yr), .z_i (al_zr), .r_i (al_rr),
    .busy         (sv_busy),
    .done         (sv_done),
    .x            (sv_x), .y (sv_y), .z (sv_z),
    .sat          (sv_sat),
    .singular     (sv_sing)
  );

  loc_tx u_tx (
    .clk, .rst_n,
    .is_anchor, .own_id, .own_x, .own_y, .own_z, .flood_start,
    .relay_valid (rl_valid),
    .relay_ready (rl_ready),
    .relay_pkt   (rl_pkt),
    .pos_valid   (pos_req),
    .pos_ready   (ps_ready),
    .pos_x       (pos_x), .pos_y (pos_y), .pos_z (pos_z),
    .out_valid   (tx_valid),
    .out_ready   (tx_ready),
    .out_pkt     (tx_pkt)
  );

  always_comb begin
    n_known = '0;
    for (int i = 0; i < N_ANCHORS; i++) n_known += (AIW+1)'(anchor_valid[i]);
  end

  assign sv_start = solve_req && !sv_busy;
  assign solving  = sv_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      solve_req    <= 1'b0;
      pos_req      <= 1'b0;
      pos_done     <= 1'b0;
      pos_x        <= '0;
      pos_y        <= '0;
      pos_z        <= '0;
      pos_sat      <= 1'b0;
      pos_singular <= 1'b0;
    end else begin
      pos_done <= sv_done;
      if (sv_start) solve_req <= 1'b0;
      if (updated && solve_en && !is_anchor && n_known >= (AIW+1)'(4)) solve_req <= 1'b1;
      if (pos_req && ps_ready) pos_req <= 1'b0;
      if (sv_done) begin
        pos_x        <= sv_x;
        pos_y        <= sv_y;
        pos_z        <= sv_z;
        pos_sat      <= sv_sat;
        pos_singular <= sv_sing;
      end
      if (pos_done && !pos_singular) pos_req <= 1'b1;
    end
  end

endmodule
