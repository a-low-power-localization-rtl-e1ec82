// anchor_list: storage of the anchors known to this node.
//
// An array of N_ANCHORS anchor objects, each holding the anchor's 8-bit signed
// x, y, z coordinates and its 5-bit hop count r. It has one write port
// (we, w_add, x_in..r_in, written on the rising clock edge) and one read port
// (r_add -> x_i..r_i, combinational read). Port names and field widths follow the
// published block diagram of the list; the asynchronous read and the absence of
// a reset on the contents (validity is tracked by the receiver) are choices of
// this design.
module anchor_list
  import loc_pkg::*;
#(
  parameter int unsigned N_ANCHORS = 16
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [$clog2(N_ANCHORS)-1:0] w_add,
  input  logic [$clog2(N_ANCHORS)-1:0] r_add,
  input  coord_t                       x_in,
  input  coord_t                       y_in,
  input  coord_t                       z_in,
  input  hop_t                         r_in,
  output coord_t                       x_i,
  output coord_t                       y_i,
  output coord_t                       z_i,
  output hop_t                         r_i
);

  anchor_t mem [N_ANCHORS];

  always_ff @(posedge clk) begin
    if (we) mem[w_add] <= '{x: x_in, y: y_in, z: z_in, r: r_in};
  end

  always_comb begin
    x_i = mem[r_add].x;
    y_i = mem[r_add].y;
    z_i = mem[r_add].z;
    r_i = mem[r_add].r;
  end

endmodule
