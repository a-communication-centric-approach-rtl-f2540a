// dist_subtree: recursive helper of dist_network. A subtree with LEAVES leaves
// and LANES input lanes is one simple_switchlet feeding two subtrees of half the
// size; below a two-leaf subtree the switchlet drives the two leaves directly
// (a subtree of one leaf, used only when the whole tree has one leaf, is a wire). The lane count of a link is
// min(bandwidth at the root, leaves below it): a fat tree whose bandwidth halves
// per level below the level where it reaches one lane per leaf.
// Timing: one register per switchlet, so log2(LEAVES) cycles from root to leaf.
//
// From the document: a binary tree of 1:2 simple switchlets. This design's
// choice: the recursive construction and lane counts.
module dist_subtree
  import maeri_pkg::*;
#(
  parameter int unsigned LEAVES = 2,
  parameter int unsigned LANES  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid  [LANES],
  input  pkt_kind_e         in_kind   [LANES],
  input  data_t             in_data   [LANES],
  input  logic [LEAVES-1:0] in_mask   [LANES],
  output logic              leaf_valid[LEAVES],
  output pkt_kind_e         leaf_kind [LEAVES],
  output data_t             leaf_data [LEAVES]
);
  if (LEAVES == 1) begin : g_leaf
    assign leaf_valid[0] = in_valid[0] && in_mask[0][0];
    assign leaf_kind[0]  = in_kind[0];
    assign leaf_data[0]  = in_data[0];
  end else begin : g_node
    localparam int unsigned H    = LEAVES / 2;
    localparam int unsigned COUT = (LANES < H) ? LANES : H;

    logic              l_valid [COUT];
    pkt_kind_e         l_kind  [COUT];
    data_t             l_data  [COUT];
    logic [H-1:0]      l_mask  [COUT];
    logic              r_valid [COUT];
    pkt_kind_e         r_kind  [COUT];
    data_t             r_data  [COUT];
    logic [H-1:0]      r_mask  [COUT];
    logic              lv [H];
    pkt_kind_e         lk [H];
    data_t             ld [H];
    logic              rv [H];
    pkt_kind_e         rk [H];
    data_t             rd [H];

    simple_switchlet #(.LEAVES(LEAVES), .WIN(LANES), .WOUT(COUT)) u_sw (
      .clk, .rst_n, .in_valid, .in_kind, .in_data, .in_mask,
      .l_valid, .l_kind, .l_data, .l_mask, .r_valid, .r_kind, .r_data, .r_mask);

    if (H == 1) begin : g_leaves
      // children are single multiplier switchlets
      assign lv[0] = l_valid[0] && l_mask[0][0];
      assign lk[0] = l_kind[0];
      assign ld[0] = l_data[0];
      assign rv[0] = r_valid[0] && r_mask[0][0];
      assign rk[0] = r_kind[0];
      assign rd[0] = r_data[0];
    end else begin : g_sub
      dist_subtree #(.LEAVES(H), .LANES(COUT)) u_left (
        .clk, .rst_n, .in_valid(l_valid), .in_kind(l_kind), .in_data(l_data), .in_mask(l_mask),
        .leaf_valid(lv), .leaf_kind(lk), .leaf_data(ld));
      dist_subtree #(.LEAVES(H), .LANES(COUT)) u_right (
        .clk, .rst_n, .in_valid(r_valid), .in_kind(r_kind), .in_data(r_data), .in_mask(r_mask),
        .leaf_valid(rv), .leaf_kind(rk), .leaf_data(rd));
    end

    for (genvar i = 0; i < H; i++) begin : g_out
      assign leaf_valid[i]   = lv[i];
      assign leaf_kind[i]    = lk[i];
      assign leaf_data[i]    = ld[i];
      assign leaf_valid[H+i] = rv[i];
      assign leaf_kind[H+i]  = rk[i];
      assign leaf_data[H+i]  = rd[i];
    end
  end
endmodule
