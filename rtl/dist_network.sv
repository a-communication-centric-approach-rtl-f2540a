// dist_network: MAERI distribution network from the prefetch buffer to the
// multiplier switchlets.
//
// A binary tree of simple switchlets (1:2 switches) with fat links: the root
// accepts DIST_BW words per cycle and a link into a subtree of L leaves carries
// min(DIST_BW, L) words. DIST_BW = 1 is a plain binary tree; larger values give
// the fat distribution tree. Every word names its destinations with a bit-mask
// over the N leaves, so one word can be unicast or multicast to any leaf set.
//
// Interface: root lanes in (valid, kind, data, mask), one (valid, kind, data)
// per leaf out. Timing: log2(N) cycles, one register per level. The caller must
// not address one leaf with two words in the same cycle; with that rule no link
// can overflow.
//
// From the document: a binary tree for multicast and fat links whose bandwidth
// can double at each higher level. This design's choice: the destination mask,
// the lane rule min(DIST_BW, L) and one register per level.
module dist_network
  import maeri_pkg::*;
#(
  parameter int unsigned N       = 64,  // multiplier switchlets (leaves)
  parameter int unsigned DIST_BW = 16   // words per cycle at the root
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid  [DIST_BW],
  input  pkt_kind_e    in_kind   [DIST_BW],
  input  data_t        in_data   [DIST_BW],
  input  logic [N-1:0] in_mask   [DIST_BW],
  output logic         leaf_valid[N],
  output pkt_kind_e    leaf_kind [N],
  output data_t        leaf_data [N]
);
  localparam int unsigned ROOT_LANES = (DIST_BW < N) ? DIST_BW : N;

  logic         rv [ROOT_LANES];
  pkt_kind_e    rk [ROOT_LANES];
  data_t        rd [ROOT_LANES];
  logic [N-1:0] rm [ROOT_LANES];

  for (genvar i = 0; i < ROOT_LANES; i++) begin : g_root
    assign rv[i] = in_valid[i];
    assign rk[i] = in_kind[i];
    assign rd[i] = in_data[i];
    assign rm[i] = in_mask[i];
  end

  dist_subtree #(.LEAVES(N), .LANES(ROOT_LANES)) u_tree (
    .clk, .rst_n, .in_valid(rv), .in_kind(rk), .in_data(rd), .in_mask(rm),
    .leaf_valid, .leaf_kind, .leaf_data);

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0) else $fatal(1, "dist_network: N must be a power of two");
    assert (DIST_BW <= N) else $fatal(1, "dist_network: DIST_BW above N is useless");
  end
endmodule
