// simple_switchlet: one node of the MAERI distribution tree (a 1:2 switch).
//
// Each input lane carries one word with a destination bit-mask over the leaves
// (multiplier switchlets) below this node. A word is sent to the left child if
// any destination lies in the left half of the mask, to the right child if any
// lies in the right half, or to both (multicast). On a fat link the node has
// WIN input lanes and WOUT lanes towards each child; the words bound for a child
// are packed into that child's lanes in input-lane order. The mask is split so
// each child only sees its own half.
//
// Timing: outputs are registered, one cycle per tree level.
// The 1:2 switch and fat links follow the architecture; the mask-based routing
// and lane packing are this design's choice. Capacity rule: with lane counts of
// min(bandwidth, leaves below), a lane set never overflows as long as no leaf is
// the target of two words in the same cycle. The assertion checks that rule.
module simple_switchlet
  import maeri_pkg::*;
#(
  parameter int unsigned LEAVES = 2,  // leaves below this node
  parameter int unsigned WIN    = 1,  // lanes of the link from the parent
  parameter int unsigned WOUT   = 1   // lanes of the link to each child
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid [WIN],
  input  pkt_kind_e               in_kind  [WIN],
  input  data_t                   in_data  [WIN],
  input  logic [LEAVES-1:0]       in_mask  [WIN],
  output logic                    l_valid  [WOUT],
  output pkt_kind_e               l_kind   [WOUT],
  output data_t                   l_data   [WOUT],
  output logic [LEAVES/2-1:0]     l_mask   [WOUT],
  output logic                    r_valid  [WOUT],
  output pkt_kind_e               r_kind   [WOUT],
  output data_t                   r_data   [WOUT],
  output logic [LEAVES/2-1:0]     r_mask   [WOUT]
);
  localparam int unsigned H = LEAVES / 2;

  logic              nl_valid [WOUT];
  pkt_kind_e         nl_kind  [WOUT];
  data_t             nl_data  [WOUT];
  logic [H-1:0]      nl_mask  [WOUT];
  logic              nr_valid [WOUT];
  pkt_kind_e         nr_kind  [WOUT];
  data_t             nr_data  [WOUT];
  logic [H-1:0]      nr_mask  [WOUT];
  int unsigned       nl, nr;           // words bound left / right this cycle

  always_comb begin
    nl = 0;
    nr = 0;
    for (int unsigned o = 0; o < WOUT; o++) begin
      nl_valid[o] = 1'b0; nl_kind[o] = PKT_WEIGHT; nl_data[o] = '0; nl_mask[o] = '0;
      nr_valid[o] = 1'b0; nr_kind[o] = PKT_WEIGHT; nr_data[o] = '0; nr_mask[o] = '0;
    end
    for (int unsigned i = 0; i < WIN; i++) begin
      if (in_valid[i] && (in_mask[i][H-1:0] != '0)) begin
        for (int unsigned o = 0; o < WOUT; o++)
          if (o == nl) begin
            nl_valid[o] = 1'b1;
            nl_kind[o]  = in_kind[i];
            nl_data[o]  = in_data[i];
            nl_mask[o]  = in_mask[i][H-1:0];
          end
        nl++;
      end
      if (in_valid[i] && (in_mask[i][LEAVES-1:H] != '0)) begin
        for (int unsigned o = 0; o < WOUT; o++)
          if (o == nr) begin
            nr_valid[o] = 1'b1;
            nr_kind[o]  = in_kind[i];
            nr_data[o]  = in_data[i];
            nr_mask[o]  = in_mask[i][LEAVES-1:H];
          end
        nr++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < WOUT; o++) begin
        l_valid[o] <= 1'b0; l_kind[o] <= PKT_WEIGHT; l_data[o] <= '0; l_mask[o] <= '0;
        r_valid[o] <= 1'b0; r_kind[o] <= PKT_WEIGHT; r_data[o] <= '0; r_mask[o] <= '0;
      end
    end else begin
      l_valid <= nl_valid; l_kind <= nl_kind; l_data <= nl_data; l_mask <= nl_mask;
      r_valid <= nr_valid; r_kind <= nr_kind; r_data <= nr_data; r_mask <= nr_mask;
    end
  end

  // A child link never has to carry more words than it has lanes.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (nl <= WOUT) && (nr <= WOUT))
    else $error("simple_switchlet: link to a child over capacity");

endmodule
