// adder_switchlet: one node of the augmented reduction tree (ART).
//
// A node sees, from each child, the partial sums of the virtual neurons (VNs)
// that cross the child's left and right edges (edge_rec_t). The left child's
// right-edge partial and the right child's left-edge partial belong to the same
// VN whenever that VN straddles the node's midpoint; the node's single adder
// (or comparator, for max pooling) then combines them. The result either
// completes the VN here (emit, sent towards the prefetch buffer) or continues
// past this node's left and/or right edge. Partials that do not meet here pass
// through unchanged on the node's left/right output lanes; these bypass lanes
// play the part of the ART's forwarding links and fat links, so several
// reductions proceed at once without sharing a link.
//
// Interface: cfg from the reconfiguration controller, child records in,
// record and emitted sum out. Timing: all outputs registered (one cycle/level).
//
// From the document: an adder switchlet adds (or, for pooling, compares) and
// sits in a binary reduction tree whose VNs are built at run time. This
// design's choice: the edge-partial record on each link, the three-way route
// (left, right, emit) in place of the forwarding links between adders, and one
// register per node.
module adder_switchlet
  import maeri_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  adder_cfg_t cfg,
  input  red_op_e    op,
  input  edge_rec_t  in_l,       // record of the left child
  input  edge_rec_t  in_r,       // record of the right child
  output edge_rec_t  out,        // record towards the parent
  output logic       emit_valid, // a VN completes at this node
  output acc_t       emit_sum
);
  acc_t      sum;
  logic      sum_ok;
  edge_rec_t nxt;

  always_comb begin
    sum    = red_combine(op, in_l.r_sum, in_r.l_sum);
    sum_ok = cfg.add_en && in_l.r_valid && in_r.l_valid;
    nxt    = '{l_valid: in_l.l_valid, l_sum: in_l.l_sum,
               r_valid: in_r.r_valid, r_sum: in_r.r_sum};
    if (cfg.add_en && cfg.sum_left) begin
      nxt.l_valid = sum_ok;
      nxt.l_sum   = sum;
    end
    if (cfg.add_en && cfg.sum_right) begin
      nxt.r_valid = sum_ok;
      nxt.r_sum   = sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out        <= '0;
      emit_valid <= 1'b0;
      emit_sum   <= '0;
    end else begin
      out        <= nxt;
      emit_valid <= sum_ok && cfg.emit;
      emit_sum   <= sum;
    end
  end
endmodule
