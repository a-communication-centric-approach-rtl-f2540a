// maeri_pkg: types and constants shared by the MAERI accelerator blocks.
//
// Operands (weights and input activations) are DATA_W-bit signed fixed-point
// words; products and partial sums are ACC_W-bit signed. Neither width is fixed
// by the architecture description; 16/32 bits is this design's choice.
// A reduction-tree node passes two "edge partial sums" upwards (the partial sum
// of the virtual neuron touching its left edge and of the one touching its right
// edge), described by edge_rec_t. adder_cfg_t is the per-node configuration
// produced by the reduction-tree reconfiguration controller.
package maeri_pkg;

  parameter int unsigned DATA_W = 16;  // operand width
  parameter int unsigned ACC_W  = 32;  // product / partial-sum width
  parameter int unsigned SLOT_W = 8;   // leaf index width (trees up to 256 leaves)

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // What a distributed word is for at the multiplier switchlet.
  typedef enum logic {
    PKT_WEIGHT = 1'b0,  // load into the stationary weight register
    PKT_INPUT  = 1'b1   // load into the streaming input register
  } pkt_kind_e;

  // Operation of the adder switchlets: "+" for weighted sums, ">" (max) for pooling.
  typedef enum logic {
    RED_ADD = 1'b0,
    RED_MAX = 1'b1
  } red_op_e;

  // Partial sums leaving a subtree towards its parent.
  typedef struct packed {
    logic l_valid;  // a virtual neuron continues past the subtree's left edge
    acc_t l_sum;    // its partial sum over this subtree
    logic r_valid;  // a virtual neuron continues past the subtree's right edge
    acc_t r_sum;    // its partial sum over this subtree
  } edge_rec_t;

  // Configuration of one adder switchlet.
  typedef struct packed {
    logic              add_en;     // left child's right partial meets right child's left partial
    logic              sum_left;   // the sum continues past this node's left edge
    logic              sum_right;  // the sum continues past this node's right edge
    logic              emit;       // the sum completes a virtual neuron here
    logic [SLOT_W-1:0] emit_slot;  // first leaf of that virtual neuron (its output slot)
  } adder_cfg_t;

  // Combine two operands with the configured reduction operation.
  function automatic acc_t red_combine(red_op_e op, acc_t a, acc_t b);
    if (op == RED_MAX) return (a > b) ? a : b;
    return a + b;
  endfunction

endpackage
