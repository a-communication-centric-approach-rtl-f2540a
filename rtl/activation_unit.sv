// activation_unit: applies the activation function to one output activation on
// its way from the reduction tree to the prefetch buffer.
// With relu_en set it is a rectified linear unit (negative sums become zero);
// otherwise it passes the sum unchanged (for layers whose activation is applied
// later, or pooling). Purely combinational. ReLU as the function is this
// design's choice of the example the architecture names; other non-linear
// functions are not provided.
module activation_unit
  import maeri_pkg::*;
(
  input  logic relu_en,
  input  acc_t in_sum,
  output acc_t out_act
);
  assign out_act = (relu_en && in_sum < 0) ? '0 : in_sum;
endmodule
