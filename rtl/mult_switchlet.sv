// mult_switchlet: MAERI multiplier switchlet, a leaf of both networks.
//
// It holds a stationary weight and a streaming input. A word from the
// distribution network either loads the weight (PKT_WEIGHT) or the input
// (PKT_INPUT). On a fire pulse the switchlet multiplies weight by input and
// presents the product to the reduction tree one cycle later (out_valid for
// one cycle, only when the switchlet is active in the current mapping).
// Local forwarding: fwd_out always shows this switchlet's input; a switchlet
// with fwd_sel set takes its next input from its neighbour's fwd_out on the
// fire pulse instead of from the distribution network, so a sliding window
// needs only one new word per step.
//
// Timing: a word arriving in cycle t is used by a fire in cycle t+1 or later;
// a word arriving in the same cycle as a fire is kept for the next fire.
// The multiplier, the weight/input selection between Data_In and Fwd_In and the
// one-way forwarding link follow the architecture; the fire pulse and the
// register arrangement are this design's choice.
module mult_switchlet
  import maeri_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      active,     // part of a virtual neuron in this mapping
  input  logic      fwd_sel,    // next input comes from the neighbour, not the tree
  input  logic      in_valid,   // Data_In from the distribution network
  input  pkt_kind_e in_kind,
  input  data_t     in_data,
  input  data_t     fwd_in,     // Fwd_In from the neighbour
  output data_t     fwd_out,    // Fwd_Out to the other neighbour
  input  logic      fire,       // compute with the current operands
  output logic      out_valid,  // Data_Out towards the reduction tree
  output acc_t      out_prod
);
  data_t weight_q, input_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      weight_q  <= '0;
      input_q   <= '0;
      out_valid <= 1'b0;
      out_prod  <= '0;
    end else begin
      if (in_valid && in_kind == PKT_WEIGHT) weight_q <= in_data;
      if (fire && fwd_sel)                   input_q  <= fwd_in;
      else if (in_valid && in_kind == PKT_INPUT) input_q <= in_data;
      out_valid <= fire && active;
      if (fire) out_prod <= acc_t'(weight_q) * acc_t'(input_q);
    end
  end

  assign fwd_out = input_q;

  // A forwarded input and a distributed input never target one fire.
  a_single_source: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(fire && fwd_sel && in_valid && in_kind == PKT_INPUT))
    else $error("mult_switchlet: input from tree and neighbour in the same cycle");
endmodule
