// art_network: MAERI augmented reduction tree (ART) and collection path.
//
// N-1 adder switchlets form a binary tree over the N multiplier switchlets.
// Every virtual neuron (VN), a run of consecutive leaves of any length, is
// reduced simultaneously with all others: each leaf's product enters as a left
// and/or right edge partial (per the cont[] bits from the reconfiguration
// controller), adder switchlets combine partials where a VN crosses their
// midpoint, and each VN's total is emitted at exactly one node (or at its leaf,
// for a VN of one leaf). Emitted totals travel up a collection path with one
// lane per output slot (the slot is the VN's first leaf), so no two VNs share a
// link on the way to the root.
//
// Interface: per-leaf products with valid, a wave strobe that accompanies them,
// the per-node configuration; out: res_valid/res per slot plus res_wave.
// Timing: fully pipelined, one wave per cycle; products entering in cycle t
// leave as res in cycle t + log2(N).
//
// From the document: the augmented reduction tree, reduction of many VNs of any
// size at once, and max for pooling. This design's choice: bypass lanes and one
// collection lane per slot in place of the forwarding links and fat links near
// the root, the slot numbering, and the pipeline registers.
module art_network
  import maeri_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  red_op_e      op,
  input  adder_cfg_t   cfg [N],      // index 1..N-1 used
  input  logic [N-1:0] cont,
  input  logic         in_wave,      // products of one fire are present
  input  logic         prod_valid [N],
  input  acc_t         prod       [N],
  output logic         res_wave,     // a wave of results is present
  output logic         res_valid  [N],
  output acc_t         res        [N]
);
  localparam int unsigned LEVELS = $clog2(N);

  edge_rec_t rec [2*N];              // rec[k]: record leaving node k (leaves at N+i)
  logic      emit_v [N];
  acc_t      emit_s [N];
  logic [N-1:0] col_v  [LEVELS+1];   // collection lanes at the output time of depth d
  acc_t [N-1:0] col_d  [LEVELS+1];
  logic [N-1:0] colq_v [LEVELS];     // registered copies between depths
  acc_t [N-1:0] colq_d [LEVELS];
  logic      wave_q [LEVELS];

  assign rec[0] = '0;

  // Leaves: product becomes a left and/or right edge partial, or a whole VN.
  for (genvar i = 0; i < N; i++) begin : g_leaf
    logic cr;
    if (i == N - 1) begin : g_last
      assign cr = 1'b0;
    end else begin : g_mid
      assign cr = cont[i+1];
    end
    assign rec[N+i] = '{l_valid: prod_valid[i] && cont[i], l_sum: prod[i],
                        r_valid: prod_valid[i] && cr,      r_sum: prod[i]};
    assign col_v[LEVELS][i] = prod_valid[i] && !cont[i] && !cr;
    assign col_d[LEVELS][i] = prod[i];
  end

  // Adder switchlets.
  assign emit_v[0] = 1'b0;
  assign emit_s[0] = '0;
  for (genvar k = 1; k < N; k++) begin : g_node
    adder_switchlet u_add (
      .clk, .rst_n, .cfg(cfg[k]), .op, .in_l(rec[2*k]), .in_r(rec[2*k+1]),
      .out(rec[k]), .emit_valid(emit_v[k]), .emit_sum(emit_s[k]));
  end

  // Collection lanes: register from depth d+1 to depth d, merge emits of depth d.
  for (genvar d = 0; d < LEVELS; d++) begin : g_col
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        colq_v[d] <= '0;
        colq_d[d] <= '0;
      end else begin
        colq_v[d] <= col_v[d+1];
        colq_d[d] <= col_d[d+1];
      end
    end
    // A VN completes at the lowest node covering it, so its first leaf lies
    // inside that node's span: slot j at depth d can only be hit by node K.
    for (genvar j = 0; j < N; j++) begin : g_slot
      localparam int K = (N + j) >> (LEVELS - d);
      logic hit;
      assign hit = emit_v[K] && (cfg[K].emit_slot == SLOT_W'(j));
      assign col_v[d][j] = colq_v[d][j] || hit;
      assign col_d[d][j] = hit ? emit_s[K] : colq_d[d][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int d = 0; d < LEVELS; d++) wave_q[d] <= 1'b0;
    else begin
      wave_q[LEVELS-1] <= in_wave;
      for (int d = 0; d < LEVELS - 1; d++) wave_q[d] <= wave_q[d+1];
    end
  end

  assign res_wave  = wave_q[0];
  for (genvar i = 0; i < N; i++) begin : g_res
    assign res_valid[i] = col_v[0][i];
    assign res[i]       = col_d[0][i];
  end
endmodule
