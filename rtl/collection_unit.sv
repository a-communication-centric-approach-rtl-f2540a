// collection_unit: delivers the outputs of the reduction tree to the output
// prefetch buffer at the reduction bandwidth.
//
// A wave from the tree holds up to N valid output slots (one per virtual
// neuron). The unit writes at most RED_BW of them per cycle, lowest slot first,
// each through an activation unit, to consecutive buffer addresses starting at
// a running write pointer. A wave with more than RED_BW outputs takes several
// cycles; busy stays high until it is drained and the source must not deliver
// another wave before then (checked by an assertion).
// Temporal folding: a neuron too large for the multiplier array is run as
// several folds (one run each) that write the same output addresses. With
// accumulate set, each output is first combined (add, or max for pooling) with
// the word already at its address, read through old_addr/old_data, so the
// buffer ends up holding the whole neuron; set relu_en only on the final fold.
// Timing: writes are registered, one cycle after selection. clear resets the
// write pointer. Within one run every address is written once, so a read never
// needs the write still in its register. The limit of RED_BW outputs per cycle models the collection
// bandwidth of the architecture; packing order and addressing are this design's
// choice.
module collection_unit
  import maeri_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned RED_BW = 8,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              relu_en,
  input  logic              accumulate,
  input  red_op_e           op,
  input  logic              in_wave,
  input  logic              in_valid [N],
  input  acc_t              in_data  [N],
  output logic              wr_en    [RED_BW],
  output logic [ADDR_W-1:0] wr_addr  [RED_BW],
  output acc_t              wr_data  [RED_BW],
  output logic [ADDR_W-1:0] old_addr [RED_BW],  // read port of the output buffer
  input  acc_t              old_data [RED_BW],
  output logic              busy,
  output logic [ADDR_W-1:0] wr_ptr   // number of outputs written since clear
);
  logic              pend_v [N];
  acc_t              pend_d [N];
  logic              cur_v  [N];
  acc_t              cur_d  [N];
  logic              sel_v  [RED_BW];
  acc_t              sel_d  [RED_BW];
  acc_t              acc_d  [RED_BW];
  acc_t              act_d  [RED_BW];
  logic              nxt_v  [N];
  int unsigned       cnt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      cur_v[i] = pend_v[i] || (in_wave && in_valid[i]);
      cur_d[i] = (in_wave && in_valid[i]) ? in_data[i] : pend_d[i];
    end
    nxt_v = cur_v;
    cnt   = 0;
    for (int o = 0; o < RED_BW; o++) begin
      sel_v[o] = 1'b0;
      sel_d[o] = '0;
    end
    for (int i = 0; i < N; i++)
      if (cur_v[i] && cnt < RED_BW) begin
        for (int o = 0; o < RED_BW; o++)
          if (o == cnt) begin
            sel_v[o] = 1'b1;
            sel_d[o] = cur_d[i];
          end
        nxt_v[i] = 1'b0;
        cnt++;
      end
  end

  for (genvar o = 0; o < RED_BW; o++) begin : g_act
    assign old_addr[o] = wr_ptr + ADDR_W'(o);
    assign acc_d[o]    = accumulate ? red_combine(op, old_data[o], sel_d[o]) : sel_d[o];
    activation_unit u_act (.relu_en, .in_sum(acc_d[o]), .out_act(act_d[o]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        pend_v[i] <= 1'b0;
        pend_d[i] <= '0;
      end
      for (int o = 0; o < RED_BW; o++) begin
        wr_en[o]   <= 1'b0;
        wr_addr[o] <= '0;
        wr_data[o] <= '0;
      end
      wr_ptr <= '0;
    end else begin
      pend_v <= nxt_v;
      pend_d <= cur_d;
      for (int o = 0; o < RED_BW; o++) begin
        wr_en[o]   <= sel_v[o];
        wr_addr[o] <= wr_ptr + ADDR_W'(o);
        wr_data[o] <= act_d[o];
      end
      if (clear) wr_ptr <= '0;
      else       wr_ptr <= wr_ptr + ADDR_W'(cnt);
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < N; i++) busy |= pend_v[i];
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(busy && in_wave))
    else $error("collection_unit: new wave before the previous one was drained");
endmodule
