// maeri_top: MAERI (Multiply-Accumulate Engine with Reconfigurable
// Interconnect), a DNN accelerator built from N multiplier switchlets and N-1
// adder switchlets joined by two configurable networks.
//
// Data path: weight and input prefetch buffers -> distribution network (fat
// binary tree of simple switchlets, DIST_BW words/cycle at the root, multicast
// by destination mask) -> multiplier switchlets (with one-way local forwarding
// links between neighbours) -> augmented reduction tree of adder switchlets
// (all virtual neurons reduced at once) -> collection unit with activation
// units (RED_BW outputs/cycle) -> output prefetch buffer.
// Control: the host (off-chip CPU, not part of this design) writes the buffers,
// sets the mapping (vn_start/active: which multipliers form which virtual
// neuron, fwd_sel: which multipliers take their next input from the right-hand
// neighbour, red_op/relu_en) and pulses start; done pulses when every output is
// in the output buffer, n_outputs tells how many. A neuron larger than N
// multipliers is run as several folds; with accumulate set a run adds its
// outputs to those already in the output buffer.
// Host buffer ports stand in for the DRAM/prefetch path; DRAM itself is outside.
// Stall and cycle counters report the effect of the two bandwidths.
//
// From the document: the set of blocks and how they connect (prefetch buffers,
// distribution tree, multiplier switchlets with forwarding links, augmented
// reduction tree, activation units, controller) and the 64-multiplier size.
// This design's choice: the host ports standing in for the CPU and DRAM, the
// buffer word format, fold accumulation in the output buffer, and the counters.
module maeri_top
  import maeri_pkg::*;
#(
  parameter int unsigned N       = 64,    // multiplier switchlets
  parameter int unsigned DIST_BW = 16,    // distribution bandwidth (words/cycle)
  parameter int unsigned RED_BW  = 8,     // collection bandwidth (outputs/cycle)
  parameter int unsigned DEPTH   = 1024,  // words per prefetch buffer
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned EW     = 1 + N + DATA_W,
  localparam int unsigned VW     = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host / prefetch side
  input  logic          wb_we,
  input  logic [AW-1:0] wb_addr,
  input  logic [EW-1:0] wb_wdata,      // {last, dest_mask[N], data}
  input  logic          ib_we,
  input  logic [AW-1:0] ib_addr,
  input  logic [EW-1:0] ib_wdata,
  input  logic [AW-1:0] ob_raddr,
  output acc_t          ob_rdata,
  // mapping and control
  input  logic [N-1:0]  vn_start,
  input  logic [N-1:0]  active,
  input  logic [N-1:0]  fwd_sel,
  input  red_op_e       red_op,
  input  logic          relu_en,
  input  logic          accumulate,    // add this run's outputs to the buffer (folding)
  input  logic [AW:0]   n_weights,
  input  logic [AW:0]   n_inputs,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] n_outputs,
  output logic [VW-1:0] num_vn,
  output logic [31:0]   cyc_count,
  output logic [31:0]   step_count,
  output logic [31:0]   dist_stall_count,
  output logic [31:0]   red_stall_count
);
  // buffers
  logic [AW-1:0] w_raddr [DIST_BW];
  logic [EW-1:0] w_rdata [DIST_BW];
  logic [AW-1:0] i_raddr [DIST_BW];
  logic [EW-1:0] i_rdata [DIST_BW];
  logic          wb_we_a [1];
  logic [AW-1:0] wb_ad_a [1];
  logic [EW-1:0] wb_wd_a [1];
  logic          ib_we_a [1];
  logic [AW-1:0] ib_ad_a [1];
  logic [EW-1:0] ib_wd_a [1];
  logic [AW-1:0] ob_ra_a [RED_BW+1];   // port 0: host, 1..RED_BW: accumulation
  logic [ACC_W-1:0] ob_rd_a [RED_BW+1];
  logic [AW-1:0] acc_raddr [RED_BW];
  acc_t          acc_rdata [RED_BW];
  logic          o_we    [RED_BW];
  logic [AW-1:0] o_waddr [RED_BW];
  acc_t          o_wdata [RED_BW];
  logic [ACC_W-1:0] o_wbits [RED_BW];

  assign wb_we_a[0] = wb_we;  assign wb_ad_a[0] = wb_addr;  assign wb_wd_a[0] = wb_wdata;
  assign ib_we_a[0] = ib_we;  assign ib_ad_a[0] = ib_addr;  assign ib_wd_a[0] = ib_wdata;
  assign ob_ra_a[0] = ob_raddr;
  assign ob_rdata   = acc_t'(ob_rd_a[0]);
  for (genvar o = 0; o < RED_BW; o++) begin : g_ow
    assign o_wbits[o]   = o_wdata[o];
    assign ob_ra_a[o+1] = acc_raddr[o];
    assign acc_rdata[o] = acc_t'(ob_rd_a[o+1]);
  end

  prefetch_buffer #(.WIDTH(EW), .DEPTH(DEPTH), .NW(1), .NR(DIST_BW)) u_wbuf (
    .clk, .we(wb_we_a), .waddr(wb_ad_a), .wdata(wb_wd_a), .raddr(w_raddr), .rdata(w_rdata));
  prefetch_buffer #(.WIDTH(EW), .DEPTH(DEPTH), .NW(1), .NR(DIST_BW)) u_ibuf (
    .clk, .we(ib_we_a), .waddr(ib_ad_a), .wdata(ib_wd_a), .raddr(i_raddr), .rdata(i_rdata));
  prefetch_buffer #(.WIDTH(ACC_W), .DEPTH(DEPTH), .NW(RED_BW), .NR(RED_BW+1)) u_obuf (
    .clk, .we(o_we), .waddr(o_waddr), .wdata(o_wbits), .raddr(ob_ra_a), .rdata(ob_rd_a));

  // control
  logic         cfg_load, out_clear, fire, wave, collect_busy;
  logic         d_valid [DIST_BW];
  pkt_kind_e    d_kind  [DIST_BW];
  data_t        d_data  [DIST_BW];
  logic [N-1:0] d_mask  [DIST_BW];
  adder_cfg_t   cfg [N];
  logic [N-1:0] cont;

  maeri_controller #(.N(N), .DIST_BW(DIST_BW), .RED_BW(RED_BW), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .n_weights, .n_inputs, .num_vn, .cfg_load, .out_clear,
    .w_raddr, .w_rdata, .i_raddr, .i_rdata, .d_valid, .d_kind, .d_data, .d_mask,
    .fire, .wave, .collect_busy, .busy, .done, .cyc_count, .step_count,
    .dist_stall_count, .red_stall_count);

  art_config_ctrl #(.N(N)) u_artcfg (
    .clk, .rst_n, .load(cfg_load), .vn_start, .active, .cfg, .cont, .num_vn);

  // distribution network
  logic      leaf_valid [N];
  pkt_kind_e leaf_kind  [N];
  data_t     leaf_data  [N];

  dist_network #(.N(N), .DIST_BW(DIST_BW)) u_dist (
    .clk, .rst_n, .in_valid(d_valid), .in_kind(d_kind), .in_data(d_data), .in_mask(d_mask),
    .leaf_valid, .leaf_kind, .leaf_data);

  // multiplier switchlets with local forwarding from the right-hand neighbour
  data_t fwd   [N+1];
  logic  pv    [N];
  acc_t  prod  [N];
  assign fwd[N] = '0;
  for (genvar i = 0; i < N; i++) begin : g_mult
    mult_switchlet u_mul (
      .clk, .rst_n, .active(active[i]), .fwd_sel(fwd_sel[i]),
      .in_valid(leaf_valid[i]), .in_kind(leaf_kind[i]), .in_data(leaf_data[i]),
      .fwd_in(fwd[i+1]), .fwd_out(fwd[i]), .fire,
      .out_valid(pv[i]), .out_prod(prod[i]));
  end

  // augmented reduction tree and collection
  logic res_wave;
  logic res_valid [N];
  acc_t res       [N];

  art_network #(.N(N)) u_art (
    .clk, .rst_n, .op(red_op), .cfg, .cont, .in_wave(wave), .prod_valid(pv), .prod,
    .res_wave, .res_valid, .res);

  collection_unit #(.N(N), .RED_BW(RED_BW), .ADDR_W(AW)) u_coll (
    .clk, .rst_n, .clear(out_clear), .relu_en, .accumulate, .op(red_op), .in_wave(res_wave),
    .in_valid(res_valid), .in_data(res), .wr_en(o_we), .wr_addr(o_waddr), .wr_data(o_wdata),
    .old_addr(acc_raddr), .old_data(acc_rdata),
    .busy(collect_busy), .wr_ptr(n_outputs));
endmodule
