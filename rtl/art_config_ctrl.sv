// art_config_ctrl: reconfiguration controller of the augmented reduction tree.
//
// Input is a mapping of virtual neurons (VNs) onto the N multiplier switchlets:
// vn_start[i] marks leaf i as the first leaf of a VN and active[i] says leaf i
// is used at all. A VN is a run of consecutive active leaves, so VNs of
// different sizes can sit side by side. From the mapping the controller works
// out, for every adder switchlet (heap order: node 1 is the root, node k has
// children 2k and 2k+1, leaves are nodes N..2N-1), whether it adds, where its
// sum goes and whether a VN completes there, and for every leaf whether its
// product continues into the neighbouring leaf on the left (cont[i]) or right.
// It also counts the VNs. The rules for node [a..b] with midpoint m:
//   add_en    = leaf m+1 continues the VN of leaf m
//   sum_left  = leaves a..m are all one VN and that VN continues left of a
//   sum_right = leaves m+1..b are all one VN and that VN continues right of b
//   emit      = add_en and neither of the above; slot = first leaf of the VN
// Timing: the configuration is computed in one pass and registered on load;
// it is valid the cycle after load. The controller inspecting the mapping is the
// architecture's; computing every node in one combinational pass is this
// design's choice.
module art_config_ctrl
  import maeri_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N-1:0]          vn_start,
  input  logic [N-1:0]          active,
  output adder_cfg_t            cfg [N],     // index 1..N-1 used, 0 unused
  output logic [N-1:0]          cont,        // leaf i continues the VN of leaf i-1
  output logic [$clog2(N+1)-1:0] num_vn
);
  localparam int unsigned LEVELS = $clog2(N);

  logic [N:0]          c;       // c[i]: leaf i continues leaf i-1 (c[0] = c[N] = 0)
  adder_cfg_t          ncfg [N];
  logic [$clog2(N+1)-1:0] nvn;

  always_comb begin
    c = '0;
    for (int i = 1; i < N; i++) c[i] = active[i] && active[i-1] && !vn_start[i];
    nvn = '0;
    for (int i = 0; i < N; i++) if (active[i] && !c[i]) nvn++;
  end

  assign ncfg[0] = '0;

  // One configuration per node; node k = 2**d + j covers leaves a..b.
  for (genvar d = 0; d < LEVELS; d++) begin : g_lvl
    for (genvar j = 0; j < (1 << d); j++) begin : g_node
      localparam int K    = (1 << d) + j;
      localparam int SPAN = N >> d;
      localparam int A    = j * SPAN;
      localparam int B    = A + SPAN - 1;
      localparam int M    = A + SPAN / 2 - 1;
      always_comb begin
        logic              sl, sr, el, er;
        logic [SLOT_W-1:0] slot;
        sl = 1'b1;
        for (int i = A + 1; i <= M; i++) if (!c[i]) sl = 1'b0;
        sr = 1'b1;
        for (int i = M + 2; i <= B; i++) if (!c[i]) sr = 1'b0;
        el   = sl && c[A];
        er   = sr && c[B+1];
        slot = SLOT_W'(A);
        for (int i = A; i <= M; i++) if (!c[i]) slot = SLOT_W'(i);
        ncfg[K].add_en    = c[M+1];
        ncfg[K].sum_left  = c[M+1] && el;
        ncfg[K].sum_right = c[M+1] && er;
        ncfg[K].emit      = c[M+1] && !el && !er;
        ncfg[K].emit_slot = slot;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) cfg[k] <= '0;
      cont   <= '0;
      num_vn <= '0;
    end else if (load) begin
      cfg    <= ncfg;
      cont   <= c[N-1:0];
      num_vn <= nvn;
    end
  end

  initial assert (N >= 2 && N <= (1 << SLOT_W) && (N & (N - 1)) == 0)
    else $fatal(1, "art_config_ctrl: N must be a power of two, at most 2**SLOT_W");
endmodule
