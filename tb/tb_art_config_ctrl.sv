// tb_art_config_ctrl: self-check of the reduction-tree reconfiguration
// controller on random mappings of 16 leaves (random VN sizes, unused leaves).
// Checked against properties worked out from the mapping alone:
//   * cont[i] is set exactly when leaf i belongs to the VN of leaf i-1;
//   * num_vn is the number of VNs;
//   * a VN of s leaves uses exactly s-1 adders (add_en);
//   * every VN of two or more leaves completes at exactly one adder, whose
//     emit_slot is the VN's first leaf, and that adder spans the whole VN.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_art_config_ctrl;
  import maeri_pkg::*;
  localparam int N = 16, LV = 4;
  logic clk = 0, rst_n = 0, load;
  logic [N-1:0] vn_start, active, cont;
  adder_cfg_t cfg [N];
  logic [$clog2(N+1)-1:0] num_vn;
  int checks = 0, failures = 0, irregular = 0;

  art_config_ctrl #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void node_range(int k, output int a, output int b);
    int d = 0;
    while ((2 << d) <= k) d++;
    a = (k - (1 << d)) * (N >> d);
    b = a + (N >> d) - 1;
  endfunction

  initial begin
    load = 0; vn_start = 0; active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int vn_of [N]; int first [N]; int last [N]; int nvn; int adds [N]; int emits [N]; int sizes [$];
      // build a mapping: runs of random size, sometimes a gap
      vn_start = 0; active = 0; nvn = 0; sizes.delete();
      for (int i = 0; i < N; ) begin
        int sz;
        sz = $urandom_range(1, (t % 4 == 0) ? 16 : 6);
        if ($urandom_range(0, 5) == 0) begin vn_of[i] = -1; i++; continue; end
        first[nvn] = i;
        for (int j = 0; j < sz && i < N; j++, i++) begin
          active[i] = 1; vn_of[i] = nvn;
          if (j == 0) vn_start[i] = 1;
        end
        last[nvn] = i - 1;
        sizes.push_back(last[nvn] - first[nvn] + 1);
        nvn++;
      end
      if (sizes.size() > 1 && sizes[0] != sizes[1]) irregular++;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      // cont and count
      for (int i = 0; i < N; i++) begin
        logic e;
        e = (i > 0) && vn_of[i] >= 0 && vn_of[i] == vn_of[i-1];
        checks++;
        if (cont[i] != e) begin failures++; $display("t=%0d cont[%0d]=%0b want %0b", t, i, cont[i], e); end
      end
      checks++;
      if (num_vn != nvn) begin failures++; $display("t=%0d num_vn=%0d want %0d", t, num_vn, nvn); end
      for (int v = 0; v < nvn; v++) begin adds[v] = 0; emits[v] = 0; end
      for (int k = 1; k < N; k++) begin
        int a, b, m;
        node_range(k, a, b);
        m = (a + b) / 2;
        if (cfg[k].add_en) begin
          int v;
          v = vn_of[m];
          checks++;
          if (v < 0 || vn_of[m+1] != v) begin failures++; $display("t=%0d node %0d adds across VNs", t, k); continue; end
          adds[v]++;
          if (cfg[k].emit) begin
            emits[v]++;
            checks++;
            if (cfg[k].emit_slot != first[v] || first[v] < a || last[v] > b) begin
              failures++; $display("t=%0d node %0d emit slot %0d for VN at %0d..%0d", t, k, cfg[k].emit_slot, first[v], last[v]);
            end
          end
        end
      end
      for (int v = 0; v < nvn; v++) begin
        int sz;
        sz = last[v] - first[v] + 1;
        checks++;
        if (adds[v] != sz - 1 || emits[v] != (sz > 1 ? 1 : 0)) begin
          failures++; $display("t=%0d VN %0d (size %0d): %0d adds, %0d emits", t, v, sz, adds[v], emits[v]);
        end
      end
    end
    checks++;
    if (irregular == 0) failures++;
    $display("irregular mappings=%0d", irregular);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
