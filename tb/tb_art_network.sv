// tb_art_network: self-check of the augmented reduction tree with 16 leaves,
// configured by the reconfiguration controller. For random mappings (VNs of
// random, mixed sizes, unused leaves) and back-to-back waves of random products,
// each VN's sum (or max, in pooling mode) must appear in the slot of its first
// leaf exactly log2(16) = 4 cycles after the products, and no other slot may be
// valid. Counts how many VNs were reduced in one wave at most.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_art_network;
  import maeri_pkg::*;
  localparam int N = 16, LAT = 4, WAVES = 6;
  logic clk = 0, rst_n = 0, load;
  logic [N-1:0] vn_start, active, cont;
  adder_cfg_t cfg [N];
  logic [$clog2(N+1)-1:0] num_vn;
  red_op_e op;
  logic in_wave, prod_valid [N], res_wave, res_valid [N];
  acc_t prod [N], res [N];
  int checks = 0, failures = 0, max_parallel = 0, max_waves = 0;

  art_config_ctrl #(.N(N)) u_cfg (.clk, .rst_n, .load, .vn_start, .active, .cfg, .cont, .num_vn);
  art_network #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results per wave
  logic ev [WAVES + LAT][N];
  acc_t ed [WAVES + LAT][N];

  initial begin
    load = 0; vn_start = 0; active = 0; op = RED_ADD; in_wave = 0;
    for (int i = 0; i < N; i++) begin prod_valid[i] = 0; prod[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int vn_of [N]; int nvn;
      vn_start = 0; active = 0; nvn = 0;
      for (int i = 0; i < N; ) begin
        int sz;
        sz = $urandom_range(1, (t % 4 == 0) ? 16 : 5);
        if ($urandom_range(0, 6) == 0) begin vn_of[i] = -1; i++; continue; end
        for (int j = 0; j < sz && i < N; j++, i++) begin
          active[i] = 1; vn_of[i] = nvn;
          if (j == 0) vn_start[i] = 1;
        end
        nvn++;
      end
      if (nvn > max_parallel) max_parallel = nvn;
      op = red_op_e'(t % 3 == 0);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      // WAVES consecutive waves, then LAT idle cycles
      for (int w = 0; w < WAVES + LAT; w++) begin
        for (int i = 0; i < N; i++) ev[w][i] = 0;
        if (w < WAVES) begin
          in_wave = 1;
          for (int i = 0; i < N; i++) begin
            prod_valid[i] = active[i];
            prod[i] = acc_t'($signed($urandom_range(0, 2000)) - 1000);
          end
          for (int i = 0; i < N; i++) if (active[i]) begin
            int f;
            f = i;
            while (f > 0 && vn_of[f-1] == vn_of[i]) f--;
            if (!ev[w][f]) begin ev[w][f] = 1; ed[w][f] = prod[i]; end
            else ed[w][f] = (op == RED_MAX) ? ((prod[i] > ed[w][f]) ? prod[i] : ed[w][f]) : ed[w][f] + prod[i];
          end
        end else begin
          in_wave = 0;
          for (int i = 0; i < N; i++) prod_valid[i] = 0;
        end
        #1;
        if (w >= LAT) begin
          checks++;
          if (res_wave != (w - LAT < WAVES)) begin failures++; $display("t=%0d res_wave wrong at %0d", t, w); end
          for (int i = 0; i < N; i++) begin
            checks++;
            if (res_valid[i] != ev[w-LAT][i] || (ev[w-LAT][i] && res[i] != ed[w-LAT][i])) begin
              failures++;
              if (failures < 10) $display("t=%0d wave %0d slot %0d: got v=%0b %0d want v=%0b %0d", t, w-LAT, i,
                                          res_valid[i], res[i], ev[w-LAT][i], ed[w-LAT][i]);
            end
          end
        end
        @(negedge clk);
      end
      max_waves = WAVES;
    end
    checks++;
    if (max_parallel < 4) failures++;
    $display("most VNs reduced in one wave=%0d, back-to-back waves=%0d", max_parallel, max_waves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
