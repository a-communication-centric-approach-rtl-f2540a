// tb_maeri_top: end-to-end self-check of the MAERI accelerator at its default
// size (64 multiplier switchlets, distribution bandwidth 16, collection
// bandwidth 8). It loads the weight and input buffers through the host ports,
// runs a sequence of layer mappings, reads the output buffer back and compares
// every output with a reference model of the same dataflow written here.
// Mappings run:
//   1. fully-connected / LSTM-gate style: 4 VNs of 16, input vector multicast;
//   2. one VN over all 64 multipliers (a folded large neuron), unicast inputs;
//   3. 21 VNs of 3 (64 mod 3 leaves unused), ReLU on: both bandwidths limit;
//   4. sparse 1-D convolution: VNs of 5, 6 and 4 non-zero weights, sliding
//      window by local forwarding so each step needs one new word per VN;
//   5. 2x2 max pooling: 16 VNs of 4, max in the adder switchlets;
//   6. 32 VNs of 2 with multicast inputs: more outputs per step than the
//      collection bandwidth, so the collector spaces the steps;
//   7. temporal folding: 48-input neurons on 16-leaf VNs, three folds added
//      up in the output buffer;
//   8. random mappings with random VN sizes (1..12) and random inputs.
// For every run the outputs, their count, the number of steps and the
// distribution stall count (sum over steps of ceil(words/16) - 1) are checked.
// Each mechanism (multicast, forwarding, distribution stall, collection stall,
// max, ReLU clipping, mixed VN sizes, one-leaf VNs, unused leaves, folding)
// must occur.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_maeri_top;
  import maeri_pkg::*;
  localparam int N = 64, B = 16, R = 8, DEPTH = 1024, AW = 10, EW = 1 + N + DATA_W;

  logic clk = 0, rst_n = 0;
  logic wb_we = 0, ib_we = 0, start = 0, relu_en = 0, accumulate = 0;
  logic [AW-1:0] wb_addr = 0, ib_addr = 0, ob_raddr = 0;
  logic [EW-1:0] wb_wdata = 0, ib_wdata = 0;
  acc_t ob_rdata;
  logic [N-1:0] vn_start = 0, active = 0, fwd_sel = 0;
  red_op_e red_op = RED_ADD;
  logic [AW:0] n_weights = 0, n_inputs = 0;
  logic busy, done;
  logic [AW-1:0] n_outputs;
  logic [$clog2(N+1)-1:0] num_vn;
  logic [31:0] cyc_count, step_count, dist_stall_count, red_stall_count;

  maeri_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_multicast = 0, m_forward = 0, m_dist_stall = 0, m_red_stall = 0, m_max = 0,
      m_relu_clip = 0, m_mixed = 0, m_single = 0, m_unused = 0, m_fold = 0;
  acc_t prev_out [$];   // what the previous run left in the output buffer

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program of one run
  typedef struct { data_t d; logic [N-1:0] m; logic last; } word_t;
  word_t wq [$], iq [$];
  // reference state, persistent across runs like the switchlets' registers
  data_t rw [N], rx [N];

  function automatic data_t rnd(int lim);
    return data_t'($signed($urandom_range(0, 2 * lim)) - lim);
  endfunction

  function automatic logic [N-1:0] bit_at(int l);
    logic [N-1:0] m;
    m = '0;
    m[l] = 1'b1;
    return m;
  endfunction

  task automatic put(bit to_weights, data_t d, logic [N-1:0] m, logic last);
    word_t w;
    w.d = d; w.m = m; w.last = last;
    if (to_weights) wq.push_back(w);
    else            iq.push_back(w);
    if ($countones(m) > 1) m_multicast++;
  endtask

  task automatic run(string name);
    acc_t exp_out [$];
    int steps, dstall, i, nv, sizes [$];
    logic [N-1:0] cont;
    // mapping properties
    nv = 0;
    for (int l = 0; l < N; l++) begin
      cont[l] = (l > 0) && active[l] && active[l-1] && !vn_start[l];
      if (!active[l]) m_unused++;
      if (active[l] && !cont[l]) begin nv++; sizes.push_back(1); end
      else if (active[l]) sizes[sizes.size()-1]++;
    end
    foreach (sizes[k]) begin
      if (sizes[k] == 1) m_single++;
      if (sizes[k] != sizes[0]) m_mixed++;
    end
    if (red_op == RED_MAX) m_max++;
    if (fwd_sel != 0) m_forward++;
    if (accumulate) m_fold++;
    // reference model
    foreach (wq[k]) for (int l = 0; l < N; l++) if (wq[k].m[l]) rw[l] = wq[k].d;
    steps = 0; dstall = 0; i = 0;
    while (i < iq.size()) begin
      int cnt;
      data_t nx [N];
      cnt = 0;
      do begin
        for (int l = 0; l < N; l++) if (iq[i].m[l]) rx[l] = iq[i].d;
        cnt++; i++;
      end while (!iq[i-1].last && i < iq.size());
      if (!iq[i-1].last) break;                // unterminated tail is not fired
      steps++;
      dstall += (cnt + B - 1) / B - 1;
      for (int l = 0; l < N; l++) if (active[l] && !cont[l]) begin
        acc_t s;
        int e;
        s = acc_t'(rw[l]) * acc_t'(rx[l]);
        e = l + 1;
        while (e < N && active[e] && !vn_start[e]) begin
          acc_t p;
          p = acc_t'(rw[e]) * acc_t'(rx[e]);
          s = (red_op == RED_MAX) ? ((p > s) ? p : s) : s + p;
          e++;
        end
        if (accumulate) begin
          acc_t o;
          o = prev_out[exp_out.size()];
          s = (red_op == RED_MAX) ? ((o > s) ? o : s) : o + s;
        end
        if (relu_en && s < 0) begin s = 0; m_relu_clip++; end
        exp_out.push_back(s);
      end
      for (int l = 0; l < N; l++) nx[l] = (fwd_sel[l] && l < N - 1) ? rx[l+1] : rx[l];
      rx = nx;
    end
    // load buffers
    foreach (wq[k]) begin
      @(negedge clk); wb_we = 1; wb_addr = AW'(k); wb_wdata = {1'b0, wq[k].m, wq[k].d};
    end
    foreach (iq[k]) begin
      @(negedge clk); wb_we = 0; ib_we = 1; ib_addr = AW'(k); ib_wdata = {iq[k].last, iq[k].m, iq[k].d};
    end
    @(negedge clk);
    wb_we = 0; ib_we = 0;
    n_weights = (AW+1)'(wq.size()); n_inputs = (AW+1)'(iq.size());
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // compare
    checks++;
    if (n_outputs != AW'(exp_out.size()) || step_count != steps || dist_stall_count != dstall) begin
      failures++;
      $display("%s: outputs %0d/%0d steps %0d/%0d dist stalls %0d/%0d", name, n_outputs, exp_out.size(),
               step_count, steps, dist_stall_count, dstall);
    end
    checks++;
    if (num_vn != nv) begin failures++; $display("%s: num_vn %0d want %0d", name, num_vn, nv); end
    for (int k = 0; k < exp_out.size(); k++) begin
      ob_raddr = AW'(k);
      #1;
      checks++;
      if (ob_rdata != exp_out[k]) begin
        failures++;
        if (failures < 20) $display("%s: output %0d = %0d want %0d", name, k, ob_rdata, exp_out[k]);
      end
    end
    if (dist_stall_count > 0) m_dist_stall++;
    if (red_stall_count > 0) m_red_stall++;
    $display("%-10s VNs=%0d steps=%0d outputs=%0d cycles=%0d dist_stalls=%0d red_stalls=%0d", name, nv,
             step_count, exp_out.size(), cyc_count, dist_stall_count, red_stall_count);
    prev_out = exp_out;
    wq.delete(); iq.delete();
  endtask

  initial begin
    for (int l = 0; l < N; l++) begin rw[l] = 0; rx[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. FC / LSTM gate: 4 VNs of 16, each input element multicast to 4 leaves
    vn_start = 0; active = '1; fwd_sel = 0; red_op = RED_ADD; relu_en = 0;
    for (int v = 0; v < 4; v++) vn_start[v*16] = 1;
    for (int l = 0; l < N; l++) put(1, rnd(100), bit_at(l), 0);
    for (int t = 0; t < 6; t++)
      for (int j = 0; j < 16; j++) begin
        logic [N-1:0] m;
        m = 0;
        for (int v = 0; v < 4; v++) m[v*16+j] = 1;
        put(0, rnd(100), m, j == 15);
      end
    run("fc");

    // 2. one VN of 64: every step needs 64 unicast words
    vn_start = 1; active = '1;
    for (int l = 0; l < N; l++) put(1, rnd(100), bit_at(l), 0);
    for (int t = 0; t < 4; t++)
      for (int l = 0; l < N; l++) put(0, rnd(100), bit_at(l), l == N - 1);
    run("vn64");

    // 3. 21 VNs of 3, one leaf unused, shared 3-tap filter multicast, ReLU
    vn_start = 0; active = 0; relu_en = 1;
    for (int v = 0; v < 21; v++) begin vn_start[3*v] = 1; active[3*v +: 3] = '1; end
    for (int j = 0; j < 3; j++) begin
      logic [N-1:0] m;
      m = 0;
      for (int v = 0; v < 21; v++) m[3*v+j] = 1;
      put(1, rnd(100), m, 0);
    end
    for (int t = 0; t < 5; t++)
      for (int l = 0; l < 63; l++) put(0, rnd(100), bit_at(l), l == 62);
    run("vn3_relu");

    // 4. sparse 1-D convolution, VNs of 5, 6, 4 at leaves 0, 8, 16; sliding window
    vn_start = 0; active = 0; relu_en = 0; fwd_sel = 0;
    vn_start[0] = 1; active[4:0] = '1;   fwd_sel[3:0] = '1;
    vn_start[8] = 1; active[13:8] = '1;  fwd_sel[12:8] = '1;
    vn_start[16] = 1; active[19:16] = '1; fwd_sel[18:16] = '1;
    for (int l = 0; l < 20; l++) if (active[l]) put(1, rnd(100), bit_at(l), 0);
    // first window: every leaf; afterwards only the last leaf of each VN
    for (int l = 0; l < 20; l++) if (active[l]) put(0, rnd(100), bit_at(l), l == 19);
    for (int t = 1; t < 12; t++) begin
      put(0, rnd(100), bit_at(4), 0);
      put(0, rnd(100), bit_at(13), 0);
      put(0, rnd(100), bit_at(19), 1);
    end
    run("conv_fwd");

    // 5. 2x2 max pooling: 16 VNs of 4, weights all 1 (one multicast word)
    vn_start = 0; active = '1; fwd_sel = 0; red_op = RED_MAX;
    for (int v = 0; v < 16; v++) vn_start[4*v] = 1;
    put(1, 16'sd1, '1, 0);
    for (int t = 0; t < 3; t++)
      for (int l = 0; l < N; l++) put(0, rnd(1000), bit_at(l), l == N - 1);
    run("maxpool");

    // 6. 32 VNs of 2 fed by 16 multicast words per step: 32 outputs per step
    //    exceed the collection bandwidth, so steps are spaced by the collector
    vn_start = 0; active = '1; fwd_sel = 0; red_op = RED_ADD; relu_en = 0;
    for (int v = 0; v < 32; v++) vn_start[2*v] = 1;
    for (int l = 0; l < N; l++) put(1, rnd(100), bit_at(l), 0);
    for (int t = 0; t < 5; t++)
      for (int j = 0; j < 16; j++) begin
        logic [N-1:0] m;
        m = 0;
        for (int q = 0; q < 4; q++) m[j+16*q] = 1;
        put(0, rnd(100), m, j == 15);
      end
    run("vn2_bcast");

    // 7. temporal folding: 4 neurons of 48 inputs on VNs of 16 (LSTM-gate
    //    style), run as 3 folds accumulating in the output buffer, ReLU last
    vn_start = 0; active = '1; fwd_sel = 0; red_op = RED_ADD;
    for (int v = 0; v < 4; v++) vn_start[v*16] = 1;
    for (int f = 0; f < 3; f++) begin
      accumulate = (f != 0); relu_en = (f == 2);
      for (int l = 0; l < N; l++) put(1, rnd(100), bit_at(l), 0);
      for (int t = 0; t < 3; t++)
        for (int j = 0; j < 16; j++) begin
          logic [N-1:0] m;
          m = 0;
          for (int v = 0; v < 4; v++) m[v*16+j] = 1;
          put(0, rnd(100), m, j == 15);
        end
      run($sformatf("fold%0d", f));
    end
    accumulate = 0;

    // 8. random mappings
    for (int r = 0; r < 6; r++) begin
      vn_start = 0; active = 0; fwd_sel = 0;
      red_op = red_op_e'(r % 2); relu_en = (r % 3 == 0);
      for (int l = 0; l < N; ) begin
        int sz;
        sz = $urandom_range(1, 12);
        if ($urandom_range(0, 7) == 0) begin l++; continue; end
        vn_start[l] = 1;
        for (int j = 0; j < sz && l < N; j++, l++) active[l] = 1;
      end
      for (int l = 0; l < N; l++) if (active[l]) put(1, rnd(100), bit_at(l), 0);
      for (int t = 0; t < 4; t++) begin
        int last_l;
        last_l = 0;
        for (int l = 0; l < N; l++) if (active[l]) last_l = l;
        for (int l = 0; l < N; l++) if (active[l]) put(0, rnd(100), bit_at(l), l == last_l);
      end
      run($sformatf("random%0d", r));
    end

    $display("mechanisms: multicast=%0d forward=%0d dist_stall=%0d red_stall=%0d max=%0d relu_clip=%0d mixed=%0d single=%0d unused=%0d fold=%0d",
             m_multicast, m_forward, m_dist_stall, m_red_stall, m_max, m_relu_clip, m_mixed, m_single, m_unused, m_fold);
    checks++; if (m_multicast == 0) failures++;
    checks++; if (m_forward == 0) failures++;
    checks++; if (m_dist_stall == 0) failures++;
    checks++; if (m_red_stall == 0) failures++;
    checks++; if (m_max == 0) failures++;
    checks++; if (m_relu_clip == 0) failures++;
    checks++; if (m_mixed == 0) failures++;
    checks++; if (m_single == 0) failures++;
    checks++; if (m_unused == 0) failures++;
    checks++; if (m_fold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
