// tb_maeri_controller: self-check of the accelerator controller with 16 leaves,
// distribution bandwidth 4 and collection bandwidth 2, against buffers modelled
// here. Random programs (random step lengths, random num_vn) are run; checked:
//   * the words leave in buffer order, weights first (PKT_WEIGHT), then inputs;
//   * no cycle sends more than 4 words or words of two steps;
//   * each step's fire comes exactly log2(16)+1 = 5 cycles after its last word;
//   * step ends are at least ceil(num_vn/2) cycles apart;
//   * the step and distribution-stall counters, and done after the last fire.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_maeri_controller;
  import maeri_pkg::*;
  localparam int N = 16, B = 4, R = 2, DEPTH = 64, AW = 6, EW = 1 + N + DATA_W, LV = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW:0] n_weights, n_inputs;
  logic [$clog2(N+1)-1:0] num_vn;
  logic cfg_load, out_clear, fire, wave, collect_busy, busy, done;
  logic [AW-1:0] w_raddr [B], i_raddr [B];
  logic [EW-1:0] w_rdata [B], i_rdata [B];
  logic d_valid [B]; pkt_kind_e d_kind [B]; data_t d_data [B]; logic [N-1:0] d_mask [B];
  logic [31:0] cyc_count, step_count, dist_stall_count, red_stall_count;
  logic [EW-1:0] wmem [DEPTH], imem [DEPTH];
  int checks = 0, failures = 0, red_holds = 0, multi = 0;

  maeri_controller #(.N(N), .DIST_BW(B), .RED_BW(R), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  for (genvar p = 0; p < B; p++) begin : g_rd
    assign w_rdata[p] = wmem[w_raddr[p]];
    assign i_rdata[p] = imem[i_raddr[p]];
  end
  assign collect_busy = 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  int cyc = 0, wseen, iseen, last_end, fires_exp [$], steps_seen, dst;
  int period;
  always @(posedge clk) if (rst_n) begin
    int n, ends;
    cyc++;
    n = 0; ends = 0;
    for (int p = 0; p < B; p++) if (d_valid[p]) begin
      logic [EW-1:0] e;
      n++;
      if (d_kind[p] == PKT_WEIGHT) begin
        e = wmem[wseen]; wseen++;
        checks++;
        if (iseen != 0 || {d_mask[p], d_data[p]} != e[EW-2:0]) begin failures++; $display("weight word %0d wrong", wseen-1); end
      end else begin
        e = imem[iseen]; iseen++;
        checks++;
        if (ends != 0 || {d_mask[p], d_data[p]} != e[EW-2:0]) begin failures++; $display("input word %0d wrong", iseen-1); end
        if (e[EW-1]) ends++;
      end
    end
    if (n > 0 && d_kind[0] == PKT_INPUT && ends == 0) dst++;
    if (ends > 0) begin
      checks++;
      if (last_end >= 0 && cyc - last_end < period) begin failures++; $display("steps %0d apart, period %0d", cyc - last_end, period); end
      if (last_end >= 0 && cyc - last_end > period && n > 1) ;
      last_end = cyc;
      fires_exp.push_back(cyc + LV + 1);
    end
    if (fire) begin
      checks++;
      steps_seen++;
      if (fires_exp.size() == 0 || fires_exp[0] != cyc) begin failures++; $display("unexpected fire at %0d", cyc); end
      if (fires_exp.size() != 0) void'(fires_exp.pop_front());
    end
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin wmem[a] = 0; imem[a] = 0; end
    n_weights = 0; n_inputs = 0; num_vn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int nw, ni, steps, dstall;
      nw = $urandom_range(0, 20);
      ni = 0; steps = 0; dstall = 0;
      for (int a = 0; a < nw; a++) wmem[a] = {1'b0, N'($urandom), DATA_W'($urandom)};
      while (ni < 40) begin
        int len;
        len = $urandom_range(1, 9);
        if (len > B) multi++;
        dstall += (len + B - 1) / B - 1;
        for (int j = 0; j < len; j++) begin
          imem[ni] = {j == len - 1, N'($urandom), DATA_W'($urandom)};
          ni++;
        end
        steps++;
      end
      num_vn = $urandom_range(1, N);
      period = (num_vn + R - 1) / R;
      n_weights = (AW+1)'(nw); n_inputs = (AW+1)'(ni);
      wseen = 0; iseen = 0; last_end = -1; steps_seen = 0; dst = 0;
      fires_exp.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (wseen != nw || iseen != ni || steps_seen != steps || step_count != steps ||
          dist_stall_count != dstall || fires_exp.size() != 0) begin
        failures++;
        $display("run %0d: words %0d/%0d %0d/%0d steps %0d/%0d/%0d dist stalls %0d/%0d", r, wseen, nw, iseen, ni,
                 steps_seen, step_count, steps, dist_stall_count, dstall);
      end
      if (red_stall_count > 0) red_holds++;
    end
    checks++;
    if (red_holds == 0 || multi == 0) failures++;
    $display("runs with collection holds=%0d multi-cycle steps=%0d", red_holds, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
