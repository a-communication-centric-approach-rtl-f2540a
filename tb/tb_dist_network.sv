// tb_dist_network: random self-check of the fat distribution tree with 16
// leaves and 4 root lanes. Every cycle up to 4 words are sent, each to a random
// set of leaves (unicast or multicast, no leaf targeted twice). Each leaf must
// receive exactly its word, log2(16) = 4 cycles later, and nothing otherwise.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_dist_network;
  import maeri_pkg::*;
  localparam int N = 16, B = 4, LAT = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid [B]; pkt_kind_e in_kind [B]; data_t in_data [B]; logic [N-1:0] in_mask [B];
  logic leaf_valid [N]; pkt_kind_e leaf_kind [N]; data_t leaf_data [N];
  int checks = 0, failures = 0, multicasts = 0, full_bw = 0;
  // expected per leaf, per cycle
  logic      ev [LAT+1][N];
  pkt_kind_e ek [LAT+1][N];
  data_t     ed [LAT+1][N];

  dist_network #(.N(N), .DIST_BW(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < B; i++) begin in_valid[i] = 0; in_kind[i] = PKT_WEIGHT; in_data[i] = 0; in_mask[i] = 0; end
    for (int s = 0; s <= LAT; s++) for (int l = 0; l < N; l++) begin ev[s][l] = 0; ek[s][l] = PKT_WEIGHT; ed[s][l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [N-1:0] m [B];
      int nw;
      nw = 0;
      for (int i = 0; i < B; i++) m[i] = '0;
      for (int l = 0; l < N; l++) begin
        int sel;
        sel = $urandom_range(0, B + 1);
        if (t >= 590) sel = B;                 // idle at the end
        if (sel < B) m[sel][l] = 1'b1;
      end
      // shift expectation pipeline
      for (int s = LAT; s > 0; s--) begin ev[s] = ev[s-1]; ek[s] = ek[s-1]; ed[s] = ed[s-1]; end
      for (int l = 0; l < N; l++) ev[0][l] = 0;
      @(negedge clk);
      for (int i = 0; i < B; i++) begin
        in_valid[i] = (m[i] != 0);
        in_kind[i]  = pkt_kind_e'($urandom_range(0, 1));
        in_data[i]  = data_t'($urandom);
        in_mask[i]  = m[i];
        if (m[i] != 0) nw++;
        if ($countones(m[i]) > 1) multicasts++;
        for (int l = 0; l < N; l++) if (m[i][l]) begin ev[0][l] = 1; ek[0][l] = in_kind[i]; ed[0][l] = in_data[i]; end
      end
      if (nw == B) full_bw++;
      // leaf outputs now correspond to words sent LAT cycles ago
      #1;
      for (int l = 0; l < N; l++) begin
        checks++;
        if (leaf_valid[l] != ev[LAT][l] || (ev[LAT][l] && (leaf_data[l] != ed[LAT][l] || leaf_kind[l] != ek[LAT][l]))) begin
          failures++;
          if (failures < 10) $display("t=%0d leaf %0d: got v=%0b d=%0d want v=%0b d=%0d", t, l,
                                      leaf_valid[l], leaf_data[l], ev[LAT][l], ed[LAT][l]);
        end
      end
    end
    checks++;
    if (multicasts == 0 || full_bw == 0) begin failures++; $display("multicast or full bandwidth not exercised"); end
    $display("multicasts=%0d full_bandwidth_cycles=%0d", multicasts, full_bw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
