// tb_simple_switchlet: random self-check of one distribution switchlet with a
// fat input link (4 leaves below, 2 lanes in, 2 lanes per child). Each cycle
// every leaf is the target of at most one word; the expected child lanes are the
// words whose mask touches that child, packed in input-lane order, one cycle
// later, with the mask cut to the child's half.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_simple_switchlet;
  import maeri_pkg::*;
  localparam int L = 4, WIN = 2, WOUT = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid [WIN]; pkt_kind_e in_kind [WIN]; data_t in_data [WIN]; logic [L-1:0] in_mask [WIN];
  logic l_valid [WOUT]; pkt_kind_e l_kind [WOUT]; data_t l_data [WOUT]; logic [L/2-1:0] l_mask [WOUT];
  logic r_valid [WOUT]; pkt_kind_e r_kind [WOUT]; data_t r_data [WOUT]; logic [L/2-1:0] r_mask [WOUT];
  int checks = 0, failures = 0, multicasts = 0;

  simple_switchlet #(.LEAVES(L), .WIN(WIN), .WOUT(WOUT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_side(string s, logic [L/2-1:0] half [WIN], logic v [WOUT], pkt_kind_e k [WOUT],
                            data_t d [WOUT], logic [L/2-1:0] m [WOUT],
                            logic iv [WIN], pkt_kind_e ik [WIN], data_t id [WIN]);
    int o = 0;
    for (int i = 0; i < WIN; i++)
      if (iv[i] && half[i] != 0) begin
        checks++;
        if (!(v[o] && k[o] == ik[i] && d[o] == id[i] && m[o] == half[i])) begin
          failures++;
          $display("%s lane %0d: got v=%0b d=%0d m=%b, want d=%0d m=%b", s, o, v[o], d[o], m[o], id[i], half[i]);
        end
        o++;
      end
    for (; o < WOUT; o++) begin
      checks++;
      if (v[o]) begin failures++; $display("%s lane %0d unexpectedly valid", s, o); end
    end
  endtask

  initial begin
    logic iv [WIN]; pkt_kind_e ik [WIN]; data_t id [WIN]; logic [L-1:0] im [WIN];
    logic [L/2-1:0] lh [WIN], rh [WIN];
    for (int i = 0; i < WIN; i++) begin in_valid[i] = 0; in_kind[i] = PKT_WEIGHT; in_data[i] = 0; in_mask[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      // each leaf: owned by lane 0, lane 1 or nobody
      for (int i = 0; i < WIN; i++) im[i] = '0;
      for (int lf = 0; lf < L; lf++) begin
        int sel;
        sel = $urandom_range(0, 2);
        if (sel < WIN) im[sel][lf] = 1'b1;
      end
      for (int i = 0; i < WIN; i++) begin
        iv[i] = (im[i] != 0) && ($urandom_range(0, 7) != 0);
        ik[i] = pkt_kind_e'($urandom_range(0, 1));
        id[i] = data_t'($urandom);
        lh[i] = im[i][L/2-1:0];
        rh[i] = im[i][L-1:L/2];
        if (iv[i] && lh[i] != 0 && rh[i] != 0) multicasts++;
      end
      @(negedge clk);
      in_valid = iv; in_kind = ik; in_data = id; in_mask = im;
      @(posedge clk); #1;
      check_side("left", lh, l_valid, l_kind, l_data, l_mask, iv, ik, id);
      check_side("right", rh, r_valid, r_kind, r_data, r_mask, iv, ik, id);
    end
    checks++;
    if (multicasts == 0) begin failures++; $display("no multicast exercised"); end
    $display("multicasts=%0d", multicasts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
