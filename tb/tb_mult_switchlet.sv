// tb_mult_switchlet: self-check of two neighbouring multiplier switchlets.
// Switchlet 0 takes its input from switchlet 1's forwarding link when fwd_sel
// is set. Random weights/inputs are loaded through Data_In; after each fire the
// products (one cycle later) must equal weight * input, the forwarded operand
// must shift over, and an inactive switchlet must not present a product.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_mult_switchlet;
  import maeri_pkg::*;
  logic clk = 0, rst_n = 0;
  logic active [2], fwd_sel [2], in_valid [2], fire, out_valid [2];
  pkt_kind_e in_kind [2];
  data_t in_data [2], fwd [3];
  acc_t out_prod [2];
  int checks = 0, failures = 0, forwards = 0;

  for (genvar i = 0; i < 2; i++) begin : g
    mult_switchlet dut (.clk, .rst_n, .active(active[i]), .fwd_sel(fwd_sel[i]),
      .in_valid(in_valid[i]), .in_kind(in_kind[i]), .in_data(in_data[i]),
      .fwd_in(fwd[i+1]), .fwd_out(fwd[i]), .fire, .out_valid(out_valid[i]), .out_prod(out_prod[i]));
  end
  assign fwd[2] = '0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int i, pkt_kind_e k, data_t d);
    @(negedge clk);
    in_valid[i] = 1; in_kind[i] = k; in_data[i] = d;
    @(negedge clk);
    in_valid[i] = 0;
  endtask

  initial begin
    data_t w [2], x [2];
    fire = 0;
    for (int i = 0; i < 2; i++) begin active[i] = 1; fwd_sel[i] = 0; in_valid[i] = 0; in_kind[i] = PKT_WEIGHT; in_data[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic fw;
      fw = (t % 3 == 2);
      for (int i = 0; i < 2; i++) begin
        w[i] = data_t'($urandom); send(i, PKT_WEIGHT, w[i]);
        if (!(fw && i == 0)) begin x[i] = data_t'($urandom); send(i, PKT_INPUT, x[i]); end
      end
      active[1] = (t % 5 != 4);
      @(negedge clk); fire = 1;
      @(negedge clk); fire = 0;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (out_valid[i] != active[i] || out_prod[i] != acc_t'(w[i]) * acc_t'(x[i])) begin
          failures++;
          $display("t=%0d sw%0d: got v=%0b p=%0d want v=%0b p=%0d", t, i, out_valid[i], out_prod[i], active[i],
                   acc_t'(w[i]) * acc_t'(x[i]));
        end
      end
      // the next round of sw0 may take sw1's input over the forwarding link
      fwd_sel[0] = ((t + 1) % 3 == 2);
      if (fwd_sel[0]) begin
        @(negedge clk); fire = 1; @(negedge clk); fire = 0;   // this fire shifts x[1] into sw0
        x[0] = x[1];
        forwards++;
        checks++;
        if (fwd[0] != x[1]) begin failures++; $display("forwarding link did not shift"); end
        fwd_sel[0] = 0;
      end
    end
    checks++;
    if (forwards == 0) failures++;
    $display("forwards=%0d", forwards);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
