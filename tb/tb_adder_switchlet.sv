// tb_adder_switchlet: random self-check of one adder switchlet. For random
// child records and configurations, the registered outputs one cycle later must
// follow the node rules: combine the left child's right partial with the right
// child's left partial, then route the result to the left lane, the right lane
// or the emit output, and pass the other partials through.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_adder_switchlet;
  import maeri_pkg::*;
  logic clk = 0, rst_n = 0;
  adder_cfg_t cfg; red_op_e op; edge_rec_t in_l, in_r, out;
  logic emit_valid; acc_t emit_sum;
  int checks = 0, failures = 0, n_emit = 0, n_max = 0;

  adder_switchlet dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edge_rec_t exp_out; logic exp_ev; acc_t s;
    cfg = '0; op = RED_ADD; in_l = '0; in_r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_l = '{l_valid: 1'($urandom), l_sum: acc_t'($urandom), r_valid: 1'($urandom), r_sum: acc_t'($urandom)};
      in_r = '{l_valid: 1'($urandom), l_sum: acc_t'($urandom), r_valid: 1'($urandom), r_sum: acc_t'($urandom)};
      op = red_op_e'($urandom_range(0, 1));
      cfg.add_en    = 1'($urandom);
      cfg.sum_left  = cfg.add_en && 1'($urandom);
      cfg.sum_right = cfg.add_en && 1'($urandom);
      cfg.emit      = cfg.add_en && !cfg.sum_left && !cfg.sum_right;
      cfg.emit_slot = 8'($urandom);
      // reference
      if (op == RED_MAX) s = (in_l.r_sum > in_r.l_sum) ? in_l.r_sum : in_r.l_sum;
      else               s = in_l.r_sum + in_r.l_sum;
      exp_out = '{l_valid: in_l.l_valid, l_sum: in_l.l_sum, r_valid: in_r.r_valid, r_sum: in_r.r_sum};
      if (cfg.sum_left)  begin exp_out.l_valid = in_l.r_valid & in_r.l_valid; exp_out.l_sum = s; end
      if (cfg.sum_right) begin exp_out.r_valid = in_l.r_valid & in_r.l_valid; exp_out.r_sum = s; end
      exp_ev = cfg.emit && in_l.r_valid && in_r.l_valid;
      if (exp_ev) n_emit++;
      if (exp_ev && op == RED_MAX) n_max++;
      @(posedge clk); #1;
      checks++;
      if (out != exp_out || emit_valid != exp_ev || (exp_ev && emit_sum != s)) begin
        failures++;
        if (failures < 10) $display("t=%0d mismatch: out=%h exp=%h ev=%0b/%0b", t, out, exp_out, emit_valid, exp_ev);
      end
    end
    checks++;
    if (n_emit == 0 || n_max == 0) failures++;
    $display("emits=%0d max_emits=%0d", n_emit, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
