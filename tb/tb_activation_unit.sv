// tb_activation_unit: self-check of the activation unit: with relu_en the
// output is max(0, x), without it the output equals the input.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_activation_unit;
  import maeri_pkg::*;
  logic relu_en; acc_t in_sum, out_act;
  int checks = 0, failures = 0;

  activation_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      acc_t e;
      relu_en = 1'($urandom);
      in_sum  = (t < 4) ? acc_t'(t - 2) : acc_t'($urandom);
      e = (relu_en && in_sum[ACC_W-1]) ? 0 : in_sum;
      #1;
      checks++;
      if (out_act !== e) begin failures++; $display("x=%0d relu=%0b got %0d want %0d", in_sum, relu_en, out_act, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
