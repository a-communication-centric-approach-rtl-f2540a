// tb_prefetch_buffer: self-check of the scratchpad bank with 2 write ports and
// 3 read ports. Random writes are mirrored in a reference array; every read port
// must return the reference word in the same cycle, and a same-address double
// write must keep the higher port's word.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_prefetch_buffer;
  localparam int W = 24, D = 32, NW = 2, NR = 3, AW = 5;
  logic clk = 0;
  logic we [NW]; logic [AW-1:0] waddr [NW]; logic [W-1:0] wdata [NW];
  logic [AW-1:0] raddr [NR]; logic [W-1:0] rdata [NR];
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0, collisions = 0;

  prefetch_buffer #(.WIDTH(W), .DEPTH(D), .NW(NW), .NR(NR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we[0] = 1; waddr[0] = AW'(a); wdata[0] = W'($urandom); ref_mem[a] = wdata[0];
      we[1] = 0; waddr[1] = 0; wdata[1] = 0;
      for (int r = 0; r < NR; r++) raddr[r] = 0;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom); waddr[p] = AW'($urandom); wdata[p] = W'($urandom);
      end
      if (we[0] && we[1] && waddr[0] == waddr[1]) collisions++;
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom);
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] != ref_mem[raddr[r]]) begin failures++; $display("read %0d mismatch", raddr[r]); end
      end
      for (int p = 0; p < NW; p++) if (we[p]) ref_mem[waddr[p]] = wdata[p];
    end
    // a forced collision
    @(negedge clk);
    we[0] = 1; we[1] = 1; waddr[0] = 3; waddr[1] = 3; wdata[0] = 'h111; wdata[1] = 'h222;
    @(negedge clk);
    we[0] = 0; we[1] = 0; raddr[0] = 3; #1;
    checks++;
    if (rdata[0] != 'h222) begin failures++; $display("collision: port 1 must win"); end
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
