// tb_collection_unit: self-check of the collection unit with 16 slots and a
// collection bandwidth of 4. Random waves of outputs are presented whenever the
// unit is idle. Every output must be written once, in slot order, through the
// activation function, at consecutive addresses, at most 4 per cycle, and a
// wave of k outputs must keep the unit busy for ceil(k/4) - 1 cycles after it.
// A second pass with accumulate set (the folding mode) must combine each new
// output with the word already at its address (add or max), then apply ReLU.
//
// Expected values come from a reference model written in this testbench from
// the behaviour the design documents; stimulus, seeds and scenario choices are
// the testbench's own.
module tb_collection_unit;
  import maeri_pkg::*;
  localparam int N = 16, R = 4, AW = 10;
  logic clk = 0, rst_n = 0, clear, relu_en, accumulate, in_wave, in_valid [N], busy;
  red_op_e op;
  logic [AW-1:0] old_addr [R];
  acc_t old_data [R];
  acc_t in_data [N];
  logic wr_en [R]; logic [AW-1:0] wr_addr [R]; acc_t wr_data [R];
  logic [AW-1:0] wr_ptr;
  acc_t expq [$];
  acc_t mem [1 << AW];
  int addr_base = 0;
  int checks = 0, failures = 0, written = 0, multi_cycle = 0, busy_cycles = 0, exp_busy = 0;

  collection_unit #(.N(N), .RED_BW(R), .ADDR_W(AW)) dut (.*);
  for (genvar o = 0; o < R; o++) begin : g_rd
    assign old_data[o] = mem[old_addr[o]];
  end
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture writes
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    if (busy) busy_cycles++;
    for (int o = 0; o < R; o++) if (wr_en[o]) begin
      n++;
      mem[wr_addr[o]] = wr_data[o];
      checks++;
      if (wr_addr[o] != AW'(written - addr_base)) begin failures++; $display("write address %0d, want %0d", wr_addr[o], written); end
      written++;
    end
  end

  initial begin
    clear = 0; relu_en = 0; accumulate = 0; op = RED_ADD; in_wave = 0;
    for (int a = 0; a < (1 << AW); a++) mem[a] = 0;
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_data[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 80; t++) begin
      int k;
      k = 0;
      while (busy) @(negedge clk);
      relu_en = (t % 2 == 1);
      in_wave = 1;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(0, 2) != 0);
        in_data[i]  = acc_t'($signed($urandom_range(0, 200)) - 100);
        if (in_valid[i]) begin
          k++;
          expq.push_back((relu_en && in_data[i] < 0) ? 0 : in_data[i]);
        end
      end
      if (k > R) multi_cycle++;
      exp_busy += (k + R - 1) / R - ((k > 0) ? 1 : 0);
      @(negedge clk);
      in_wave = 0;
      for (int i = 0; i < N; i++) in_valid[i] = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (written != expq.size() || wr_ptr != AW'(written)) begin
      failures++; $display("wrote %0d outputs, expected %0d (ptr %0d)", written, expq.size(), wr_ptr);
    end
    for (int j = 0; j < expq.size() && j < written; j++) begin
      checks++;
      if (mem[j] != expq[j]) begin failures++; if (failures < 10) $display("out %0d = %0d want %0d", j, mem[j], expq[j]); end
    end
    checks++;
    if (busy_cycles != exp_busy) begin failures++; $display("busy %0d cycles, expected %0d", busy_cycles, exp_busy); end
    // second pass: accumulate onto the first pass's outputs
    begin
      acc_t first [$];
      int base;
      for (int j = 0; j < 400; j++) first.push_back(mem[j]);
      @(negedge clk); clear = 1; addr_base = written; @(negedge clk); clear = 0;
      accumulate = 1;
      base = written;
      expq.delete();
      for (int t = 0; t < 25; t++) begin
        while (busy) @(negedge clk);
        @(negedge clk);
        relu_en = (t % 2 == 1);
        op = red_op_e'(t % 3 == 0);
        in_wave = 1;
        for (int i = 0; i < N; i++) begin
          acc_t c;
          in_valid[i] = ($urandom_range(0, 2) != 0);
          in_data[i]  = acc_t'($signed($urandom_range(0, 200)) - 100);
          if (in_valid[i]) begin
            c = first[expq.size()];
            c = (op == RED_MAX) ? ((in_data[i] > c) ? in_data[i] : c) : c + in_data[i];
            expq.push_back((relu_en && c < 0) ? 0 : c);
          end
        end
        @(negedge clk);
        in_wave = 0;
        for (int i = 0; i < N; i++) in_valid[i] = 0;
      end
      repeat (10) @(negedge clk);
      for (int j = 0; j < expq.size(); j++) begin
        checks++;
        if (mem[j] != expq[j]) begin failures++; if (failures < 10) $display("accumulated out %0d = %0d want %0d", j, mem[j], expq[j]); end
      end
      written = base;
    end
    checks++;
    if (multi_cycle == 0) failures++;
    $display("outputs=%0d waves needing several cycles=%0d busy cycles=%0d", written, multi_cycle, busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
