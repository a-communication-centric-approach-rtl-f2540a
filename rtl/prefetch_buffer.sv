// prefetch_buffer: an SRAM-style scratchpad bank of the MAERI global (prefetch)
// buffer, used for the weight, input and output buffers.
//
// DEPTH words of WIDTH bits, NW write ports and NR read ports. Writes are
// synchronous; when two ports write one address, the higher-numbered port wins.
// Reads are asynchronous (the word at rd_addr is visible in the same cycle), so
// the accelerator controller can look at the words it is about to send before
// committing them. The buffer's size and port counts are not given by the
// architecture; they are parameters here.
//
// From the document: prefetch buffers for inputs, weights and outputs. This
// design's choice: depth, port counts, asynchronous reads and the write-clash
// rule.
module prefetch_buffer #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NW    = 1,
  parameter int unsigned NR    = 1,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we    [NW],
  input  logic [AW-1:0]    waddr [NW],
  input  logic [WIDTH-1:0] wdata [NW],
  input  logic [AW-1:0]    raddr [NR],
  output logic [WIDTH-1:0] rdata [NR]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NW; p++)
      if (we[p]) mem[waddr[p]] <= wdata[p];
  end

  for (genvar p = 0; p < NR; p++) begin : g_rd
    assign rdata[p] = mem[raddr[p]];
  end
endmodule
