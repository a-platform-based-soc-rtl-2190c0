// sam_table_ram: one programmable pattern table of the SAM coprocessor.
//
// Every table the matching units read (bitmap AC state table, next-state
// table, IDX tables, root next table, pre-hashing bit vectors) is one of
// these. The host writes entries through the single write port while the
// engines read through NRD independent read ports, one per engine, so a
// double-engine build shares one copy of every table. Keeping the tables
// in programmable memory is what lets the pattern set be replaced without
// stopping the hardware, as the document stresses; the exact port
// arrangement is this design's own.
//
// Timing: reads are synchronous. The address presented in cycle t is
// returned in rdata during cycle t+1 (one block-RAM access). A write and a
// read of the same address in the same cycle return the old contents.
// The memory is not reset; software fills it before enabling matching.
module sam_table_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NRD   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  // host programming port
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic [WIDTH-1:0]          wdata,
  // read ports
  input  logic [NRD-1:0][AW-1:0]    raddr,
  output logic [NRD-1:0][WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) begin
      rdata[p] <= mem[raddr[p]];
    end
  end

endmodule
