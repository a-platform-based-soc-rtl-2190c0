// sam_top: double-engine SAM string matching coprocessor.
//
// NUM_ENGINES SAM engines (sam_engine) match independent text streams
// against one shared Aho-Corasick pattern set. The pattern tables exist
// once and give every engine its own read port, the way the document's
// double-engine build shares dual-port block RAM between two engines
// without using more of it. The document evaluates this two-engine
// arrangement for its headline throughput; how its coordinating FSM works
// is not described, so here the engines are simply independent bus
// slaves and software hands each engine its own text buffers.
//
// Pattern tables (sizes are defaults):
//   state table   2^NSTATE_AW x 288 bit  {base, fail, 256-bit bitmap}
//   next table    2^NX_AW     x 17 bit   {match flag, state}
//   bit vectors   2^NSTATE_AW x 32 bit   {V2, V1}
//   IDX_1, IDX_2  256 x 8 bit
//   root NEXT     2^16        x 17 bit   {match flag, state}
//
// Host bus: word addresses, bus_addr[23:20] selects a region:
//   0 .. NUM_ENGINES-1  registers and text buffers of that engine
//                       (sam_sm_ctrl), bus_addr[LADDR_W-1:0]
//   8   IDX tables      bus_addr[8] = table (0: IDX_1), [7:0] = byte, data[7:0]
//   9   root NEXT       bus_addr[15:0] = NA, data[16:0]
//   10  bit vectors     bus_addr = state, data[31:0] = {V2, V1}
//   11  state table     bus_addr = {state, word[3:0]}; words 0..7 are the
//                       bitmap (word 0 = bytes 0..31), word 8 = {base, fail}
//                       and commits the entry
//   12  next table      bus_addr = index, data[16:0]
// The tables are write-only from the bus; reads return engine registers
// one cycle after the read (zero for other regions). Writes take effect
// at the clock edge where bus_sel and bus_we are high, so tables can be
// rewritten while the engines run, as the document intends.
//
// Lint notes: bus_addr[19:17] are not decoded (no region needs them at the
// default sizes). The linter reports rst_n as both synchronous and
// asynchronous because the concurrent assertions use it in their disable
// condition; every flip-flop resets asynchronously.
module sam_top
  import sam_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 2,
  parameter int unsigned BUF_BYTES   = 2048,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned NSTATE_AW   = 13,
  parameter int unsigned NX_AW       = 13,
  localparam int unsigned LADDR_W    = $clog2(BUF_BYTES),
  localparam int unsigned NA_W       = KROOT * IDX_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   bus_sel,
  input  logic                   bus_we,
  input  logic [23:0]            bus_addr,
  input  logic [31:0]            bus_wdata,
  output logic [31:0]            bus_rdata,
  output logic [NUM_ENGINES-1:0] irq,
  output fsm_state_t [NUM_ENGINES-1:0] fsm_state
);

  localparam int unsigned NE = NUM_ENGINES;

  // ---- engine side of the tables ----
  logic [NE-1:0][KROOT-1:0][7:0]       idx_raddr;
  logic [NE-1:0][KROOT-1:0][IDX_W-1:0] idx_rdata;
  logic [KROOT-1:0][NE-1:0][7:0]       idx_raddr_t;
  logic [KROOT-1:0][NE-1:0][IDX_W-1:0] idx_rdata_t;
  logic [NE-1:0][NA_W-1:0]             rnext_raddr;
  state_t [NE-1:0]                     rnext_rdata;
  logic [NE-1:0][NSTATE_AW-1:0]        bv_raddr;
  logic [NE-1:0][BV_W-1:0]             bv_rdata;
  logic [NE-1:0][NSTATE_AW-1:0]        st_raddr;
  ac_entry_t [NE-1:0]                  st_rdata;
  logic [NE-1:0][NX_AW-1:0]            nx_raddr;
  state_t [NE-1:0]                     nx_rdata;
  logic [NE-1:0][31:0]                 eng_rdata;

  // ---- bus decode ----
  logic [3:0]          region;
  logic [3:0]          rd_region_q;
  logic                wr;
  logic [BITMAP_W-1:0] bitmap_stage_q;

  assign region = bus_addr[23:20];
  assign wr     = bus_sel && bus_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_region_q    <= '0;
      bitmap_stage_q <= '0;
    end else begin
      if (bus_sel && !bus_we) rd_region_q <= region;
      if (wr && region == 4'd11 && bus_addr[3:0] < 4'd8)
        bitmap_stage_q[32*bus_addr[2:0] +: 32] <= bus_wdata;
    end
  end

  always_comb begin
    bus_rdata = '0;
    for (int e = 0; e < NE; e++) begin
      if (rd_region_q == 4'(e)) bus_rdata = eng_rdata[e];
    end
  end

  // ---- engines ----
  for (genvar e = 0; e < NE; e++) begin : g_eng
    sam_engine #(
      .BUF_BYTES (BUF_BYTES),
      .FIFO_DEPTH(FIFO_DEPTH),
      .NSTATE_AW (NSTATE_AW),
      .NX_AW     (NX_AW)
    ) u_engine (
      .clk, .rst_n,
      .bus_sel    (bus_sel && region == 4'(e)),
      .bus_we,
      .bus_addr   (bus_addr[LADDR_W-1:0]),
      .bus_wdata,
      .bus_rdata  (eng_rdata[e]),
      .irq        (irq[e]),
      .idx_raddr  (idx_raddr[e]),
      .idx_rdata  (idx_rdata[e]),
      .rnext_raddr(rnext_raddr[e]),
      .rnext_rdata(rnext_rdata[e]),
      .bv_raddr   (bv_raddr[e]),
      .bv_rdata   (bv_rdata[e]),
      .st_raddr   (st_raddr[e]),
      .st_rdata   (st_rdata[e]),
      .nx_raddr   (nx_raddr[e]),
      .nx_rdata   (nx_rdata[e]),
      .fsm_state  (fsm_state[e])
    );
    for (genvar j = 0; j < KROOT; j++) begin : g_idx_t
      assign idx_raddr_t[j][e] = idx_raddr[e][j];
      assign idx_rdata[e][j]   = idx_rdata_t[j][e];
    end
  end

  // ---- shared pattern tables ----
  for (genvar j = 0; j < KROOT; j++) begin : g_idx
    sam_table_ram #(.WIDTH(IDX_W), .DEPTH(256), .NRD(NE)) u_idx (
      .clk,
      .we   (wr && region == 4'd8 && bus_addr[8] == 1'(j)),
      .waddr(bus_addr[7:0]),
      .wdata(bus_wdata[IDX_W-1:0]),
      .raddr(idx_raddr_t[j]),
      .rdata(idx_rdata_t[j])
    );
  end

  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(2**NA_W), .NRD(NE)) u_rnext (
    .clk,
    .we   (wr && region == 4'd9),
    .waddr(bus_addr[NA_W-1:0]),
    .wdata(bus_wdata[STATE_T_W-1:0]),
    .raddr(rnext_raddr),
    .rdata(rnext_rdata)
  );

  sam_table_ram #(.WIDTH(BV_W), .DEPTH(2**NSTATE_AW), .NRD(NE)) u_bv (
    .clk,
    .we   (wr && region == 4'd10),
    .waddr(bus_addr[NSTATE_AW-1:0]),
    .wdata(bus_wdata),
    .raddr(bv_raddr),
    .rdata(bv_rdata)
  );

  sam_table_ram #(.WIDTH(AC_ENTRY_W), .DEPTH(2**NSTATE_AW), .NRD(NE)) u_state (
    .clk,
    .we   (wr && region == 4'd11 && bus_addr[3:0] == 4'd8),
    .waddr(bus_addr[NSTATE_AW+3:4]),
    .wdata({bus_wdata, bitmap_stage_q}),
    .raddr(st_raddr),
    .rdata(st_rdata)
  );

  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(2**NX_AW), .NRD(NE)) u_next (
    .clk,
    .we   (wr && region == 4'd12),
    .waddr(bus_addr[NX_AW-1:0]),
    .wdata(bus_wdata[STATE_T_W-1:0]),
    .raddr(nx_raddr),
    .rdata(nx_rdata)
  );

endmodule
