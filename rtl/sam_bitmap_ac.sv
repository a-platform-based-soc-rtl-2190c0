// sam_bitmap_ac: bitmap Aho-Corasick matching unit of the SAM engine.
//
// Performs one bitmap AC step: it loads the current state's entry from the
// state table (256-bit bitmap, failure state, next-state base address),
// tests the bitmap bit of the input byte and, when it is set, counts the 1s
// of the bitmap below that bit. The count is the offset of the wanted
// state in the state's list in the next-state table, which is read at
// base + offset. When the bit is clear the step reports the failure state
// instead; following the failure chain, and reaching the root, is left to
// the FSM unit. The data structure follows the document; the document
// leaves the unit's insides to earlier work, so the schedule is this
// design's own: the 1s are counted 64 bits per cycle over four cycles,
// which makes a step take the 8 clock cycles the document gives for a
// bitmap AC operation.
//
// Interface: pulse start for one cycle with cur_state and c valid. Both
// tables are external synchronous RAMs. over rises 8 cycles after start
// and stays high, with found, next and fail held, until the next start.
//   found = 1: next is the goto state of (cur_state, c), with its match flag
//   found = 0: fail is the failure state of cur_state
//
// Lint note: only the low NSTATE_AW bits of the state number and the low
// NX_AW bits of the base pointer address the tables; the upper bits are
// unused when the tables are smaller than 2^16 entries.
module sam_bitmap_ac
  import sam_pkg::*;
#(
  parameter int unsigned NSTATE_AW = 13,   // state table address width
  parameter int unsigned NX_AW     = 13,   // next-state table address width
  localparam int unsigned CHUNK    = 64,
  localparam int unsigned NCHUNK   = BITMAP_W / CHUNK
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  state_id_t            cur_state,
  input  logic [7:0]           c,
  // state table read port
  output logic [NSTATE_AW-1:0] st_raddr,
  input  ac_entry_t            st_rdata,
  // next-state table read port
  output logic [NX_AW-1:0]     nx_raddr,
  input  state_t               nx_rdata,
  output logic                 over,
  output logic                 found,
  output state_t               next,
  output state_id_t            fail
);

  localparam logic [3:0] LAST = 4'd8;   // cycles per operation

  logic [3:0]          ph;            // 0: idle, 1..LAST: step phase, LAST+1: done
  logic [7:0]          c_q;
  logic [BITMAP_W-1:0] below_q;       // bitmap bits below c
  logic                bit_q;
  state_id_t           base_q, fail_q;
  logic [8:0]          cnt_q;
  logic [NX_AW-1:0]    nx_addr_q;
  state_t              next_q;

  function automatic logic [6:0] popcount64(input logic [CHUNK-1:0] v);
    logic [6:0] n;
    n = '0;
    for (int i = 0; i < CHUNK; i++) n = n + 7'(v[i]);
    return n;
  endfunction

  assign st_raddr = cur_state[NSTATE_AW-1:0];
  assign nx_raddr = nx_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph        <= '0;
      c_q       <= '0;
      below_q   <= '0;
      bit_q     <= 1'b0;
      base_q    <= '0;
      fail_q    <= '0;
      cnt_q     <= '0;
      nx_addr_q <= '0;
      next_q    <= '0;
    end else if (start) begin
      ph  <= 4'd1;
      c_q <= c;
    end else if (ph != 4'd0 && ph <= LAST) begin
      ph <= ph + 4'd1;
      if (ph == 4'd1) begin
        // state entry arrives: keep the bits below c and the tested bit
        for (int i = 0; i < BITMAP_W; i++) below_q[i] <= st_rdata.bitmap[i] && (i < int'(c_q));
        bit_q  <= st_rdata.bitmap[c_q];
        base_q <= st_rdata.base;
        fail_q <= st_rdata.fail;
        cnt_q  <= '0;
      end else if (ph >= 4'd2 && ph < 4'(2 + NCHUNK)) begin
        cnt_q <= cnt_q + 9'(popcount64(below_q[(int'(ph) - 2) * CHUNK +: CHUNK]));
      end else if (ph == 4'(2 + NCHUNK)) begin
        nx_addr_q <= NX_AW'(base_q) + NX_AW'(cnt_q);
      end else if (ph == LAST) begin
        next_q <= nx_rdata;
      end
    end
  end

  assign over  = (ph >= LAST) && !start;
  assign found = bit_q;
  assign next  = (ph == LAST) ? nx_rdata : next_q;
  assign fail  = fail_q;

endmodule
