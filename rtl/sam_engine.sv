// sam_engine: one scalable automaton matching (SAM) engine.
//
// An Aho-Corasick matcher built from three units that work in parallel
// under one FSM, as in the document's block diagram:
//   * root-indexing unit: from the root state, two text bytes per lookup;
//   * pre-hashing unit: from a non-root state, a quick bit-vector test that
//     tells whether the next bytes can continue a pattern at all; on a
//     non-hit the engine jumps back to the root and root-indexes;
//   * bitmap AC unit: the exact but slow (8-cycle) one-byte AC step, used
//     only after a pre-hash hit.
// The SM controller holds the host registers, the two text buffers and the
// current-state register.
//
// The pattern tables are outside the engine (sam_table_ram), so several
// engines can share them; each unit has its own read port, as the
// document's architecture gives every matching function its own memory
// interface. All table reads are synchronous, one cycle.
//
// Host interface: see sam_sm_ctrl for the register map and bus timing.
//
// Lint note: the linter reports rst_n as both synchronous and asynchronous
// because the concurrent assertions use it in their disable condition;
// every flip-flop resets asynchronously.
module sam_engine
  import sam_pkg::*;
#(
  parameter int unsigned BUF_BYTES  = 2048,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NSTATE_AW  = 13,
  parameter int unsigned NX_AW      = 13,
  parameter int unsigned H1_LSB     = 0,
  parameter int unsigned H2_LSB     = 0,
  localparam int unsigned LADDR_W   = $clog2(BUF_BYTES),
  localparam int unsigned NA_W      = KROOT * IDX_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host bus
  input  logic                        bus_sel,
  input  logic                        bus_we,
  input  logic [LADDR_W-1:0]          bus_addr,
  input  logic [31:0]                 bus_wdata,
  output logic [31:0]                 bus_rdata,
  output logic                        irq,
  // IDX tables and root next table
  output logic [KROOT-1:0][7:0]       idx_raddr,
  input  logic [KROOT-1:0][IDX_W-1:0] idx_rdata,
  output logic [NA_W-1:0]             rnext_raddr,
  input  state_t                      rnext_rdata,
  // pre-hashing bit vectors
  output logic [NSTATE_AW-1:0]        bv_raddr,
  input  logic [BV_W-1:0]             bv_rdata,
  // bitmap AC state table and next-state table
  output logic [NSTATE_AW-1:0]        st_raddr,
  input  ac_entry_t                   st_rdata,
  output logic [NX_AW-1:0]            nx_raddr,
  input  state_t                      nx_rdata,
  output fsm_state_t                  fsm_state
);

  logic                  control, text_rdy, no_text, fetch, buf_done;
  logic [KROOT-1:0][7:0] win;
  logic                  win_full, root_state;
  state_id_t             cur_state;
  logic                  set_state;
  state_t                set_value;
  logic [1:0]            set_adv;
  logic                  ri_en, ri_over;
  state_t                ri_next;
  logic                  ph_en, ph_over, ph_hit, ph_no_hit;
  logic                  ac_en, ac_over, ac_found;
  state_t                ac_next;
  state_id_t             ac_fail;
  logic                  ev_root, ev_ac, ev_hit, ev_nonhit;

  sam_sm_ctrl #(
    .BUF_BYTES (BUF_BYTES),
    .FIFO_DEPTH(FIFO_DEPTH),
    .K         (KROOT)
  ) u_ctrl (
    .clk, .rst_n,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .control, .text_rdy, .no_text, .fetch, .buf_done,
    .win, .win_full, .root_state, .cur_state,
    .set_state, .set_value, .set_adv,
    .fsm_state,
    .ev_root, .ev_ac, .ev_hit, .ev_nonhit
  );

  sam_fsm u_fsm (
    .clk, .rst_n,
    .control, .text_rdy, .no_text, .win_full, .root_state,
    .fetch, .buf_done, .set_state, .set_value, .set_adv,
    .root_index_en  (ri_en),
    .root_index_over(ri_over),
    .root_next      (ri_next),
    .pre_hash_en    (ph_en),
    .pre_hash_over  (ph_over),
    .hit            (ph_hit),
    .ac_match_en    (ac_en),
    .ac_match_over  (ac_over),
    .ac_found       (ac_found),
    .ac_next        (ac_next),
    .failure        (ac_fail),
    .state          (fsm_state),
    .ev_root, .ev_ac, .ev_hit, .ev_nonhit
  );

  sam_root_index #(
    .K (KROOT),
    .IW(IDX_W)
  ) u_root (
    .clk, .rst_n,
    .start     (ri_en),
    .z         (win),
    .idx_raddr,
    .idx_rdata,
    .next_raddr(rnext_raddr),
    .next_rdata(rnext_rdata),
    .over      (ri_over),
    .result    (ri_next)
  );

  sam_prehash #(
    .NSTATE_AW(NSTATE_AW),
    .H1_LSB   (H1_LSB),
    .H2_LSB   (H2_LSB)
  ) u_prehash (
    .clk, .rst_n,
    .start    (ph_en),
    .cur_state,
    .w        (win),
    .two_bytes(win_full),
    .bv_raddr,
    .bv_rdata,
    .over     (ph_over),
    .hit      (ph_hit),
    .no_hit   (ph_no_hit)
  );

  sam_bitmap_ac #(
    .NSTATE_AW(NSTATE_AW),
    .NX_AW    (NX_AW)
  ) u_ac (
    .clk, .rst_n,
    .start    (ac_en),
    .cur_state,
    .c        (win[0]),
    .st_raddr,
    .st_rdata,
    .nx_raddr,
    .nx_rdata,
    .over     (ac_over),
    .found    (ac_found),
    .next     (ac_next),
    .fail     (ac_fail)
  );

  // the pre-hash unit's hit and no_hit outputs are complementary once over
  a_hit_excl: assert property (@(posedge clk) disable iff (!rst_n)
    ph_over |-> (ph_hit != ph_no_hit));

endmodule
