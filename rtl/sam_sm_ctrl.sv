// sam_sm_ctrl: string matching (SM) controller of a SAM engine.
//
// The host side of the engine. It holds the control registers, two text
// buffers, the current-state register of the automaton and the text
// pointer, and it reports matches and raises the interrupt. The document
// names the control registers (text buffer length, enable), the two text
// buffers, the current-state register and the bus signals (address, data,
// interrupt); the register map, the match FIFO and the statistics counters
// are this design's own.
//
// Text buffers. The host writes a buffer (four bytes per 32-bit word,
// first byte in bits 7:0) and then its length register, which marks the
// buffer full. The FSM fetches buffers alternately 0, 1, 0, ... and hands a
// buffer back (it becomes empty again, with a sticky done flag) when all of
// its bytes are consumed. The automaton state carries over from one buffer
// to the next, so a stream may be split across buffers at any byte; CTRL
// bit 1 returns the state to the root and restarts the byte count.
// Each buffer is stored as two banks of 32-bit words, even and odd word
// addresses, read synchronously: the banks are addressed with the pointer
// the next cycle will have, so the two window bytes at the current pointer
// are always ready, even when they straddle two words.
//
// Matching. The FSM sets a new current state with set_state, telling how
// many bytes (0, 1 or 2) the step consumed. When bytes were consumed and
// the new state carries the match flag, the controller queues
// {byte position of the last consumed byte, state number} in the match
// FIFO; software maps the state number to its pattern list.
//
// Register map (word addresses, bus_addr[LADDR_W-1:LADDR_W-2] = 0):
//   0 CTRL        W/R  [0] enable  [1] clear state (write 1, self-clearing)
//   1 STATUS      R    [1:0] buffer full  [2] match pending  [3] FIFO overflow
//                      [4] buffer done  [7:5] FSM state  [8] buffer active
//                      [20:16] FIFO entries
//   2 LEN0, 3 LEN1  W  byte length of buffer 0/1; marks it full (0 ignored)
//   4 MATCH_POS   R    byte position of the oldest queued match
//   5 MATCH_STATE R    state number of the oldest queued match
//   6 MATCH_POP   W    drop the oldest queued match
//   7 CUR_STATE   R    8 BYTE_COUNT R
//   9 IRQ_EN      W/R  [0] on pending match  [1] on buffer done
//  10 IRQ_CLR     W    [0] clear overflow  [1] clear buffer done
//  11..14         R    counts of root-index lookups, bitmap AC steps,
//                      pre-hash hits, pre-hash non-hits
// Region 1 and 2 are text buffer 0 and 1 (write only).
// Bus timing: a write takes effect at the clock edge where sel and we are
// high; read data appears in bus_rdata one cycle after the read.
//
// Lint note: the linter reports rst_n as both synchronous and asynchronous
// because the concurrent assertions use it in their disable condition;
// every register resets asynchronously, while the text buffers and the
// match FIFO storage are memories without reset. The top pointer bit
// (pointer = buffer size) does not address the banks.
module sam_sm_ctrl
  import sam_pkg::*;
#(
  parameter int unsigned BUF_BYTES  = 2048,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned K          = sam_pkg::KROOT,
  localparam int unsigned BAW       = $clog2(BUF_BYTES),
  localparam int unsigned LADDR_W   = BAW,           // 2 region bits + buffer word address
  localparam int unsigned FAW       = $clog2(FIFO_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus (engine-local word address)
  input  logic               bus_sel,
  input  logic               bus_we,
  input  logic [LADDR_W-1:0] bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               irq,
  // FSM unit
  output logic               control,
  output logic               text_rdy,
  output logic               no_text,
  input  logic               fetch,
  input  logic               buf_done,
  output logic [K-1:0][7:0]  win,
  output logic               win_full,    // K text bytes are left
  output logic               root_state,
  output state_id_t          cur_state,
  input  logic               set_state,
  input  state_t             set_value,
  input  logic [1:0]         set_adv,
  input  fsm_state_t         fsm_state,
  input  logic               ev_root,
  input  logic               ev_ac,
  input  logic               ev_hit,
  input  logic               ev_nonhit
);

  localparam int unsigned WAW = BAW - 2;   // word address width of a buffer

  // ---- registers ----
  logic              enable_q;
  logic [1:0]        full_q;
  logic [1:0][BAW:0] len_q;
  logic              act_q, nxt_q, active_q;
  logic [BAW:0]      ptr_q;
  state_id_t         cur_q;
  logic [31:0]       bytes_q;
  logic [1:0]        irq_en_q;
  logic              ovf_q, done_q;
  logic [31:0]       st_root_q, st_ac_q, st_hit_q, st_nonhit_q;

  // text buffers: 32-bit words split into an even-word and an odd-word
  // bank, so the two words a window can span are read in one cycle;
  // address {buffer, word / 2}
  localparam int unsigned BW = WAW - 1;
  logic [31:0] bank_e [2**(BW+1)];
  logic [31:0] bank_o [2**(BW+1)];

  // ---- match FIFO ----
  typedef struct packed {
    logic [31:0] pos;
    state_id_t   id;
  } match_ev_t;
  match_ev_t      fifo [FIFO_DEPTH];
  logic [FAW-1:0] rd_q, wr_q;
  logic [FAW:0]   cnt_q;

  // ---- bus decode ----
  logic [1:0]     region;
  logic [WAW-1:0] waddr;
  logic [3:0]     reg_a;
  logic           wr_reg, wr_buf;
  logic           clear, pop, push;

  assign region = bus_addr[LADDR_W-1 -: 2];
  assign waddr  = bus_addr[WAW-1:0];
  assign reg_a  = bus_addr[3:0];
  assign wr_reg = bus_sel && bus_we && (region == 2'd0);
  assign wr_buf = bus_sel && bus_we && (region == 2'd1 || region == 2'd2);
  assign clear  = wr_reg && (reg_a == 4'd0) && bus_wdata[1];
  assign pop    = wr_reg && (reg_a == 4'd6) && (cnt_q != 0);
  assign push   = set_state && (set_adv != 2'd0) && set_value.matched;

  // ---- text buffer writes ----
  always_ff @(posedge clk) begin
    if (wr_buf && !waddr[0]) bank_e[{region == 2'd2, waddr[WAW-1:1]}] <= bus_wdata;
    if (wr_buf &&  waddr[0]) bank_o[{region == 2'd2, waddr[WAW-1:1]}] <= bus_wdata;
  end

  // ---- text window ----
  // The banks are read with the pointer and buffer of the next cycle, so
  // the registered words hold the window at ptr_q and act_q.
  logic           start_buf, act_n, w0odd_q;
  logic [BAW:0]   ptr_n;
  logic [BW-1:0]  ae, ao;
  logic [31:0]    rd_e_q, rd_o_q;
  logic [1:0]     off_q;
  logic [63:0]    pair;

  assign start_buf = fetch && text_rdy;
  always_comb begin
    ptr_n = ptr_q;
    act_n = act_q;
    if (start_buf) begin
      ptr_n = '0;
      act_n = nxt_q;
    end
    if (set_state) ptr_n = ptr_q + (BAW+1)'(set_adv);
    // first word w0 = ptr_n / 4: the odd bank holds w0 or w0 + 1 at
    // w0 / 2, the even bank holds w0 at w0 / 2 or w0 + 1 at w0 / 2 + 1
    ao = ptr_n[BAW-1:3];
    ae = ptr_n[2] ? ao + 1'b1 : ao;
  end

  always_ff @(posedge clk) begin
    rd_e_q <= bank_e[{act_n, ae}];
    rd_o_q <= bank_o[{act_n, ao}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_q   <= '0;
      w0odd_q <= 1'b0;
    end else begin
      off_q   <= ptr_n[1:0];
      w0odd_q <= ptr_n[2];
    end
  end

  // first word in the low half; bytes past the buffer end are don't-care
  // (win_full is low there)
  assign pair = w0odd_q ? {rd_e_q, rd_o_q} : {rd_o_q, rd_e_q};
  always_comb begin
    for (int j = 0; j < K; j++) win[j] = pair[8*(int'(off_q) + j) +: 8];
  end

  if (K > 5) begin : g_k_check
    $error("sam_sm_ctrl: a window of more than 5 bytes can span three words");
  end

  assign no_text    = !active_q || (ptr_q >= len_q[act_q]);
  assign win_full   = active_q && (ptr_q + (BAW+1)'(K) <= len_q[act_q]);
  assign text_rdy   = full_q[nxt_q] && !active_q;
  assign control    = enable_q;
  assign cur_state  = cur_q;
  assign root_state = (cur_q == ROOT);

  // ---- control, buffers, current state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_q    <= 1'b0;
      full_q      <= '0;
      len_q       <= '0;
      act_q       <= 1'b0;
      nxt_q       <= 1'b0;
      active_q    <= 1'b0;
      ptr_q       <= '0;
      cur_q       <= ROOT;
      bytes_q     <= '0;
      irq_en_q    <= '0;
      ovf_q       <= 1'b0;
      done_q      <= 1'b0;
      st_root_q   <= '0;
      st_ac_q     <= '0;
      st_hit_q    <= '0;
      st_nonhit_q <= '0;
    end else begin
      if (wr_reg) begin
        unique case (reg_a)
          4'd0: enable_q <= bus_wdata[0];
          4'd2: if (bus_wdata[BAW:0] != 0) begin len_q[0] <= bus_wdata[BAW:0]; full_q[0] <= 1'b1; end
          4'd3: if (bus_wdata[BAW:0] != 0) begin len_q[1] <= bus_wdata[BAW:0]; full_q[1] <= 1'b1; end
          4'd9: irq_en_q <= bus_wdata[1:0];
          4'd10: begin
            if (bus_wdata[0]) ovf_q  <= 1'b0;
            if (bus_wdata[1]) done_q <= 1'b0;
          end
          default: ;
        endcase
      end
      if (start_buf) begin
        act_q    <= nxt_q;
        nxt_q    <= !nxt_q;
        active_q <= 1'b1;
        ptr_q    <= '0;
      end
      if (buf_done && active_q) begin
        full_q[act_q] <= 1'b0;
        active_q      <= 1'b0;
        done_q        <= 1'b1;
      end
      if (set_state) begin
        cur_q   <= set_value.id;
        ptr_q   <= ptr_q + (BAW+1)'(set_adv);
        bytes_q <= bytes_q + 32'(set_adv);
      end
      if (push && cnt_q == (FAW+1)'(FIFO_DEPTH) && !pop) ovf_q <= 1'b1;
      if (clear) begin
        cur_q   <= ROOT;
        bytes_q <= '0;
      end
      if (ev_root)   st_root_q   <= st_root_q + 1;
      if (ev_ac)     st_ac_q     <= st_ac_q + 1;
      if (ev_hit)    st_hit_q    <= st_hit_q + 1;
      if (ev_nonhit) st_nonhit_q <= st_nonhit_q + 1;
    end
  end

  // ---- match FIFO ----
  logic do_push;
  assign do_push = push && (cnt_q < (FAW+1)'(FIFO_DEPTH) || pop);

  always_ff @(posedge clk) begin
    if (do_push) fifo[wr_q] <= '{pos: bytes_q + 32'(set_adv) - 32'd1, id: set_value.id};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= wr_q + 1'b1;
      if (pop)     rd_q <= rd_q + 1'b1;
      cnt_q <= cnt_q + (FAW+1)'(do_push) - (FAW+1)'(pop);
    end
  end

  // ---- read data ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else if (bus_sel && !bus_we) begin
      bus_rdata <= '0;
      if (region == 2'd0) begin
        unique case (reg_a)
          4'd0:  bus_rdata <= {31'd0, enable_q};
          4'd1:  bus_rdata <= {11'd0, 5'(cnt_q), 7'd0, active_q, 3'(fsm_state), done_q, ovf_q,
                              (cnt_q != 0), full_q};
          4'd4:  bus_rdata <= fifo[rd_q].pos;
          4'd5:  bus_rdata <= 32'(fifo[rd_q].id);
          4'd7:  bus_rdata <= 32'(cur_q);
          4'd8:  bus_rdata <= bytes_q;
          4'd9:  bus_rdata <= {30'd0, irq_en_q};
          4'd11: bus_rdata <= st_root_q;
          4'd12: bus_rdata <= st_ac_q;
          4'd13: bus_rdata <= st_hit_q;
          4'd14: bus_rdata <= st_nonhit_q;
          default: ;
        endcase
      end
    end
  end

  assign irq = (irq_en_q[0] && cnt_q != 0) || (irq_en_q[1] && done_q);

  // a step never consumes bytes the buffer does not hold
  a_adv_in_buffer: assert property (@(posedge clk) disable iff (!rst_n)
    set_state |-> (ptr_q + (BAW+1)'(set_adv) <= len_q[act_q]));

endmodule
