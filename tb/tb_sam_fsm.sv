// tb_sam_fsm: self-checking test of the FSM unit.
//
// The SM controller and the three matching units are replaced by small
// behavioural models with the same handshakes and latencies as the real
// blocks: root indexing raises over 2 cycles after its start and the
// bitmap AC unit 8 cycles after its start, pre-hashing 1 cycle after; all
// hold over until the next start. Their results are random: the root next
// state, the pre-hash hit (forced to a hit when fewer than two bytes are
// left, as the real unit does), and the AC outcome (goto state found, or
// a failure link to the root or to another state). The text side hands
// out buffers of random length, which the model consumes by the amount
// set_adv gives.
//
// Checks: every state change is one of the transitions of the state
// diagram or one of the design's documented additions; each set_state
// carries the value and byte count the unit results call for; MATCH goes
// to ROOT_MATCH or AC_MATCH for the right reason; a root-index iteration
// takes 4 cycles; every buffer is consumed exactly and handed back; after
// control drops the FSM comes to rest in IDLE. Every path must occur.
`timescale 1ns/1ps
module tb_sam_fsm;
  import sam_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       control, text_rdy, no_text, win_full, root_state;
  logic       fetch, buf_done, set_state;
  state_t     set_value;
  logic [1:0] set_adv;
  logic       root_index_en, root_index_over, pre_hash_en, pre_hash_over, hit;
  logic       ac_match_en, ac_match_over, ac_found;
  state_t     root_next, ac_next;
  state_id_t  failure;
  fsm_state_t state;
  logic       ev_root, ev_ac, ev_hit, ev_nonhit;

  sam_fsm dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- text side ----
  int        left;          // bytes left in the active buffer
  bit        active;
  int        rdy_wait;
  state_id_t cur;
  assign no_text    = !(active && left > 0);
  assign win_full   = active && left >= 2;
  assign root_state = (cur == ROOT);
  assign text_rdy   = !active && rdy_wait == 0;

  // like the SM controller, the text side changes on the rising edge
  always @(posedge clk) begin
    if (set_state) begin
      cur  <= set_value.id;
      left <= left - int'(set_adv);
    end
    if (fetch) begin
      active <= 1;
      left   <= 1 + int'($urandom_range(12));
    end
    if (buf_done) begin
      active   <= 0;
      rdy_wait <= int'($urandom_range(3));
    end else if (rdy_wait > 0) rdy_wait <= rdy_wait - 1;
  end

  // ---- behavioural units ----
  int ri_cnt, ph_cnt, ac_cnt;
  assign root_index_over = (ri_cnt >= 2) && !root_index_en;
  assign pre_hash_over   = (ph_cnt >= 1) && !pre_hash_en;
  assign ac_match_over   = (ac_cnt >= 8) && !ac_match_en;

  function automatic state_t rand_state();
    rand_state = '{matched: 1'($urandom), id: state_id_t'($urandom_range(1, 5000))};
    if ($urandom_range(3) == 0) rand_state.id = ROOT;
  endfunction

  always @(posedge clk) begin
    if (root_index_en) begin
      ri_cnt    <= 0;
      root_next <= rand_state();
    end else if (ri_cnt < 2) ri_cnt <= ri_cnt + 1;
    if (pre_hash_en) begin
      ph_cnt <= 0;
      hit    <= (left < 2) || ($urandom_range(2) != 0);
    end else if (ph_cnt < 1) ph_cnt <= ph_cnt + 1;
    if (ac_match_en) begin
      ac_cnt   <= 0;
      ac_found <= ($urandom_range(2) == 0);
      ac_next  <= '{matched: 1'($urandom), id: state_id_t'($urandom_range(1, 5000))};
      failure  <= ($urandom_range(1) == 0) ? ROOT : state_id_t'($urandom_range(1, 5000));
    end else if (ac_cnt < 8) ac_cnt <= ac_cnt + 1;
  end

  // ---- transition and result checks ----
  int n_root, n_ac_found, n_ac_root, n_fail_loop, n_fail_ri, n_nonhit, n_tail, n_bufs, n_waits;
  int match_t;
  fsm_state_t prev;

  function automatic bit legal(fsm_state_t a, fsm_state_t b);
    if (a == b) return 1;
    case (a)
      S_IDLE:       return b == S_FETCH;
      S_FETCH:      return b == S_MATCH || b == S_IDLE;
      S_MATCH:      return b == S_ROOT_MATCH || b == S_AC_MATCH;
      S_ROOT_MATCH: return b == S_SET_ROOT;
      S_AC_MATCH:   return b == S_SET_AC || b == S_SET_ROOT;
      S_SET_ROOT,
      S_SET_AC:     return b == S_MATCH || b == S_IDLE;
      default:      return 0;
    endcase
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (state != prev) begin
      check(legal(prev, state), $sformatf("transition %s -> %s", prev.name(), state.name()));
      if (state == S_MATCH) match_t = 0;
      if (prev == S_MATCH && state == S_ROOT_MATCH)
        check(win_full && (root_state || !hit), "MATCH -> ROOT_MATCH without reason");
      if (prev == S_MATCH && state == S_AC_MATCH) begin
        check((root_state && !win_full) || (!root_state && hit), "MATCH -> AC_MATCH without reason");
        if (root_state) n_tail++;
      end
      if (prev == S_MATCH && state == S_ROOT_MATCH && !root_state) n_nonhit++;
    end
    if (state == S_MATCH || state == S_ROOT_MATCH) match_t++;
    if (state == S_AC_MATCH && ac_match_over && !ac_found && !root_state && failure == ROOT && win_full &&
        !root_index_over) n_waits++;
    if (set_state) begin
      if (state == S_ROOT_MATCH) begin
        n_root++;
        check(set_value == root_next && set_adv == 2, "root-index result");
        check(match_t == 4, $sformatf("root-index iteration took %0d cycles", match_t));
      end else begin
        check(state == S_AC_MATCH && ac_match_over, "set_state outside a finished AC step");
        if (ac_found) begin
          n_ac_found++;
          check(set_value == ac_next && set_adv == 1, "AC goto result");
        end else if (root_state) begin
          n_ac_root++;
          check(set_value == '{matched: 1'b0, id: ROOT} && set_adv == 1, "failed step from the root");
        end else if (failure == ROOT && win_full) begin
          n_fail_ri++;
          check(root_index_over && set_value == root_next && set_adv == 2, "failure to the root uses root indexing");
        end else begin
          n_fail_loop++;
          check(set_value == '{matched: 1'b0, id: failure} && set_adv == 0, "failure step to a non-root state");
        end
      end
      check(int'(set_adv) <= left, $sformatf("consumed more than the buffer holds: %s adv %0d left %0d found %0d fail %0d cur %0d", state.name(), set_adv, left, ac_found, failure, cur));
    end
    if (fetch) begin
      check(text_rdy && state == S_FETCH, "fetch without a ready buffer");
    end
    if (buf_done) begin
      check(active && left == 0, "buffer handed back before it was used up");
      n_bufs++;
    end
    prev <= state;
  end

  initial begin
    control = 0; cur = ROOT; active = 0; left = 0; rdy_wait = 0; prev = S_IDLE;
    ri_cnt = 2; ph_cnt = 1; ac_cnt = 8; hit = 0; ac_found = 0; root_next = '0; ac_next = '0; failure = '0;
    n_root = 0; n_ac_found = 0; n_ac_root = 0; n_fail_loop = 0; n_fail_ri = 0; n_nonhit = 0;
    n_tail = 0; n_bufs = 0; n_waits = 0; match_t = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(state == S_IDLE, "idle without control");
    control = 1;
    wait (n_bufs == 300);
    control = 0;
    repeat (30) @(negedge clk);
    check(state == S_IDLE && !active, "rests in IDLE after control drops");
    $display("root %0d, AC found %0d, failed at root %0d, failure loops %0d, failure to root %0d,",
             n_root, n_ac_found, n_ac_root, n_fail_loop, n_fail_ri);
    $display("non-hit %0d, one-byte tails %0d, waits for root indexing %0d, buffers %0d",
             n_nonhit, n_tail, n_waits, n_bufs);
    check(n_root > 0 && n_ac_found > 0 && n_ac_root > 0 && n_fail_loop > 0 && n_fail_ri > 0 &&
          n_nonhit > 0 && n_tail > 0, "every path occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
