// sam_fsm: FSM unit of a SAM engine.
//
// Runs one matching iteration after another over the fetched text buffer.
// The states and the transitions between them follow the document's state
// diagram: IDLE -> FETCH on control; FETCH -> MATCH once text is there;
// MATCH starts the root-indexing, pre-hashing and bitmap AC units together;
// MATCH -> ROOT_MATCH when the current state is the root or the pre-hash
// reports a non-hit; MATCH -> AC_MATCH on a pre-hash hit; ROOT_MATCH ->
// SET_ROOT_IDX when root indexing is over; AC_MATCH -> SET_AC when the AC
// step is over; AC_MATCH -> SET_ROOT_IDX when the failure link leads to the
// root and root indexing is over; both SET states -> MATCH while text is
// left and -> IDLE when the buffer is used up.
//
// This design's own additions, for cases the diagram leaves open:
//  * AC_MATCH loops on itself when the failure link leads to another
//    non-root state: the current state becomes the failure state and a new
//    AC step starts in the next cycle.
//  * With a single byte left in the buffer, root indexing (two bytes) is
//    impossible, so MATCH goes to AC_MATCH from the root too and the byte
//    is matched by the bitmap AC unit; the pre-hash unit reports a hit then.
//    A failed step from the root consumes the byte and stays at the root.
//  * FETCH returns to IDLE when control is withdrawn.
//  * The current state and text pointer are written on the edge that
//    enters a SET state, so the SET state sees the new pointer when it
//    decides between MATCH and IDLE.
//
// Bytes consumed: root indexing 2, an AC step that finds its goto
// transition 1, a failure step 0.
//
// Lint note: the linter reports rst_n as both synchronous and asynchronous
// because the concurrent assertions use it in their disable condition;
// every flip-flop resets asynchronously.
module sam_fsm
  import sam_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // SM controller
  input  logic       control,
  input  logic       text_rdy,
  input  logic       no_text,
  input  logic       win_full,
  input  logic       root_state,
  output logic       fetch,
  output logic       buf_done,
  output logic       set_state,
  output state_t     set_value,
  output logic [1:0] set_adv,
  // root-indexing unit
  output logic       root_index_en,
  input  logic       root_index_over,
  input  state_t     root_next,
  // pre-hashing unit
  output logic       pre_hash_en,
  input  logic       pre_hash_over,
  input  logic       hit,
  // bitmap AC unit
  output logic       ac_match_en,
  input  logic       ac_match_over,
  input  logic       ac_found,
  input  state_t     ac_next,
  input  state_id_t  failure,
  // status and statistics
  output fsm_state_t state,
  output logic       ev_root,
  output logic       ev_ac,
  output logic       ev_hit,
  output logic       ev_nonhit
);

  fsm_state_t state_d;
  logic       first_q, first_d;       // first cycle of MATCH: start the units
  logic       restart_q, restart_d;   // start a new AC step from the failure state

  always_comb begin
    state_d       = state;
    first_d       = 1'b0;
    restart_d     = 1'b0;
    fetch         = 1'b0;
    buf_done      = 1'b0;
    set_state     = 1'b0;
    set_value     = '0;
    set_adv       = 2'd0;
    root_index_en = 1'b0;
    pre_hash_en   = 1'b0;
    ac_match_en   = 1'b0;
    ev_root       = 1'b0;
    ev_ac         = 1'b0;
    ev_hit        = 1'b0;
    ev_nonhit     = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (control) state_d = S_FETCH;
      end

      S_FETCH: begin
        if (!control) begin
          state_d = S_IDLE;
        end else if (!no_text) begin
          state_d = S_MATCH;
          first_d = 1'b1;
        end else if (text_rdy) begin
          fetch = 1'b1;
        end
      end

      S_MATCH: begin
        if (first_q) begin
          root_index_en = win_full;
          pre_hash_en   = !root_state;
          ac_match_en   = 1'b1;
          if (root_state) state_d = win_full ? S_ROOT_MATCH : S_AC_MATCH;
        end else if (pre_hash_over) begin
          if (hit) begin
            state_d = S_AC_MATCH;
            ev_hit  = 1'b1;
          end else begin
            state_d   = S_ROOT_MATCH;
            ev_nonhit = 1'b1;
          end
        end
      end

      S_ROOT_MATCH: begin
        if (root_index_over) begin
          state_d   = S_SET_ROOT;
          set_state = 1'b1;
          set_value = root_next;
          set_adv   = 2'd2;
          ev_root   = 1'b1;
        end
      end

      S_AC_MATCH: begin
        if (restart_q) begin
          ac_match_en = 1'b1;
        end else if (ac_match_over) begin
          ev_ac = 1'b1;
          if (ac_found) begin
            state_d   = S_SET_AC;
            set_state = 1'b1;
            set_value = ac_next;
            set_adv   = 2'd1;
          end else if (root_state) begin
            // no transition from the root: the byte is consumed
            state_d   = S_SET_AC;
            set_state = 1'b1;
            set_value = '{matched: 1'b0, id: ROOT};
            set_adv   = 2'd1;
          end else if (failure == ROOT && win_full && root_index_over) begin
            state_d   = S_SET_ROOT;
            set_state = 1'b1;
            set_value = root_next;
            set_adv   = 2'd2;
            ev_root   = 1'b1;
          end else if (failure == ROOT && win_full) begin
            ev_ac = 1'b0;           // wait for root indexing
          end else begin
            set_state = 1'b1;
            set_value = '{matched: 1'b0, id: failure};
            set_adv   = 2'd0;
            restart_d = 1'b1;
          end
        end
      end

      S_SET_ROOT, S_SET_AC: begin
        if (no_text) begin
          state_d  = S_IDLE;
          buf_done = 1'b1;
        end else begin
          state_d = S_MATCH;
          first_d = 1'b1;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      first_q   <= 1'b0;
      restart_q <= 1'b0;
    end else begin
      state     <= state_d;
      first_q   <= first_d;
      restart_q <= restart_d;
    end
  end

  // the three units are only started together from MATCH, or AC alone
  // when it follows a failure link
  a_start_in_match: assert property (@(posedge clk) disable iff (!rst_n)
    (root_index_en || pre_hash_en) |-> (state == S_MATCH));
  a_one_set: assert property (@(posedge clk) disable iff (!rst_n)
    set_state |-> (state == S_ROOT_MATCH || state == S_AC_MATCH));

endmodule
