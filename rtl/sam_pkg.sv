// sam_pkg: types and constants shared by the scalable automaton matching
// (SAM) engine.
//
// A SAM engine runs an Aho-Corasick (AC) automaton over a text buffer. The
// automaton is held as a bitmap AC state table (256-bit next-character
// bitmap, failure pointer and next-state base address per state), a
// next-state table, root-indexing tables (IDX_1..IDX_k and a root next
// table NEXT) and one pre-hashing bit vector per state. The 256-bit bitmap,
// the 32-bit bit vector split into a 16-bit length-1 and a 16-bit length-2
// vector, the 8-bit IDX entries, k_root = k_prehash = 2 and the hash
// functions (four low bits of a byte for length 1, two low bits of each
// byte for length 2, each turned into a one-hot index) follow the document.
// The 16-bit state number follows the document's smaller state format; the
// match flag carried with every stored next state is this design's own
// way of reporting matches.
//
// Lint notes: the hash functions look at only some bits of their byte
// arguments, by design; the other bits are reported as unused. Constants
// that a given module does not need are reported unused when that module
// is checked on its own.
package sam_pkg;

  localparam int unsigned STATE_W  = 16;   // state number width
  localparam int unsigned BITMAP_W = 256;  // next-character bitmap per state
  localparam int unsigned HV_W     = 16;   // one bit-vector half (per suffix length)
  localparam int unsigned BV_W     = 2 * HV_W;  // pre-hashing bit vector per state
  localparam int unsigned IDX_W    = 8;    // width of one IDX table entry
  localparam int unsigned KROOT    = 2;    // bytes matched by one root-index lookup

  typedef logic [STATE_W-1:0] state_id_t;

  // A next state as stored in the root next table and the AC next-state
  // table: the state number plus a flag telling that the state has a
  // non-empty output function (some pattern ends there).
  typedef struct packed {
    logic      matched;
    state_id_t id;
  } state_t;

  localparam int unsigned STATE_T_W = $bits(state_t);

  // One bitmap AC state-table entry.
  typedef struct packed {
    state_id_t             base;    // first entry of this state's next-state list
    state_id_t             fail;    // failure state
    logic [BITMAP_W-1:0]   bitmap;  // bit c set: a goto transition on byte c exists
  } ac_entry_t;

  localparam int unsigned AC_ENTRY_W = $bits(ac_entry_t);

  localparam state_id_t ROOT = '0;

  // FSM unit states (names as in the document's state diagram).
  typedef enum logic [2:0] {
    S_IDLE       = 3'd0,
    S_FETCH      = 3'd1,
    S_MATCH      = 3'd2,
    S_ROOT_MATCH = 3'd3,
    S_SET_ROOT   = 3'd4,
    S_AC_MATCH   = 3'd5,
    S_SET_AC     = 3'd6
  } fsm_state_t;

  // Length-1 pre-hash: the four bits of the byte starting at H1_LSB, as a
  // one-hot index into the 16-bit length-1 vector.
  function automatic logic [3:0] hash1(input logic [7:0] c, input int unsigned lsb);
    logic [7:0] s;
    s = c >> lsb;
    return s[3:0];
  endfunction

  // Length-2 pre-hash: two bits of each byte starting at H2_LSB, first
  // byte in the upper half.
  function automatic logic [3:0] hash2(input logic [7:0] c1, input logic [7:0] c2,
                                       input int unsigned lsb);
    logic [7:0] s1, s2;
    s1 = c1 >> lsb;
    s2 = c2 >> lsb;
    return {s1[1:0], s2[1:0]};
  endfunction

endpackage
