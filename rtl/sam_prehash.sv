// sam_prehash: pre-hashing unit of the SAM engine.
//
// Before a slow bitmap AC step from a non-root state, this unit checks
// whether the next text bytes can possibly continue a pattern from the
// current state. Each state owns a 32-bit bit vector: the low 16 bits (V1)
// have a bit set for the hash of every byte that has a transition from the
// state or its failure chain, the high 16 bits (V2) for the hash of every
// such two-byte continuation. The unit hashes the first text byte with H1
// (four low bits of the byte, one-hot) and the first two bytes with H2 (two
// low bits of each byte, one-hot) and ANDs each with its vector: the result
// is a hit only if both lengths hit (the document's conditional AND, where
// a miss at length 1 already settles a non-hit). On a non-hit the engine
// may jump to the root state and use root indexing instead. The vector
// layout and hash functions follow the document; H1_LSB and H2_LSB move
// the hashed bits, which the document calls adjustable.
//
// Interface: pulse start for one cycle with cur_state, w and two_bytes
// valid. The bit vector memory is a synchronous RAM addressed by the state
// number. over rises one cycle after start and stays high, with hit and
// no_hit held, until the next start. With fewer than two text bytes left
// (two_bytes = 0) the unit cannot rule a transition out and reports a hit;
// that rule is this design's own.
//
// Lint note: only the low NSTATE_AW bits of the 16-bit state number address
// the bit vector table; the upper bits are unused when the table is
// smaller than 2^16 states.
module sam_prehash
  import sam_pkg::*;
#(
  parameter int unsigned NSTATE_AW = 13,
  parameter int unsigned H1_LSB    = 0,
  parameter int unsigned H2_LSB    = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  state_id_t            cur_state,
  input  logic [1:0][7:0]      w,          // w[0] is the first text byte
  input  logic                 two_bytes,  // w[1] is valid text
  // bit vector memory read port
  output logic [NSTATE_AW-1:0] bv_raddr,
  input  logic [BV_W-1:0]      bv_rdata,
  output logic                 over,
  output logic                 hit,
  output logic                 no_hit
);

  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_DONE} ph_phase_t;
  ph_phase_t       phase;
  logic [1:0][7:0] w_q;
  logic            two_q;
  logic            hit_q;
  logic            hit_now;
  logic [HV_W-1:0] h1_onehot, h2_onehot;
  logic            tn1, tn2;

  assign bv_raddr = cur_state[NSTATE_AW-1:0];

  always_comb begin
    h1_onehot = '0;
    h2_onehot = '0;
    h1_onehot[hash1(w_q[0], H1_LSB)] = 1'b1;
    h2_onehot[hash2(w_q[0], w_q[1], H2_LSB)] = 1'b1;
    tn1 = |(h1_onehot & bv_rdata[HV_W-1:0]);
    tn2 = |(h2_onehot & bv_rdata[BV_W-1:HV_W]);
    hit_now = !two_q || (tn1 && tn2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      w_q   <= '0;
      two_q <= 1'b0;
      hit_q <= 1'b0;
    end else if (start) begin
      phase <= PH_LOAD;
      w_q   <= w;
      two_q <= two_bytes;
    end else if (phase == PH_LOAD) begin
      phase <= PH_DONE;
      hit_q <= hit_now;
    end
  end

  assign over   = (phase != PH_IDLE) && !start;
  assign hit    = (phase == PH_LOAD) ? hit_now : hit_q;
  assign no_hit = over && !hit;

endmodule
