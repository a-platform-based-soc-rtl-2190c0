// sam_root_index: root-indexing unit of the SAM engine.
//
// From the root state the unit consumes K text bytes in one lookup. Byte j
// of the window addresses index table IDX_j, which returns a small partial
// address (0 for a byte that no pattern has within the first j positions,
// otherwise the byte's rank among those bytes). The K partial addresses,
// IDX_1 leftmost, are concatenated into the address NA of the root next
// table NEXT, whose entry is the automaton state reached from the root
// after the K bytes. Table contents are built by software, as the document
// describes; this unit only performs the lookup of the document's
// root-index function.
//
// Interface: pulse start for one cycle with the window z[0..K-1] valid in
// that cycle. The IDX tables and NEXT are external synchronous RAMs
// (sam_table_ram). over rises two cycles after start, as in the document
// ("2 clock cycles to index a mapping state"), and stays high with result
// held until the next start. z needs to be valid only in the start cycle.
module sam_root_index
  import sam_pkg::*;
#(
  parameter int unsigned K     = sam_pkg::KROOT,
  parameter int unsigned IW    = sam_pkg::IDX_W,
  localparam int unsigned NA_W = K * IW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [K-1:0][7:0]       z,           // z[0] is the first text byte
  // IDX table read ports (one table per window byte)
  output logic [K-1:0][7:0]       idx_raddr,
  input  logic [K-1:0][IW-1:0]    idx_rdata,
  // root next table read port
  output logic [NA_W-1:0]         next_raddr,
  input  state_t                  next_rdata,
  output logic                    over,
  output state_t                  result
);

  typedef enum logic [1:0] {RI_IDLE, RI_IDX, RI_NEXT, RI_DONE} ri_phase_t;
  ri_phase_t phase;
  state_t    res_q;

  assign idx_raddr = z;

  // NA = IDX_1[z1] o IDX_2[z2] o ... (concatenation, first byte leftmost)
  always_comb begin
    next_raddr = '0;
    for (int j = 0; j < K; j++) begin
      next_raddr[NA_W-1-j*IW -: IW] = idx_rdata[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= RI_IDLE;
      res_q <= '0;
    end else if (start) begin
      phase <= RI_IDX;
    end else begin
      unique case (phase)
        RI_IDX:  phase <= RI_NEXT;
        RI_NEXT: begin
          phase <= RI_DONE;
          res_q <= next_rdata;
        end
        default: ;
      endcase
    end
  end

  assign over   = ((phase == RI_NEXT) || (phase == RI_DONE)) && !start;
  assign result = (phase == RI_NEXT) ? next_rdata : res_q;

endmodule
