// tb_sam_prehash: self-checking test of the pre-hashing unit.
//
// First the worked example: for the patterns TEST, THE and HE, the bit
// vector of state T must hold bits 5 (E) and 8 (H) in the length-1 vector
// and bits 7 (ES) and 1 (HE) in the length-2 vector. Then random states of
// a random pattern set are tested with random byte pairs; the expected hit
// is computed here from the bit vector with the two hash functions, and a
// non-hit must never hide a transition of the reference automaton. over
// must rise one cycle after start; with a one-byte window the unit must
// report a hit.
`timescale 1ns/1ps
module tb_sam_prehash;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int nonhits = 0, hits = 0;

  logic            start, two_bytes;
  state_id_t       cur_state;
  logic [1:0][7:0] w;
  logic [12:0]     bv_raddr;
  logic [31:0]     bv_rdata;
  logic            over, hit, no_hit;
  logic            we;
  logic [12:0]     waddr;
  logic [31:0]     wdata;

  sam_prehash dut (.clk, .rst_n, .start, .cur_state, .w, .two_bytes,
                   .bv_raddr, .bv_rdata, .over, .hit, .no_hit);
  sam_table_ram #(.WIDTH(32), .DEPTH(8192), .NRD(1)) u_bv (
    .clk, .we, .waddr, .wdata, .raddr(bv_raddr), .rdata(bv_rdata));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(sam_model m);
    for (int s = 0; s < m.n; s++) begin
      @(negedge clk);
      we = 1; waddr = 13'(s); wdata = m.bv[s];
    end
    @(negedge clk);
    we = 0;
  endtask

  task automatic probe(sam_model m, int s, byte unsigned c1, byte unsigned c2, bit two);
    int  lat;
    bit  exp_hit;
    bit [31:0] v = m.bv[s];
    exp_hit = !two || (v[c1 % 16] && v[16 + (c1 % 4) * 4 + (c2 % 4)]);
    @(negedge clk);
    cur_state = state_id_t'(s); w = {c2, c1}; two_bytes = two; start = 1;
    @(negedge clk);
    start = 0; w = '0; cur_state = '0;
    #1;
    lat = 1;
    while (!over && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 1, $sformatf("latency %0d", lat));
    check(hit == exp_hit && no_hit == !exp_hit,
          $sformatf("state %0d %02h %02h: hit %0d expected %0d", s, c1, c2, hit, exp_hit));
    // a non-hit must be safe: the state after two bytes equals the state
    // reached from the root, and no pattern ends after the first byte
    if (two && !hit) begin
      int s1 = m.delta(s, c1);
      check(m.delta(s1, c2) == m.delta(m.delta(0, c1), c2) && !(m.out[s1] && m.depth[s1] > 1),
            $sformatf("unsafe non-hit at state %0d", s));
      nonhits++;
    end else if (two) hits++;
  endtask

  sam_model m;

  initial begin
    start = 0; two_bytes = 0; cur_state = '0; w = '0; we = 0; waddr = '0; wdata = '0;
    m = new();
    m.add("TEST"); m.add("THE"); m.add("HE");
    m.build();
    check(m.bv[1][15:0] == 16'h0120 && m.bv[1][31:16] == 16'h0082, "bit vector of state T");
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(m);
    probe(m, 1, "E", "S", 1);   // hit
    check(hit, "T + ES hits");
    probe(m, 1, "E", "X", 1);   // length 2 misses
    check(!hit, "T + EX misses");
    probe(m, 1, "A", "S", 1);   // length 1 misses
    check(!hit, "T + AS misses");
    probe(m, 1, "A", "S", 0);   // one byte left
    check(hit, "one-byte window reports a hit");

    m = new();
    repeat (60) m.add(rand_pattern(2, 7, 12));
    m.build();
    load(m);
    repeat (600) begin
      int s;
      byte unsigned c1, c2;
      s = 1 + int'($urandom_range(m.n - 2));
      c1 = byte'(8'h41 + $urandom_range(15));
      c2 = byte'(8'h41 + $urandom_range(15));
      probe(m, s, c1, c2, 1);
    end
    check(hits > 0 && nonhits > 0, $sformatf("hits %0d non-hits %0d", hits, nonhits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
