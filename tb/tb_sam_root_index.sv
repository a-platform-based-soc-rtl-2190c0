// tb_sam_root_index: self-checking test of the root-indexing unit.
//
// Builds the automaton for the patterns TEST, THE and HE, loads IDX_1,
// IDX_2 and the root next table into sam_table_ram instances, then looks
// up every pair of bytes from {E, H, S, T, X} plus random byte pairs. Each
// result must equal the state the reference automaton reaches from the
// root after the two bytes, and over must rise exactly two cycles after
// start. It also checks the IDX numbering of the worked example (H = 1,
// T = 2 in IDX_1; E = 1, H = 2, T = 3 in IDX_2).
`timescale 1ns/1ps
module tb_sam_root_index;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                            start;
  logic [1:0][7:0]                 z;
  logic [1:0][7:0]                 idx_raddr;
  logic [1:0][IDX_W-1:0]           idx_rdata;
  logic [15:0]                     next_raddr;
  state_t                          next_rdata;
  logic                            over;
  state_t                          result;
  logic [1:0]                      idx_we;
  logic                            nx_we;
  logic [15:0]                     waddr;
  logic [31:0]                     wdata;

  sam_root_index dut (
    .clk, .rst_n, .start, .z, .idx_raddr, .idx_rdata,
    .next_raddr, .next_rdata, .over, .result
  );

  for (genvar j = 0; j < 2; j++) begin : g_idx
    sam_table_ram #(.WIDTH(IDX_W), .DEPTH(256), .NRD(1)) u_idx (
      .clk, .we(idx_we[j]), .waddr(waddr[7:0]), .wdata(wdata[IDX_W-1:0]),
      .raddr(idx_raddr[j]), .rdata(idx_rdata[j])
    );
  end
  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(65536), .NRD(1)) u_next (
    .clk, .we(nx_we), .waddr(waddr), .wdata(wdata[STATE_T_W-1:0]),
    .raddr(next_raddr), .rdata(next_rdata)
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic lookup(byte unsigned c1, byte unsigned c2, int expect_enc);
    int lat = 0;
    @(negedge clk);
    z = {c2, c1};
    start = 1;
    @(negedge clk);
    start = 0;
    z = '0;       // the window only has to be valid in the start cycle
    lat = 1;
    while (!over && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 2, $sformatf("latency %0d for %c%c", lat, c1, c2));
    check(int'(result) == expect_enc,
          $sformatf("%c%c -> %05h, expected %05h", c1, c2, result, expect_enc));
    repeat (2) @(negedge clk);
    check(int'(result) == expect_enc, "result held");
  endtask

  sam_model m;
  byte unsigned chars[5] = '{"E", "H", "S", "T", "X"};

  initial begin
    start = 0; z = '0; idx_we = '0; nx_we = 0; waddr = '0; wdata = '0;
    m = new();
    m.add("TEST"); m.add("THE"); m.add("HE");
    m.build();
    check(m.idx[0]["H"] == 1 && m.idx[0]["T"] == 2 && m.idx[0]["E"] == 0, "IDX_1 numbering");
    check(m.idx[1]["E"] == 1 && m.idx[1]["H"] == 2 && m.idx[1]["T"] == 3, "IDX_2 numbering");
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 2; j++) begin
      for (int c = 0; c < 256; c++) begin
        @(negedge clk);
        idx_we = '0; idx_we[j] = 1; waddr = 16'(c); wdata = 32'(m.idx[j][c]);
      end
    end
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk);
      idx_we = '0; nx_we = 1; waddr = 16'(a); wdata = 32'(m.rnext[a]);
    end
    @(negedge clk);
    nx_we = 0;
    foreach (chars[i]) foreach (chars[k])
      lookup(chars[i], chars[k], m.enc(m.delta(m.delta(0, chars[i]), chars[k])));
    repeat (40) begin
      byte unsigned c1, c2;
      c1 = byte'($urandom);
      c2 = byte'($urandom);
      lookup(c1, c2, m.enc(m.delta(m.delta(0, c1), c2)));
    end
    // the worked example: "TE" leads to state TE, "HE" to the matched state HE
    lookup("H", "E", (1 << 16) | m.delta(m.delta(0, "H"), "E"));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
