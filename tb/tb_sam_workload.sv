// tb_sam_workload: the double-engine coprocessor at its default size with a
// pattern set of virus-signature scale.
//
// The reference model compiles 1000 random binary signatures (2 to 11
// bytes, byte values 1..255), about 6,000 states, close to the 8192-state
// capacity of the default tables and to the size of a 1000-signature
// anti-virus set. Every table is written over the host bus. Engine 0 then
// scans text-like data (printable characters, mostly letters and spaces),
// engine 1 executable-like data (many zero bytes, otherwise any value);
// signatures are planted in both at random. Both engines run at once,
// each through its two alternating text buffers.
//
// Checks: the state count stays within the tables; each engine's match
// list equals the golden matcher's; the share of bytes that needed an
// exact bitmap AC step is printed, and must be small, since avoiding
// those steps is the point of root indexing and pre-hashing.
`timescale 1ns/1ps
module tb_sam_workload;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  localparam int NE   = 2;
  localparam int BUF  = 2048;
  localparam int LAW  = $clog2(BUF);
  localparam int NPAT = 1000;
  localparam int TEXT = 24000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          bus_sel, bus_we;
  logic [23:0]   bus_addr;
  logic [31:0]   bus_wdata, bus_rdata;
  logic [NE-1:0] irq;
  fsm_state_t [NE-1:0] fsm_state;

  sam_top dut (.clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq, .fsm_state);

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(logic [23:0] a, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  function automatic logic [23:0] ea(int e, int r);
    return 24'((e << 20) | r);
  endfunction

  ev_t got[NE][$], want[NE][$];

  task automatic drain(int e);
    logic [31:0] st, pos, id;
    forever begin
      bus_read(ea(e, 1), st);
      check(!st[3], "match FIFO overflow");
      if (!st[2]) break;
      bus_read(ea(e, 4), pos);
      bus_read(ea(e, 5), id);
      bus_write(ea(e, 6), 0);
      got[e].push_back('{pos: int'(pos), id: int'(id)});
    end
  endtask

  int nxt_buf[NE];
  task automatic try_send(int e, byte unsigned chunk[$], output bit sent);
    logic [31:0] st;
    drain(0); drain(1);
    bus_read(ea(e, 1), st);
    sent = 0;
    if (st[nxt_buf[e]]) return;
    for (int w = 0; w < (chunk.size() + 3) / 4; w++) begin
      logic [31:0] d;
      d = '0;
      for (int b = 0; b < 4; b++) if (4*w + b < chunk.size()) d[8*b +: 8] = chunk[4*w + b];
      bus_write(ea(e, ((nxt_buf[e] + 1) << (LAW - 2)) | w), d);
      if (w % 8 == 7) begin drain(0); drain(1); end
    end
    bus_write(ea(e, 2 + nxt_buf[e]), 32'(chunk.size()));
    nxt_buf[e] ^= 1;
    sent = 1;
  endtask

  task automatic wait_idle();
    logic [31:0] st0, st1;
    do begin
      drain(0); drain(1);
      bus_read(ea(0, 1), st0);
      bus_read(ea(1, 1), st1);
    end while (st0[1:0] != 0 || st0[8] || st1[1:0] != 0 || st1[8]);
    drain(0); drain(1);
  endtask

  task automatic load_tables(sam_model m);
    for (int j = 0; j < 2; j++) for (int c = 0; c < 256; c++)
      bus_write(24'((8 << 20) | (j << 8) | c), 32'(m.idx[j][c]));
    for (int a = 0; a < 65536; a++) bus_write(24'((9 << 20) | a), 32'(m.rnext[a]));
    for (int i = 0; i < m.n; i++) begin
      bus_write(24'((10 << 20) | i), m.bv[i]);
      for (int wd = 0; wd < 8; wd++) bus_write(24'((11 << 20) | (i << 4) | wd), m.bitmap[i][32*wd +: 32]);
      bus_write(24'((11 << 20) | (i << 4) | 8), {16'(m.base[i]), 16'(m.fail[i])});
    end
    for (int i = 0; i < m.nnx; i++) bus_write(24'((12 << 20) | i), 32'(m.nx[i]));
  endtask

  string sigs[$];

  function automatic byte unsigned text_byte(int kind);
    if (kind == 0) begin
      int r;
      r = int'($urandom_range(99));
      if (r < 15) return 8'h20;
      if (r < 85) return byte'(8'h61 + $urandom_range(25));
      if (r < 95) return byte'(8'h41 + $urandom_range(25));
      return byte'(8'h21 + $urandom_range(30));
    end
    if ($urandom_range(9) < 4) return 8'h00;
    return byte'($urandom);
  endfunction

  function automatic void gen_text(ref byte unsigned t[$], input string sg[$], input int n, input int kind);
    while (t.size() < n) begin
      if ($urandom_range(199) == 0) begin
        string p;
        p = sg[$urandom_range(sg.size() - 1)];
        for (int i = 0; i < p.len(); i++) t.push_back(byte'(p[i]));
      end else begin
        t.push_back(text_byte(kind));
      end
    end
  endfunction

  sam_model m;

  initial begin
    byte unsigned text[NE][$], chunk[$];
    int s[NE], tlen[NE];
    bit sent;
    int e;
    logic [31:0] r_root, r_ac, r_hit, r_non, cnt;

    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    nxt_buf = '{0, 0};
    m = new();
    repeat (NPAT) begin
      string p;
      int len;
      p = "";
      len = 2 + int'($urandom_range(9));
      for (int i = 0; i < len; i++) p = {p, string'(byte'($urandom_range(1, 255)))};
      sigs.push_back(p);
      m.add(p);
    end
    m.build();
    $display("%0d signatures, %0d states, %0d next-state entries", NPAT, m.n, m.nnx);
    check(m.n <= (1 << 13) && m.nnx <= (1 << 13), "pattern set fits the default tables");
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_tables(m);
    for (int k = 0; k < NE; k++) begin
      bus_write(ea(k, 9), 32'h1);
      bus_write(ea(k, 0), 32'h3);
      s[k] = 0;
      gen_text(text[k], sigs, TEXT, k);
      m.run(text[k], 0, s[k], want[k]);
      tlen[k] = text[k].size();
    end

    e = 0;
    while (text[0].size() > 0 || text[1].size() > 0) begin
      if (text[e].size() > 0) begin
        chunk.delete();
        for (int i = 0; i < BUF && i < text[e].size(); i++) chunk.push_back(text[e][i]);
        try_send(e, chunk, sent);
        if (sent) repeat (chunk.size()) void'(text[e].pop_front());
      end
      e ^= 1;
    end
    wait_idle();

    for (int k = 0; k < NE; k++) begin
      check(got[k].size() == want[k].size(),
            $sformatf("engine %0d: %0d matches reported, %0d expected", k, got[k].size(), want[k].size()));
      for (int i = 0; i < want[k].size() && i < got[k].size(); i++)
        check(got[k][i].pos == want[k][i].pos && got[k][i].id == want[k][i].id,
              $sformatf("engine %0d match %0d: (%0d,%0d) expected (%0d,%0d)", k, i,
                        got[k][i].pos, got[k][i].id, want[k][i].pos, want[k][i].id));
      bus_read(ea(k, 8), cnt);
      bus_read(ea(k, 11), r_root);
      bus_read(ea(k, 12), r_ac);
      bus_read(ea(k, 13), r_hit);
      bus_read(ea(k, 14), r_non);
      check(cnt == 32'(tlen[k]), $sformatf("engine %0d consumed %0d bytes of %0d", k, cnt, tlen[k]));
      $display("engine %0d (%s): %0d bytes, %0d matches, root lookups %0d (%0d bytes), AC steps %0d, pre-hash hits %0d, non-hits %0d",
               k, k == 0 ? "text" : "executable", cnt, got[k].size(), r_root, 2 * r_root, r_ac, r_hit, r_non);
      $display("          bytes through root indexing: %0d%%", 200 * r_root / cnt);
      check(r_ac * 4 < cnt, $sformatf("engine %0d: exact AC steps (%0d) are a small share of %0d bytes", k, r_ac, cnt));
      check(got[k].size() > 50, "planted signatures were found");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
