// tb_sam_top: end-to-end test of the double-engine SAM coprocessor at its
// default size.
//
// Everything goes through the host bus, as software would do it: the
// reference model compiles a random pattern set, the test writes the IDX
// tables, the root next table, the bit vectors, the state table (bitmap
// words then the committing {base, fail} word) and the next-state table,
// then streams a different random text with planted patterns through each
// engine, alternating between the engines and between each engine's two
// text buffers, and drains both match FIFOs. Each engine's match list must
// equal the golden matcher's list for its text.
//
// It counts how often every mechanism of the design happened and fails if
// one never did: root-index steps, pre-hash hits and non-hits, bitmap AC
// steps that find a transition, failure steps to a non-root state, failure
// to the root resolved by root indexing, the one-byte tail handled by the
// AC unit, buffer hand-over, and interrupts. It also rewrites one pattern
// table entry while the engines are idle and checks that matching follows
// the new contents.
`timescale 1ns/1ps
module tb_sam_top;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  localparam int NE  = 2;
  localparam int BUF = 2048;
  localparam int LAW = $clog2(BUF);

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
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters (observed on the FSMs) ----
  int n_root, n_hit, n_nonhit, n_ac_found, n_fail_step, n_fail_root, n_tail, n_bufdone, n_irq;
  for (genvar e = 0; e < NE; e++) begin : g_mon
    always @(negedge clk) if (rst_n) begin
      if (dut.g_eng[e].u_engine.u_fsm.ev_root) n_root++;
      if (dut.g_eng[e].u_engine.u_fsm.ev_hit) n_hit++;
      if (dut.g_eng[e].u_engine.u_fsm.ev_nonhit) n_nonhit++;
      if (dut.g_eng[e].u_engine.u_fsm.ev_ac && dut.g_eng[e].u_engine.u_fsm.ac_found) n_ac_found++;
      if (dut.g_eng[e].u_engine.u_fsm.restart_d) n_fail_step++;
      if (fsm_state[e] == S_AC_MATCH && dut.g_eng[e].u_engine.u_fsm.state_d == S_SET_ROOT) n_fail_root++;
      if (fsm_state[e] == S_MATCH && dut.g_eng[e].u_engine.u_fsm.first_q &&
          !dut.g_eng[e].u_engine.win_full) n_tail++;
      if (dut.g_eng[e].u_engine.buf_done) n_bufdone++;
      if (irq[e]) n_irq++;
    end
  end

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
  // try to hand a chunk to engine e; returns 0 if both its buffers are busy
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
      drain(0); drain(1);
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

  function automatic void gen_text(ref byte unsigned t[$], input int n);
    repeat (n) begin
      if ($urandom_range(9) == 0) begin
        string p;
        p = rand_pattern(2, 8, 6);
        for (int i = 0; i < p.len(); i++) t.push_back(p[i]);
      end else if ($urandom_range(7) == 0) begin
        // same low bits as pattern bytes: pre-hash false positives
        t.push_back(byte'(8'h51 + $urandom_range(7)));
      end else begin
        t.push_back(byte'(8'h41 + $urandom_range(7)));
      end
    end
  endfunction

  sam_model m;

  initial begin
    byte unsigned text[NE][$], chunk[$];
    int s[NE];
    bit sent;
    int e;

    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    n_root = 0; n_hit = 0; n_nonhit = 0; n_ac_found = 0; n_fail_step = 0;
    n_fail_root = 0; n_tail = 0; n_bufdone = 0; n_irq = 0;
    nxt_buf = '{0, 0};
    m = new();
    repeat (60) m.add(rand_pattern(2, 8, 6));
    m.add("ABCDEF");
    m.add("BCDX");
    m.add("QRS");                         // R: a second byte that is no first byte
    m.build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_tables(m);
    for (int k = 0; k < NE; k++) begin
      bus_write(ea(k, 9), 32'h3);          // interrupts on
      bus_write(ea(k, 0), 32'h3);          // clear state, enable
      s[k] = 0;
    end

    for (int k = 0; k < NE; k++) begin
      gen_text(text[k], 4000 + 1000 * k);
      text[k].push_back("A");              // odd tails are likely
      m.run(text[k], 0, s[k], want[k]);
    end
    e = 0;
    while (text[0].size() > 0 || text[1].size() > 0) begin
      if (text[e].size() > 0) begin
        int len;
        len = 1 + int'($urandom_range(BUF - 1));
        if ($urandom_range(2) == 0) len = 1 + int'($urandom_range(9));
        chunk.delete();
        for (int i = 0; i < len && i < text[e].size(); i++) chunk.push_back(text[e][i]);
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
    end

    // live table update: make the root next entry of "BC" report nothing
    // from now on, then check that engine 0 follows the new table
    begin
      int na, old, st_bc;
      byte unsigned t2[$];
      logic [31:0] cur;
      na = (m.idx[0]["B"] << 8) | m.idx[1]["C"];
      old = m.rnext[na];
      bus_write(24'((9 << 20) | na), 32'h0);
      bus_write(ea(0, 0), 32'h3);          // clear state
      t2 = '{"B", "C"};
      chunk = t2;
      try_send(0, chunk, sent);
      wait_idle();
      bus_read(ea(0, 7), cur);
      check(sent && cur == 0, $sformatf("after the table update BC leads to state %0d", cur));
      bus_write(24'((9 << 20) | na), 32'(old));
      bus_write(ea(0, 0), 32'h3);
      try_send(0, chunk, sent);
      wait_idle();
      bus_read(ea(0, 7), cur);
      st_bc = m.delta(m.delta(0, "B"), "C");
      check(cur == 32'(st_bc), $sformatf("restored table: BC leads to %0d, expected %0d", cur, st_bc));
    end

    $display("mechanisms: root-index %0d, pre-hash hit %0d, non-hit %0d, AC found %0d, failure steps %0d,",
             n_root, n_hit, n_nonhit, n_ac_found, n_fail_step);
    $display("            failure to root %0d, one-byte tails %0d, buffers done %0d, irq cycles %0d, matches %0d/%0d",
             n_fail_root, n_tail, n_bufdone, n_irq, got[0].size(), got[1].size());
    check(n_root > 0, "root indexing happened");
    check(n_hit > 0, "pre-hash hit happened");
    check(n_nonhit > 0, "pre-hash non-hit happened");
    check(n_ac_found > 0, "AC step with a transition happened");
    check(n_fail_step > 0, "failure step to a non-root state happened");
    check(n_fail_root > 0, "failure to the root resolved by root indexing happened");
    check(n_tail > 0, "one-byte tail happened");
    check(n_bufdone > 4, "buffers were handed back");
    check(n_irq > 0, "interrupt was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
