// tb_sam_engine: end-to-end test of one SAM engine with its pattern tables.
//
// A random pattern set is compiled by the reference model and written into
// sam_table_ram instances. The test then streams random text, with patterns
// planted in it, through the engine's two text buffers in chunks of random
// length, draining the match FIFO over the bus as it goes. The list of
// reported matches (byte position, state) must equal the golden matcher's
// list exactly, across buffer boundaries. It also checks that root
// indexing, pre-hash hits and non-hits and bitmap AC steps all occurred,
// that text without any pattern byte is consumed two bytes per root-index
// lookup in at most four cycles per lookup, that the interrupt follows the
// match FIFO and that the FIFO never overflowed.
`timescale 1ns/1ps
module tb_sam_engine;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  localparam int BUF = 256;
  localparam int LAW = $clog2(BUF);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               bus_sel, bus_we;
  logic [LAW-1:0]     bus_addr;
  logic [31:0]        bus_wdata, bus_rdata;
  logic               irq;
  logic [1:0][7:0]    idx_raddr;
  logic [1:0][7:0]    idx_rdata;
  logic [15:0]        rnext_raddr;
  state_t             rnext_rdata;
  logic [12:0]        bv_raddr, st_raddr, nx_raddr;
  logic [31:0]        bv_rdata;
  ac_entry_t          st_rdata;
  state_t             nx_rdata;
  fsm_state_t         fsm_state;

  // table programming
  logic [1:0]  idx_we;
  logic        rn_we, bv_we, st_we, nx_we;
  logic [15:0] t_addr;
  logic [31:0] t_data;
  ac_entry_t   st_wdata;

  sam_engine #(.BUF_BYTES(BUF)) dut (
    .clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .idx_raddr, .idx_rdata, .rnext_raddr, .rnext_rdata, .bv_raddr, .bv_rdata,
    .st_raddr, .st_rdata, .nx_raddr, .nx_rdata, .fsm_state);

  for (genvar j = 0; j < 2; j++) begin : g_idx
    sam_table_ram #(.WIDTH(8), .DEPTH(256)) u_idx (.clk, .we(idx_we[j]), .waddr(t_addr[7:0]),
      .wdata(t_data[7:0]), .raddr(idx_raddr[j]), .rdata(idx_rdata[j]));
  end
  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(65536)) u_rn (.clk, .we(rn_we), .waddr(t_addr),
    .wdata(t_data[STATE_T_W-1:0]), .raddr(rnext_raddr), .rdata(rnext_rdata));
  sam_table_ram #(.WIDTH(32), .DEPTH(8192)) u_bv (.clk, .we(bv_we), .waddr(t_addr[12:0]),
    .wdata(t_data), .raddr(bv_raddr), .rdata(bv_rdata));
  sam_table_ram #(.WIDTH(AC_ENTRY_W), .DEPTH(8192)) u_st (.clk, .we(st_we), .waddr(t_addr[12:0]),
    .wdata(st_wdata), .raddr(st_raddr), .rdata(st_rdata));
  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(8192)) u_nx (.clk, .we(nx_we), .waddr(t_addr[12:0]),
    .wdata(t_data[STATE_T_W-1:0]), .raddr(nx_raddr), .rdata(nx_rdata));

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

  function automatic logic [LAW-1:0] reg_addr(int r);
    return LAW'(r);
  endfunction

  task automatic bus_write(logic [LAW-1:0] a, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(logic [LAW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  ev_t got[$], want[$];

  task automatic drain();
    logic [31:0] st, pos, id;
    forever begin
      bus_read(reg_addr(1), st);
      check(!st[3], "match FIFO overflow");
      if (!st[2]) break;
      check(irq, "interrupt while a match is pending");
      bus_read(reg_addr(4), pos);
      bus_read(reg_addr(5), id);
      bus_write(reg_addr(6), 0);
      got.push_back('{pos: int'(pos), id: int'(id)});
    end
  endtask

  // fill the next free buffer with a chunk
  int nxt_buf = 0;
  task automatic send(byte unsigned chunk[$]);
    logic [31:0] st;
    do begin
      drain();
      bus_read(reg_addr(1), st);
    end while (st[nxt_buf]);
    for (int w = 0; w < (chunk.size() + 3) / 4; w++) begin
      logic [31:0] d = '0;
      for (int b = 0; b < 4; b++) if (4*w + b < chunk.size()) d[8*b +: 8] = chunk[4*w + b];
      bus_write(LAW'(((nxt_buf + 1) << (LAW - 2)) | w), d);
      if (w % 4 == 3) drain();
    end
    bus_write(reg_addr(2 + nxt_buf), 32'(chunk.size()));
    nxt_buf ^= 1;
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    do begin
      drain();
      bus_read(reg_addr(1), st);
    end while (st[1:0] != 0 || st[8]);
    drain();
  endtask

  sam_model m;

  initial begin
    byte unsigned text[$], chunk[$];
    int s = 0;
    logic [31:0] r0, r1, r2, r3, t0;
    int cyc;
    int total;

    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    idx_we = '0; rn_we = 0; bv_we = 0; st_we = 0; nx_we = 0; t_addr = '0; t_data = '0; st_wdata = '0;
    m = new();
    repeat (40) m.add(rand_pattern(2, 8, 6));
    m.add("ABCDEF");
    m.build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the tables
    for (int j = 0; j < 2; j++) for (int c = 0; c < 256; c++) begin
      @(negedge clk); idx_we = '0; idx_we[j] = 1; t_addr = 16'(c); t_data = 32'(m.idx[j][c]);
    end
    @(negedge clk); idx_we = '0;
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk); rn_we = 1; t_addr = 16'(a); t_data = 32'(m.rnext[a]);
    end
    @(negedge clk); rn_we = 0;
    for (int i = 0; i < m.n; i++) begin
      @(negedge clk); bv_we = 1; st_we = 1; t_addr = 16'(i); t_data = m.bv[i];
      st_wdata = '{base: state_id_t'(m.base[i]), fail: state_id_t'(m.fail[i]), bitmap: m.bitmap[i]};
    end
    @(negedge clk); bv_we = 0; st_we = 0;
    for (int i = 0; i < m.nnx; i++) begin
      @(negedge clk); nx_we = 1; t_addr = 16'(i); t_data = 32'(m.nx[i]);
    end
    @(negedge clk); nx_we = 0;

    bus_write(reg_addr(9), 32'h1);       // interrupt on pending match
    bus_write(reg_addr(0), 32'h3);       // clear state, enable

    // 1) text of bytes no pattern uses: root indexing only
    chunk.delete();
    repeat (200) chunk.push_back("z");
    t0 = 0;
    cyc = 0;
    send(chunk);
    fork
      begin
        @(posedge clk iff fsm_state == S_MATCH);
        while (fsm_state != S_IDLE) begin @(posedge clk); cyc++; end
      end
    join
    wait_idle();
    bus_read(reg_addr(11), r0);
    bus_read(reg_addr(12), r1);
    check(r0 == 100 && r1 == 0, $sformatf("200 plain bytes: %0d root lookups, %0d AC steps", r0, r1));
    check(cyc <= 4 * 100, $sformatf("200 plain bytes took %0d cycles", cyc));
    m.run(chunk, 0, s, want);

    // 2) random text with planted patterns, random chunk lengths
    text.delete();
    repeat (3000) begin
      if ($urandom_range(9) == 0) begin
        string p;
        p = rand_pattern(2, 8, 6);
        for (int i = 0; i < p.len(); i++) text.push_back(p[i]);
      end else begin
        text.push_back(byte'(8'h41 + $urandom_range(7)));
      end
    end
    m.run(text, 200, s, want);
    total = 200 + text.size();
    while (text.size() > 0) begin
      int len;
      len = 1 + int'($urandom_range(BUF - 1));
      if ($urandom_range(3) == 0) len = 1 + int'($urandom_range(3));
      chunk.delete();
      for (int i = 0; i < len && text.size() > 0; i++) chunk.push_back(text.pop_front());
      send(chunk);
    end
    wait_idle();

    check(got.size() == want.size(), $sformatf("%0d matches reported, %0d expected", got.size(), want.size()));
    for (int i = 0; i < want.size() && i < got.size(); i++) begin
      check(got[i].pos == want[i].pos && got[i].id == want[i].id,
            $sformatf("match %0d: (%0d,%0d) expected (%0d,%0d)", i, got[i].pos, got[i].id, want[i].pos, want[i].id));
    end
    bus_read(reg_addr(11), r0);
    bus_read(reg_addr(12), r1);
    bus_read(reg_addr(13), r2);
    bus_read(reg_addr(14), r3);
    $display("root lookups %0d, AC steps %0d, pre-hash hits %0d, non-hits %0d, matches %0d",
             r0, r1, r2, r3, got.size());
    check(r0 > 100 && r1 > 0 && r2 > 0 && r3 > 0, "every matching mechanism was used");
    check(!irq, "interrupt drops when the FIFO is empty");
    bus_read(reg_addr(8), t0);
    check(t0 == 32'(total), $sformatf("byte count %0d, expected %0d", t0, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
