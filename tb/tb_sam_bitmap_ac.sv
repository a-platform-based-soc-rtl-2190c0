// tb_sam_bitmap_ac: self-checking test of the bitmap AC unit.
//
// Loads the state table and next-state table of a random pattern set
// (and of the TEST/THE/HE example) into sam_table_ram instances and runs
// AC steps for random states and bytes, including bytes above 127 and
// states with many children, so that every 64-bit quarter of the bitmap
// is counted. The expected goto state or failure state comes from the
// reference automaton. over must rise exactly 8 cycles after start.
`timescale 1ns/1ps
module tb_sam_bitmap_ac;
  import sam_pkg::*;
  import sam_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int nfound = 0, nfail = 0;

  logic        start;
  state_id_t   cur_state;
  logic [7:0]  c;
  logic [12:0] st_raddr, nx_raddr;
  ac_entry_t   st_rdata;
  state_t      nx_rdata;
  logic        over, found;
  state_t      next;
  state_id_t   fail;
  logic        st_we, nx_we;
  logic [12:0] waddr;
  ac_entry_t   st_wdata;
  state_t      nx_wdata;

  sam_bitmap_ac dut (.clk, .rst_n, .start, .cur_state, .c, .st_raddr, .st_rdata,
                     .nx_raddr, .nx_rdata, .over, .found, .next, .fail);
  sam_table_ram #(.WIDTH(AC_ENTRY_W), .DEPTH(8192), .NRD(1)) u_st (
    .clk, .we(st_we), .waddr, .wdata(st_wdata), .raddr(st_raddr), .rdata(st_rdata));
  sam_table_ram #(.WIDTH(STATE_T_W), .DEPTH(8192), .NRD(1)) u_nx (
    .clk, .we(nx_we), .waddr, .wdata(nx_wdata), .raddr(nx_raddr), .rdata(nx_rdata));

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
      st_we = 1; waddr = 13'(s);
      st_wdata = '{base: state_id_t'(m.base[s]), fail: state_id_t'(m.fail[s]), bitmap: m.bitmap[s]};
    end
    @(negedge clk);
    st_we = 0;
    for (int i = 0; i < m.nnx; i++) begin
      @(negedge clk);
      nx_we = 1; waddr = 13'(i); nx_wdata = state_t'(m.nx[i]);
    end
    @(negedge clk);
    nx_we = 0;
  endtask

  task automatic step(sam_model m, int s, byte unsigned ch);
    int lat;
    int t = m.g[s*256 + ch];
    @(negedge clk);
    cur_state = state_id_t'(s); c = ch; start = 1;
    @(negedge clk);
    start = 0; cur_state = '0; c = '0;
    lat = 1;
    while (!over && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 8, $sformatf("latency %0d", lat));
    if (t >= 0) begin
      nfound++;
      check(found && int'(next) == m.enc(t),
            $sformatf("state %0d byte %02h: found %0d next %05h, expected %05h", s, ch, found, next, m.enc(t)));
    end else begin
      nfail++;
      check(!found && int'(fail) == m.fail[s],
            $sformatf("state %0d byte %02h: found %0d fail %0d, expected %0d", s, ch, found, fail, m.fail[s]));
    end
  endtask

  sam_model m;

  initial begin
    start = 0; cur_state = '0; c = '0; st_we = 0; nx_we = 0; waddr = '0; st_wdata = '0; nx_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    m = new();
    m.add("TEST"); m.add("THE"); m.add("HE");
    m.build();
    load(m);
    step(m, 1, "E");
    step(m, 1, "H");
    step(m, 5, "E");
    step(m, 2, "X");
    // wide alphabet: children spread over all four quarters of the bitmap
    m = new();
    repeat (150) begin
      string p;
      int len;
      p = "";
      len = 2 + int'($urandom_range(4));
      for (int i = 0; i < len; i++) p = {p, string'(byte'($urandom_range(1, 255)))};
      m.add(p);
    end
    m.build();
    load(m);
    for (int ch = 0; ch < 256; ch += 3) step(m, 0, byte'(ch));
    repeat (400) begin
      int s;
      byte unsigned ch;
      s = int'($urandom_range(m.n - 1));
      // bias towards existing transitions
      if ($urandom_range(1) == 0) begin
        ch = byte'($urandom);
      end else begin
        ch = byte'($urandom);
        for (int k = 0; k < 256; k++) if (m.g[s*256 + ((ch + k) % 256)] >= 0) begin
          ch = byte'((ch + k) % 256);
          break;
        end
      end
      step(m, s, ch);
    end
    check(nfound > 50 && nfail > 50, $sformatf("found %0d failed %0d", nfound, nfail));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
