// tb_sam_sm_ctrl: self-checking test of the SM controller.
//
// The testbench plays both the host (bus reads and writes) and the FSM
// unit (fetch, set_state, buf_done, statistics pulses). It checks the text
// window against the bytes written, buffer fetch order and hand-back, the
// byte count and current-state register, the match FIFO contents, order,
// pop and overflow flag, the interrupt sources, the clear bit and the
// statistics counters, and walks random-length buffers with random steps,
// checking both window bytes at every pointer.
`timescale 1ns/1ps
module tb_sam_sm_ctrl;
  import sam_pkg::*;

  localparam int BUF = 64;
  localparam int LAW = $clog2(BUF);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            bus_sel, bus_we;
  logic [LAW-1:0]  bus_addr;
  logic [31:0]     bus_wdata, bus_rdata;
  logic            irq, control, text_rdy, no_text, fetch, buf_done;
  logic [1:0][7:0] win;
  logic            win_full, root_state;
  state_id_t       cur_state;
  logic            set_state;
  state_t          set_value;
  logic [1:0]      set_adv;
  logic            ev_root, ev_ac, ev_hit, ev_nonhit;

  sam_sm_ctrl #(.BUF_BYTES(BUF)) dut (
    .clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .control, .text_rdy, .no_text, .fetch, .buf_done, .win, .win_full, .root_state, .cur_state,
    .set_state, .set_value, .set_adv, .fsm_state(S_MATCH), .ev_root, .ev_ac, .ev_hit, .ev_nonhit);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = LAW'(a); bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
    #1;
  endtask

  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = LAW'(a);
    @(negedge clk);
    bus_sel = 0;
    d = bus_rdata;
  endtask

  task automatic pulse_fetch();
    @(negedge clk); fetch = 1;
    @(negedge clk); fetch = 0;
    #1;
  endtask

  task automatic step(int adv, bit matched, int id);
    @(negedge clk);
    set_state = 1; set_adv = 2'(adv); set_value = '{matched: matched, id: state_id_t'(id)};
    @(negedge clk);
    set_state = 0;
    #1;
  endtask

  byte unsigned b0[BUF], b1[BUF];

  task automatic fill(int buf_i, ref byte unsigned b[BUF], input int len);
    for (int i = 0; i < BUF; i++) b[i] = byte'($urandom);
    for (int w = 0; w < BUF / 4; w++)
      bus_write(((buf_i + 1) << (LAW - 2)) | w, {b[4*w+3], b[4*w+2], b[4*w+1], b[4*w]});
    bus_write(2 + buf_i, 32'(len));
  endtask

  initial begin
    logic [31:0] d;
    bus_sel = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0; fetch = 0; buf_done = 0;
    set_state = 0; set_value = '0; set_adv = '0; ev_root = 0; ev_ac = 0; ev_hit = 0; ev_nonhit = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1;
    check(!control && no_text && !text_rdy && root_state, "reset state");
    bus_write(0, 1);
    check(control, "enable");
    bus_write(9, 3);
    fill(0, b0, 11);
    fill(1, b1, 3);
    bus_read(1, d);
    check(d[1:0] == 2'b11 && !d[8], "both buffers full");
    check(text_rdy && no_text, "text ready, none active");
    pulse_fetch();
    check(!no_text && win_full && win[0] == b0[0] && win[1] == b0[1], "window at buffer 0 start");
    // walk through buffer 0 with 2-, 1- and 0-byte steps
    step(2, 1, 7);
    check(cur_state == 7 && !root_state && win[0] == b0[2] && win[1] == b0[3], "after 2-byte step");
    check(irq, "interrupt on pending match");
    step(0, 1, 3);     // failure step: no match is queued
    check(cur_state == 3 && win[0] == b0[2], "failure step keeps the pointer");
    step(1, 0, 9);
    step(2, 1, 12);
    step(2, 0, 0);
    check(win[0] == b0[7], "pointer at 7");
    step(2, 0, 4);
    step(1, 1, 5);     // pointer 10: one byte left
    check(!win_full && !no_text && win[0] == b0[10], "one byte left");
    step(1, 0, 0);
    check(no_text, "buffer 0 used up");
    bus_read(1, d);
    check(d[20:16] == 3, $sformatf("three matches queued, status %08h", d));
    bus_read(4, d); check(d == 1, $sformatf("match 0 position %0d", d));
    bus_read(5, d); check(d == 7, "match 0 state");
    bus_write(6, 0);
    bus_read(4, d); check(d == 4, $sformatf("match 1 position %0d", d));
    bus_read(5, d); check(d == 12, "match 1 state");
    bus_write(6, 0);
    bus_read(4, d); check(d == 9, $sformatf("match 2 position %0d", d));
    bus_read(5, d); check(d == 5, "match 2 state");
    bus_write(6, 0);
    bus_read(1, d);
    check(!d[2] && !irq, "FIFO empty, no interrupt");
    // hand buffer 0 back, buffer 1 is next
    @(negedge clk); buf_done = 1; @(negedge clk); buf_done = 0; #1;
    bus_read(1, d);
    check(d[1:0] == 2'b10 && d[4] && irq, "buffer 0 handed back, done flag and interrupt");
    bus_write(10, 2);
    check(!irq, "done flag cleared");
    check(text_rdy, "buffer 1 ready");
    pulse_fetch();
    check(win[0] == b1[0] && win[1] == b1[1] && win_full, "window at buffer 1 start");
    step(2, 0, 0);
    check(!win_full && win[0] == b1[2], "buffer 1 tail");
    step(1, 0, 0);
    check(no_text, "buffer 1 used up");
    bus_read(8, d); check(d == 14, $sformatf("byte count %0d", d));
    @(negedge clk); buf_done = 1; @(negedge clk); buf_done = 0; #1;
    // overflow: more matches than the FIFO holds
    fill(0, b0, 40);
    pulse_fetch();
    for (int i = 0; i < 17; i++) step(2, 1, i + 1);
    bus_read(1, d);
    check(d[3] && d[20:16] == 16, $sformatf("FIFO full and overflow flagged, status %08h", d));
    bus_read(5, d); check(d == 1, "oldest match kept");
    bus_write(10, 1);
    bus_read(1, d); check(!d[3], "overflow cleared");
    // clear returns to the root and empties the FIFO
    bus_write(0, 3);
    bus_read(1, d);
    check(root_state && d[20:16] == 0, "clear");
    bus_read(8, d); check(d == 0, "byte count cleared");
    // use up and hand back the rest of the 40-byte buffer
    repeat (3) step(2, 0, 0);
    check(no_text, "40-byte buffer used up");
    @(negedge clk); buf_done = 1; @(negedge clk); buf_done = 0; #1;
    // random walks through both buffers: the window must follow the
    // pointer, also where the two bytes straddle two buffer words
    for (int r = 0; r < 24; r++) begin
      int len, p;
      len = 1 + int'($urandom_range(BUF - 1));
      if (r % 2 == 1) fill(0, b0, len); else fill(1, b1, len);   // buffer 1 is next
      pulse_fetch();
      p = 0;
      while (p < len) begin
        byte unsigned e0, e1;
        int adv;
        e0 = (r % 2 == 1) ? b0[p] : b1[p];
        e1 = (r % 2 == 1) ? b0[(p + 1) % BUF] : b1[(p + 1) % BUF];
        check(!no_text && win[0] == e0 && (win_full == (p + 2 <= len)) && (!win_full || win[1] == e1),
              $sformatf("walk %0d: window at %0d of %0d", r, p, len));
        adv = (p + 2 <= len) ? 1 + int'($urandom_range(1)) : 1;
        step(adv, 0, 0);
        p += adv;
      end
      check(no_text, "walk: buffer used up");
      @(negedge clk); buf_done = 1; @(negedge clk); buf_done = 0; #1;
    end
    // statistics
    @(negedge clk); ev_root = 1; ev_ac = 1;
    @(negedge clk); ev_ac = 1; ev_root = 0; ev_hit = 1;
    @(negedge clk); ev_ac = 0; ev_hit = 0; ev_nonhit = 1;
    @(negedge clk); ev_nonhit = 0;
    bus_read(11, d); check(d == 1, "root statistic");
    bus_read(12, d); check(d == 2, "AC statistic");
    bus_read(13, d); check(d == 1, "hit statistic");
    bus_read(14, d); check(d == 1, "non-hit statistic");
    bus_write(0, 0);
    check(!control, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
