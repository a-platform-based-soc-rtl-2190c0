// tb_sam_table_ram: self-checking test of the shared pattern-table memory.
//
// Writes random words through the programming port and reads them back
// through two read ports at once, checking the one-cycle read latency,
// that both ports are independent and that a read in the cycle of a write
// to the same address returns the old word.
`timescale 1ns/1ps
module tb_sam_table_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 17, D = 512;
  logic              we;
  logic [8:0]        waddr;
  logic [W-1:0]      wdata;
  logic [1:0][8:0]   raddr;
  logic [1:0][W-1:0] rdata;
  logic [W-1:0]      ref_mem [D];

  sam_table_ram #(.WIDTH(W), .DEPTH(D), .NRD(2)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = W'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    repeat (300) begin
      int a0, a1;
      a0 = int'($urandom_range(D - 1));
      a1 = int'($urandom_range(D - 1));
      raddr[0] = 9'(a0); raddr[1] = 9'(a1);
      @(negedge clk);
      check(rdata[0] == ref_mem[a0] && rdata[1] == ref_mem[a1],
            $sformatf("read %0d/%0d", a0, a1));
    end
    // read during write of the same address gives the old word
    repeat (50) begin
      int a;
      logic [W-1:0] old;
      a = int'($urandom_range(D - 1));
      old = ref_mem[a];
      we = 1; waddr = 9'(a); wdata = W'($urandom); raddr[0] = 9'(a); raddr[1] = 9'(a);
      ref_mem[a] = wdata;
      @(negedge clk);
      we = 0;
      check(rdata[0] == old && rdata[1] == old, "read-during-write returns old data");
      @(negedge clk);
      check(rdata[0] == ref_mem[a] && rdata[1] == ref_mem[a], "new data after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
