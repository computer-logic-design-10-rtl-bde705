// tb_m_amemory: self-checking testbench for m_amemory.
//
// The memory comes up holding rtl/program.hex (checked against the
// demonstration program of rv_model_pkg) and zeros elsewhere. Random writes
// and reads are then compared with a shadow copy kept by the testbench;
// the read is combinational: the word at the address is visible in the same cycle, and a write shows immediately after its clock edge.
`timescale 1ns/1ps
module tb_m_amemory;
  import rv_model_pkg::*;
  localparam int AW = 12;
  logic          clk = 1'b0;
  logic [AW-1:0] addr;
  logic          we;
  logic [31:0]   din, dout, expv;
  logic [31:0]   shadow[1 << AW];
  logic [31:0]   prog[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  m_amemory dut (.w_clk(clk), .w_addr(addr), .w_we(we), .w_din(din), .w_dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    demo_program(prog);
    foreach (shadow[i]) shadow[i] = (i < prog.size()) ? prog[i] : '0;
    we = 1'b0; din = '0; addr = '0;
    // initial contents
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); addr = AW'(i);
      if (0) @(negedge clk); else #1;
      check(dout == shadow[i], $sformatf("initial word %0d = %h, expected %h", i, dout, shadow[i]));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = AW'($urandom % 64); we = 1'($urandom); din = $urandom;
      expv = shadow[addr];
      if (0) begin
        @(posedge clk); #1;
        check(dout == expv, $sformatf("read %0d = %h, expected %h", addr, dout, expv));
        if (we) shadow[addr] = din;
      end else begin
        #1;
        check(dout == expv, $sformatf("read %0d = %h, expected %h", addr, dout, expv));
        @(posedge clk); #1;
        if (we) shadow[addr] = din;
        check(dout == shadow[addr], $sformatf("after write %0d = %h, expected %h", addr, dout, shadow[addr]));
      end
    end
    // a word far from the start
    @(negedge clk); addr = '1; we = 1'b1; din = 32'hdeadbeef;
    @(negedge clk); we = 1'b0; addr = '1;
    if (0) @(negedge clk); else #1;
    check(dout == 32'hdeadbeef, "top word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
