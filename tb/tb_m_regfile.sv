// tb_m_regfile: self-checking testbench for m_regfile.
//
// Random writes and reads are compared with a shadow array kept by the
// testbench: x0 must read zero whatever is written to it, reads are
// combinational, a write appears after the clock edge, and a disabled write
// changes nothing.
`timescale 1ns/1ps
module tb_m_regfile;
  logic        clk = 1'b0;
  logic [4:0]  rs1, rs2, rd;
  logic        we;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] shadow[32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  m_regfile dut (.w_clk(clk), .w_rs1(rs1), .w_rs2(rs2), .w_rd(rd), .w_we(we),
                 .w_wdata(wdata), .w_rdata1(rdata1), .w_rdata2(rdata2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    we = 0; rd = 0; wdata = 0; rs1 = 0; rs2 = 0;
    // all registers start at zero
    for (int r = 0; r < 32; r++) begin
      rs1 = 5'(r); rs2 = 5'(31 - r); #1;
      check(rdata1 == 0 && rdata2 == 0, $sformatf("x%0d not zero at start", r));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rd = 5'($urandom); we = 1'($urandom); wdata = $urandom;
      if (n % 50 == 0) rd = 5'd0;   // writes to x0 must be ignored
      rs1 = 5'($urandom); rs2 = 5'($urandom);
      #1;
      check(rdata1 == shadow[rs1], $sformatf("read1 x%0d = %h, expected %h", rs1, rdata1, shadow[rs1]));
      check(rdata2 == shadow[rs2], $sformatf("read2 x%0d = %h, expected %h", rs2, rdata2, shadow[rs2]));
      @(posedge clk);
      if (we && rd != 0) shadow[rd] = wdata;
      #1;
      rs1 = rd;
      #1;
      check(rdata1 == shadow[rd], $sformatf("after write x%0d = %h, expected %h", rd, rdata1, shadow[rd]));
    end
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
