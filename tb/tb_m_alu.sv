// tb_m_alu: self-checking testbench for m_alu.
//
// Random operands for add, sll and srl (R-type) and for the add used by
// I-type, load and store instructions, compared with results computed here.
`timescale 1ns/1ps
module tb_m_alu;
  logic [31:0] a, b, y, exp_y;
  logic [2:0]  f3;
  logic        r_type;
  int checks = 0, failures = 0;

  m_alu dut (.w_a(a), .w_b(b), .w_f3(f3), .w_r_type(r_type), .w_y(y));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = $urandom;
      f3 = 3'($urandom); r_type = 1'($urandom);
      if (n % 3 == 0) begin f3 = 3'b001; r_type = 1'b1; end
      if (n % 3 == 1) begin f3 = 3'b101; r_type = 1'b1; end
      #1;
      if (r_type && f3 == 3'b001)      exp_y = a << (b % 32);
      else if (r_type && f3 == 3'b101) exp_y = a >> (b % 32);
      else                             exp_y = a + b;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL: a=%h b=%h f3=%b r=%b y=%h expected %h", a, b, f3, r_type, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
