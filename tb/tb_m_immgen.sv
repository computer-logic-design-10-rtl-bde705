// tb_m_immgen: self-checking testbench for m_immgen.
//
// Instructions are assembled from a random immediate with the encoders of
// rv_model_pkg (I-type addi/lw, S-type sw, B-type beq/bne); the generator must
// return the same immediate, sign-extended.
`timescale 1ns/1ps
module tb_m_immgen;
  import rv_model_pkg::*;
  logic [31:0] ir, imm;
  int checks = 0, failures = 0;

  m_immgen dut (.w_ir(ir), .w_imm(imm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int v = int'($urandom % 4096) - 2048;      // 12-bit signed
      int b = 2 * (int'($urandom % 4096) - 2048); // 13-bit signed, even
      if (n == 0) begin v = -2048; b = -4096; end
      if (n == 1) begin v = 2047;  b = 4094;  end
      ir = enc_addi(int'($urandom % 32), int'($urandom % 32), v); #1;
      check(imm == 32'(v), $sformatf("addi imm %h, expected %h", imm, 32'(v)));
      ir = enc_lw(int'($urandom % 32), int'($urandom % 32), v); #1;
      check(imm == 32'(v), $sformatf("lw imm %h, expected %h", imm, 32'(v)));
      ir = enc_sw(int'($urandom % 32), int'($urandom % 32), v); #1;
      check(imm == 32'(v), $sformatf("sw imm %h, expected %h", imm, 32'(v)));
      ir = enc_beq(int'($urandom % 32), int'($urandom % 32), b); #1;
      check(imm == 32'(b), $sformatf("beq imm %h, expected %h", imm, 32'(b)));
      ir = enc_bne(int'($urandom % 32), int'($urandom % 32), b); #1;
      check(imm == 32'(b), $sformatf("bne imm %h, expected %h", imm, 32'(b)));
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
