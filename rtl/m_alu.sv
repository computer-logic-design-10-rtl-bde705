// m_alu: arithmetic unit of the single-cycle baseline processor.
//
// Combinational. For R-type instructions funct3 selects add (000), shift left
// logical (001) or shift right logical (101) of w_a by w_b[4:0]. Every other
// instruction (addi, and the address calculation of lw and sw) adds. The
// operation set is the one the baseline processor supports; the decoding by
// funct3 is RISC-V's.
module m_alu
  import proc_pkg::*;
(
  input  logic [31:0] w_a,
  input  logic [31:0] w_b,
  input  logic [2:0]  w_f3,
  input  logic        w_r_type,
  output logic [31:0] w_y
);

  always_comb begin
    if (w_r_type && w_f3 == F3_SLL)      w_y = w_a << w_b[4:0];
    else if (w_r_type && w_f3 == F3_SRL) w_y = w_a >> w_b[4:0];
    else                                 w_y = w_a + w_b;
  end

endmodule
