// m_immgen: immediate generator.
//
// Purely combinational. From an instruction word it builds the 32-bit,
// sign-extended immediate of the instruction's format, chosen by op5 = ir[6:2]:
//   S-type (sw)        {ir[31:25], ir[11:7]}
//   B-type (beq, bne)  {ir[31], ir[7], ir[30:25], ir[11:8], 1'b0}
//   I-type (others)    ir[31:20]
// R-type instructions carry no immediate; the I-type value is output and
// ignored by the datapath. Bit positions are those of the RISC-V formats.
module m_immgen
  import proc_pkg::*;
(
  input  logic [31:0] w_ir,
  output logic [31:0] w_imm
);

  always_comb begin
    unique case (op5_of(w_ir))
      OP5_STORE:  w_imm = {{20{w_ir[31]}}, w_ir[31:25], w_ir[11:7]};
      OP5_BRANCH: w_imm = {{19{w_ir[31]}}, w_ir[31], w_ir[7], w_ir[30:25], w_ir[11:8], 1'b0};
      default:    w_imm = {{20{w_ir[31]}}, w_ir[31:20]};
    endcase
  end

endmodule
