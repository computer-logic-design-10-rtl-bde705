// m_regfile: the 32 x 32-bit integer register file.
//
// Two read ports (w_rs1 -> w_rdata1, w_rs2 -> w_rdata2) are combinational; one
// write port stores w_wdata into register w_rd at the rising clock edge when
// w_we is high. Register x0 always reads as zero and ignores writes, as RISC-V
// requires. A read of the register being written in the same cycle returns
// the old value. All registers start at zero.
//
// Size and port order follow the lecture's register file; the x0 rule is the
// RISC-V architecture's, and the zero start values are this design's choice.
module m_regfile (
  input  logic        w_clk,
  input  logic [4:0]  w_rs1,
  input  logic [4:0]  w_rs2,
  input  logic [4:0]  w_rd,
  input  logic        w_we,
  input  logic [31:0] w_wdata,
  output logic [31:0] w_rdata1,
  output logic [31:0] w_rdata2
);

  logic [31:0] r_regs [32];

  initial for (int i = 0; i < 32; i++) r_regs[i] = '0;

  always_ff @(posedge w_clk)
    if (w_we && w_rd != 5'd0) r_regs[w_rd] <= w_wdata;

  assign w_rdata1 = (w_rs1 == 5'd0) ? '0 : r_regs[w_rs1];
  assign w_rdata2 = (w_rs2 == 5'd0) ? '0 : r_regs[w_rs2];

endmodule
