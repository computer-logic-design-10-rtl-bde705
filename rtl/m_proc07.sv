// m_proc07: single-cycle baseline processor for add, addi, sll, srl, lw, sw,
// beq and bne.
//
// Each instruction passes IF, ID, EX, MEM and WB within one clock period
// (IPC 1.0), using asynchronous-read memories (m_amemory). The ALU (m_alu)
// adds, or shifts for R-type sll/srl. Its second operand w_ain is rs2 for
// R-type and branch instructions and the immediate otherwise. In parallel an
// equality comparator on w_rrs1 and w_ain decides w_taken (equal for beq, not
// equal for bne), an adder forms the branch target w_tpc = r_pc + w_imm, and
// a mux picks w_npc = w_taken ? w_tpc : r_pc + 4 as the next PC.
//
// The program stops by looping on a branch to itself. Writes of x30 are also
// captured in r_led (w_led).
//
// Interface: w_clk, synchronous active-high w_rst, w_ce (nothing changes
// while low). The datapath follows the lecture's block diagram; the choice of
// rs2 as the comparator's operand through w_ain, and the reset, are this
// design's reading of it.
module m_proc07
  import proc_pkg::*;
#(
  parameter int    ADDR_W    = 12,
  parameter string INIT_FILE = "rtl/program.hex"
) (
  input  logic        w_clk,
  input  logic        w_rst,
  input  logic        w_ce,
  output logic [31:0] w_led
);

  logic [31:0] r_pc, w_npc, w_tpc;
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ain, w_rslt, w_ldd, w_rslt2;
  logic [4:0]  w_op5, w_rd;
  logic [2:0]  w_f3;
  logic        w_we, w_taken;

  assign w_op5 = op5_of(w_ir);
  assign w_rd  = rd_of(w_ir);
  assign w_f3  = f3_of(w_ir);
  assign w_we  = w_ce && writes_rd(w_ir);

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_imem (
    .w_clk, .w_addr(r_pc[ADDR_W+1:2]), .w_we(1'b0), .w_din('0), .w_dout(w_ir));

  m_immgen m_immgen0 (.w_ir, .w_imm);

  m_regfile m_regs (
    .w_clk, .w_rs1(rs1_of(w_ir)), .w_rs2(rs2_of(w_ir)), .w_rd, .w_we,
    .w_wdata(w_rslt2), .w_rdata1(w_rrs1), .w_rdata2(w_rrs2));

  assign w_ain = (w_op5 == OP5_OP || w_op5 == OP5_BRANCH) ? w_rrs2 : w_imm;

  m_alu m_alu0 (.w_a(w_rrs1), .w_b(w_ain), .w_f3, .w_r_type(w_op5 == OP5_OP), .w_y(w_rslt));

  // ==/!= comparator
  assign w_taken = (w_op5 == OP5_BRANCH) &&
                   ((w_f3 == F3_BEQ && w_rrs1 == w_ain) ||
                    (w_f3 == F3_BNE && w_rrs1 != w_ain));
  assign w_tpc = r_pc + w_imm;
  assign w_npc = w_taken ? w_tpc : r_pc + 32'd4;

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(w_rslt[ADDR_W+1:2]), .w_we(w_ce && w_op5 == OP5_STORE),
    .w_din(w_rrs2), .w_dout(w_ldd));

  assign w_rslt2 = (w_op5 == OP5_LOAD) ? w_ldd : w_rslt;

  always_ff @(posedge w_clk)
    if (w_rst)     r_pc <= '0;
    else if (w_ce) r_pc <= w_npc;

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                        r_led <= '0;
    else if (w_we && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
