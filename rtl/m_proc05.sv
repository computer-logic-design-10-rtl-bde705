// m_proc05: single-cycle processor for add, addi, lw and sw.
//
// Every instruction is fetched, decoded, executed, given its memory access and
// written back within one clock period, so one instruction retires per cycle
// (IPC 1.0). The instruction and data memories are asynchronous-read
// (m_amemory) so that the whole path from r_pc through the instruction memory,
// register file, adder, data memory and write-back mux is combinational and
// closes at the next rising edge.
//
// The adder's second operand (w_ain) is rs2 for add and the immediate for
// addi, lw and sw. Loads write the memory word back, other writers the sum.
// The PC advances by 4 each enabled cycle and stops at HALT_PC, so the
// instruction there is executed repeatedly; the machine has no branches.
// Writes of register x30 are also captured in r_led, brought out as w_led.
//
// Interface: w_clk, synchronous active-high w_rst (PC and LED to 0), w_ce
// (nothing changes while low). The datapath, the HALT_PC stop and the LED
// register follow the lecture; the reset input is this design's addition.
module m_proc05
  import proc_pkg::*;
#(
  parameter int          ADDR_W    = 12,
  parameter string       INIT_FILE = "rtl/program.hex",
  parameter logic [31:0] HALT_PC   = 32'd24
) (
  input  logic        w_clk,
  input  logic        w_rst,
  input  logic        w_ce,
  output logic [31:0] w_led
);

  logic [31:0] r_pc;
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ain, w_rslt, w_ldd, w_rslt2;
  logic [4:0]  w_op5, w_rd;
  logic        w_we;

  assign w_op5 = op5_of(w_ir);
  assign w_rd  = rd_of(w_ir);
  assign w_we  = w_ce && writes_rd(w_ir);

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_imem (
    .w_clk, .w_addr(r_pc[ADDR_W+1:2]), .w_we(1'b0), .w_din('0), .w_dout(w_ir));

  m_immgen m_immgen0 (.w_ir, .w_imm);

  m_regfile m_regs (
    .w_clk, .w_rs1(rs1_of(w_ir)), .w_rs2(rs2_of(w_ir)), .w_rd, .w_we,
    .w_wdata(w_rslt2), .w_rdata1(w_rrs1), .w_rdata2(w_rrs2));

  assign w_ain  = (w_op5 == OP5_OP) ? w_rrs2 : w_imm;
  assign w_rslt = w_rrs1 + w_ain;

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(w_rslt[ADDR_W+1:2]), .w_we(w_ce && w_op5 == OP5_STORE),
    .w_din(w_rrs2), .w_dout(w_ldd));

  assign w_rslt2 = (w_op5 == OP5_LOAD) ? w_ldd : w_rslt;

  always_ff @(posedge w_clk)
    if (w_rst)                      r_pc <= '0;
    else if (w_ce && r_pc != HALT_PC) r_pc <= r_pc + 32'd4;

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                        r_led <= '0;
    else if (w_we && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
