// m_proc08: two-state multi-cycle processor for add, addi, lw and sw.
//
// The single-cycle datapath is cut in two by the registers r_rslt (adder
// output) and r_rrs2 (store data). In state 0 the instruction is fetched,
// decoded and executed (IF, ID, EX) and the sum and rs2 are captured; in
// state 1 the data memory is accessed with r_rslt (MEM), the register file is
// written, the PC advances by 4 and the LED register is updated (WB). One
// instruction therefore takes two cycles (IPC 0.5), while the longest
// combinational path is roughly half that of the single-cycle version. The
// instruction word stays valid for both states because r_pc only changes at
// the end of state 1.
//
// The PC stops at HALT_PC, re-executing that instruction. Interface: w_clk,
// synchronous active-high w_rst (PC, state, LED to 0), w_ce (nothing changes
// while low). Datapath and state split follow the lecture; the reset input is
// this design's addition.
module m_proc08
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
  logic        r_state;  // 0: IF/ID/EX, 1: MEM/WB
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ain, w_rslt, w_ldd, w_rslt2;
  logic [31:0] r_rslt, r_rrs2;
  logic [4:0]  w_op5, w_rd;
  logic        w_we;

  assign w_op5 = op5_of(w_ir);
  assign w_rd  = rd_of(w_ir);
  assign w_we  = w_ce && writes_rd(w_ir);

  always_ff @(posedge w_clk)
    if (w_rst)     r_state <= 1'b0;
    else if (w_ce) r_state <= ~r_state;

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_imem (
    .w_clk, .w_addr(r_pc[ADDR_W+1:2]), .w_we(1'b0), .w_din('0), .w_dout(w_ir));

  m_immgen m_immgen0 (.w_ir, .w_imm);

  m_regfile m_regs (
    .w_clk, .w_rs1(rs1_of(w_ir)), .w_rs2(rs2_of(w_ir)), .w_rd, .w_we(w_we && r_state),
    .w_wdata(w_rslt2), .w_rdata1(w_rrs1), .w_rdata2(w_rrs2));

  assign w_ain  = (w_op5 == OP5_OP) ? w_rrs2 : w_imm;
  assign w_rslt = w_rrs1 + w_ain;

  always_ff @(posedge w_clk)
    if (w_ce && !r_state) begin
      r_rslt <= w_rslt;
      r_rrs2 <= w_rrs2;
    end

  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(r_rslt[ADDR_W+1:2]), .w_we(w_ce && r_state && w_op5 == OP5_STORE),
    .w_din(r_rrs2), .w_dout(w_ldd));

  assign w_rslt2 = (w_op5 == OP5_LOAD) ? w_ldd : r_rslt;

  always_ff @(posedge w_clk)
    if (w_rst)                                  r_pc <= '0;
    else if (w_ce && r_state && r_pc != HALT_PC) r_pc <= r_pc + 32'd4;

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                                   r_led <= '0;
    else if (w_we && r_state && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
