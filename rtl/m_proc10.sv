// m_proc10: five-state multi-cycle processor for add, addi, lw and sw, built
// on synchronous (block-RAM style) memories.
//
// The state machine walks IF -> ID -> EX -> MEM -> WB -> IF, one step per
// clock, so every instruction takes five cycles (IPC 0.2). Unlike m_proc09 the
// memories have a registered read (m_memory), and their output registers take
// the place of two pipeline registers:
//   IF   the instruction memory is addressed by r_pc; at the end of IF its
//        output register holds the instruction. Because r_pc does not change
//        until the end of WB, the memory keeps re-reading the same word and
//        its output stays valid as the instruction register through WB.
//   ID   register file and immediate read; r_rrs1, r_ain, r_rrs2 captured.
//   EX   r_rslt <= r_rrs1 + r_ain.
//   MEM  the data memory is addressed by r_rslt; sw writes r_rrs2; the read
//        word lands in the memory's output register at the end of MEM.
//   WB   the register file is written with the loaded word (lw) or r_rslt,
//        x30 writes are copied to r_led, and r_pc advances by 4 unless it is
//        at HALT_PC.
//
// Interface: w_clk, synchronous active-high w_rst (state to IF, PC and LED to
// 0), w_ce (nothing changes while low). Register placement and state sequence
// follow the lecture; the reset input is this design's addition.
module m_proc10
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

  state_t      r_state;
  logic [31:0] r_pc;
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ldd, w_rslt2;
  logic [31:0] r_rrs1, r_ain, r_rrs2, r_rslt;
  logic [4:0]  w_op5, w_rd;
  logic        w_we;

  assign w_op5 = op5_of(w_ir);
  assign w_rd  = rd_of(w_ir);
  assign w_we  = w_ce && r_state == S_WB && writes_rd(w_ir);

  always_ff @(posedge w_clk)
    if (w_rst) r_state <= S_IF;
    else if (w_ce)
      unique case (r_state)
        S_IF:    r_state <= S_ID;
        S_ID:    r_state <= S_EX;
        S_EX:    r_state <= S_MEM;
        S_MEM:   r_state <= S_WB;
        default: r_state <= S_IF;
      endcase

  // IF: the memory's output register is the instruction register
  m_memory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_imem (
    .w_clk, .w_addr(r_pc[ADDR_W+1:2]), .w_we(1'b0), .w_din('0), .r_dout(w_ir));

  // ID
  m_immgen m_immgen0 (.w_ir, .w_imm);

  m_regfile m_regs (
    .w_clk, .w_rs1(rs1_of(w_ir)), .w_rs2(rs2_of(w_ir)), .w_rd, .w_we,
    .w_wdata(w_rslt2), .w_rdata1(w_rrs1), .w_rdata2(w_rrs2));

  always_ff @(posedge w_clk)
    if (w_ce && r_state == S_ID) begin
      r_rrs1 <= w_rrs1;
      r_ain  <= (w_op5 == OP5_OP) ? w_rrs2 : w_imm;
      r_rrs2 <= w_rrs2;
    end

  // EX
  always_ff @(posedge w_clk)
    if (w_ce && r_state == S_EX) r_rslt <= r_rrs1 + r_ain;

  // MEM: the memory's output register holds the loaded word for WB
  m_memory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(r_rslt[ADDR_W+1:2]),
    .w_we(w_ce && r_state == S_MEM && w_op5 == OP5_STORE),
    .w_din(r_rrs2), .r_dout(w_ldd));

  // WB
  assign w_rslt2 = (w_op5 == OP5_LOAD) ? w_ldd : r_rslt;

  always_ff @(posedge w_clk)
    if (w_rst) r_pc <= '0;
    else if (w_ce && r_state == S_WB && r_pc != HALT_PC) r_pc <= r_pc + 32'd4;

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                        r_led <= '0;
    else if (w_we && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
