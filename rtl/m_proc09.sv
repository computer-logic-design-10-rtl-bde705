// m_proc09: five-state multi-cycle processor for add, addi, lw and sw, with
// asynchronous-read memories.
//
// The single-cycle datapath is cut into its five steps by registers, and a
// state machine walks IF -> ID -> EX -> MEM -> WB -> IF, one step per clock:
//   IF   the instruction memory is read at r_pc; r_ir captures the word.
//   ID   the register file and immediate generator read r_ir; r_rrs1, r_ain
//        (rs2 for add, the immediate otherwise) and r_rrs2 are captured.
//   EX   the adder forms r_rrs1 + r_ain; r_rslt captures it.
//   MEM  the data memory is addressed by r_rslt; sw writes r_rrs2, and r_ldd
//        captures the word read.
//   WB   the register file is written with r_ldd (lw) or r_rslt (add, addi),
//        x30 writes also go to r_led, and r_pc advances by 4 unless it is at
//        HALT_PC.
// Every instruction takes five cycles (IPC 0.2); the clock period is set by
// the slowest single step rather than by the sum of all of them.
//
// Interface: w_clk, synchronous active-high w_rst (state to IF, PC and LED to
// 0), w_ce (nothing changes while low). The register placement and the state
// sequence follow the lecture; the reset input is this design's addition.
module m_proc09
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
  logic [31:0] r_pc, r_ir;
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ldd, w_rslt2;
  logic [31:0] r_rrs1, r_ain, r_rrs2, r_rslt, r_ldd;
  logic [4:0]  w_op5, w_rd;
  logic        w_we;

  assign w_op5 = op5_of(r_ir);
  assign w_rd  = rd_of(r_ir);
  assign w_we  = w_ce && r_state == S_WB && writes_rd(r_ir);

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

  // IF
  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_imem (
    .w_clk, .w_addr(r_pc[ADDR_W+1:2]), .w_we(1'b0), .w_din('0), .w_dout(w_ir));

  always_ff @(posedge w_clk)
    if (w_ce && r_state == S_IF) r_ir <= w_ir;

  // ID
  m_immgen m_immgen0 (.w_ir(r_ir), .w_imm);

  m_regfile m_regs (
    .w_clk, .w_rs1(rs1_of(r_ir)), .w_rs2(rs2_of(r_ir)), .w_rd, .w_we,
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

  // MEM
  m_amemory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(r_rslt[ADDR_W+1:2]),
    .w_we(w_ce && r_state == S_MEM && w_op5 == OP5_STORE),
    .w_din(r_rrs2), .w_dout(w_ldd));

  always_ff @(posedge w_clk)
    if (w_ce && r_state == S_MEM) r_ldd <= w_ldd;

  // WB
  assign w_rslt2 = (w_op5 == OP5_LOAD) ? r_ldd : r_rslt;

  always_ff @(posedge w_clk)
    if (w_rst) r_pc <= '0;
    else if (w_ce && r_state == S_WB && r_pc != HALT_PC) r_pc <= r_pc + 32'd4;

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                        r_led <= '0;
    else if (w_we && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
