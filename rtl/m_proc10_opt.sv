// m_proc10_opt: multi-cycle processor with the optimized state machine, for
// add, addi, lw, sw, beq and bne, built on synchronous (block-RAM style)
// memories.
//
// The datapath is that of m_proc10 (registered-read memories whose output
// registers act as instruction register and load-data register; r_rrs1,
// r_ain, r_rrs2 after ID; r_rslt after EX) plus branch hardware: an adder for
// the target w_tpc = r_pc + w_imm, an equal/not-equal comparator on r_rrs1 and
// r_rrs2 giving w_taken, and a mux choosing w_npc = w_taken ? w_tpc : r_pc + 4.
//
// Instead of always walking all five steps, each instruction visits only the
// steps it needs and returns to IF right after its last one:
//   beq, bne     IF ID EX                 3 cycles, r_pc <= w_npc after EX
//   sw           IF ID EX MEM             4 cycles, r_pc += 4 after MEM
//   add, addi    IF ID EX WB              4 cycles, r_pc += 4 after WB
//   lw           IF ID EX MEM WB          5 cycles, r_pc += 4 after WB
// With 10% branches, 10% loads and 80% other instructions the average is
// 0.1*3 + 0.1*5 + 0.8*4 = 4.0 cycles per instruction, against 5 for m_proc10.
// Any other opcode is treated as a no-op that leaves EX for IF.
// The instruction-memory output stays valid as the instruction register
// because r_pc only changes at the end of an instruction's last step.
//
// Interface: w_clk, synchronous active-high w_rst (state to IF, PC and LED to
// 0), w_ce (nothing changes while low); w_led holds the last value written to
// x30. The per-instruction step sequences follow the lecture's optimized state
// diagram. Where the branch is resolved (EX, from the ID/EX registers), the
// treatment of unknown opcodes and the reset input are this design's choices.
module m_proc10_opt
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

  state_t      r_state, w_next;
  logic [31:0] r_pc, w_npc, w_tpc;
  logic [31:0] w_ir, w_imm, w_rrs1, w_rrs2, w_ldd, w_rslt2;
  logic [31:0] r_rrs1, r_ain, r_rrs2, r_rslt;
  logic [4:0]  w_op5, w_rd;
  logic [2:0]  w_f3;
  logic        w_we, w_taken, w_last;

  assign w_op5 = op5_of(w_ir);
  assign w_rd  = rd_of(w_ir);
  assign w_f3  = f3_of(w_ir);
  assign w_we  = w_ce && r_state == S_WB && writes_rd(w_ir);

  // Optimized state machine: the step after the current one, per opcode.
  always_comb begin
    unique case (r_state)
      S_IF: w_next = S_ID;
      S_ID: w_next = S_EX;
      S_EX:
        if (w_op5 == OP5_LOAD || w_op5 == OP5_STORE)    w_next = S_MEM;
        else if (w_op5 == OP5_OP || w_op5 == OP5_OPIMM) w_next = S_WB;
        else                                            w_next = S_IF;
      S_MEM: w_next = (w_op5 == OP5_LOAD) ? S_WB : S_IF;
      default: w_next = S_IF;
    endcase
  end

  // The current step is the instruction's last one.
  assign w_last = r_state != S_IF && w_next == S_IF;

  always_ff @(posedge w_clk)
    if (w_rst)     r_state <= S_IF;
    else if (w_ce) r_state <= w_next;

  // IF
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

  // EX: sum for add/addi/lw/sw, branch decision and target
  always_ff @(posedge w_clk)
    if (w_ce && r_state == S_EX) r_rslt <= r_rrs1 + r_ain;

  assign w_taken = (w_op5 == OP5_BRANCH) &&
                   ((w_f3 == F3_BEQ && r_rrs1 == r_rrs2) ||
                    (w_f3 == F3_BNE && r_rrs1 != r_rrs2));
  assign w_tpc = r_pc + w_imm;
  assign w_npc = w_taken ? w_tpc : r_pc + 32'd4;

  // MEM
  m_memory #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) m_dmem (
    .w_clk, .w_addr(r_rslt[ADDR_W+1:2]),
    .w_we(w_ce && r_state == S_MEM && w_op5 == OP5_STORE),
    .w_din(r_rrs2), .r_dout(w_ldd));

  // WB
  assign w_rslt2 = (w_op5 == OP5_LOAD) ? w_ldd : r_rslt;

  always_ff @(posedge w_clk)
    if (w_rst)               r_pc <= '0;
    else if (w_ce && w_last) r_pc <= w_npc;

  // The instruction word is only valid while the PC stands still, so the PC
  // may move only at the end of an instruction's last step.
  a_pc_stable: assert property (
    @(posedge w_clk) disable iff (w_rst) !(w_ce && w_last) |=> $stable(r_pc));

  logic [31:0] r_led;
  always_ff @(posedge w_clk)
    if (w_rst)                        r_led <= '0;
    else if (w_we && w_rd == LED_REG) r_led <= w_rslt2;
  assign w_led = r_led;

endmodule
