// tb_m_top: end-to-end testbench for m_top at its default parameters.
//
// All six processors run the demonstration program from rtl/program.hex
// (4096-word memories). The testbench checks that each one ends with 64 on
// its LED, that each reaches its final instruction after the number of clock
// cycles its organisation implies (m_proc05 6, m_proc07 7, m_proc08 12,
// m_proc09 30, m_proc10 30, m_proc10_opt 29), and that nothing moves while
// the clock enable is low. It also counts how often each mechanism of the
// designs happens and fails if one never does: stores and loads in every
// processor, the PC holding at HALT_PC, a taken branch in m_proc07 and in
// m_proc10_opt, every transition of the optimized state machine, and a
// clock-enable stall.
`timescale 1ns/1ps
module tb_m_top;
  import proc_pkg::*;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [31:0] led05, led07, led08, led09, led10, led10o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  m_top dut (.w_clk(clk), .w_rst(rst), .w_ce(ce),
             .w_led05(led05), .w_led07(led07), .w_led08(led08),
             .w_led09(led09), .w_led10(led10), .w_led10o(led10o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Enabled cycles since reset, and the cycle each PC first reached its end.
  int cyc;
  int done[6];
  logic [31:0] pcs[6];
  localparam int          EXP_CYC[6] = '{6, 7, 12, 30, 30, 29};
  localparam logic [31:0] END_PC[6]  = '{24, 28, 24, 24, 24, 28};
  localparam string       NAME[6]    = '{"m_proc05", "m_proc07", "m_proc08", "m_proc09", "m_proc10", "m_proc10_opt"};
  assign pcs = '{dut.u_proc05.r_pc, dut.u_proc07.r_pc, dut.u_proc08.r_pc,
                 dut.u_proc09.r_pc, dut.u_proc10.r_pc, dut.u_proc10o.r_pc};

  // Mechanism counters.
  int n_store, n_load, n_halt_hold, n_branch_taken07, n_stall;
  int n_ex_if, n_ex_mem, n_ex_wb, n_mem_if, n_mem_wb, n_wb_if;

  always @(posedge clk) begin
    if (rst) begin
      cyc = 0;
      foreach (done[i]) done[i] = -1;
    end else begin
      if (ce) cyc++;
      if (!ce) n_stall++;
      if (ce && dut.u_proc09.r_state == S_MEM && dut.u_proc09.w_op5 == OP5_STORE) n_store++;
      if (ce && dut.u_proc09.r_state == S_MEM && dut.u_proc09.w_op5 == OP5_LOAD)  n_load++;
      if (ce && dut.u_proc05.r_pc == 32'd24) n_halt_hold++;
      if (ce && dut.u_proc07.w_taken) n_branch_taken07++;
      if (ce)
        case ({dut.u_proc10o.r_state, dut.u_proc10o.w_next})
          {S_EX,  S_IF}:  n_ex_if++;
          {S_EX,  S_MEM}: n_ex_mem++;
          {S_EX,  S_WB}:  n_ex_wb++;
          {S_MEM, S_IF}:  n_mem_if++;
          {S_MEM, S_WB}:  n_mem_wb++;
          {S_WB,  S_IF}:  n_wb_if++;
          default: ;
        endcase
    end
  end
  always @(negedge clk)
    if (!rst) foreach (done[i]) if (done[i] < 0 && pcs[i] == END_PC[i]) done[i] = cyc;

  logic [31:0] hold_pc[6];

  initial begin
    n_store = 0; n_load = 0; n_halt_hold = 0; n_branch_taken07 = 0; n_stall = 0;
    n_ex_if = 0; n_ex_mem = 0; n_ex_wb = 0; n_mem_if = 0; n_mem_wb = 0; n_wb_if = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0; ce = 1'b1;
    repeat (60) @(negedge clk);
    foreach (done[i])
      check(done[i] == EXP_CYC[i], $sformatf("%s reached PC %0d after %0d cycles, expected %0d",
                                             NAME[i], END_PC[i], done[i], EXP_CYC[i]));
    check(led05 == 32'd64, $sformatf("m_proc05 LED %0d", led05));
    check(led07 == 32'd64, $sformatf("m_proc07 LED %0d", led07));
    check(led08 == 32'd64, $sformatf("m_proc08 LED %0d", led08));
    check(led09 == 32'd64, $sformatf("m_proc09 LED %0d", led09));
    check(led10 == 32'd64, $sformatf("m_proc10 LED %0d", led10));
    check(led10o == 32'd64, $sformatf("m_proc10_opt LED %0d", led10o));
    check(dut.u_proc10.m_dmem.cm_ram[4] == 32'd55, "m_proc10 stored 55 at byte address 16");
    check(dut.u_proc10o.m_dmem.cm_ram[4] == 32'd55, "m_proc10_opt stored 55 at byte address 16");
    check(dut.u_proc07.m_regs.r_regs[7] == 32'd55, "m_proc07 loaded 55 into x7");

    // Clock enable low: nothing may move.
    ce = 1'b0;
    foreach (hold_pc[i]) hold_pc[i] = pcs[i];
    repeat (10) @(negedge clk);
    foreach (hold_pc[i]) check(pcs[i] == hold_pc[i], $sformatf("%s PC moved while disabled", NAME[i]));
    ce = 1'b1;
    repeat (10) @(negedge clk);

    $display("mechanisms: store %0d, load %0d, halt-hold %0d, taken branch (m_proc07) %0d, stall %0d",
             n_store, n_load, n_halt_hold, n_branch_taken07, n_stall);
    $display("optimized FSM: EX->IF %0d, EX->MEM %0d, EX->WB %0d, MEM->IF %0d, MEM->WB %0d, WB->IF %0d",
             n_ex_if, n_ex_mem, n_ex_wb, n_mem_if, n_mem_wb, n_wb_if);
    check(n_store > 0, "no store seen");
    check(n_load > 0, "no load seen");
    check(n_halt_hold > 0, "PC never held at HALT_PC");
    check(n_branch_taken07 > 0, "no taken branch in m_proc07");
    check(n_stall > 0, "no clock-enable stall");
    check(n_ex_if > 0, "optimized FSM never went EX->IF (branch)");
    check(n_ex_mem > 0, "optimized FSM never went EX->MEM");
    check(n_ex_wb > 0, "optimized FSM never went EX->WB (add, addi)");
    check(n_mem_if > 0, "optimized FSM never went MEM->IF (sw)");
    check(n_mem_wb > 0, "optimized FSM never went MEM->WB (lw)");
    check(n_wb_if > 0, "optimized FSM never went WB->IF");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
