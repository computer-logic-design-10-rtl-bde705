// tb_m_proc10_opt: self-checking testbench for m_proc10_opt.
//
// Two instances run side by side on one clock:
//  * u_demo keeps every parameter at its default and runs the demonstration
//    program from rtl/program.hex; the testbench checks the LED value (64) and
//    the cycle at which the PC reaches the program's final instruction.
//  * u_rand runs a program generated here (add, addi, lw, sw, beq, bne; a counted loop, then random code with forward branches) that is also executed by
//    the instruction-level model in rv_model_pkg. After the run every
//    register, the LED and the data-memory words the program can touch are
//    compared with the model, and the cycle count with 3 cycles per branch, 4 per add, addi and sw and 5 per lw.
//    The program is then run again with a random clock enable, which must
//    change nothing but the number of clock cycles.
// A watchdog ends the run with a failure if it hangs.

`timescale 1ns/1ps
module tb_m_proc10_opt;
  import rv_model_pkg::*;

  localparam int AW    = 12;
  localparam int NRAND = 80;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce  = 1'b0;
  logic [31:0] led_demo, led_rand;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  m_proc10_opt u_demo (.w_clk(clk), .w_rst(rst), .w_ce(ce), .w_led(led_demo));
  m_proc10_opt #(.ADDR_W(AW), .INIT_FILE("")) u_rand (
    .w_clk(clk), .w_rst(rst), .w_ce(ce), .w_led(led_rand));

  rv_model     model;
  logic [31:0] prog[$];
  logic [31:0] final_pc;
  int          exp_cycles;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Random program over the instructions the processor supports.
  function automatic void make_program();
    int n;
    prog = {};
    prog.push_back(enc_addi(31, 0, 1024));         // base register for lw/sw
    prog.push_back(enc_addi(1, 0, 5));             // loop counter
    prog.push_back(enc_addi(2, 2, 3));             // L:
    prog.push_back(enc_sw(2, 31, 0));
    prog.push_back(enc_lw(3, 31, 0));
    prog.push_back(enc_addi(1, 1, -1));
    prog.push_back(enc_bne(1, 0, -16));            // bne x1, x0, L
    prog.push_back(enc_beq(0, 0, 8));              // always taken, skips one
    prog.push_back(enc_addi(30, 0, 99));           // skipped
    n = prog.size();
    for (int i = n; i < NRAND - 1; i++) begin
      int rd  = 1 + int'($urandom % 30);
      int rs1 = int'($urandom % 32);
      int rs2 = int'($urandom % 32);
      int sel = int'($urandom % 6);
      int base = ($urandom % 2) ? 31 : 0;
      int off  = (base == 31) ? -512 + 4 * int'($urandom % 256) : 512 + 4 * int'($urandom % 384);
      case (sel)
        0: prog.push_back(enc_add(rd, rs1, rs2));
        1: prog.push_back(enc_addi(rd, rs1, int'($urandom % 4096) - 2048));
        2: prog.push_back(enc_lw(rd, base, off));
        3: prog.push_back(enc_sw(rs2, base, off));
        4: prog.push_back(enc_beq(rs1, (($urandom % 2) ? rs1 : rs2), 4 * (1 + int'($urandom % 4)) > 4 * (NRAND - 1 - i) ? 4 * (NRAND - 1 - i) : 4 * (1 + int'($urandom % 4))));
        5: prog.push_back(enc_bne(rs1, rs2, 4 * (1 + int'($urandom % 4)) > 4 * (NRAND - 1 - i) ? 4 * (NRAND - 1 - i) : 4 * (1 + int'($urandom % 4))));
        default: prog.push_back(enc_add(rd, rs1, rs2));
      endcase
    end
    prog.push_back(enc_beq(0, 0, 0));             // L: beq x0, x0, L
    final_pc = 32'(4 * (prog.size() - 1));
  endfunction

  task automatic load_dut();
    for (int i = 0; i < (1 << AW); i++) begin
      u_rand.m_imem.cm_ram[i] = (i < prog.size()) ? prog[i] : '0;
      u_rand.m_dmem.cm_ram[i] = (i < prog.size()) ? prog[i] : '0;
    end
    for (int i = 0; i < 32; i++) u_rand.m_regs.r_regs[i] = '0;
  endtask

  // Run the model to the final instruction and derive the expected cycles.
  task automatic run_model();
    int steps = 0;
    model.reset();
    model.load(prog);
    while (model.pc != final_pc && steps < 100000) begin
      void'(model.step());
      steps++;
    end
    exp_cycles = model.opt_cycles();

  endtask

  task automatic compare(input string tag);
    for (int r = 1; r < 32; r++)
      check(u_rand.m_regs.r_regs[r] == model.x[r],
            $sformatf("%s x%0d = %h, expected %h", tag, r, u_rand.m_regs.r_regs[r], model.x[r]));
    check(led_rand == model.led, $sformatf("%s led = %h, expected %h", tag, led_rand, model.led));
    for (int w = 0; w < 512; w++)
      if (u_rand.m_dmem.cm_ram[w] != model.dmem[w]) begin
        check(0, $sformatf("%s dmem[%0d] = %h, expected %h", tag, w, u_rand.m_dmem.cm_ram[w], model.dmem[w]));
        break;
      end
    check(1, "data memory");
  endtask

  // Transitions of the optimized state machine, seen in u_rand during pass 1.
  int n_ex_if, n_ex_mem, n_ex_wb, n_mem_if, n_mem_wb, n_wb_if;
  bit count_en = 1'b1;
  always @(posedge clk)
    if (rst) begin
      n_ex_if = 0; n_ex_mem = 0; n_ex_wb = 0; n_mem_if = 0; n_mem_wb = 0; n_wb_if = 0;
    end else if (ce && count_en && rand_done < 0) begin
      case ({u_rand.r_state, u_rand.w_next})
        {proc_pkg::S_EX,  proc_pkg::S_IF}:  n_ex_if++;
        {proc_pkg::S_EX,  proc_pkg::S_MEM}: n_ex_mem++;
        {proc_pkg::S_EX,  proc_pkg::S_WB}:  n_ex_wb++;
        {proc_pkg::S_MEM, proc_pkg::S_IF}:  n_mem_if++;
        {proc_pkg::S_MEM, proc_pkg::S_WB}:  n_mem_wb++;
        {proc_pkg::S_WB,  proc_pkg::S_IF}:  n_wb_if++;
        default: ;
      endcase
    end

  // Cycle (counted in enabled cycles after reset) at which each PC reaches its end.
  int cyc, demo_done, rand_done;
  always @(posedge clk) begin
    if (rst) begin
      cyc = 0; demo_done = -1; rand_done = -1;
    end else if (ce) begin
      cyc++;
    end
  end
  always @(negedge clk) begin
    if (!rst && demo_done < 0 && u_demo.r_pc == 32'd28) demo_done = cyc;
    if (!rst && rand_done < 0 && u_rand.r_pc == final_pc) rand_done = cyc;
  end

  initial begin
    model = new(AW);
    make_program();
    #1;
    load_dut();
    run_model();
    $display("program: %0d static, model: %0d branches (%0d taken), %0d loads, %0d stores, %0d alu; expected %0d cycles",
             prog.size(), model.n_branch, model.n_taken, model.n_load, model.n_store, model.n_alu, exp_cycles);

    // Pass 1: clock enable always high.
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0; ce = 1'b1;
    while ((demo_done < 0 || rand_done < 0) && cyc < exp_cycles + 1000) @(negedge clk);
    repeat (20) @(negedge clk);
    check(demo_done == 29, $sformatf("demo program reached its end after %0d cycles, expected 29", demo_done));
    check(led_demo == 32'd64, $sformatf("demo LED = %0d, expected 64", led_demo));
    check(rand_done == exp_cycles, $sformatf("random program reached its end after %0d cycles, expected %0d", rand_done, exp_cycles));
    compare("pass 1");
    count_en = 1'b0;
    check(n_ex_if == model.n_branch, $sformatf("EX->IF %0d times, expected %0d (branches)", n_ex_if, model.n_branch));
    check(n_ex_mem == model.n_load + model.n_store, $sformatf("EX->MEM %0d times, expected %0d", n_ex_mem, model.n_load + model.n_store));
    check(n_ex_wb == model.n_alu, $sformatf("EX->WB %0d times, expected %0d", n_ex_wb, model.n_alu));
    check(n_mem_if == model.n_store, $sformatf("MEM->IF %0d times, expected %0d (stores)", n_mem_if, model.n_store));
    check(n_mem_wb == model.n_load, $sformatf("MEM->WB %0d times, expected %0d (loads)", n_mem_wb, model.n_load));
    check(n_wb_if == model.n_load + model.n_alu, $sformatf("WB->IF %0d times, expected %0d", n_wb_if, model.n_load + model.n_alu));

    // Pass 2: random clock enable.
    rst = 1'b1; ce = 1'b1;
    repeat (2) @(negedge clk);
    load_dut();
    @(negedge clk); rst = 1'b0;
    while (rand_done < 0 && cyc < exp_cycles + 1000) begin
      ce = 1'($urandom % 2);
      @(negedge clk);
    end
    ce = 1'b1;
    repeat (20) @(negedge clk);
    check(rand_done == exp_cycles, $sformatf("pass 2: %0d enabled cycles, expected %0d", rand_done, exp_cycles));
    compare("pass 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
