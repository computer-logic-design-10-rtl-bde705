// rv_model_pkg: testbench support for the processors.
//
// Instruction encoders for the supported RV32I subset, and rv_model, an
// instruction-level reference model. The model executes one instruction per
// call of step() on its own copies of the instruction memory, data memory and
// registers, and counts the dynamic instruction mix, from which the
// testbenches derive the cycle count each processor should need.
package rv_model_pkg;

  function automatic logic [31:0] enc_r(input logic [2:0] f3, input int rd, rs1, rs2);
    return {7'd0, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_add(input int rd, rs1, rs2);
    return enc_r(3'b000, rd, rs1, rs2);
  endfunction
  function automatic logic [31:0] enc_sll(input int rd, rs1, rs2);
    return enc_r(3'b001, rd, rs1, rs2);
  endfunction
  function automatic logic [31:0] enc_srl(input int rd, rs1, rs2);
    return enc_r(3'b101, rd, rs1, rs2);
  endfunction
  function automatic logic [31:0] enc_addi(input int rd, rs1, imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] enc_lw(input int rd, rs1, imm);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic logic [31:0] enc_sw(input int rs2, rs1, imm);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input logic [2:0] f3, input int rs1, rs2, off);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_beq(input int rs1, rs2, off);
    return enc_b(3'b000, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] enc_bne(input int rs1, rs2, off);
    return enc_b(3'b001, rs1, rs2, off);
  endfunction

  // The lecture's demonstration program (LED ends at 64).
  function automatic void demo_program(ref logic [31:0] prog[$]);
    prog = {};
    prog.push_back(enc_add(0, 0, 0));    // nop
    prog.push_back(enc_addi(4, 0, 55));  // x4 = 55
    prog.push_back(enc_sw(4, 0, 16));    // m[16] = x4
    prog.push_back(enc_lw(7, 0, 16));    // x7 = m[16]
    prog.push_back(enc_addi(2, 0, 9));   // x2 = 9
    prog.push_back(enc_add(3, 7, 2));    // x3 = x7 + x2
    prog.push_back(enc_add(30, 0, 3));   // led = x3
    prog.push_back(enc_beq(0, 0, 0));    // L: beq x0, x0, L
  endfunction

  class rv_model;
    int          aw;
    logic [31:0] imem[];
    logic [31:0] dmem[];
    logic [31:0] x[32];
    logic [31:0] pc;
    logic [31:0] led;
    int n_branch, n_load, n_store, n_alu, n_taken;

    function new(int addr_w);
      aw = addr_w;
      imem = new[1 << aw];
      dmem = new[1 << aw];
      reset();
    endfunction

    function void reset();
      foreach (imem[i]) begin imem[i] = '0; dmem[i] = '0; end
      foreach (x[i]) x[i] = '0;
      pc = 0; led = 0;
      n_branch = 0; n_load = 0; n_store = 0; n_alu = 0; n_taken = 0;
    endfunction

    // The program goes into both memories, as the processors' memories are
    // loaded with the same image.
    function void load(logic [31:0] prog[$]);
      foreach (prog[i]) begin imem[i] = prog[i]; dmem[i] = prog[i]; end
    endfunction

    function int widx(logic [31:0] a);
      return int'((a >> 2) & ((1 << aw) - 1));
    endfunction

    function void wr(int rd, logic [31:0] v);
      if (rd != 0) x[rd] = v;
      if (rd == 30) led = v;
    endfunction

    // Execute one instruction. Returns 0 for an opcode outside the subset.
    function bit step();
      logic [31:0] ir = imem[widx(pc)];
      int rd = int'(ir[11:7]), rs1 = int'(ir[19:15]), rs2 = int'(ir[24:20]);
      logic [31:0] immi = {{20{ir[31]}}, ir[31:20]};
      logic [31:0] imms = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      logic [31:0] immb = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      logic [31:0] npc = pc + 4;
      case (ir[6:0])
        7'b0110011: begin
          n_alu++;
          case (ir[14:12])
            3'b001:  wr(rd, x[rs1] << x[rs2][4:0]);
            3'b101:  wr(rd, x[rs1] >> x[rs2][4:0]);
            default: wr(rd, x[rs1] + x[rs2]);
          endcase
        end
        7'b0010011: begin n_alu++; wr(rd, x[rs1] + immi); end
        7'b0000011: begin n_load++; wr(rd, dmem[widx(x[rs1] + immi)]); end
        7'b0100011: begin n_store++; dmem[widx(x[rs1] + imms)] = x[rs2]; end
        7'b1100011: begin
          n_branch++;
          if ((ir[14:12] == 3'b000 && x[rs1] == x[rs2]) ||
              (ir[14:12] == 3'b001 && x[rs1] != x[rs2])) begin
            npc = pc + immb;
            n_taken++;
          end
        end
        default: return 0;
      endcase
      pc = npc;
      return 1;
    endfunction

    // Cycles the optimized multi-cycle state machine needs for the mix so far.
    function int opt_cycles();
      return 3 * n_branch + 4 * n_store + 4 * n_alu + 5 * n_load;
    endfunction
  endclass

endpackage
