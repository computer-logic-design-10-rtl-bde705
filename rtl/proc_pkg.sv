// proc_pkg: constants and types shared by the processors of this repository.
//
// The processors execute a small subset of RV32I. They decode only the five
// upper bits of the 7-bit opcode (op5 = ir[6:2]); the two low bits are always
// 2'b11 for 32-bit RISC-V instructions. The multi-cycle machines step through
// the five classic phases IF, ID, EX, MEM and WB, encoded by state_t.
package proc_pkg;

  // op5 = ir[6:2]
  localparam logic [4:0] OP5_OP     = 5'b01100;  // R-type: add, sll, srl
  localparam logic [4:0] OP5_OPIMM  = 5'b00100;  // I-type: addi
  localparam logic [4:0] OP5_LOAD   = 5'b00000;  // lw
  localparam logic [4:0] OP5_STORE  = 5'b01000;  // sw
  localparam logic [4:0] OP5_BRANCH = 5'b11000;  // beq, bne

  // funct3 = ir[14:12]
  localparam logic [2:0] F3_ADD = 3'b000;
  localparam logic [2:0] F3_SLL = 3'b001;
  localparam logic [2:0] F3_SRL = 3'b101;
  localparam logic [2:0] F3_BEQ = 3'b000;
  localparam logic [2:0] F3_BNE = 3'b001;

  // Writes to this register are copied to the LED output register.
  localparam logic [4:0] LED_REG = 5'd30;

  // Phases of a multi-cycle instruction.
  typedef enum logic [2:0] {
    S_IF  = 3'd0,
    S_ID  = 3'd1,
    S_EX  = 3'd2,
    S_MEM = 3'd3,
    S_WB  = 3'd4
  } state_t;

  // Fields of an instruction word.
  function automatic logic [4:0] op5_of(input logic [31:0] ir);
    return ir[6:2];
  endfunction
  function automatic logic [4:0] rs1_of(input logic [31:0] ir);
    return ir[19:15];
  endfunction
  function automatic logic [4:0] rs2_of(input logic [31:0] ir);
    return ir[24:20];
  endfunction
  function automatic logic [4:0] rd_of(input logic [31:0] ir);
    return ir[11:7];
  endfunction
  function automatic logic [2:0] f3_of(input logic [31:0] ir);
    return ir[14:12];
  endfunction

  // Instructions that write the register file (add/sll/srl, addi, lw).
  function automatic logic writes_rd(input logic [31:0] ir);
    return op5_of(ir) == OP5_OP || op5_of(ir) == OP5_OPIMM || op5_of(ir) == OP5_LOAD;
  endfunction

endpackage
