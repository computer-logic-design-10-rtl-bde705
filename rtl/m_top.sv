// m_top: the lecture's processors side by side.
//
// Five implementations of the same small RISC-V machine trade clock period
// against cycles per instruction:
//   m_proc05      single cycle, add/addi/lw/sw                     IPC 1.0
//   m_proc07      single cycle, adds sll/srl/beq/bne (baseline)    IPC 1.0
//   m_proc08      two states (IF+ID+EX, MEM+WB)                    IPC 0.5
//   m_proc09      five states, asynchronous memories               IPC 0.2
//   m_proc10      five states, synchronous (block RAM) memories    IPC 0.2
//   m_proc10_opt  m_proc10 with the optimized state machine
//                 (3 to 5 cycles per instruction) and beq/bne
// They share nothing but clock, reset and clock enable. Each has its own
// instruction and data memories of 2**ADDR_W words, both loaded from
// INIT_FILE, and brings out its LED register (last value written to x30).
// Grouping them in one top is this design's arrangement.
module m_top #(
  parameter int    ADDR_W    = 12,
  parameter string INIT_FILE = "rtl/program.hex"
) (
  input  logic        w_clk,
  input  logic        w_rst,
  input  logic        w_ce,
  output logic [31:0] w_led05,
  output logic [31:0] w_led07,
  output logic [31:0] w_led08,
  output logic [31:0] w_led09,
  output logic [31:0] w_led10,
  output logic [31:0] w_led10o
);

  m_proc05     #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc05  (.w_clk, .w_rst, .w_ce, .w_led(w_led05));
  m_proc07     #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc07  (.w_clk, .w_rst, .w_ce, .w_led(w_led07));
  m_proc08     #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc08  (.w_clk, .w_rst, .w_ce, .w_led(w_led08));
  m_proc09     #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc09  (.w_clk, .w_rst, .w_ce, .w_led(w_led09));
  m_proc10     #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc10  (.w_clk, .w_rst, .w_ce, .w_led(w_led10));
  m_proc10_opt #(.ADDR_W(ADDR_W), .INIT_FILE(INIT_FILE)) u_proc10o (.w_clk, .w_rst, .w_ce, .w_led(w_led10o));

endmodule
