// m_amemory: word memory with a synchronous write port and an asynchronous
// (combinational) read port, the shape an FPGA maps to distributed LUT RAM.
//
// 2**ADDR_W words of 32 bits (4096 by default). A write of w_din to w_addr
// happens at the rising clock edge when w_we is high. w_dout shows the word at
// w_addr in the same cycle, so a processor can fetch and use an instruction, or
// load and write back a word, within one clock period.
//
// The contents are cleared and then loaded from INIT_FILE (hexadecimal words,
// one per line, read with $readmemh) when simulation or configuration starts.
// Size and read/write behaviour follow the lecture's asynchronous memory; the
// init-file mechanism is this design's choice.
module m_amemory #(
  parameter int    ADDR_W    = 12,
  parameter string INIT_FILE = "rtl/program.hex"
) (
  input  logic              w_clk,
  input  logic [ADDR_W-1:0] w_addr,
  input  logic              w_we,
  input  logic [31:0]       w_din,
  output logic [31:0]       w_dout
);

  logic [31:0] cm_ram [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) cm_ram[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, cm_ram);
  end

  always_ff @(posedge w_clk)
    if (w_we) cm_ram[w_addr] <= w_din;

  assign w_dout = cm_ram[w_addr];

endmodule
