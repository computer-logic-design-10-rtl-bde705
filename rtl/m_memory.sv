// m_memory: word memory with a synchronous write port and a registered read
// port, the shape an FPGA maps to block RAM.
//
// 2**ADDR_W words of 32 bits (4096 by default). At every rising clock edge the
// word at w_addr is copied into r_dout (one cycle read latency) and, when w_we
// is high, w_din is written to w_addr. A read of the address being written
// returns the old word (read-first). Because r_dout is refreshed every clock,
// it keeps its value for as long as w_addr stays unchanged; the multi-cycle
// processors rely on this to use it as their instruction register.
//
// The contents are cleared and then loaded from INIT_FILE ($readmemh) at start.
// Size and read/write behaviour follow the lecture's synchronous memory; the
// init-file mechanism is this design's own. Like a block RAM output register,
// r_dout holds no defined value until the first clock edge.
module m_memory #(
  parameter int    ADDR_W    = 12,
  parameter string INIT_FILE = "rtl/program.hex"
) (
  input  logic              w_clk,
  input  logic [ADDR_W-1:0] w_addr,
  input  logic              w_we,
  input  logic [31:0]       w_din,
  output logic [31:0]       r_dout
);

  logic [31:0] cm_ram [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) cm_ram[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, cm_ram);
  end

  always_ff @(posedge w_clk) begin
    if (w_we) cm_ram[w_addr] <= w_din;
    r_dout <= cm_ram[w_addr];
  end

endmodule
