// instr_mem: instruction memory.
//
// WORDS 16-bit instructions. Read is combinational: given the byte address
// pc it returns the instruction stored at word pc[AW:1]. A write port
// (we/waddr/wdata, written on the clock edge) loads the program before the
// processor runs; alternatively INIT_FILE names a hex file of instruction
// words read at start-up ($readmemh), the way assembled programs are delivered
// as machine-code files. The size, 1024 words, is what a 10-bit jump field
// reaches; the load port is this design's choice.
module instr_mem #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned WORDS  = 1024,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] pc,
  output logic [DATA_W-1:0] instr
);
  logic [DATA_W-1:0] mem [WORDS];

  initial
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb instr = mem[pc[AW:1]];

  // Bit 0 (byte within the word) and the bits above the memory are ignored
  logic unused_pc;
  assign unused_pc = ^{pc[DATA_W-1:AW+1], pc[0]};
endmodule
