// data_mem: data memory for variables and the stack.
//
// WORDS 16-bit words addressed by word. On a clock edge a write (we) stores
// wdata at addr; the read is synchronous: rdata holds, one cycle after addr
// is presented, the word at addr (it also serves as the memory data register
// of the multicycle datapath). A second, combinational read port (dbg_addr /
// dbg_data) lets a testbench or host observe memory. Size and word
// addressing are this design's choices (a 10-bit address field).
module data_mem #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned WORDS  = 1024,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic [AW-1:0]     dbg_addr,
  output logic [DATA_W-1:0] dbg_data
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

  always_comb dbg_data = mem[dbg_addr];
endmodule
