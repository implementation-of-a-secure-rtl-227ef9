// ptag_mem: one bank of the on-chip PTAG memory.
//
// The PTAG memory stores one 64-bit PTAG per protected SEC Line and, in a
// second bank, the PTAG chunks of the Merkle tree. In the prototype it lives
// in FPGA block RAM because the board's SRAM was too narrow for a 64-bit
// port; the two-bank split and the word counts (18816 + 8192 words of 64
// bits, 216,064 bytes in all) follow the published configuration.
//
// Interface: one synchronous port. With req high, we high writes wdata to
// word addr at the clock edge; with we low the word is read and appears on
// rdata after that edge. rdata keeps its value until the next read, so a
// reader may sample it any later cycle. Contents are not reset (block RAM).
module ptag_mem #(
  parameter int unsigned DEPTH = 18816,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             req,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req && we && (32'(addr) < DEPTH)) mem[addr] <= wdata;
    if (req && !we) rdata <= mem[addr];
  end

endmodule
