// pmmu: PTAG Memory Management Unit.
//
// The PMMU hides the PTAG memory from the rest of CSHIA. The security engine
// asks for the PTAG of a SEC Line by its line address; the PMMU turns that
// address into a word index of the line-PTAG bank and reads or writes the
// word. Code lines [CODE_BASE, CODE_BASE + 32*CODE_LINES) take indices
// 0..CODE_LINES-1 and data lines [DATA_BASE, DATA_BASE + 32*DATA_LINES)
// follow them, which with the defaults gives 18816 words (code + 512 KB of
// data). An address outside both windows is reported as not covered and no
// memory access is made for it; the security engine lets such lines through
// unchecked, as the prototype did for memory beyond its coverage.
//
// The Merkle-tree PTAGs sit in a bank of their own ("split in two" in the
// published design so the decoder stays trivial). The tree controller, an
// external extension, reaches it through the tree_* port by word index.
//
// Timing: a request is decoded combinationally and reaches the bank in the
// same cycle; read data arrives one cycle later and is held. covered is a
// combinational function of sec_req.address.
module pmmu
  import cshia_pkg::*;
#(
  parameter logic [31:0] CODE_BASE  = CODE_BASE_DEF,
  parameter int unsigned CODE_LINES = CODE_LINES_DEF,
  parameter logic [31:0] DATA_BASE  = DATA_BASE_DEF,
  parameter int unsigned DATA_LINES = DATA_LINES_DEF,
  parameter int unsigned TREE_WORDS = TREE_WORDS_DEF,
  parameter int unsigned LAW        = $clog2(CODE_LINES + DATA_LINES),
  parameter int unsigned TAW        = $clog2(TREE_WORDS)
) (
  // security engine side
  input  ptag_mreq_t         sec_req,
  output ptag_mresp_t        sec_resp,
  output logic               covered,
  // Merkle-tree controller side
  input  logic               tree_mreq,
  input  logic               tree_mwe,
  input  logic [TAW-1:0]     tree_maddr,
  input  logic [PTAG_W-1:0]  tree_mwdata,
  output logic [PTAG_W-1:0]  tree_mrdata,
  // line-PTAG bank
  output logic               lmem_req,
  output logic               lmem_we,
  output logic [LAW-1:0]     lmem_addr,
  output logic [PTAG_W-1:0]  lmem_wdata,
  input  logic [PTAG_W-1:0]  lmem_rdata,
  // tree-PTAG bank
  output logic               tmem_req,
  output logic               tmem_we,
  output logic [TAW-1:0]     tmem_addr,
  output logic [PTAG_W-1:0]  tmem_wdata,
  input  logic [PTAG_W-1:0]  tmem_rdata
);

  localparam logic [31:0] CODE_SPAN = 32'(CODE_LINES * LINE_BYTES);
  localparam logic [31:0] DATA_SPAN = 32'(DATA_LINES * LINE_BYTES);

  logic [31:0] code_ofs, data_ofs;
  logic        in_code, in_data;
  logic [LAW-1:0] index;

  always_comb begin
    code_ofs = sec_req.address - CODE_BASE;
    data_ofs = sec_req.address - DATA_BASE;
    in_code  = (sec_req.address >= CODE_BASE) && (code_ofs < CODE_SPAN);
    in_data  = (sec_req.address >= DATA_BASE) && (data_ofs < DATA_SPAN);
    if (in_code)      index = LAW'(code_ofs >> LINE_OFS_W);
    else if (in_data) index = LAW'(CODE_LINES + 32'(data_ofs >> LINE_OFS_W));
    else              index = '0;
  end

  assign covered    = in_code || in_data;

  assign lmem_req   = sec_req.valid && covered;
  assign lmem_we    = sec_req.we;
  assign lmem_addr  = index;
  assign lmem_wdata = sec_req.data;
  assign sec_resp   = '{data: lmem_rdata};

  assign tmem_req    = tree_mreq;
  assign tmem_we     = tree_mwe;
  assign tmem_addr   = tree_maddr;
  assign tmem_wdata  = tree_mwdata;
  assign tree_mrdata = tmem_rdata;

endmodule
