// cshia_top: CSHIA secure-code-execution chassis.
//
// CSHIA (Computer Security by Hardware-Intrinsic Authentication) checks
// every 256-bit line of code or data that a processor brings in from
// external memory against a 64-bit tag (PTAG) computed with a key that only
// this chip can produce, because it comes from its PUFs. The processor, its
// instruction set and its toolchain are unchanged: the chassis is spliced
// into the processor's AHB master port.
//
//   processor AHB master --> bus_hdlr --> AHB bus (arbiter, memory, I/O)
//                               |
//                            sec_eng (ptag_gen, key derivation)
//                               |
//                             pmmu --> ptag_mem (line PTAGs, 18816 x 64)
//                                  --> ptag_mem (Merkle-tree PTAGs, 8192 x 64)
//
// Blocks that are not part of this RTL connect through ports: the fuzzy
// extractor delivers the corrected PUF strings r1..r4 (fe_*); the Merkle-tree
// controller receives check/update requests (tree_req_out/tree_resp_in) and
// reaches its own PTAG bank through the PMMU (tree_m*). With MERKLE_EN = 0
// the tree ports are idle and the engine compares PTAGs on its own.
//
// Operation after reset: the engine derives the key once fe_valid is high;
// then, if enroll_in is high, the handler tags every protected line
// (enrollment) and raises enroll_done; from then on every line fetched for
// the processor is validated before the processor sees it, and modified
// lines get a new PTAG before they are written back. A failed check stops
// the processor and raises violation.
module cshia_top
  import cshia_pkg::*;
#(
  parameter int unsigned NLINES      = 4,
  parameter bit          MERKLE_EN   = 1'b1,
  parameter logic [31:0] CODE_BASE   = CODE_BASE_DEF,
  parameter int unsigned CODE_LINES  = CODE_LINES_DEF,
  parameter logic [31:0] DATA_BASE   = DATA_BASE_DEF,
  parameter int unsigned DATA_LINES  = DATA_LINES_DEF,
  parameter int unsigned TREE_WORDS  = TREE_WORDS_DEF,
  parameter logic [31:0] RAM_BASE    = RAM_BASE_DEF,
  parameter logic [31:0] RAM_MASK    = RAM_MASK_DEF,
  parameter int unsigned WDOG_CYCLES = 1024,
  parameter int unsigned TAW         = $clog2(TREE_WORDS)
) (
  input  logic              clk,
  input  logic              rstn,
  // processor AHB master port
  input  ahb_mst_out_t      proc_ahbo_in,
  output ahb_mst_in_t       proc_ahbi_out,
  // AHB bus
  output ahb_mst_out_t      bus_ahbo_out,
  input  ahb_mst_in_t       bus_ahbi_in,
  // fuzzy extractor
  input  logic              fe_valid,
  input  logic [3:0][63:0]  fe_r,
  output logic              key_ready,
  // Merkle-tree controller
  output tree_req_t         tree_req_out,
  input  tree_resp_t        tree_resp_in,
  input  logic              tree_mreq,
  input  logic              tree_mwe,
  input  logic [TAW-1:0]    tree_maddr,
  input  logic [PTAG_W-1:0] tree_mwdata,
  output logic [PTAG_W-1:0] tree_mrdata,
  // control and status
  input  logic              bypass_in,
  input  logic              log_in,
  input  logic              watchdog_en_in,
  input  logic              enroll_in,
  output logic              enroll_done,
  output logic              violation,
  output bh_log_t           log_out,
  output logic [3:0]        sec_status
);

  localparam int unsigned LAW = $clog2(CODE_LINES + DATA_LINES);

  ptag_sec_req_t sreq;
  ptag_sec_val_t sval;
  ptag_mreq_t    mreq;
  ptag_mresp_t   mresp;
  logic          covered;

  logic              lmem_req, lmem_we, tmem_req, tmem_we;
  logic [LAW-1:0]    lmem_addr;
  logic [TAW-1:0]    tmem_addr;
  logic [PTAG_W-1:0] lmem_wdata, lmem_rdata, tmem_wdata, tmem_rdata;

  bus_hdlr #(
    .NLINES(NLINES), .CODE_BASE(CODE_BASE), .CODE_LINES(CODE_LINES),
    .DATA_BASE(DATA_BASE), .DATA_LINES(DATA_LINES), .RAM_BASE(RAM_BASE),
    .RAM_MASK(RAM_MASK), .WDOG_CYCLES(WDOG_CYCLES)
  ) u_bus_hdlr (
    .clk, .rstn,
    .ahbo_in        (proc_ahbo_in),
    .ahbi_out       (proc_ahbi_out),
    .ahbo_out       (bus_ahbo_out),
    .ahbi_in        (bus_ahbi_in),
    .ptag_sreq_out  (sreq),
    .ptag_sval_in   (sval),
    .bypass_in, .log_in, .watchdog_en_in, .enroll_in,
    .enroll_done, .violation, .log_out
  );

  sec_eng #(.MERKLE_EN(MERKLE_EN)) u_sec_eng (
    .clk, .rstn,
    .fe_valid, .fe_r, .key_ready,
    .ptag_sreq_in   (sreq),
    .ptag_sval_out  (sval),
    .enroll_done,
    .ptag_mreq_out  (mreq),
    .ptag_mresp_in  (mresp),
    .covered,
    .tree_req_out, .tree_resp_in,
    .status         (sec_status)
  );

  pmmu #(
    .CODE_BASE(CODE_BASE), .CODE_LINES(CODE_LINES), .DATA_BASE(DATA_BASE),
    .DATA_LINES(DATA_LINES), .TREE_WORDS(TREE_WORDS)
  ) u_pmmu (
    .sec_req (mreq), .sec_resp (mresp), .covered,
    .tree_mreq, .tree_mwe, .tree_maddr, .tree_mwdata, .tree_mrdata,
    .lmem_req, .lmem_we, .lmem_addr, .lmem_wdata, .lmem_rdata,
    .tmem_req, .tmem_we, .tmem_addr, .tmem_wdata, .tmem_rdata
  );

  ptag_mem #(.DEPTH(CODE_LINES + DATA_LINES), .WIDTH(PTAG_W)) u_line_ptags (
    .clk, .req (lmem_req), .we (lmem_we), .addr (lmem_addr),
    .wdata (lmem_wdata), .rdata (lmem_rdata)
  );

  ptag_mem #(.DEPTH(TREE_WORDS), .WIDTH(PTAG_W)) u_tree_ptags (
    .clk, .req (tmem_req), .we (tmem_we), .addr (tmem_addr),
    .wdata (tmem_wdata), .rdata (tmem_rdata)
  );

endmodule
