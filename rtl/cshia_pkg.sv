// cshia_pkg: types and constants shared by the CSHIA blocks.
//
// CSHIA authenticates every memory block ("SEC Line") that the processor
// fetches from external memory with a 64-bit keyed tag (PTAG). This package
// holds the AHB master bundles seen on both sides of the bus handler, the
// request/response records between the bus handler, the security engine and
// the PTAG memory management unit, and the default memory map.
//
// Field lists follow the record types of the published design (line, base
// address, valid, write-PTAG flag; PTAG, valid, line-secure, ready; write
// enable, address, data). The AHB bundles keep only the signals the handler
// uses: interrupt, scan-test and configuration fields are left out.
// The memory-map numbers follow the FPGA prototype: code at 0x4000_0000,
// data at 0x4001_3000, 2432 code lines plus 16384 data lines (512 KB) of
// coverage, 32-byte (256-bit) SEC Lines made of eight 32-bit words.
package cshia_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned HADDR_W     = 32;
  localparam int unsigned HDATA_W     = 32;
  localparam int unsigned LINE_WORDS  = 8;                     // 256-bit cache line
  localparam int unsigned LINE_W      = LINE_WORDS * HDATA_W;  // 256
  localparam int unsigned LINE_BYTES  = LINE_W / 8;            // 32
  localparam int unsigned LINE_OFS_W  = $clog2(LINE_BYTES);    // 5
  localparam int unsigned PTAG_W      = 64;
  localparam int unsigned KEY_W       = 128;

  // ------------------------------------------------------- default memory map
  localparam logic [31:0] CODE_BASE_DEF  = 32'h4000_0000;
  localparam int unsigned CODE_LINES_DEF = 2432;    // 0x13000 bytes of code
  localparam logic [31:0] DATA_BASE_DEF  = 32'h4001_3000;
  localparam int unsigned DATA_LINES_DEF = 16384;   // 512 KB of data
  localparam int unsigned TREE_WORDS_DEF = 8192;    // Merkle-tree PTAG bank
  // External RAM window handled through the SEC Line buffer (128 MB)
  localparam logic [31:0] RAM_BASE_DEF   = 32'h4000_0000;
  localparam logic [31:0] RAM_MASK_DEF   = 32'hF800_0000;

  // Constants that take the place of the line address when the key halves are
  // derived. Real line addresses are 32-byte aligned, so 1 and 2 never clash.
  localparam logic [63:0] KEY_C1 = 64'h0000_0000_0000_0001;
  localparam logic [63:0] KEY_C2 = 64'h0000_0000_0000_0002;

  // ---------------------------------------------------------------- AHB
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_INCR8  = 3'b101
  } hburst_e;

  localparam logic [1:0] HRESP_OKAY  = 2'b00;
  localparam logic [1:0] HRESP_ERROR = 2'b01;

  localparam logic [2:0] HSIZE_BYTE  = 3'b000;
  localparam logic [2:0] HSIZE_HALF  = 3'b001;
  localparam logic [2:0] HSIZE_WORD  = 3'b010;

  // What an AHB master drives
  typedef struct packed {
    logic               hbusreq;
    logic               hlock;
    logic [1:0]         htrans;
    logic [HADDR_W-1:0] haddr;
    logic               hwrite;
    logic [2:0]         hsize;
    logic [2:0]         hburst;
    logic [3:0]         hprot;
    logic [HDATA_W-1:0] hwdata;
  } ahb_mst_out_t;

  // What an AHB master receives
  typedef struct packed {
    logic               hgrant;
    logic               hready;
    logic [1:0]         hresp;
    logic [HDATA_W-1:0] hrdata;
  } ahb_mst_in_t;

  // ------------------------------------------ BUS-HDLR <-> SEC-ENG records
  typedef struct packed {
    logic [LINE_W-1:0]  cache_line;  // word i in bits [32*i +: 32], word 0 at base_addr
    logic [HADDR_W-1:0] base_addr;   // 32-byte aligned line address
    logic               valid;
    logic               wr_ptag;     // 1: tag and store, 0: validate
  } ptag_sec_req_t;

  typedef struct packed {
    logic [PTAG_W-1:0]  ptag;        // computed PTAG
    logic               valid;       // one-cycle response strobe
    logic               line_secure; // line verified (or tag stored)
    logic               ready;       // can take a new line
  } ptag_sec_val_t;

  // ------------------------------------------------ SEC-ENG <-> PMMU records
  typedef struct packed {
    logic               valid;
    logic               we;
    logic [HADDR_W-1:0] address;     // line address
    logic [PTAG_W-1:0]  data;
  } ptag_mreq_t;

  typedef struct packed {
    logic [PTAG_W-1:0]  data;        // PTAG read one cycle after the request
  } ptag_mresp_t;

  // ---------------------------------------- SEC-ENG <-> Merkle-tree control
  typedef struct packed {
    logic               valid;
    logic               we;          // 1: new PTAG written, 0: check stored PTAG
    logic [HADDR_W-1:0] address;
    logic [PTAG_W-1:0]  ptag;
  } tree_req_t;

  typedef struct packed {
    logic               done;        // one-cycle completion strobe
    logic               ok;          // tree agrees with the PTAG (reads)
  } tree_resp_t;

  // Bus-handler activity counters, enabled by log_in
  typedef struct packed {
    logic [31:0] hits;
    logic [31:0] fills;
    logic [31:0] writebacks;
    logic [31:0] passes;
  } bh_log_t;

  // ------------------------------------------------------------ helpers
  // Line address of the idx-th protected line: code lines first, then data.
  function automatic logic [31:0] enroll_addr(input int unsigned idx,
                                              input logic [31:0] code_base,
                                              input int unsigned code_lines,
                                              input logic [31:0] data_base);
    if (idx < code_lines) return code_base + 32'(idx * LINE_BYTES);
    else                  return data_base + 32'((idx - code_lines) * LINE_BYTES);
  endfunction

endpackage
