// bus_hdlr: CSHIA bus handler (BUS-HDLR).
//
// The bus handler sits between the processor's AHB master port and the AHB
// bus. To the processor it looks like the bus (it parks the grant on it and
// answers every transfer itself); to the bus it looks like the processor. It
// keeps a buffer of SEC Lines (the BHS buffer, NLINES lines of 256 bits,
// 128 bytes with the default 4) and only lets the processor read or write
// a line after the security engine has verified it. Lines are always fetched
// and written back whole, as 8-beat incrementing bursts of 32-bit words.
//
// State machine (the published one, with the small additions marked *):
//   IDLE             decide what the pending processor transfer needs:
//                    line in buffer and verified -> SERVE_LEON; line missing
//                    -> READ_GRANT; a check still running -> wait here
//   READ_GRANT       request the bus; once owned pick a victim slot; a
//                    modified victim is sent for a new PTAG (WAIT_PTAG_WRITE),
//                    a clean one is replaced (READ_LINE)
//   READ_LINE        burst-read the line, hand it to the security engine,
//                    back to IDLE (the processor waits there for the answer)
//   WAIT_PTAG_WRITE  wait until the new PTAG of the victim is stored
//   WRITE_LINE       burst-write the victim, back to IDLE
//   SERVE_LEON       complete processor reads and writes from the buffer
//   UNSAFE           enrollment: wait until the line's PTAG is stored
//   PASS*            single transfer to an address outside external RAM
//                    (peripherals), not buffered and not checked
//   PASS_DONE*       return the data of a PASS read to the processor
//   HALT*            a line failed its check (or the watchdog ran out): the
//                    processor is never answered again, violation is high
//
// Enrollment: when enroll_in is high after reset the handler walks all
// protected lines (code lines, then data lines) and has each one tagged
// before it serves the processor; enroll_done then goes high. With enroll_in
// low the PTAGs are taken to be in place already and enroll_done rises at
// once. bypass_in (static) connects processor and bus directly; log_in
// enables activity counters; watchdog_en_in halts the processor if the
// security engine does not answer within WDOG_CYCLES cycles.
//
// Processor-side timing: address phases are always accepted; the data phase
// is stretched with hready until the word can be served. Byte lanes follow
// the big-endian convention of the processor (byte 0 on hwdata[31:24]).
// The arbiter is assumed not to break an 8-beat burst and the bus to answer
// OKAY; split, retry and error responses are not handled.
//
// Lint notes: the PTAG value returned by the security engine is not used
// here (only valid, line_secure and ready are); it is part of the response
// record for debugging. rstn is used both as the asynchronous reset and in
// the disable condition of the handshake assertion at the end.
module bus_hdlr
  import cshia_pkg::*;
#(
  parameter int unsigned NLINES      = 4,
  parameter logic [31:0] CODE_BASE   = CODE_BASE_DEF,
  parameter int unsigned CODE_LINES  = CODE_LINES_DEF,
  parameter logic [31:0] DATA_BASE   = DATA_BASE_DEF,
  parameter int unsigned DATA_LINES  = DATA_LINES_DEF,
  parameter logic [31:0] RAM_BASE    = RAM_BASE_DEF,
  parameter logic [31:0] RAM_MASK    = RAM_MASK_DEF,
  parameter int unsigned WDOG_CYCLES = 1024
) (
  input  logic           clk,
  input  logic           rstn,
  // processor side
  input  ahb_mst_out_t   ahbo_in,
  output ahb_mst_in_t    ahbi_out,
  // bus side
  output ahb_mst_out_t   ahbo_out,
  input  ahb_mst_in_t    ahbi_in,
  // security engine
  output ptag_sec_req_t  ptag_sreq_out,
  input  ptag_sec_val_t  ptag_sval_in,
  // control and debug
  input  logic           bypass_in,
  input  logic           log_in,
  input  logic           watchdog_en_in,
  input  logic           enroll_in,
  output logic           enroll_done,
  output logic           violation,
  output bh_log_t        log_out
);

  localparam int unsigned SW     = (NLINES > 1) ? $clog2(NLINES) : 1;
  localparam int unsigned TAG_W  = HADDR_W - LINE_OFS_W;
  localparam int unsigned TOTAL  = CODE_LINES + DATA_LINES;
  localparam int unsigned EIW    = $clog2(TOTAL + 1);
  localparam int unsigned WDW    = $clog2(WDOG_CYCLES + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_READ_GRANT, S_READ_LINE, S_WAIT_PTAG_WRITE, S_WRITE_LINE,
    S_SERVE_LEON, S_UNSAFE, S_PASS, S_PASS_DONE, S_HALT
  } state_e;

  typedef enum logic [1:0] {OP_FILL, OP_PASS} op_e;
  typedef enum logic [1:0] {R_NONE, R_CHECK, R_WB, R_ENROLL} resp_e;

  typedef struct packed {
    logic             valid;
    logic             verified;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } slot_t;

  state_e              state;
  op_e                 op;
  slot_t               slot [NLINES];
  logic [LINE_W-1:0]   ldata [NLINES];
  logic [SW-1:0]       victim, rr_ptr;
  logic [31:0]         fetch_addr;
  logic [31:0]         wb_addr;      // line being written back

  // processor data phase
  logic                dp_valid, dp_write;
  logic [31:0]         dp_addr;
  logic [2:0]          dp_size;

  // bus side
  logic                owner;
  logic [3:0]          acnt, dcnt, nbeats;
  logic                dphase;
  logic [31:0]         pass_rdata;

  // security engine handshake
  ptag_sec_req_t       sreq_q;
  resp_e               resp_kind;
  logic [SW-1:0]       resp_slot;
  logic [EIW-1:0]      enr_idx;
  logic [WDW-1:0]      wdog_cnt;
  bh_log_t             log_q;

  // ------------------------------------------------------------ helpers
  function automatic logic is_ram(input logic [31:0] a);
    return (a & RAM_MASK) == (RAM_BASE & RAM_MASK);
  endfunction

  // big-endian byte-enable mask of a write of size sz at byte offset ofs
  function automatic logic [31:0] lane_mask(input logic [2:0] sz, input logic [1:0] ofs);
    unique case (sz)
      HSIZE_BYTE: return 32'hFF00_0000 >> (8 * ofs);
      HSIZE_HALF: return 32'hFFFF_0000 >> (8 * {ofs[1], 1'b0});
      default:    return 32'hFFFF_FFFF;
    endcase
  endfunction

  // ------------------------------------------------------------ lookup
  logic              hit;
  logic [SW-1:0]     hit_idx;
  logic              free_found;
  logic [SW-1:0]     free_idx;

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = 0; i < NLINES; i++) begin
      if (slot[i].valid && slot[i].tag == dp_addr[31:LINE_OFS_W] && !hit) begin
        hit     = 1'b1;
        hit_idx = SW'(i);
      end
      if (!slot[i].valid && !free_found) begin
        free_found = 1'b1;
        free_idx   = SW'(i);
      end
    end
  end

  logic        hit_ok;       // processor transfer can be served from the buffer
  logic        serve;        // data phase completes this cycle
  logic [2:0]  dp_word;
  logic [31:0] hit_word;

  assign dp_word  = dp_addr[LINE_OFS_W-1:2];
  assign hit_ok   = dp_valid && is_ram(dp_addr) && hit && slot[hit_idx].verified;
  assign hit_word = ldata[hit_idx][32*dp_word +: 32];
  assign serve    = (state == S_SERVE_LEON) && hit_ok;

  logic [31:0]   wmask;    // byte lanes of a processor write
  logic [SW-1:0] vsel;     // replacement choice: a free slot, else round robin
  assign wmask = lane_mask(dp_size, dp_addr[1:0]);
  assign vsel  = free_found ? free_idx : rr_ptr;

  logic proc_hready;
  assign proc_hready = (!dp_valid && state != S_HALT) || serve || (state == S_PASS_DONE);

  // ------------------------------------------------------------ bus master
  logic        bus_phase;    // burst states
  logic        addr_go;      // an address phase is driven this cycle
  logic [31:0] burst_base;

  assign bus_phase  = (state inside {S_READ_LINE, S_WRITE_LINE, S_PASS});
  assign addr_go    = bus_phase && owner && (acnt < nbeats);
  assign burst_base = (state == S_PASS)       ? dp_addr :
                      (state == S_WRITE_LINE) ? wb_addr : fetch_addr;

  ahb_mst_out_t bus_out;
  always_comb begin
    bus_out         = '0;
    bus_out.hbusreq = (state inside {S_READ_GRANT, S_WAIT_PTAG_WRITE}) ||
                      (bus_phase && acnt < nbeats);
    bus_out.hprot   = 4'b0011;
    bus_out.htrans  = addr_go ? ((acnt == 0) ? HTRANS_NONSEQ : HTRANS_SEQ) : HTRANS_IDLE;
    bus_out.haddr   = burst_base + 32'({acnt[2:0], 2'b00});
    bus_out.hwrite  = (state == S_WRITE_LINE) || (state == S_PASS && dp_write);
    bus_out.hsize   = (state == S_PASS) ? dp_size : HSIZE_WORD;
    bus_out.hburst  = (state == S_PASS) ? HBURST_SINGLE : HBURST_INCR8;
    bus_out.hwdata  = (state == S_PASS) ? ahbo_in.hwdata : ldata[victim][32*dcnt[2:0] +: 32];
  end

  // the filled line as it stands once the last word, arriving now, is in
  logic [LINE_W-1:0] fill_line;
  always_comb begin
    fill_line = ldata[victim];
    fill_line[LINE_W-32 +: 32] = ahbi_in.hrdata;
  end

  logic last_beat;
  assign last_beat = bus_phase && dphase && ahbi_in.hready && (dcnt == nbeats - 1);

  // ------------------------------------------------------------ outputs
  always_comb begin
    if (bypass_in) begin
      ahbo_out = ahbo_in;
      ahbi_out = ahbi_in;
    end else begin
      ahbo_out          = bus_out;
      ahbi_out.hgrant   = 1'b1;
      ahbi_out.hready   = proc_hready;
      ahbi_out.hresp    = HRESP_OKAY;
      ahbi_out.hrdata   = (state == S_PASS_DONE) ? pass_rdata : hit_word;
    end
  end

  assign ptag_sreq_out = sreq_q;
  assign log_out       = log_q;
  assign violation     = (state == S_HALT);

  logic sreq_accept, resp_in;
  assign sreq_accept = sreq_q.valid && ptag_sval_in.ready;
  assign resp_in     = ptag_sval_in.valid && (resp_kind != R_NONE);

  logic wdog_trip;
  assign wdog_trip = watchdog_en_in && (resp_kind != R_NONE) && (wdog_cnt >= WDW'(WDOG_CYCLES));

  // ------------------------------------------------------------ main FSM
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state       <= S_IDLE;
      op          <= OP_FILL;
      for (int i = 0; i < NLINES; i++) begin
        slot[i]  <= '0;
        ldata[i] <= '0;
      end
      victim      <= '0;
      rr_ptr      <= '0;
      fetch_addr  <= '0;
      wb_addr     <= '0;
      dp_valid    <= 1'b0;
      dp_write    <= 1'b0;
      dp_addr     <= '0;
      dp_size     <= '0;
      owner       <= 1'b0;
      acnt        <= '0;
      dcnt        <= '0;
      nbeats      <= 4'd8;
      dphase      <= 1'b0;
      pass_rdata  <= '0;
      sreq_q      <= '0;
      resp_kind   <= R_NONE;
      resp_slot   <= '0;
      enr_idx     <= '0;
      enroll_done <= 1'b0;
      wdog_cnt    <= '0;
      log_q       <= '0;
    end else begin
      // ---- processor address phase capture
      if (!bypass_in && proc_hready) begin
        dp_valid <= ahbo_in.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ};
        dp_addr  <= ahbo_in.haddr;
        dp_write <= ahbo_in.hwrite;
        dp_size  <= ahbo_in.hsize;
      end

      // ---- processor write data from the buffer
      if (serve && dp_write) begin
        ldata[hit_idx][32*dp_word +: 32] <= (hit_word & ~wmask) | (ahbo_in.hwdata & wmask);
        slot[hit_idx].dirty <= 1'b1;
      end
      if (serve && log_in) log_q.hits <= log_q.hits + 1;

      // ---- bus ownership (AHB: grant sampled with hready)
      if (ahbi_in.hready) owner <= ahbi_in.hgrant;

      // ---- burst engine
      if (bus_phase && ahbi_in.hready) begin
        if (dphase) begin
          if (state == S_READ_LINE) ldata[victim][32*dcnt[2:0] +: 32] <= ahbi_in.hrdata;
          if (state == S_PASS)      pass_rdata <= ahbi_in.hrdata;
          dcnt <= dcnt + 1'b1;
        end
        dphase <= addr_go;
        if (addr_go) acnt <= acnt + 1'b1;
      end

      // ---- security engine request / response
      if (sreq_accept) sreq_q.valid <= 1'b0;
      if (resp_kind != R_NONE) wdog_cnt <= wdog_cnt + 1'b1;
      else                     wdog_cnt <= '0;
      if (resp_in) begin
        resp_kind <= R_NONE;
        unique case (resp_kind)
          R_CHECK: if (ptag_sval_in.line_secure) slot[resp_slot].verified <= 1'b1;
          R_ENROLL: begin
            slot[resp_slot].verified <= 1'b1;
            if (32'(enr_idx) == TOTAL - 1) enroll_done <= 1'b1;
            enr_idx <= enr_idx + 1'b1;
          end
          default: ;
        endcase
      end

      // ---- control
      unique case (state)
        S_IDLE: begin
          if (bypass_in) begin
            // baseline mode: the handler stays out of the way
          end else if (!enroll_done && !enroll_in && resp_kind == R_NONE) begin
            enroll_done <= 1'b1;
          end else if (!enroll_done && resp_kind == R_NONE && !sreq_q.valid) begin
            fetch_addr <= enroll_addr(32'(enr_idx), CODE_BASE, CODE_LINES, DATA_BASE);
            op         <= OP_FILL;
            state      <= S_READ_GRANT;
          end else if (enroll_done && resp_kind == R_NONE && !sreq_q.valid && dp_valid) begin
            if (!is_ram(dp_addr)) begin
              op    <= OP_PASS;
              state <= S_READ_GRANT;
            end else if (hit) begin
              state <= S_SERVE_LEON;
            end else begin
              fetch_addr <= {dp_addr[31:LINE_OFS_W], {LINE_OFS_W{1'b0}}};
              op         <= OP_FILL;
              state      <= S_READ_GRANT;
            end
          end
        end

        S_READ_GRANT: if (owner) begin
          acnt   <= '0;
          dcnt   <= '0;
          dphase <= 1'b0;
          if (op == OP_PASS) begin
            nbeats <= 4'd1;
            state  <= S_PASS;
          end else begin
            victim <= vsel;
            nbeats <= 4'd8;
            if (slot[vsel].valid && slot[vsel].dirty) begin
              sreq_q    <= '{cache_line: ldata[vsel],
                             base_addr:  {slot[vsel].tag, {LINE_OFS_W{1'b0}}},
                             valid:      1'b1,
                             wr_ptag:    1'b1};
              resp_kind <= R_WB;
              wb_addr   <= {slot[vsel].tag, {LINE_OFS_W{1'b0}}};
              state     <= S_WAIT_PTAG_WRITE;
            end else begin
              slot[vsel].valid <= 1'b0;
              state         <= S_READ_LINE;
            end
          end
        end

        S_READ_LINE: if (last_beat) begin
          slot[victim] <= '{valid: 1'b1, verified: 1'b0, dirty: 1'b0,
                            tag: fetch_addr[31:LINE_OFS_W]};
          rr_ptr       <= (32'(rr_ptr) == NLINES - 1) ? '0 : rr_ptr + 1'b1;
          sreq_q       <= '{cache_line: fill_line,
                            base_addr:  fetch_addr,
                            valid:      1'b1,
                            wr_ptag:    !enroll_done};
          resp_slot    <= victim;
          resp_kind    <= enroll_done ? R_CHECK : R_ENROLL;
          if (log_in) log_q.fills <= log_q.fills + 1;
          state        <= enroll_done ? S_IDLE : S_UNSAFE;
        end

        S_WAIT_PTAG_WRITE: if (resp_in) begin
          acnt   <= '0;
          dcnt   <= '0;
          dphase <= 1'b0;
          state  <= S_WRITE_LINE;
        end

        S_WRITE_LINE: if (last_beat) begin
          slot[victim] <= '0;
          if (log_in) log_q.writebacks <= log_q.writebacks + 1;
          state        <= S_IDLE;
        end

        S_SERVE_LEON: if (dp_valid && !hit_ok) state <= S_IDLE;

        S_UNSAFE: if (resp_in) state <= S_IDLE;

        S_PASS: if (last_beat) begin
          if (log_in) log_q.passes <= log_q.passes + 1;
          state <= S_PASS_DONE;
        end

        S_PASS_DONE: state <= S_IDLE;

        S_HALT: ;

        default: state <= S_IDLE;
      endcase

      // a failed check or a silent security engine stops everything
      if ((resp_in && resp_kind == R_CHECK && !ptag_sval_in.line_secure) || wdog_trip)
        state <= S_HALT;
    end
  end

  // Only one line is with the security engine at a time: a request is never
  // raised without its answer being awaited.
  property p_no_req_while_busy;
    @(posedge clk) disable iff (!rstn) sreq_q.valid |-> resp_kind != R_NONE;
  endproperty
  a_no_req_while_busy: assert property (p_no_req_while_busy);

endmodule
