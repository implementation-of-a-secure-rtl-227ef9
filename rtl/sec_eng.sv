// sec_eng: CSHIA security engine (SEC-ENG).
//
// The engine takes SEC Lines from the bus handler and either validates them
// (computes the PTAG and compares it with the one kept in PTAG memory) or
// tags them (computes the PTAG and stores it). It owns the PTAG generator and,
// before any line is handled, derives the 128-bit instance key from the four
// 64-bit strings r1..r4 that the fuzzy extractor recovers from the PUFs:
//   K1 = PRF(key = r3||r4, address = C1, line = r1||r2)
//   K2 = PRF(key = r1||r2, address = C2, line = r3||r4)
//   K  = K1||K2
// using the PTAG generator itself with constants in place of the address, as
// the published design does (the unused upper half of the line is zero and
// the constant values are this design's choice).
//
// State machine (follows the published one; KEY_* added for the key step):
//   IDLE       ready; a valid request is registered and the PTAG started
//   CALC       wait for the PTAG (10 cycles); a read also fetches the stored
//              PTAG through the PMMU; lines the PMMU does not cover are
//              answered "secure" without a check
//   VALIDATE   compare computed and stored PTAG, answer the bus handler
//   WRITE_PTAG store the new PTAG, answer "secure"
//   WAIT_TREE  (MERKLE_EN) hand the stored PTAG to the Merkle-tree control
//              and wait until it confirms it, then VALIDATE
//   WRITE_TREE (MERKLE_EN) store the PTAG and let the tree control update
//              the tree, wait for it, answer "secure"
// While enroll_done is low every line is tagged, whatever wr_ptag says.
//
// Timing: sval_out.valid is a one-cycle strobe one cycle after VALIDATE or
// WRITE_PTAG (or after the tree's done in WRITE_TREE). Counting the cycle in
// which the request is taken as cycle 1, a read line without tree is
// answered in cycle 12: the PTAG is ready in cycle 10 (the prototype's
// 10-cycle PTAG generation), the stored PTAG is read in cycle 11 and the
// comparison is registered for cycle 12.
// The tree handshake is valid/done: tree_req_out.valid is high for one
// cycle; tree_resp_in.done may come any later cycle.
// rstn also appears in the disable condition of the assertion at the end,
// which lint reports as a reset used both synchronously and asynchronously.
module sec_eng
  import cshia_pkg::*;
#(
  parameter bit MERKLE_EN = 1'b1
) (
  input  logic              clk,
  input  logic              rstn,
  // fuzzy extractor: corrected PUF strings r1..r4 (fe_r[0] = r1)
  input  logic              fe_valid,
  input  logic [3:0][63:0]  fe_r,
  output logic              key_ready,
  // bus handler
  input  ptag_sec_req_t     ptag_sreq_in,
  output ptag_sec_val_t     ptag_sval_out,
  input  logic              enroll_done,
  // PMMU
  output ptag_mreq_t        ptag_mreq_out,
  input  ptag_mresp_t       ptag_mresp_in,
  input  logic              covered,
  // Merkle-tree control
  output tree_req_t         tree_req_out,
  input  tree_resp_t        tree_resp_in,
  // debug
  output logic [3:0]        status
);

  typedef enum logic [3:0] {
    S_KEY_WAIT, S_KEY1, S_KEY2, S_IDLE, S_CALC, S_VALIDATE,
    S_WRITE_PTAG, S_WAIT_TREE, S_WRITE_TREE
  } state_e;

  state_e             state;
  logic [31:0]        addr_q;
  logic               wr_q;
  logic [KEY_W-1:0]   key_q;
  logic [63:0]        k1_q;
  logic               tree_sent, tree_ok_q;
  logic               resp_valid, resp_secure;

  // PTAG generator inputs
  logic               pg_start, pg_done, pg_busy;
  logic [KEY_W-1:0]   pg_key;
  logic [63:0]        pg_addr;
  logic [LINE_W-1:0]  pg_line;
  logic [PTAG_W-1:0]  pg_ptag;

  ptag_gen #(.MSG_WORDS(1 + LINE_W / 64)) u_ptag_gen (
    .clk, .rstn,
    .start (pg_start),
    .key   (pg_key),
    .addr  (pg_addr),
    .line  (pg_line),
    .busy  (pg_busy),
    .done  (pg_done),
    .ptag  (pg_ptag)
  );

  always_comb begin
    pg_start = 1'b0;
    pg_key   = key_q;
    pg_addr  = {32'h0, ptag_sreq_in.base_addr};
    pg_line  = ptag_sreq_in.cache_line;
    unique case (state)
      S_KEY_WAIT: begin
        pg_start = fe_valid;
        pg_key   = {fe_r[3], fe_r[2]};
        pg_addr  = KEY_C1;
        pg_line  = {128'h0, fe_r[1], fe_r[0]};
      end
      S_KEY1: begin
        pg_start = pg_done;
        pg_key   = {fe_r[1], fe_r[0]};
        pg_addr  = KEY_C2;
        pg_line  = {128'h0, fe_r[3], fe_r[2]};
      end
      S_IDLE:  pg_start = ptag_sreq_in.valid;
      default: ;
    endcase
  end

  logic ptag_match;
  assign ptag_match = (ptag_mresp_in.data == pg_ptag);

  // PMMU request
  always_comb begin
    ptag_mreq_out         = '0;
    ptag_mreq_out.address = addr_q;
    ptag_mreq_out.data    = pg_ptag;
    unique case (state)
      S_CALC:       ptag_mreq_out.valid = pg_done && !wr_q && covered;
      S_WRITE_PTAG: begin ptag_mreq_out.valid = 1'b1; ptag_mreq_out.we = 1'b1; end
      S_WRITE_TREE: begin ptag_mreq_out.valid = !tree_sent; ptag_mreq_out.we = 1'b1; end
      default: ;
    endcase
  end

  // Merkle-tree request
  always_comb begin
    tree_req_out         = '0;
    tree_req_out.address = addr_q;
    tree_req_out.valid   = (state inside {S_WAIT_TREE, S_WRITE_TREE}) && !tree_sent;
    tree_req_out.we      = (state == S_WRITE_TREE);
    tree_req_out.ptag    = (state == S_WRITE_TREE) ? pg_ptag : ptag_mresp_in.data;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state       <= S_KEY_WAIT;
      addr_q      <= '0;
      wr_q        <= 1'b0;
      key_q       <= '0;
      k1_q        <= '0;
      tree_sent   <= 1'b0;
      tree_ok_q   <= 1'b0;
      resp_valid  <= 1'b0;
      resp_secure <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_KEY_WAIT: if (fe_valid) state <= S_KEY1;
        S_KEY1: if (pg_done) begin
          k1_q  <= pg_ptag;
          state <= S_KEY2;
        end
        S_KEY2: if (pg_done) begin
          key_q <= {pg_ptag, k1_q};
          state <= S_IDLE;
        end
        S_IDLE: if (ptag_sreq_in.valid) begin
          addr_q    <= ptag_sreq_in.base_addr;
          wr_q      <= ptag_sreq_in.wr_ptag || !enroll_done;
          tree_sent <= 1'b0;
          tree_ok_q <= !MERKLE_EN;
          state     <= S_CALC;
        end
        S_CALC: if (pg_done) begin
          if (!covered) begin
            resp_valid  <= 1'b1;
            resp_secure <= 1'b1;
            state       <= S_IDLE;
          end else if (wr_q) begin
            state <= MERKLE_EN ? S_WRITE_TREE : S_WRITE_PTAG;
          end else begin
            state <= MERKLE_EN ? S_WAIT_TREE : S_VALIDATE;
          end
        end
        S_VALIDATE: begin
          resp_valid  <= 1'b1;
          resp_secure <= ptag_match && tree_ok_q;
          state       <= S_IDLE;
        end
        S_WRITE_PTAG: begin
          resp_valid  <= 1'b1;
          resp_secure <= 1'b1;
          state       <= S_IDLE;
        end
        S_WAIT_TREE: begin
          if (!tree_sent) tree_sent <= 1'b1;
          if (tree_sent && tree_resp_in.done) begin
            tree_ok_q <= tree_resp_in.ok;
            state     <= S_VALIDATE;
          end
        end
        S_WRITE_TREE: begin
          if (!tree_sent) tree_sent <= 1'b1;
          if (tree_sent && tree_resp_in.done) begin
            resp_valid  <= 1'b1;
            resp_secure <= 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign key_ready = (state != S_KEY_WAIT) && (state != S_KEY1) && (state != S_KEY2);

  always_comb begin
    ptag_sval_out.ptag        = pg_ptag;
    ptag_sval_out.valid       = resp_valid;
    ptag_sval_out.line_secure = resp_secure;
    ptag_sval_out.ready       = (state == S_IDLE);
  end

  assign status = state;

  // The generator is only started when it is free: one PTAG at a time.
  property p_start_when_free;
    @(posedge clk) disable iff (!rstn) pg_start |-> !pg_busy;
  endproperty
  a_start_when_free: assert property (p_start_when_free);

endmodule
