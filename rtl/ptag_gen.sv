// ptag_gen: PTAG generator, a SipHash-2-4 keyed pseudo-random function.
//
// A PTAG is the 64-bit SipHash-2-4 of the line address followed by the
// 256-bit SEC Line, under the 128-bit instance key. The message is fixed at
// MSG_WORDS 64-bit words (address zero-extended to 64 bits, then line bits
// [63:0], [127:64], ...), so the length block is constant. Using SipHash-2-4,
// a 128-bit key and a 64-bit tag follows the published design; the word
// order of the message is this design's choice.
//
// Schedule (one iteration per clock, each iteration two SipRounds):
//   edge 1      : start sampled, state initialised from the key
//   edges 2..7  : five message words and the length block (c = 2 rounds each)
//   edges 8..9  : finalisation, 4 SipRounds in two cycles
//   edge 10     : tag registered, done high for one cycle
// With MSG_WORDS = 5 the tag is ready 10 cycles after start, the latency of
// the prototype. start is accepted only while busy is low.
//
// Ports: key[63:0] is k0 and key[127:64] is k1 in SipHash terms; addr and
// line are sampled together with start; ptag is held until the next start.
module ptag_gen
  import cshia_pkg::*;
#(
  parameter int unsigned MSG_WORDS = 5
) (
  input  logic                        clk,
  input  logic                        rstn,
  input  logic                        start,
  input  logic [KEY_W-1:0]            key,
  input  logic [63:0]                 addr,
  input  logic [64*(MSG_WORDS-1)-1:0] line,
  output logic                        busy,
  output logic                        done,
  output logic [PTAG_W-1:0]           ptag
);

  typedef struct packed {
    logic [63:0] v0, v1, v2, v3;
  } sip_state_t;

  typedef enum logic [1:0] {S_IDLE, S_COMP, S_FINAL, S_OUT} state_e;

  localparam int unsigned CNT_W = $clog2(MSG_WORDS + 2);

  state_e                  state;
  sip_state_t              v;
  logic [CNT_W-1:0]        cnt;
  logic [64*MSG_WORDS-1:0] msg;

  function automatic logic [63:0] rotl(input logic [63:0] x, input int unsigned n);
    return (x << n) | (x >> (64 - n));
  endfunction

  function automatic sip_state_t sip_round(input sip_state_t s);
    sip_state_t r = s;
    r.v0 = r.v0 + r.v1; r.v1 = rotl(r.v1, 13); r.v1 = r.v1 ^ r.v0; r.v0 = rotl(r.v0, 32);
    r.v2 = r.v2 + r.v3; r.v3 = rotl(r.v3, 16); r.v3 = r.v3 ^ r.v2;
    r.v0 = r.v0 + r.v3; r.v3 = rotl(r.v3, 21); r.v3 = r.v3 ^ r.v0;
    r.v2 = r.v2 + r.v1; r.v1 = rotl(r.v1, 17); r.v1 = r.v1 ^ r.v2; r.v2 = rotl(r.v2, 32);
    return r;
  endfunction

  // Absorb one message word: v3 ^= m, two rounds, v0 ^= m
  function automatic sip_state_t sip_absorb(input sip_state_t s, input logic [63:0] m);
    sip_state_t r = s;
    r.v3 = r.v3 ^ m;
    r = sip_round(sip_round(r));
    r.v0 = r.v0 ^ m;
    return r;
  endfunction

  // Final block: message length in bytes in the top byte, no tail bytes
  localparam logic [63:0] LEN_BLOCK = {8'(MSG_WORDS * 8), 56'h0};

  logic [63:0] cur_word;
  assign cur_word = (cnt < CNT_W'(MSG_WORDS)) ? msg[64*cnt +: 64] : LEN_BLOCK;

  // state entering finalisation: v2 ^= 0xff
  sip_state_t v_fin;
  always_comb begin
    v_fin    = v;
    v_fin.v2 = v.v2 ^ 64'hff;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      ptag  <= '0;
      v     <= '0;
      msg   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          v.v0  <= key[63:0]   ^ 64'h736f_6d65_7073_6575;
          v.v1  <= key[127:64] ^ 64'h646f_7261_6e64_6f6d;
          v.v2  <= key[63:0]   ^ 64'h6c79_6765_6e65_7261;
          v.v3  <= key[127:64] ^ 64'h7465_6462_7974_6573;
          msg   <= {line, addr};
          cnt   <= '0;
          state <= S_COMP;
        end
        S_COMP: begin
          v <= sip_absorb(v, cur_word);
          if (cnt == CNT_W'(MSG_WORDS)) begin
            cnt   <= '0;
            state <= S_FINAL;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_FINAL: begin
          if (cnt == '0) begin
            v     <= sip_round(sip_round(v_fin));
            cnt   <= cnt + 1'b1;
          end else begin
            v     <= sip_round(sip_round(v));
            state <= S_OUT;
          end
        end
        S_OUT: begin
          ptag  <= v.v0 ^ v.v1 ^ v.v2 ^ v.v3;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
