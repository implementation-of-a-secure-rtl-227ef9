// tb_bus_hdlr: self-checking testbench of the bus handler.
//
// Around the handler: a processor model (AHB master issuing pipelined
// transfers through the handler), a bus model (arbiter that grants after a
// random delay, memory slave with random wait states, content of unwritten
// words computed from the address) and a security-engine model that answers
// after a random delay and calls a line secure when it equals the trusted
// memory image the testbench keeps. Reduced memory map: 4 code and 4 data
// lines. Checked: enrollment order and completion, every processor read
// against a reference image, write-back of modified lines (and their
// re-tagging request), peripheral pass-through, the activity counters, the
// halt on a tampered line, the watchdog and the bypass mode.
module tb_bus_hdlr;
  import cshia_pkg::*;

  localparam logic [31:0] CB = 32'h4000_0000;
  localparam logic [31:0] DB = 32'h4001_3000;
  localparam int          CL = 4, DL = 4;

  logic clk = 0, rstn = 0;
  ahb_mst_out_t  pout;     // processor -> handler
  ahb_mst_in_t   pin;      // handler -> processor
  ahb_mst_out_t  bout;     // handler -> bus
  ahb_mst_in_t   bin;      // bus -> handler
  ptag_sec_req_t sreq;
  ptag_sec_val_t sval;
  logic bypass = 0, log_en = 1, wdog_en = 0, enroll = 1;
  logic enroll_done, violation;
  bh_log_t logv;
  int checks = 0, failures = 0;

  bus_hdlr #(.CODE_LINES(CL), .DATA_LINES(DL), .WDOG_CYCLES(200)) dut (
    .clk, .rstn, .ahbo_in(pout), .ahbi_out(pin), .ahbo_out(bout), .ahbi_in(bin),
    .ptag_sreq_out(sreq), .ptag_sval_in(sval), .bypass_in(bypass), .log_in(log_en),
    .watchdog_en_in(wdog_en), .enroll_in(enroll), .enroll_done, .violation, .log_out(logv));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory
  logic [31:0] bmem [logic [31:0]];   // bus memory (what is really out there)
  logic [31:0] gold [logic [31:0]];   // trusted image (what was tagged)
  logic [31:0] pref [logic [31:0]];   // what the processor must read

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction
  function automatic logic [31:0] rd(ref logic [31:0] m [logic [31:0]], input logic [31:0] a);
    return m.exists(a) ? m[a] : init_word(a);
  endfunction

  // ------------------------------------------------------------ bus model
  int grant_wait = 0;
  logic granted = 0;
  logic dpa = 0, dpa_wr = 0;
  logic [31:0] dpa_addr = 0;
  logic [2:0]  dpa_size = 0;
  int wait_left = 0;
  int bus_single = 0, bus_incr8 = 0;
  logic [31:0] last_single_addr;

  // read-only view of the bus memory for the slave's read data
  function automatic logic [31:0] bus_word(input logic [31:0] a);
    return bmem.exists(a) ? bmem[a] : init_word(a);
  endfunction

  always_comb begin
    bin.hgrant = granted;
    bin.hready = !dpa || wait_left == 0;
    bin.hresp  = HRESP_OKAY;
    bin.hrdata = dpa ? bus_word({dpa_addr[31:2], 2'b00}) : 32'h0;
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [2:0] sz, input logic [1:0] ofs);
    logic [31:0] m;
    m = (sz == 3'd0) ? (32'hFF00_0000 >> (8 * ofs)) :
        (sz == 3'd1) ? (32'hFFFF_0000 >> (8 * {ofs[1], 1'b0})) : 32'hFFFF_FFFF;
    return (old & ~m) | (d & m);
  endfunction

  always @(posedge clk) begin
    if (!rstn) begin
      granted <= 0; dpa <= 0; wait_left <= 0; grant_wait <= 0;
    end else begin
      if (bin.hready) begin
        if (dpa && dpa_wr) bmem[{dpa_addr[31:2], 2'b00}] =
          merge(rd(bmem, {dpa_addr[31:2], 2'b00}), bout.hwdata, dpa_size, dpa_addr[1:0]);
        dpa      <= granted && bout.htrans[1];
        dpa_addr <= bout.haddr;
        dpa_wr   <= bout.hwrite;
        dpa_size <= bout.hsize;
        wait_left <= $urandom_range(2);
        if (granted && bout.htrans == HTRANS_NONSEQ) begin
          if (bout.hburst == HBURST_SINGLE) begin
            bus_single++; last_single_addr = bout.haddr;
          end
          if (bout.hburst == HBURST_INCR8) begin
            bus_incr8++;
            check(bout.haddr[4:0] == 0, "bursts start on a line boundary");
          end
        end
        // arbiter: grant after a random delay, keep while requested
        if (bout.hbusreq) begin
          if (grant_wait == 0) granted <= 1;
          else grant_wait <= grant_wait - 1;
        end else begin
          granted <= 0;
          grant_wait <= $urandom_range(3);
        end
      end else begin
        wait_left <= wait_left - 1;
      end
    end
  end

  // ------------------------------------------------------------ SEC-ENG model
  bit sec_mute = 0;
  int enroll_reqs = 0, check_reqs = 0, wb_reqs = 0;
  logic [31:0] enroll_seq [$];
  int sec_busy = 0;
  bit sec_secure;

  always @(posedge clk) begin
    if (!rstn) begin
      sval <= '0; sval.ready <= 1; sec_busy = 0;
    end else begin
      sval.valid <= 0;
      if (sec_busy > 0) begin
        sec_busy--;
        if (sec_busy == 0) begin
          sval.valid <= 1; sval.line_secure <= sec_secure; sval.ready <= 1;
        end
      end else if (sreq.valid && sval.ready && !sec_mute) begin
        logic ok;
        ok = 1;
        for (int w = 0; w < 8; w++)
          if (sreq.cache_line[32*w +: 32] != rd(gold, sreq.base_addr + 4 * w)) ok = 0;
        if (sreq.wr_ptag) begin
          if (!enroll_done) begin
            enroll_reqs++;
            enroll_seq.push_back(sreq.base_addr);
          end else begin
            wb_reqs++;
            for (int w = 0; w < 8; w++) begin
              check(sreq.cache_line[32*w +: 32] == rd(pref, sreq.base_addr + 4 * w),
                    "write-back line holds the processor's data");
              gold[sreq.base_addr + 4 * w] = sreq.cache_line[32*w +: 32];
            end
          end
          ok = 1;
        end else check_reqs++;
        sec_secure = ok;
        sec_busy = 3 + $urandom_range(12);
        sval.ready <= 0;
      end else if (sreq.valid && sec_mute) begin
        sval.ready <= 0;   // swallow the request and never answer
      end
    end
  end

  // ------------------------------------------------------------ processor model
  typedef struct {
    logic [31:0] addr;
    logic        wr;
    logic [2:0]  size;
    logic [31:0] wdata;
  } beat_t;

  // Pipelined AHB transfers; returns read data per beat. Gives up after
  // max_wait cycles without completion (used when the handler halts).
  task automatic ahb_run(input beat_t b[$], output logic [31:0] rdat[$], input int max_wait,
                         output bit stalled);
    int ia, id, idle;
    ia = 0; id = -1; idle = 0; stalled = 0;
    rdat = {};
    while (ia < b.size() || id >= 0) begin
      @(negedge clk);
      pout = '0;
      pout.hbusreq = 1;
      if (ia < b.size()) begin
        pout.htrans = (ia > 0 && id >= 0 && b[ia].addr == b[ia-1].addr + 4) ? HTRANS_SEQ : HTRANS_NONSEQ;
        pout.haddr  = b[ia].addr;
        pout.hwrite = b[ia].wr;
        pout.hsize  = b[ia].size;
        pout.hburst = HBURST_INCR;
      end
      if (id >= 0) pout.hwdata = b[id].wdata;
      #1;
      if (pin.hready) begin
        idle = 0;
        if (id >= 0 && !b[id].wr) rdat.push_back(pin.hrdata);
        if (id >= 0 && b[id].wr) rdat.push_back(32'h0);
        id = (ia < b.size()) ? ia : -1;
        if (ia < b.size()) ia++;
      end else begin
        idle++;
        if (idle > max_wait) begin stalled = 1; break; end
      end
    end
    @(negedge clk);
    pout = '0;
  endtask

  task automatic proc_write(input logic [31:0] a, input logic [31:0] d, input logic [2:0] sz);
    beat_t b[$];
    logic [31:0] r[$];
    bit st;
    b.push_back('{addr: a, wr: 1, size: sz, wdata: d});
    ahb_run(b, r, 2000, st);
    check(!st, "write completed");
    pref[{a[31:2], 2'b00}] = merge(rd(pref, {a[31:2], 2'b00}), d, sz, a[1:0]);
  endtask

  task automatic proc_read_burst(input logic [31:0] a, input int n);
    beat_t b[$];
    logic [31:0] r[$];
    bit st;
    for (int i = 0; i < n; i++) b.push_back('{addr: a + 4 * i, wr: 0, size: HSIZE_WORD, wdata: 0});
    ahb_run(b, r, 2000, st);
    check(!st, "read completed");
    for (int i = 0; i < n && i < r.size(); i++)
      check(r[i] == rd(pref, a + 4 * i),
            $sformatf("read %h = %h, expected %h", a + 4 * i, r[i], rd(pref, a + 4 * i)));
  endtask

  function automatic logic [31:0] rand_line();
    int k;
    k = $urandom_range(CL + DL + 1);
    if (k < CL) return CB + 32 * k;
    if (k < CL + DL) return DB + 32 * (k - CL);
    return 32'h4100_0000 + 32 * (k - CL - DL);   // RAM outside the protected windows
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    int hits0;
    pout = '0;
    repeat (3) @(negedge clk);
    rstn = 1;

    // 1. enrollment, while the processor already waits for its first word
    proc_read_burst(CB + 8, 2);
    check(enroll_done, "enrollment finished");
    check(enroll_reqs == CL + DL, $sformatf("%0d lines enrolled", enroll_reqs));
    for (int i = 0; i < enroll_seq.size(); i++)
      check(enroll_seq[i] == ((i < CL) ? CB + 32 * i : DB + 32 * (i - CL)), "enrollment order");

    // 2. random traffic: hits, misses, evictions, write-backs, sub-word writes
    for (int i = 0; i < 250; i++) begin
      logic [31:0] a;
      int op;
      a  = rand_line() + 4 * $urandom_range(7);
      op = $urandom_range(3);
      unique case (op)
        0: proc_read_burst(a - (a & 32'h1c), 8);
        1: proc_read_burst(a, 1);
        2: proc_write(a, $urandom, HSIZE_WORD);
        3: proc_write(a + $urandom_range(3), $urandom, ($urandom_range(1) == 0) ? HSIZE_BYTE : HSIZE_HALF);
      endcase
    end
    // force every modified line out: read lines never used above
    for (int i = 0; i < 4; i++) proc_read_burst(32'h4200_0000 + 32 * i, 8);
    foreach (pref[a]) check(rd(bmem, a) == pref[a], $sformatf("memory %h written back", a));
    check(wb_reqs > 0 && logv.writebacks == 32'(wb_reqs), "write-backs counted");
    check(logv.fills > 0 && logv.hits > 0, "fills and hits counted");
    check(check_reqs + enroll_reqs == int'(logv.fills), "every fill tagged or checked");

    // 3. peripheral pass-through (not buffered, not checked)
    hits0 = bus_single;
    proc_write(32'h8000_0104, 32'hCAFE_F00D, HSIZE_WORD);
    proc_read_burst(32'h8000_0104, 1);
    check(bus_single == hits0 + 2 && last_single_addr == 32'h8000_0104, "single transfers for I/O");
    check(logv.passes == 2, "passes counted");

    // 4. tampering: change a line in memory behind the handler's back
    begin
      beat_t b[$];
      logic [31:0] r[$];
      bit st;
      bmem[DB + 32 * 2 + 4] = rd(bmem, DB + 32 * 2 + 4) ^ 32'h0000_0100;
      b.push_back('{addr: DB + 32 * 2, wr: 0, size: HSIZE_WORD, wdata: 0});
      ahb_run(b, r, 300, st);
      check(st, "processor held on a tampered line");
      check(violation, "violation raised");
    end

    // 5. watchdog: engine never answers
    rstn = 0; enroll = 0; wdog_en = 1; sec_mute = 1;
    gold.delete(); bmem.delete(); pref.delete();
    repeat (3) @(negedge clk);
    rstn = 1;
    @(negedge clk);
    check(enroll_done, "no enrollment requested");
    begin
      beat_t b[$];
      logic [31:0] r[$];
      bit st;
      b.push_back('{addr: CB, wr: 0, size: HSIZE_WORD, wdata: 0});
      ahb_run(b, r, 400, st);
      check(st && violation, "watchdog halts a silent engine");
    end

    // 6. bypass: the processor talks to the bus directly
    rstn = 0; wdog_en = 0; sec_mute = 0; bypass = 1;
    repeat (3) @(negedge clk);
    rstn = 1;
    begin
      int c0;
      c0 = check_reqs;
      for (int i = 0; i < 3; i++) begin
        beat_t b[$];
        logic [31:0] r[$];
        bit st;
        b = {};
        b.push_back('{addr: CB + 64 + 4 * i, wr: 0, size: HSIZE_WORD, wdata: 0});
        // in bypass the processor must hold its request until granted
        @(negedge clk);
        pout.hbusreq = 1;
        do @(negedge clk); while (!(pin.hgrant && pin.hready));
        ahb_run(b, r, 100, st);
        check(!st && r.size() == 1 && r[0] == init_word(CB + 64 + 4 * i),
              $sformatf("bypass read %0d: stalled %0d, %0d words, %h", i, st, r.size(), (r.size() > 0) ? r[0] : 0));
      end
      check(check_reqs == c0 && bout.hburst != HBURST_INCR8, "no line checks in bypass");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
