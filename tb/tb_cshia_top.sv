// tb_cshia_top: end-to-end testbench of the CSHIA chassis at full size.
//
// The top is instantiated with every parameter at its default: 2432 code
// lines, 16384 data lines (512 KB), a 4-line buffer, Merkle-tree ports on.
// Around it: a processor model (pipelined AHB master), a bus model (arbiter
// with random grant delay, memory slave with random wait states whose
// unwritten words are computed from the address), a fuzzy-extractor stand-in
// that presents four random strings r1..r4 after reset, and a Merkle-tree
// controller model that remembers the last PTAG written for every line,
// confirms a stored PTAG only if it is that one, and keeps a copy of each
// leaf in the tree PTAG bank through the tree memory port.
//
// Sequence: key derivation and enrollment of all 18816 lines while the
// processor already waits for its first word; random reads and writes over
// code lines, data lines (both ends of the window) and RAM outside the
// protected windows; flush of every modified line and comparison of memory
// and PTAG memory with independently computed values; a peripheral access;
// a tampered line; a replayed line with a matching forged PTAG (caught only
// by the tree); an engine that never answers (watchdog); bypass mode.
// Every mechanism is counted and one that never happened is a failure.
module tb_cshia_top;
  import cshia_pkg::*;
  import tb_siphash_pkg::*;

  localparam logic [31:0] CB = CODE_BASE_DEF;
  localparam logic [31:0] DB = DATA_BASE_DEF;
  localparam int          CL = CODE_LINES_DEF, DL = DATA_LINES_DEF;

  logic clk = 0, rstn = 0;
  ahb_mst_out_t  pout;     // processor -> chassis
  ahb_mst_in_t   pin;      // chassis -> processor
  ahb_mst_out_t  bout;     // chassis -> bus
  ahb_mst_in_t   bin;      // bus -> chassis
  logic              fe_valid = 0;
  logic [3:0][63:0]  fe_r;
  logic              key_ready;
  tree_req_t         treq;
  tree_resp_t        tresp;
  logic              tree_mreq, tree_mwe;
  logic [12:0]       tree_maddr;
  logic [63:0]       tree_mwdata, tree_mrdata;
  logic bypass = 0, log_en = 1, wdog_en = 0, enroll = 1;
  logic enroll_done, violation;
  bh_log_t logv;
  logic [3:0] sec_status;
  int checks = 0, failures = 0;

  cshia_top dut (
    .clk, .rstn,
    .proc_ahbo_in(pout), .proc_ahbi_out(pin), .bus_ahbo_out(bout), .bus_ahbi_in(bin),
    .fe_valid, .fe_r, .key_ready,
    .tree_req_out(treq), .tree_resp_in(tresp),
    .tree_mreq, .tree_mwe, .tree_maddr, .tree_mwdata, .tree_mrdata,
    .bypass_in(bypass), .log_in(log_en), .watchdog_en_in(wdog_en), .enroll_in(enroll),
    .enroll_done, .violation, .log_out(logv), .sec_status);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory
  logic [31:0] bmem [logic [31:0]];   // bus memory
  logic [31:0] pref [logic [31:0]];   // what the processor must read

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction
  function automatic logic [31:0] rd(ref logic [31:0] m [logic [31:0]], input logic [31:0] a);
    return m.exists(a) ? m[a] : init_word(a);
  endfunction
  function automatic logic [255:0] mem_line(input logic [31:0] base);
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = rd(bmem, base + 4 * w);
    return l;
  endfunction
  function automatic int line_index(input logic [31:0] base);
    if (base >= CB && base < CB + 32 * CL) return int'((base - CB) / 32);
    if (base >= DB && base < DB + 32 * DL) return CL + int'((base - DB) / 32);
    return -1;
  endfunction

  // ------------------------------------------------------------ bus model
  int grant_wait = 0;
  logic granted = 0;
  logic dpa = 0, dpa_wr = 0;
  logic [31:0] dpa_addr = 0;
  logic [2:0]  dpa_size = 0;
  int wait_left = 0;
  int n_single = 0, n_incr8 = 0;

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
          if (bout.hburst == HBURST_SINGLE) n_single++;
          if (bout.hburst == HBURST_INCR8)  n_incr8++;
        end
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

  // ------------------------------------------------------------ Merkle-tree model
  logic [63:0] trusted [logic [31:0]];   // last PTAG written per line
  logic [31:0] leaf_owner [int];         // which line last wrote a tree-bank word
  bit  tree_mute = 0;
  int  tree_updates = 0, tree_checks = 0, tree_rejects = 0, tree_readbacks = 0;
  int  t_delay = 0;
  bit  t_ok, t_rb;
  logic [63:0] t_rb_exp;

  always @(posedge clk) begin
    if (!rstn) begin
      tresp <= '0; t_delay = 0;
      tree_mreq <= 0; tree_mwe <= 0; tree_maddr <= 0; tree_mwdata <= 0;
    end else begin
      tresp     <= '0;
      tree_mreq <= 0;
      tree_mwe  <= 0;
      if (t_delay > 0) begin
        t_delay--;
        if (t_delay == 0) begin
          tresp.done <= 1;
          tresp.ok   <= t_ok;
          if (t_rb) begin
            tree_readbacks++;
            check(tree_mrdata == t_rb_exp, "tree PTAG bank read back");
          end
        end
      end else if (treq.valid && !tree_mute) begin
        int idx;
        idx = int'(treq.address[31:5]) % 8192;
        tree_maddr <= 13'(idx);
        tree_mreq  <= 1;
        t_rb = 0;
        if (treq.we) begin
          tree_updates++;
          trusted[treq.address] = treq.ptag;
          leaf_owner[idx] = treq.address;
          tree_mwe    <= 1;
          tree_mwdata <= treq.ptag;
          t_ok = 1;
        end else begin
          tree_checks++;
          t_ok = trusted.exists(treq.address) && trusted[treq.address] == treq.ptag;
          if (!t_ok) tree_rejects++;
          t_rb = leaf_owner.exists(idx) && leaf_owner[idx] == treq.address;
          t_rb_exp = trusted.exists(treq.address) ? trusted[treq.address] : 0;
        end
        t_delay = 2 + $urandom_range(3);
      end
    end
  end

  // ------------------------------------------------------------ engine traffic monitor
  int n_enroll_tag = 0, n_runtime_check = 0, n_retag = 0, n_uncovered = 0;
  always @(posedge clk) begin
    if (rstn && dut.sreq.valid && dut.sval.ready) begin
      if (line_index(dut.sreq.base_addr) < 0) n_uncovered++;
      if (!enroll_done)               n_enroll_tag++;
      else if (dut.sreq.wr_ptag)      n_retag++;
      else                            n_runtime_check++;
    end
  end

  // ------------------------------------------------------------ processor model
  typedef struct {
    logic [31:0] addr;
    logic        wr;
    logic [2:0]  size;
    logic [31:0] wdata;
  } beat_t;

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
        if (id >= 0) rdat.push_back(b[id].wr ? 32'h0 : pin.hrdata);
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

  task automatic proc_read_burst(input logic [31:0] a, input int n, input int max_wait);
    beat_t b[$];
    logic [31:0] r[$];
    bit st;
    for (int i = 0; i < n; i++) b.push_back('{addr: a + 4 * i, wr: 0, size: HSIZE_WORD, wdata: 0});
    ahb_run(b, r, max_wait, st);
    check(!st, "read completed");
    for (int i = 0; i < n && i < r.size(); i++)
      check(r[i] == rd(pref, a + 4 * i),
            $sformatf("read %h = %h, expected %h", a + 4 * i, r[i], rd(pref, a + 4 * i)));
  endtask

  // a small working set, larger than the buffer: hits, misses and evictions
  logic [31:0] lines [10];
  initial begin
    lines[0] = CB;                    lines[1] = CB + 32 * 7;
    lines[2] = CB + 32 * (CL - 1);    lines[3] = DB;
    lines[4] = DB + 32 * 100;         lines[5] = DB + 32 * (DL - 1);
    lines[6] = DB + 32 * 4000;        lines[7] = 32'h4100_0000;
    lines[8] = 32'h4100_0020;         lines[9] = DB + 32 * 9;
  end

  // restart the chassis; the PTAG memories keep their contents
  task automatic restart(input bit do_enroll);
    @(negedge clk);
    rstn = 0; fe_valid = 0; enroll = do_enroll;
    repeat (3) @(negedge clk);
    rstn = 1;
    repeat (5) @(negedge clk);
    fe_valid = 1;
  endtask

  // ------------------------------------------------------------ stimulus
  int n_key = 0, n_enrolled = 0, n_tamper = 0, n_replay = 0, n_wdog = 0, n_bypass = 0;
  int n_pass = 0, n_hits = 0, n_fills = 0, n_wb = 0, n_stall_check = 0;

  initial begin
    logic [127:0] key;
    int t0, t1;
    pout = '0;
    for (int i = 0; i < 4; i++) fe_r[i] = {$urandom, $urandom};
    key = key_ref(fe_r);
    repeat (3) @(negedge clk);
    rstn = 1;

    // 1. key derivation: no line is tagged before the strings are valid
    repeat (20) @(negedge clk);
    check(!key_ready && !enroll_done && n_enroll_tag == 0, "no line tagged before the key exists");
    fe_valid = 1;
    t0 = int'($time / 10);
    fork
      begin
        wait (key_ready);
        n_key++;
        check(dut.u_sec_eng.key_q == key, "instance key derived from r1..r4");
      end
      // 2. enrollment, with the processor's first read pending all along
      proc_read_burst(CB + 8, 2, 1_200_000);
    join
    t1 = int'($time / 10);
    check(enroll_done, "enrollment finished");
    n_enrolled = n_enroll_tag;
    check(n_enroll_tag == CL + DL, $sformatf("%0d lines enrolled", n_enroll_tag));
    check(tree_updates == CL + DL, "tree updated for every enrolled line");
    $display("enrollment of %0d lines took %0d cycles", CL + DL, t1 - t0);
    for (int i = 0; i < 64; i++) begin
      int idx;
      logic [31:0] a;
      idx = (i < 8) ? i : (i < 16) ? CL + DL - 1 - (i - 8) : $urandom_range(CL + DL - 1);
      a   = enroll_addr(idx, CB, CL, DB);
      check(dut.u_line_ptags.mem[idx] == ptag_ref(key, {32'h0, a}, mem_line(a)),
            $sformatf("enrolled PTAG of line %h", a));
    end

    // 3. random traffic
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      int op;
      a  = lines[$urandom_range(9)] + 4 * $urandom_range(7);
      op = $urandom_range(3);
      unique case (op)
        0: proc_read_burst(a - (a & 32'h1c), 8, 2000);
        1: proc_read_burst(a, 1, 2000);
        2: proc_write(a, $urandom, HSIZE_WORD);
        3: proc_write(a + $urandom_range(3), $urandom, ($urandom_range(1) == 0) ? HSIZE_BYTE : HSIZE_HALF);
      endcase
    end
    for (int i = 0; i < 4; i++) proc_read_burst(32'h4200_0000 + 32 * i, 8, 2000);
    foreach (pref[a]) check(rd(bmem, a) == pref[a], $sformatf("memory %h written back", a));
    for (int i = 0; i < 10; i++)
      if (line_index(lines[i]) >= 0)
        check(dut.u_line_ptags.mem[line_index(lines[i])] ==
              ptag_ref(key, {32'h0, lines[i]}, mem_line(lines[i])),
              $sformatf("PTAG of line %h follows its content", lines[i]));
    n_hits  = int'(logv.hits);
    n_fills = int'(logv.fills);
    n_wb    = int'(logv.writebacks);
    check(n_fills == n_enroll_tag + n_runtime_check, "every fill tagged or checked");
    check(n_wb == n_retag, "every write-back re-tagged");

    // 4. peripheral access: single transfers, no check
    begin
      int s0, c0;
      s0 = n_single; c0 = n_runtime_check;
      proc_write(32'h8000_0200, 32'h1234_5678, HSIZE_WORD);
      proc_read_burst(32'h8000_0200, 1, 2000);
      check(n_single == s0 + 2 && n_runtime_check == c0, "I/O passes as single transfers");
      n_pass = int'(logv.passes);
    end

    // 5. a line changed in external memory is refused
    begin
      beat_t b[$];
      logic [31:0] r[$];
      bit st;
      int c0;
      c0 = n_runtime_check;
      bmem[DB + 32 * 50 + 12] = rd(bmem, DB + 32 * 50 + 12) ^ 32'h0001_0000;
      b.push_back('{addr: DB + 32 * 50, wr: 0, size: HSIZE_WORD, wdata: 0});
      ahb_run(b, r, 400, st);
      check(st && violation && n_runtime_check == c0 + 1, "tampered line halts the processor");
      if (st && violation) n_tamper++;
    end

    // 6. replay: the attacker swaps in other content together with a PTAG
    //    that matches it; only the tree knows the PTAG is not the current one
    restart(1'b0);
    wait (key_ready);
    check(enroll_done && dut.u_sec_eng.key_q == key, "same key after restart, no enrollment");
    begin
      beat_t b[$];
      logic [31:0] r[$];
      bit st;
      int rj0;
      logic [31:0] la;
      la = CB + 32 * 20;
      for (int w = 0; w < 8; w++) bmem[la + 4 * w] = $urandom;
      dut.u_line_ptags.mem[line_index(la)] = ptag_ref(key, {32'h0, la}, mem_line(la));
      rj0 = tree_rejects;
      b.push_back('{addr: la, wr: 0, size: HSIZE_WORD, wdata: 0});
      ahb_run(b, r, 400, st);
      check(st && violation && tree_rejects == rj0 + 1, "replayed line refused by the tree");
      if (st && violation) n_replay++;
    end

    // 7. the engine never answers: the watchdog stops the processor
    restart(1'b0);
    wdog_en = 1; tree_mute = 1;
    wait (key_ready);
    begin
      beat_t b[$];
      logic [31:0] r[$];
      bit st;
      b.push_back('{addr: DB + 32 * 200, wr: 0, size: HSIZE_WORD, wdata: 0});
      ahb_run(b, r, 1500, st);
      check(st && violation, "watchdog halts on a silent engine");
      if (st && violation) n_wdog++;
    end

    // 8. bypass: the unmodified system, processor straight on the bus
    wdog_en = 0; tree_mute = 0; bypass = 1;
    restart(1'b0);
    begin
      int c0, b0;
      c0 = n_runtime_check; b0 = n_incr8;
      for (int i = 0; i < 3; i++) begin
        beat_t b[$];
        logic [31:0] r[$];
        bit st;
        b = {};
        b.push_back('{addr: DB + 32 * 300 + 4 * i, wr: 0, size: HSIZE_WORD, wdata: 0});
        @(negedge clk);
        pout.hbusreq = 1;
        do @(negedge clk); while (!(pin.hgrant && pin.hready));
        ahb_run(b, r, 100, st);
        check(!st && r.size() == 1 && r[0] == rd(bmem, DB + 32 * 300 + 4 * i), "bypass read");
        if (!st) n_bypass++;
      end
      check(n_runtime_check == c0 && n_incr8 == b0, "no line fetch or check in bypass");
    end

    // every mechanism must have happened
    $display("key %0d, enrolled %0d, checks %0d, hits %0d, fills %0d, write-backs %0d",
             n_key, n_enrolled, n_runtime_check, n_hits, n_fills, n_wb);
    $display("tree updates %0d, tree checks %0d, tree bank reads %0d, uncovered %0d, passes %0d",
             tree_updates, tree_checks, tree_readbacks, n_uncovered, n_pass);
    $display("tamper %0d, replay %0d, watchdog %0d, bypass %0d", n_tamper, n_replay, n_wdog, n_bypass);
    check(n_key > 0,           "mechanism: key derivation");
    check(n_enrolled > 0,      "mechanism: enrollment");
    check(n_runtime_check > 0, "mechanism: line validation");
    check(n_hits > 0,          "mechanism: buffer hit");
    check(n_wb > 0,            "mechanism: write-back with new PTAG");
    check(tree_updates > 0,    "mechanism: tree update");
    check(tree_checks > 0,     "mechanism: tree check");
    check(tree_readbacks > 0,  "mechanism: tree PTAG bank access");
    check(n_uncovered > 0,     "mechanism: uncovered line");
    check(n_pass > 0,          "mechanism: peripheral pass-through");
    check(n_tamper > 0,        "mechanism: tamper detection");
    check(n_replay > 0,        "mechanism: replay detection");
    check(n_wdog > 0,          "mechanism: watchdog");
    check(n_bypass > 0,        "mechanism: bypass");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
