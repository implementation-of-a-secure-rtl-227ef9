// tb_sec_eng: self-checking testbench of the security engine.
//
// Two engines are tested one after the other: one without and one with the
// Merkle-tree states. Each has a behavioural PTAG memory (one-cycle read,
// coverage window 0x4000_0000..0x4009_2FFF) and, for the second, a
// behavioural tree controller that answers after a few cycles. Expected
// PTAGs and the instance key come from the reference SipHash model, not from
// the engine. Covered: key derivation, forced tagging before enrollment is
// done, validation pass and fail (tampered line, tampered PTAG, tree
// refusal), PTAG update on write, uncovered lines, ready handshake, the
// 12-cycle read-check latency without tree and the tree request contents.
module tb_sec_eng;
  import cshia_pkg::*;
  import tb_siphash_pkg::*;

  logic clk = 0, rstn = 0;
  logic fe_valid = 0;
  logic [3:0][63:0] fe_r;
  logic enroll_done = 0;
  logic          key_ready [2];
  ptag_sec_req_t sreq [2];
  ptag_sec_val_t sval [2];
  ptag_mreq_t    mreq [2];
  ptag_mresp_t   mresp [2];
  logic          covered [2];
  tree_req_t     treq [2];
  tree_resp_t    tresp0 = '0, tresp1;
  logic [3:0]    status [2];

  logic [63:0] pmem [2][int];
  int  tree_delay = 3;
  bit  tree_ok_next = 1;
  int  tree_reqs = 0;
  tree_req_t last_treq;
  int  mem_accesses [2];
  int  checks = 0, failures = 0;
  logic [127:0] key_exp;

  sec_eng #(.MERKLE_EN(1'b0)) u0 (.clk, .rstn, .fe_valid, .fe_r, .key_ready(key_ready[0]),
    .ptag_sreq_in(sreq[0]), .ptag_sval_out(sval[0]), .enroll_done,
    .ptag_mreq_out(mreq[0]), .ptag_mresp_in(mresp[0]), .covered(covered[0]),
    .tree_req_out(treq[0]), .tree_resp_in(tresp0), .status(status[0]));
  sec_eng #(.MERKLE_EN(1'b1)) u1 (.clk, .rstn, .fe_valid, .fe_r, .key_ready(key_ready[1]),
    .ptag_sreq_in(sreq[1]), .ptag_sval_out(sval[1]), .enroll_done,
    .ptag_mreq_out(mreq[1]), .ptag_mresp_in(mresp[1]), .covered(covered[1]),
    .tree_req_out(treq[1]), .tree_resp_in(tresp1), .status(status[1]));

  always #5 clk = ~clk;

  function automatic bit in_window(input logic [31:0] a);
    return a >= 32'h4000_0000 && a < 32'h4009_3000;
  endfunction

  // behavioural PTAG memories
  for (genvar m = 0; m < 2; m++) begin : g_mem
    assign covered[m] = in_window(mreq[m].address);
    always_ff @(posedge clk) begin
      if (mreq[m].valid) begin
        mem_accesses[m]++;
        if (mreq[m].we) pmem[m][int'(mreq[m].address)] <= mreq[m].data;
        else mresp[m].data <= pmem[m].exists(int'(mreq[m].address)) ?
                              pmem[m][int'(mreq[m].address)] : 64'h0;
      end
    end
  end

  // behavioural tree controller for engine 1
  initial begin
    tresp1 = '0;
    forever begin
      @(posedge clk);
      tresp1 <= '0;
      if (treq[1].valid) begin
        tree_reqs++;
        last_treq = treq[1];
        repeat (tree_delay) @(posedge clk);
        tresp1 <= '{done: 1'b1, ok: tree_ok_next};
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one line, wait for the answer; returns latency from acceptance
  task automatic send(input int m, input logic [31:0] a, input logic [255:0] l, input bit wr,
                      output bit secure, output logic [63:0] ptag, output int lat);
    @(negedge clk);
    while (!sval[m].ready) @(negedge clk);
    sreq[m] = '{cache_line: l, base_addr: a, valid: 1'b1, wr_ptag: wr};
    @(negedge clk);
    sreq[m].valid = 0;
    check(!sval[m].ready, "not ready while working");
    lat = 1;
    while (!sval[m].valid) begin
      @(negedge clk);
      lat++;
      if (lat > 200) break;
    end
    secure = sval[m].line_secure;
    ptag   = sval[m].ptag;
  endtask

  initial begin
    bit s;
    logic [63:0] p;
    int lat;
    logic [255:0] l1, l2;
    logic [31:0] a1, a2;
    sreq[0] = '0; sreq[1] = '0;
    for (int i = 0; i < 4; i++) fe_r[i] = {$urandom, $urandom};
    key_exp = key_ref(fe_r);
    check(self_test(), "reference model");
    repeat (3) @(negedge clk);
    rstn = 1;
    repeat (5) @(negedge clk);
    check(!key_ready[0] && !sval[0].ready, "no work before the key");
    fe_valid = 1;
    repeat (40) @(negedge clk);
    check(key_ready[0] && key_ready[1], "key derived");

    for (int m = 0; m < 2; m++) begin
      a1 = 32'h4000_0100; a2 = 32'h4001_3040;
      l1 = {8{$urandom}} ^ {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      l2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      // enrollment: a validate request is turned into tagging
      enroll_done = 0;
      send(m, a1, l1, 1'b0, s, p, lat);
      check(s, "enrollment tag acknowledged");
      check(p == ptag_ref(key_exp, {32'h0, a1}, l1), $sformatf("engine %0d PTAG value", m));
      @(negedge clk);
      check(pmem[m].exists(int'(a1)) && pmem[m][int'(a1)] == ptag_ref(key_exp, {32'h0, a1}, l1),
            "PTAG stored in PTAG memory");
      send(m, a2, l2, 1'b1, s, p, lat);
      check(s, "second tag acknowledged");
      enroll_done = 1;
      // runtime validation
      tree_ok_next = 1;
      tree_reqs = 0;
      send(m, a1, l1, 1'b0, s, p, lat);
      check(s, $sformatf("engine %0d intact line accepted", m));
      if (m == 0) check(lat == 12, $sformatf("read-check latency %0d, expected 12", lat));
      else begin
        check(tree_reqs == 1 && !last_treq.we && last_treq.ptag == pmem[m][int'(a1)] &&
              last_treq.address == a1, "tree asked to confirm the stored PTAG");
        check(lat == 12 + tree_delay + 2, $sformatf("read-check latency with tree %0d", lat));
      end
      // tampered line
      send(m, a1, l1 ^ (256'h1 << $urandom_range(255)), 1'b0, s, p, lat);
      check(!s, "tampered line rejected");
      // relocated line (right content, wrong address)
      send(m, a2, l1, 1'b0, s, p, lat);
      check(!s, "relocated line rejected");
      // tampered PTAG memory
      pmem[m][int'(a2)] = pmem[m][int'(a2)] ^ 64'h8000;
      send(m, a2, l2, 1'b0, s, p, lat);
      check(!s, "tampered PTAG rejected");
      // write: new PTAG, then the new content validates
      tree_reqs = 0;
      send(m, a2, l1, 1'b1, s, p, lat);
      check(s, "write acknowledged");
      @(negedge clk);
      check(pmem[m][int'(a2)] == ptag_ref(key_exp, {32'h0, a2}, l1), "new PTAG written");
      if (m == 1) check(tree_reqs == 1 && last_treq.we && last_treq.ptag == pmem[m][int'(a2)],
                        "tree told about the new PTAG");
      send(m, a2, l1, 1'b0, s, p, lat);
      check(s, "rewritten line accepted");
      // the tree refuses (replayed PTAG memory)
      if (m == 1) begin
        tree_ok_next = 0;
        send(m, a1, l1, 1'b0, s, p, lat);
        check(!s, "line refused when the tree refuses");
        tree_ok_next = 1;
      end
      // uncovered line: accepted, memory untouched
      begin
        int n_before;
        n_before = mem_accesses[m];
        send(m, 32'h4100_0000, l2, 1'b0, s, p, lat);
        check(s && mem_accesses[m] == n_before, "uncovered line passes without PTAG access");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
