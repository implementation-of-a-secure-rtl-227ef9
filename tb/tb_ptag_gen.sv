// tb_ptag_gen: self-checking testbench of the PTAG generator.
//
// Checks the reference SipHash-2-4 against its published vector, then
// compares the generator with the reference for a set of fixed and random
// keys, addresses and lines, and checks that every tag takes exactly 10
// cycles from start to done and that busy blocks a second start.
module tb_ptag_gen;
  import tb_siphash_pkg::*;

  logic         clk = 0, rstn = 0;
  logic         start = 0;
  logic [127:0] key;
  logic [63:0]  addr;
  logic [255:0] line;
  logic         busy, done;
  logic [63:0]  ptag;
  int           checks = 0, failures = 0;

  ptag_gen dut (.clk, .rstn, .start, .key, .addr, .line, .busy, .done, .ptag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input logic [127:0] k, input logic [63:0] a, input logic [255:0] l);
    int cyc;
    logic [63:0] exp;
    exp = ptag_ref(k, a, l);
    @(negedge clk);
    key = k; addr = a; line = l; start = 1;
    @(negedge clk);
    start = 0;
    key = ~k; addr = ~a; line = ~l;   // inputs must have been sampled
    cyc = 1;
    while (!done) begin
      check(busy, "busy while computing");
      @(negedge clk);
      cyc++;
      if (cyc > 50) break;
    end
    check(cyc == 10, $sformatf("latency %0d, expected 10", cyc));
    check(ptag == exp, $sformatf("ptag %h expected %h", ptag, exp));
    @(negedge clk);
    check(!done && !busy, "done is a single-cycle strobe");
    check(ptag == exp, "ptag held after done");
  endtask

  initial begin
    check(self_test(), "reference SipHash-2-4 test vector");
    repeat (3) @(negedge clk);
    rstn = 1;
    run_one('0, '0, '0);
    run_one(128'h0f0e0d0c0b0a09080706050403020100, 64'h4000_0000,
            {8{32'hdead_beef}});
    for (int i = 0; i < 40; i++)
      run_one({$urandom, $urandom, $urandom, $urandom}, {32'h0, $urandom & 32'hFFFF_FFE0},
              {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    // a start while busy is ignored: the first tag still comes out right
    begin
      logic [63:0] exp;
      exp = ptag_ref(128'h1234, 64'h20, 256'h55);
      @(negedge clk);
      key = 128'h1234; addr = 64'h20; line = 256'h55; start = 1;
      @(negedge clk);
      key = 128'h9999; addr = 64'h40; line = 256'h77;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check(ptag == exp, "start while busy ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
