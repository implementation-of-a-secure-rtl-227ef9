// tb_ptag_mem: self-checking testbench of one PTAG memory bank.
//
// Writes random words to random addresses of a full-size bank (18816 words),
// keeps a copy in an associative array and reads everything back; also
// checks that read data appears one cycle after the request and is held
// while no read is made.
module tb_ptag_mem;
  localparam int DEPTH = 18816;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 0;
  logic          req = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [63:0]   wdata = '0, rdata;
  logic [63:0]   model [int];
  int            checks = 0, failures = 0;

  ptag_mem #(.DEPTH(DEPTH)) dut (.clk, .req, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // writes, including first and last word
    for (int i = 0; i < 600; i++) begin
      int a;
      a = (i == 0) ? 0 : (i == 1) ? DEPTH - 1 : int'($urandom_range(DEPTH - 1));
      @(negedge clk);
      req = 1; we = 1; addr = AW'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk);
    req = 0; we = 0;
    // read back every written word
    foreach (model[a]) begin
      @(negedge clk);
      req = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      req = 0;
      check(rdata == model[a], $sformatf("word %0d read %h expected %h", a, rdata, model[a]));
      // held without a new read, even if a write happens meanwhile
      req = 1; we = 1; addr = AW'(a); wdata = ~model[a];
      @(negedge clk);
      req = 0; we = 0;
      check(rdata == model[a], "read data held across a write");
      model[a] = ~model[a];
    end
    // re-read after the overwrite
    foreach (model[a]) begin
      @(negedge clk);
      req = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      req = 0;
      check(rdata == model[a], $sformatf("word %0d after overwrite", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
