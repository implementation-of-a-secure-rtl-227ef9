// tb_pmmu: self-checking testbench of the PTAG memory management unit.
//
// The PMMU drives two real PTAG banks. Checks: the coverage decision for
// addresses around the code and data windows; that each covered line owns a
// distinct PTAG word at the index expected from the memory map (code lines
// first, then data lines) by writing through the PMMU and reading the bank
// directly by hierarchical reference; read-back through the PMMU; and the
// tree port reaching only the tree bank.
module tb_pmmu;
  import cshia_pkg::*;

  localparam logic [31:0] CB = 32'h4000_0000;
  localparam int          CL = 2432;
  localparam logic [31:0] DB = 32'h4001_3000;
  localparam int          DL = 16384;
  localparam int          TW = 8192;
  localparam int          LAW = $clog2(CL + DL);
  localparam int          TAW = $clog2(TW);

  logic clk = 0;
  ptag_mreq_t  req = '0;
  ptag_mresp_t resp;
  logic covered;
  logic tree_mreq = 0, tree_mwe = 0;
  logic [TAW-1:0] tree_maddr = '0;
  logic [63:0] tree_mwdata = '0, tree_mrdata;
  logic lreq, lwe, treq, twe;
  logic [LAW-1:0] laddr;
  logic [TAW-1:0] taddr;
  logic [63:0] lwd, lrd, twd, trd;
  int checks = 0, failures = 0;

  pmmu dut (.sec_req(req), .sec_resp(resp), .covered,
            .tree_mreq, .tree_mwe, .tree_maddr, .tree_mwdata, .tree_mrdata,
            .lmem_req(lreq), .lmem_we(lwe), .lmem_addr(laddr), .lmem_wdata(lwd), .lmem_rdata(lrd),
            .tmem_req(treq), .tmem_we(twe), .tmem_addr(taddr), .tmem_wdata(twd), .tmem_rdata(trd));
  ptag_mem #(.DEPTH(CL + DL)) lmem (.clk, .req(lreq), .we(lwe), .addr(laddr), .wdata(lwd), .rdata(lrd));
  ptag_mem #(.DEPTH(TW))      tmem (.clk, .req(treq), .we(twe), .addr(taddr), .wdata(twd), .rdata(trd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected index from the memory map, -1 when not covered
  function automatic int exp_index(input logic [31:0] a);
    if (a >= CB && a < CB + CL * 32) return int'((a - CB) / 32);
    if (a >= DB && a < DB + DL * 32) return CL + int'((a - DB) / 32);
    return -1;
  endfunction

  task automatic wr(input logic [31:0] a, input logic [63:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b1, address: a, data: d};
    @(negedge clk);
    req.valid = 0;
  endtask

  initial begin
    logic [31:0] probes[$];
    logic [63:0] written [int];
    probes = '{32'h3FFF_FFE0, CB, CB + 32, CB + 32 * (CL - 1), DB, DB + 32 * 100,
               DB + 32 * (DL - 1), DB + 32 * DL, 32'h8000_0000, 32'h4009_3000, 32'h4009_2FE0};
    repeat (200) probes.push_back(CB + ($urandom_range(CL + DL + 50) * 32));
    foreach (probes[i]) begin
      logic [31:0] a;
      int e;
      a = probes[i];
      e = exp_index(a);
      @(negedge clk);
      req.address = a;
      #1;
      check(covered == (e >= 0), $sformatf("covered(%h)=%0b", a, covered));
      if (e >= 0) begin
        logic [63:0] d;
        d = {a, 32'(e)} ^ 64'hA5A5_0000_5A5A_0000;
        wr(a, d);
        written[e] = d;
        check(lmem.mem[e] == d, $sformatf("line %h stored at word %0d", a, e));
      end else begin
        @(negedge clk);
        req = '{valid: 1'b1, we: 1'b1, address: a, data: 64'hBAD};
        #1;
        check(!lreq, $sformatf("no memory access for uncovered %h", a));
        @(negedge clk);
        req.valid = 0;
      end
    end
    // read back through the PMMU
    foreach (probes[i]) begin
      int e;
      e = exp_index(probes[i]);
      if (e >= 0) begin
        @(negedge clk);
        req = '{valid: 1'b1, we: 1'b0, address: probes[i], data: '0};
        @(negedge clk);
        req.valid = 0;
        check(resp.data == written[e], $sformatf("read back %h", probes[i]));
      end
    end
    // tree bank port
    for (int i = 0; i < 50; i++) begin
      int t;
      logic [63:0] d;
      t = (i == 0) ? TW - 1 : $urandom_range(TW - 1);
      d = {$urandom, $urandom};
      @(negedge clk);
      tree_mreq = 1; tree_mwe = 1; tree_maddr = TAW'(t); tree_mwdata = d;
      @(negedge clk);
      tree_mwe = 0;
      @(negedge clk);
      tree_mreq = 0;
      check(tmem.mem[t] == d && tree_mrdata == d, $sformatf("tree word %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
