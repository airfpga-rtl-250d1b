// tb_sram_interface: self-checking test of the SRAM sharing logic.
//
// The interface drives the behavioural SRAM model. A host agent issues
// random single reads and writes (holding its request until done, like
// the register block); a simulator agent requests reads of random
// addresses on random cycles. A shadow memory in the testbench predicts
// every read. Checks: host reads and simulator reads return the shadow
// value, simulator data returns in grant order exactly RD_LATENCY cycles
// after its grant, the host wins every cycle in which it may be granted,
// and at least one conflict and one interleaved host read happen.
module tb_sram_interface;
  import airfpga_pkg::*;

  localparam int unsigned LAT = 2;
  localparam int unsigned AW  = 6;   // test only a small address range

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hst_req, hst_we, hst_done, sim_req, sim_gnt, sim_rvalid;
  logic [SRAM_AW-1:0] hst_addr, sim_addr;
  logic [SRAM_DW-1:0] hst_wdata, hst_rdata, sim_rdata;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;

  sram_interface #(.RD_LATENCY(LAT)) dut (.*);
  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW), .LATENCY(LAT)) u_mem (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0, conflicts = 0, sim_reads = 0, host_ops = 0;
  int cycle = 0;
  logic [SRAM_DW-1:0] shadow [2**AW];
  typedef struct { int due; logic [SRAM_DW-1:0] val; } pend_t;
  pend_t pend[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cycle++;

  // simulator agent and its checker
  always @(posedge clk) if (rst_n) begin
    if (hst_req && !dut.host_busy) begin
      conflicts += sim_req;
      check(!sim_gnt, "simulator granted over an eligible host request");
    end
    if (sim_gnt) pend.push_back('{cycle + LAT, shadow[sim_addr[AW-1:0]]});
    if (sim_rvalid) begin
      pend_t p;
      sim_reads++;
      if (pend.size() == 0) check(0, "unexpected simulator data");
      else begin
        p = pend.pop_front();
        check(p.due == cycle && p.val == sim_rdata,
              $sformatf("sim read got %h exp %h (due %0d now %0d)", sim_rdata, p.val, p.due, cycle));
      end
    end else if (pend.size() != 0) check(pend[0].due > cycle, "simulator data missing");
  end

  always @(negedge clk) begin
    sim_req  = rst_n && ($urandom_range(99) < 60);
    sim_addr = SRAM_AW'($urandom_range(2**AW - 1));
  end

  task automatic host_op(input bit we, input int a, input logic [31:0] d);
    logic [31:0] expv;
    int t0;
    expv = shadow[a];
    @(negedge clk);
    hst_req = 1; hst_we = we; hst_addr = SRAM_AW'(a); hst_wdata = d;
    t0 = cycle;
    @(posedge clk iff hst_done);
    if (we) shadow[a] = d;
    else check(hst_rdata == expv, $sformatf("host read %0d got %h exp %h", a, hst_rdata, expv));
    host_ops++;
    @(negedge clk) hst_req = 0;
  endtask

  initial begin
    hst_req = 0; hst_we = 0; hst_addr = '0; hst_wdata = '0;
    for (int k = 0; k < 2**AW; k++) shadow[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2**AW; k++) host_op(1, k, $urandom);
    for (int k = 0; k < 400; k++) begin
      host_op($urandom_range(1), $urandom_range(2**AW - 1), $urandom);
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    check(conflicts > 0, "no host/simulator conflict happened");
    check(sim_reads > 100, "too few simulator reads");
    $display("host_ops=%0d sim_reads=%0d conflicts=%0d", host_ops, sim_reads, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
