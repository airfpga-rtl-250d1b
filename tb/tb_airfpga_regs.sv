// tb_airfpga_regs: self-checking test of the register block.
//
// Writes random values to all eleven registers in random order and reads
// them back, checks that every field of the packet parameters and the
// simulator control shows the written value, that unused addresses read as
// zero and ignore writes, that a register access is acknowledged exactly
// one cycle after its request, and that SRAM-window accesses are forwarded
// to the SRAM port (address, data, direction) and acknowledged only when a
// testbench responder reports completion after a random delay.
module tb_airfpga_regs;
  import airfpga_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_req, reg_rd_wr_L, reg_ack;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wr_data, reg_rd_data;
  pkt_cfg_t cfg;
  sim_ctrl_t sim;
  logic hst_req, hst_we, hst_done;
  logic [SRAM_AW-1:0] hst_addr;
  logic [SRAM_DW-1:0] hst_wdata, hst_rdata;

  airfpga_regs dut (.*);

  int checks = 0, failures = 0, sram_ops = 0;
  logic [31:0] model [NUM_REGS];
  logic [31:0] sram_shadow [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SRAM responder: completes after 1..6 cycles
  initial begin
    hst_done = 0; hst_rdata = '0;
    forever begin
      @(posedge clk iff (hst_req && rst_n));
      repeat ($urandom_range(5)) @(posedge clk);
      @(negedge clk);
      hst_done = 1;
      if (hst_we) sram_shadow[int'(hst_addr)] = hst_wdata;
      else hst_rdata = sram_shadow.exists(int'(hst_addr)) ? sram_shadow[int'(hst_addr)] : 32'hDEAD_0000;
      @(negedge clk);
      hst_done = 0;
    end
  end

  // one bus access; returns read data and the cycles until ack
  task automatic access(input bit rd, input logic [REG_AW-1:0] a, input logic [31:0] d,
                        output logic [31:0] q, output int lat);
    @(negedge clk);
    reg_req = 1; reg_rd_wr_L = rd; reg_addr = a; reg_wr_data = d;
    @(negedge clk);
    reg_req = 0;
    lat = 1;
    while (!reg_ack) begin @(negedge clk); lat++; end
    q = reg_rd_data;
  endtask

  function automatic logic [REG_AW-1:0] sram_a(input int w);
    return REG_AW'(1 << SRAM_WIN_BIT) | REG_AW'(w);
  endfunction

  initial begin
    logic [31:0] q;
    int lat, order[$];
    reg_req = 0; reg_rd_wr_L = 1; reg_addr = '0; reg_wr_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // reset values
    for (int k = 0; k < NUM_REGS; k++) begin
      access(1, REG_AW'(k), 0, q, lat);
      check(q == 0, $sformatf("reg %0d reset value %h", k, q));
    end
    for (int round = 0; round < 4; round++) begin
      order.delete();
      for (int k = 0; k < NUM_REGS; k++) order.push_back(k);
      order.shuffle();
      foreach (order[i]) begin
        model[order[i]] = $urandom;
        access(0, REG_AW'(order[i]), model[order[i]], q, lat);
        check(lat == 1, $sformatf("write ack after %0d cycles", lat));
      end
      for (int k = 0; k < NUM_REGS; k++) begin
        access(1, REG_AW'(k), 0, q, lat);
        check(q == model[k] && lat == 1, $sformatf("reg %0d read %h exp %h lat %0d", k, q, model[k], lat));
      end
      check(cfg.mac_src == {model[0][15:0], model[1]}, "mac_src");
      check(cfg.mac_dst == {model[2][15:0], model[3]}, "mac_dst");
      check(cfg.ip_src == model[4] && cfg.ip_dst == model[5], "ip addresses");
      check(cfg.udp_src == model[6][15:0] && cfg.udp_dst == model[7][15:0], "udp ports");
      check(sim.addr_lo == model[8][18:0] && sim.addr_hi == model[9][18:0], "sim addresses");
      check(sim.enable == model[10][0], "sim enable");
    end
    // unused register addresses
    access(0, REG_AW'(11), 32'hFFFF_FFFF, q, lat);
    access(0, REG_AW'(15), 32'hFFFF_FFFF, q, lat);
    access(0, REG_AW'(16 + 3), 32'hFFFF_FFFF, q, lat);
    access(1, REG_AW'(11), 0, q, lat);
    check(q == 0, "unused reg 11 reads zero");
    access(1, REG_AW'(16 + 3), 0, q, lat);
    check(q == 0, "address 19 reads zero");
    access(1, REG_AW'(3), 0, q, lat);
    check(q == model[3], "register 3 not aliased by address 19");
    // SRAM window
    for (int k = 0; k < 30; k++) begin
      int w = $urandom_range(2**SRAM_AW - 1);
      logic [31:0] d = $urandom;
      access(0, sram_a(w), d, q, lat);
      check(lat >= 2, "SRAM write acknowledged before completion");
      check(sram_shadow.exists(w) && sram_shadow[w] == d, $sformatf("SRAM write word %0d", w));
      access(1, sram_a(w), 0, q, lat);
      check(q == d, $sformatf("SRAM read word %0d got %h exp %h", w, q, d));
      sram_ops += 2;
    end
    for (int k = 0; k < NUM_REGS; k++) begin
      access(1, REG_AW'(k), 0, q, lat);
      check(q == model[k], $sformatf("reg %0d changed by SRAM traffic", k));
    end
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
