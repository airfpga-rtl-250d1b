// tb_airfpga_top: end-to-end test of the AirFPGA data path at its default
// sizes (256 samples per packet, 512-word payload FIFO, 2**19-word SRAM).
//
// Like the server software, the testbench loads a recording of IQ samples
// into SRAM through the register bus, programs the packet parameters and
// the playback window and sets the enable bit; a behavioural SRAM model
// serves the reads, and a monitor on the output port collects packets.
// Every packet is compared word for word with the byte-wise reference
// model, using the SRAM contents at the window addresses read, and the
// read addresses must run lo..hi in a loop and restart at lo on every
// enable. The test also stalls the output (short random stalls and one
// long stall that fills the payload FIFO and stops the simulator), reads
// SRAM from the host during playback, changes the packet parameters
// between two playback sessions, and checks that with the output always
// ready the packet rate is set by the SRAM read rate of one sample per
// cycle. Each of these events is counted and must happen.
module tb_airfpga_top;
  import airfpga_pkg::*;
  import airfpga_ref_pkg::*;

  localparam int unsigned N   = 256;   // samples per packet (default)
  localparam int unsigned LAT = 2;     // SRAM read latency (default)

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;   // 125 MHz

  logic reg_req, reg_rd_wr_L, reg_ack;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_DW-1:0] reg_wr_data, reg_rd_data;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;
  logic [63:0] out_data;
  logic [7:0]  out_ctrl;
  logic out_wr, out_rdy;

  airfpga_top dut (.*);
  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW), .LATENCY(LAT)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  int n_stall = 0, n_backpressure = 0, n_wrap = 0, n_restart = 0, n_host_conflict = 0;
  int n_cfg_change = 0, packets = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host model ----------------
  logic [31:0] shadow [int];     // what the host wrote to SRAM
  pkt_cfg_t    cfg_m;            // packet parameters as programmed
  logic [SRAM_AW-1:0] lo_m, hi_m;

  task automatic access(input bit rd, input logic [REG_AW-1:0] a, input logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk);
    reg_req = 1; reg_rd_wr_L = rd; reg_addr = a; reg_wr_data = d;
    @(negedge clk);
    reg_req = 0;
    while (!reg_ack) @(negedge clk);
    q = reg_rd_data;
  endtask

  task automatic wr_reg(input reg_idx_e r, input logic [31:0] d);
    logic [31:0] q;
    access(0, REG_AW'(r), d, q);
  endtask

  task automatic sram_wr(input int w, input logic [31:0] d);
    logic [31:0] q;
    access(0, REG_AW'(1 << SRAM_WIN_BIT) | REG_AW'(w), d, q);
    shadow[w] = d;
  endtask

  task automatic sram_rd(input int w, output logic [31:0] q);
    access(1, REG_AW'(1 << SRAM_WIN_BIT) | REG_AW'(w), 0, q);
  endtask

  task automatic program_cfg();
    cfg_m.mac_src = {$urandom, $urandom};
    cfg_m.mac_dst = {16'h0100, 8'h5E, 1'b0, 23'($urandom)};   // IPv4 multicast MAC
    cfg_m.ip_src  = $urandom;
    cfg_m.ip_dst  = {8'd224, 24'($urandom)};                  // 224.x.y.z group
    cfg_m.udp_src = 16'($urandom);
    cfg_m.udp_dst = 16'($urandom);
    wr_reg(REG_MAC_SRC_HI, {16'd0, cfg_m.mac_src[47:32]});
    wr_reg(REG_MAC_SRC_LO, cfg_m.mac_src[31:0]);
    wr_reg(REG_MAC_DST_HI, {16'd0, cfg_m.mac_dst[47:32]});
    wr_reg(REG_MAC_DST_LO, cfg_m.mac_dst[31:0]);
    wr_reg(REG_IP_SRC, cfg_m.ip_src);
    wr_reg(REG_IP_DST, cfg_m.ip_dst);
    wr_reg(REG_UDP_SRC, {16'd0, cfg_m.udp_src});
    wr_reg(REG_UDP_DST, {16'd0, cfg_m.udp_dst});
  endtask

  // ---------------- SRAM read-address monitor ----------------
  // Window reads are the simulator's; the host only reads outside it.
  logic [31:0] stream[$];       // samples read by the simulator, in order
  logic [SRAM_AW-1:0] exp_addr;
  bit   fresh_enable = 1;
  always @(posedge clk) if (rst_n && sram_en && !sram_we && sram_addr >= lo_m && sram_addr <= hi_m) begin
    if (fresh_enable) begin
      exp_addr = lo_m;
      fresh_enable = 0;
      n_restart++;
    end
    check(sram_addr == exp_addr, $sformatf("SRAM read %0d exp %0d", sram_addr, exp_addr));
    stream.push_back(shadow.exists(int'(sram_addr)) ? shadow[int'(sram_addr)] : 32'h0);
    if (sram_addr == hi_m) begin
      exp_addr = lo_m;
      n_wrap++;
    end else exp_addr = sram_addr + 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_sram_if.hst_gnt && dut.rd_req) n_host_conflict++;
    if (dut.smp_valid && !dut.smp_ready) n_backpressure++;
  end

  // ---------------- output monitor ----------------
  word_t got[$];
  pkt_cfg_t cfg_hdr;
  bit in_pkt = 0;
  logic [31:0] exp_seq = 0;
  int hdr_cycles[$];
  always @(posedge clk) if (rst_n) begin
    if (in_pkt && !out_rdy) n_stall++;
    if (out_wr) begin
      if (out_ctrl == 8'hFF) begin
        cfg_hdr = cfg_m;
        in_pkt = 1;
        hdr_cycles.push_back(cycle);
      end
      got.push_back({out_ctrl, out_data});
      if (out_ctrl == 8'h01) begin
        logic [31:0] smp[$];
        word_t exp[$];
        smp.delete();
        for (int k = 0; k < N; k++) smp.push_back(stream.pop_front());
        build_packet(cfg_hdr.mac_src, cfg_hdr.mac_dst, cfg_hdr.ip_src, cfg_hdr.ip_dst,
                     cfg_hdr.udp_src, cfg_hdr.udp_dst, exp_seq, smp, exp);
        check(got.size() == exp.size(), $sformatf("packet %0d has %0d words", packets, got.size()));
        for (int k = 0; k < exp.size() && k < got.size(); k++)
          check(got[k] == exp[k], $sformatf("packet %0d word %0d got %h exp %h",
                                             packets, k, got[k], exp[k]));
        got.delete();
        in_pkt = 0;
        exp_seq++;
        packets++;
      end
    end
  end

  task automatic wait_packets(input int n);
    int target = packets + n;
    wait (packets >= target);
  endtask

  initial begin
    logic [31:0] q;
    int t;
    reg_req = 0; reg_rd_wr_L = 1; reg_addr = '0; reg_wr_data = '0;
    out_rdy = 1;
    lo_m = 19'd1000; hi_m = 19'd1000 + 19'd700 - 19'd1;   // 700-sample recording
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // load the recording and a region the host reads back later
    for (int w = int'(lo_m); w <= int'(hi_m); w++) sram_wr(w, $urandom);
    for (int w = 5000; w < 5040; w++) sram_wr(w, $urandom);
    program_cfg();
    wr_reg(REG_SIM_ADDR_LO, 32'(lo_m));
    wr_reg(REG_SIM_ADDR_HI, 32'(hi_m));
    access(1, REG_AW'(REG_SIM_ADDR_HI), 0, q);
    check(q == 32'(hi_m), "end address register read back");

    // session 1: output always ready, measure the packet rate
    fresh_enable = 1;
    wr_reg(REG_SIM_ENABLE, 1);
    wait_packets(6);
    t = hdr_cycles.size();
    check(hdr_cycles[t-1] - hdr_cycles[t-5] <= 4 * N + 4 && hdr_cycles[t-1] - hdr_cycles[t-5] >= 4 * N - 4,
          $sformatf("4 packets took %0d cycles, expected about %0d", hdr_cycles[t-1] - hdr_cycles[t-5], 4 * N));

    // random output stalls while the host reads SRAM
    fork
      begin
        for (int w = 5000; w < 5040; w++) begin
          sram_rd(w, q);
          check(q == shadow[w], $sformatf("host SRAM read %0d during playback", w));
        end
      end
      begin
        repeat (3000) @(negedge clk) out_rdy = ($urandom_range(99) < 60);
        @(negedge clk) out_rdy = 1;
      end
    join
    // one long stall: the payload FIFO fills and the simulator stops
    @(negedge clk) out_rdy = 0;
    repeat (2500) @(posedge clk);
    @(negedge clk) out_rdy = 1;
    wait_packets(3);

    // session 2: stop, wait until idle, new parameters, restart
    wr_reg(REG_SIM_ENABLE, 0);
    repeat (1500) @(posedge clk);
    program_cfg();
    n_cfg_change++;
    fresh_enable = 1;
    wr_reg(REG_SIM_ENABLE, 1);
    wait_packets(4);
    wr_reg(REG_SIM_ENABLE, 0);
    repeat (1500) @(posedge clk);

    check(n_stall > 0,         "output stall never happened");
    check(n_backpressure > 0,  "payload FIFO never back-pressured the simulator");
    check(n_wrap > 2,          "playback window never wrapped");
    check(n_restart == 2,      $sformatf("%0d playback starts", n_restart));
    check(n_host_conflict > 0, "host never competed with the simulator for SRAM");
    check(n_cfg_change > 0,    "parameters never changed");
    check(packets >= 20,       $sformatf("only %0d packets", packets));
    check(stream.size() < N,   "more than a packet of samples left unsent");
    $display("packets=%0d stalls=%0d backpressure=%0d wraps=%0d restarts=%0d host_conflicts=%0d cfg_changes=%0d",
             packets, n_stall, n_backpressure, n_wrap, n_restart, n_host_conflict, n_cfg_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
