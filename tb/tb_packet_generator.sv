// tb_packet_generator: self-checking test of the packet generator.
//
// Feeds IQ samples, reads the 64-bit output and compares every packet
// word for word with the byte-wise reference model (airfpga_ref_pkg).
// Phase 1 checks a packet at full rate and its length of 7 + N/2 cycles;
// phase 2 runs many packets with random input gaps and random output
// stalls (counting stalls and input back-pressure); phase 3 changes the
// packet parameters while a packet is being sent, which must only affect
// the next packet. Sequence numbers must count up from zero.
module tb_packet_generator;
  import airfpga_pkg::*;
  import airfpga_ref_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_cfg_t cfg;
  logic in_valid, in_ready, out_wr, out_rdy;
  iq_t in_data;
  logic [63:0] out_data;
  logic [7:0]  out_ctrl;

  packet_generator #(.SAMPLES_PER_PKT(N), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_data, .in_ready,
    .out_data, .out_ctrl, .out_wr, .out_rdy);

  int checks = 0, failures = 0;
  int stalls = 0, backpressure = 0, packets = 0;
  logic [31:0] sent[$];
  logic [31:0] exp_seq = 0;
  pkt_cfg_t cfg_hdr;
  word_t got[$];
  int first_cycle, cycle = 0;
  int last_len_cycles = 0;
  bit in_pkt = 0;

  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (!out_rdy && in_pkt) stalls++;
    if (in_valid && !in_ready) backpressure++;
    if (out_wr) begin
      if (out_ctrl == 8'hFF) begin
        cfg_hdr = cfg;
        first_cycle = cycle;
        in_pkt = 1;
      end
      got.push_back({out_ctrl, out_data});
      if (out_ctrl == 8'h01) begin
        logic [31:0] smp[$];
        word_t exp[$];
        smp.delete();
        for (int k = 0; k < N; k++) smp.push_back(sent.pop_front());
        build_packet(cfg_hdr.mac_src, cfg_hdr.mac_dst, cfg_hdr.ip_src, cfg_hdr.ip_dst,
                     cfg_hdr.udp_src, cfg_hdr.udp_dst, exp_seq, smp, exp);
        check(got.size() == exp.size(), $sformatf("packet %0d length %0d", packets, got.size()));
        for (int k = 0; k < exp.size() && k < got.size(); k++)
          check(got[k].ctrl == exp[k].ctrl && got[k].data == exp[k].data,
                $sformatf("packet %0d word %0d got %h/%h exp %h/%h", packets, k,
                          got[k].ctrl, got[k].data, exp[k].ctrl, exp[k].data));
        last_len_cycles = cycle - first_cycle + 1;
        got.delete();
        in_pkt = 0;
        exp_seq++;
        packets++;
      end
    end
  end

  function automatic pkt_cfg_t rand_cfg();
    pkt_cfg_t c;
    c.mac_src = {$urandom, $urandom};
    c.mac_dst = {$urandom, $urandom};
    c.ip_src  = $urandom;
    c.ip_dst  = $urandom;
    c.udp_src = 16'($urandom);
    c.udp_dst = 16'($urandom);
    return c;
  endfunction

  task automatic push_samples(input int count, input int gap_pct);
    int k = 0;
    while (k < count) begin
      @(negedge clk);
      in_valid = ($urandom_range(99) >= gap_pct);
      in_data  = iq_t'($urandom);
      @(posedge clk);
      if (in_valid && in_ready) begin
        sent.push_back(in_data);
        k++;
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    int target;
    in_valid = 0; in_data = '0; out_rdy = 1;
    cfg = rand_cfg();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase 1: one packet, full rate
    push_samples(N, 0);
    wait (packets == 1);
    check(last_len_cycles == 7 + N / 2, $sformatf("packet took %0d cycles", last_len_cycles));

    // phase 2: random gaps and stalls
    fork
      push_samples(20 * N, 30);
      begin
        while (packets < 21) begin
          @(negedge clk) out_rdy = ($urandom_range(99) >= 35);
        end
        @(negedge clk) out_rdy = 1;
      end
    join

    // phase 3: change parameters while a packet is in flight
    cfg = rand_cfg();
    target = packets + 2;
    fork
      push_samples(2 * N, 0);
      begin
        @(posedge clk iff (out_wr && out_ctrl == 8'hFF));
        @(negedge clk) cfg = rand_cfg();
      end
    join
    wait (packets == target);
    repeat (5) @(posedge clk);

    check(packets == 23, $sformatf("packets %0d", packets));
    check(stalls > 0, "output stall never happened");
    check(backpressure > 0, "input back-pressure never happened");
    check(sent.size() == 0, "samples left over");
    $display("packets=%0d stalls=%0d backpressure=%0d", packets, stalls, backpressure);
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
