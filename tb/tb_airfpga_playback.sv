// tb_airfpga_playback: the two signal-generator scenarios played through
// the whole data path at its default sizes, received by a client model.
//
// For each scenario the testbench synthesises a baseband IQ recording as
// the receiver would deliver it at 196,078 samples/s, tuned 20 kHz below
// a 1.4 MHz carrier: (a) AM, a 10 kHz tone with modulation depth 0.5;
// (b) wideband FM, a 1 kHz tone with modulation index 10. It loads the
// recording into SRAM over the register bus, programs a multicast
// destination (224.x.y.z) and starts playback. The client model acts like
// a UDP socket: it checks each frame's Ethernet type, IP version, protocol,
// destination address and port, IP and UDP lengths and the IP header
// checksum, requires consecutive sequence numbers (no loss), and requires
// the payload to be the recording, in order, looping at its end. It then
// demodulates what it received: for AM the envelope's peak-to-trough ratio
// must be (1+m)/(1-m) and it must have one cycle per 10 kHz period; for FM
// the instantaneous frequency must swing +-10 kHz about the 20 kHz offset.
// Finally the delivered sample rate is compared with what the radio needs.
// The design is reset between the two scenarios.
module tb_airfpga_playback;
  import airfpga_pkg::*;

  localparam real FS   = 196078.0;      // complex samples per second
  localparam real FOFF = 20000.0;       // carrier offset in baseband
  localparam real PI   = 3.14159265358979;
  localparam int  LEN  = 3000;          // samples per recording
  localparam int  PKTS = 12;            // packets to receive per scenario
  localparam int  N    = 256;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

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
  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW), .LATENCY(2)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- host ----------------
  task automatic access(input bit rd, input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_req = 1; reg_rd_wr_L = rd; reg_addr = a; reg_wr_data = d;
    @(negedge clk);
    reg_req = 0;
    while (!reg_ack) @(negedge clk);
  endtask
  task automatic wr_reg(input reg_idx_e r, input logic [31:0] d);
    access(0, REG_AW'(r), d);
  endtask

  logic [31:0] rec [LEN];
  logic [31:0] ip_dst_m;
  logic [15:0] udp_dst_m;

  function automatic logic [31:0] pack_iq(input real i, input real q);
    int ii = $rtoi(i), qq = $rtoi(q);
    return {16'(qq), 16'(ii)};
  endfunction

  task automatic make_recording(input bit fm);
    real t, a, ph;
    for (int k = 0; k < LEN; k++) begin
      t = k / FS;
      if (!fm) begin
        a  = 12000.0 * (1.0 + 0.5 * $cos(2.0 * PI * 10000.0 * t));
        ph = 2.0 * PI * FOFF * t;
      end else begin
        a  = 12000.0;
        ph = 2.0 * PI * FOFF * t + 10.0 * $sin(2.0 * PI * 1000.0 * t);
      end
      rec[k] = pack_iq(a * $cos(ph), a * $sin(ph));
    end
  endtask

  // ---------------- client ----------------
  logic [63:0] frame[$];
  int   rx_pkts = 0, rx_samples = 0;
  logic [31:0] next_seq = 0;
  real  rx_i[$], rx_q[$];
  int   first_hdr_cycle = -1, last_eop_cycle;

  function automatic logic [15:0] fold(input logic [31:0] s);
    while (s[31:16] != 0) s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    return s[15:0];
  endfunction

  task automatic client_frame();
    byte unsigned b[$];
    logic [31:0] sum;
    int n, ip_len, udp_len;
    logic [31:0] seq;
    for (int w = 1; w < frame.size(); w++)
      for (int k = 7; k >= 0; k--) b.push_back(frame[w][8*k +: 8]);
    check(b.size() == 48 + 4 * N, $sformatf("frame of %0d bytes", b.size()));
    check({b[12], b[13]} == 16'h0800, "ethertype");
    check(b[14] == 8'h45 && b[23] == 8'd17, "IPv4, UDP");
    sum = 0;
    for (int k = 14; k < 34; k += 2) sum += {16'd0, b[k], b[k+1]};
    check(fold(sum) == 16'hFFFF, "IP header checksum");
    ip_len  = {b[16], b[17]};
    udp_len = {b[38], b[39]};
    check(ip_len == b.size() - 14 && udp_len == b.size() - 34, "IP/UDP lengths");
    check({b[30], b[31], b[32], b[33]} == ip_dst_m && b[30] == 8'd224, "multicast destination");
    check({b[36], b[37]} == udp_dst_m, "UDP destination port");
    seq = {b[44], b[45], b[46], b[47]};
    check(seq == next_seq, $sformatf("sequence %0d, expected %0d", seq, next_seq));
    next_seq = seq + 1;
    n = (b.size() - 48) / 4;
    for (int s = 0; s < n; s++) begin
      logic [31:0] v = {b[48+4*s], b[49+4*s], b[50+4*s], b[51+4*s]};
      check(v == rec[rx_samples % LEN], $sformatf("sample %0d", rx_samples));
      rx_q.push_back(real'($signed(v[31:16])));
      rx_i.push_back(real'($signed(v[15:0])));
      rx_samples++;
    end
  endtask

  always @(posedge clk) if (rst_n && out_wr) begin
    if (out_ctrl == 8'hFF) begin
      frame.delete();
      if (first_hdr_cycle < 0) first_hdr_cycle = cycle;
    end
    frame.push_back(out_data);
    if (out_ctrl == 8'h01) begin
      client_frame();
      rx_pkts++;
      last_eop_cycle = cycle;
    end
  end

  // ---------------- demodulators ----------------
  task automatic check_am();
    real env, mx = 0, mn = 1.0e9, mean = 0, prev;
    int ups = 0;
    foreach (rx_i[k]) begin
      env = $sqrt(rx_i[k] * rx_i[k] + rx_q[k] * rx_q[k]);
      if (env > mx) mx = env;
      if (env < mn) mn = env;
      mean += env;
    end
    mean /= rx_i.size();
    prev = $sqrt(rx_i[0] * rx_i[0] + rx_q[0] * rx_q[0]);
    for (int k = 1; k < rx_i.size(); k++) begin
      env = $sqrt(rx_i[k] * rx_i[k] + rx_q[k] * rx_q[k]);
      if (prev < mean && env >= mean) ups++;
      prev = env;
    end
    $display("AM: envelope %0.1f..%0.1f ratio %0.3f, %0d tone cycles in %0d samples",
             mn, mx, mx / mn, ups, rx_i.size());
    check(mx / mn > 2.9 && mx / mn < 3.1, "AM envelope ratio (1+m)/(1-m) = 3");
    check(ups >= int'(rx_i.size() * 10000.0 / FS) - 2 && ups <= int'(rx_i.size() * 10000.0 / FS) + 2,
          "AM tone at 10 kHz");
  endtask

  task automatic check_fm();
    real re, im, f, fmax = -1.0e9, fmin = 1.0e9, fmean = 0;
    for (int k = 1; k < rx_i.size(); k++) begin
      if (k % LEN == 0) continue;   // the recording's loop point is a phase jump
      re = rx_i[k] * rx_i[k-1] + rx_q[k] * rx_q[k-1];
      im = rx_q[k] * rx_i[k-1] - rx_i[k] * rx_q[k-1];
      f  = $atan2(im, re) * FS / (2.0 * PI);
      if (f > fmax) fmax = f;
      if (f < fmin) fmin = f;
      fmean += f;
    end
    fmean /= (rx_i.size() - 1 - (rx_i.size() - 1) / LEN);
    $display("FM: instantaneous frequency %0.0f..%0.0f Hz, mean %0.0f Hz", fmin, fmax, fmean);
    check(fmean > FOFF - 500.0 && fmean < FOFF + 500.0, "FM carrier offset 20 kHz");
    check(fmax - FOFF > 9000.0 && fmax - FOFF < 11000.0, "FM peak deviation +10 kHz");
    check(FOFF - fmin > 9000.0 && FOFF - fmin < 11000.0, "FM peak deviation -10 kHz");
  endtask

  task automatic scenario(input bit fm, input int base);
    real rate;
    rst_n = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rx_pkts = 0; rx_samples = 0; next_seq = 0; first_hdr_cycle = -1;
    rx_i.delete(); rx_q.delete();
    make_recording(fm);
    for (int k = 0; k < LEN; k++) access(0, REG_AW'(1 << SRAM_WIN_BIT) | REG_AW'(base + k), rec[k]);
    ip_dst_m  = {8'd224, 8'd1, 8'd2, 8'(fm)};
    udp_dst_m = 16'd5000 + 16'(fm);
    wr_reg(REG_MAC_SRC_HI, 32'h0000_0002);
    wr_reg(REG_MAC_SRC_LO, 32'h0A0B_0C0D);
    wr_reg(REG_MAC_DST_HI, 32'h0000_0100);
    wr_reg(REG_MAC_DST_LO, {8'h5E, 8'd1, 8'd2, 8'(fm)});
    wr_reg(REG_IP_SRC, {8'd10, 8'd0, 8'd0, 8'd1});
    wr_reg(REG_IP_DST, ip_dst_m);
    wr_reg(REG_UDP_SRC, 32'd4000);
    wr_reg(REG_UDP_DST, {16'd0, udp_dst_m});
    wr_reg(REG_SIM_ADDR_LO, base);
    wr_reg(REG_SIM_ADDR_HI, base + LEN - 1);
    wr_reg(REG_SIM_ENABLE, 1);
    wait (rx_pkts == PKTS);
    wr_reg(REG_SIM_ENABLE, 0);
    check(rx_samples == PKTS * N && rx_samples > LEN, "recording looped");
    rate = real'(rx_samples - N) / real'(last_eop_cycle - first_hdr_cycle);
    $display("delivered %0.3f samples per clock; the radio needs %0.5f at 125 MHz", rate, FS / 125.0e6);
    check(rate > 0.9, "one sample per clock from SRAM");
    check(rate > 100.0 * FS / 125.0e6, "rate far above the radio's");
    if (fm) check_fm(); else check_am();
  endtask

  initial begin
    reg_req = 0; reg_rd_wr_L = 1; reg_addr = '0; reg_wr_data = '0;
    out_rdy = 1;
    scenario(0, 0);
    scenario(1, 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
