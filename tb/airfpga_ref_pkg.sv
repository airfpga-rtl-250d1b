// airfpga_ref_pkg: reference model of the AirFPGA packet for testbenches.
//
// build_packet() assembles the expected frame byte by byte in wire order
// (Ethernet, IPv4, UDP, AirFPGA header, IQ samples with Q before I),
// computes the IPv4 checksum by 32-bit summation and folding, and cuts the
// bytes into 64-bit words with the first byte in bits 63:56, preceded by
// the IOQ module header word. It works independently of the RTL's
// word-wise construction.
package airfpga_ref_pkg;

  typedef struct packed {
    logic [7:0]  ctrl;
    logic [63:0] data;
  } word_t;

  function automatic void build_packet(
      input  logic [47:0] mac_src, input logic [47:0] mac_dst,
      input  logic [31:0] ip_src,  input logic [31:0] ip_dst,
      input  logic [15:0] udp_src, input logic [15:0] udp_dst,
      input  logic [31:0] seq, input logic [31:0] samples[$],
      output word_t words[$]);
    byte unsigned b[$];
    int n = samples.size();
    int tot_len = 20 + 8 + 6 + 4 * n;
    int udp_len = 8 + 6 + 4 * n;
    logic [31:0] sum;
    logic [15:0] ck;
    int ip0;
    logic [63:0] w;
    for (int k = 5; k >= 0; k--) b.push_back(mac_dst[8*k +: 8]);
    for (int k = 5; k >= 0; k--) b.push_back(mac_src[8*k +: 8]);
    b.push_back(8'h08); b.push_back(8'h00);
    ip0 = b.size();
    b.push_back(8'h45); b.push_back(8'h00);
    b.push_back(tot_len[15:8]); b.push_back(tot_len[7:0]);
    b.push_back(seq[15:8]); b.push_back(seq[7:0]);
    b.push_back(8'h40); b.push_back(8'h00);
    b.push_back(8'd64); b.push_back(8'd17);
    b.push_back(8'h00); b.push_back(8'h00);
    for (int k = 3; k >= 0; k--) b.push_back(ip_src[8*k +: 8]);
    for (int k = 3; k >= 0; k--) b.push_back(ip_dst[8*k +: 8]);
    sum = 0;
    for (int k = 0; k < 20; k += 2) sum += {16'd0, b[ip0+k], b[ip0+k+1]};
    while (sum[31:16] != 0) sum = {16'd0, sum[15:0]} + {16'd0, sum[31:16]};
    ck = ~sum[15:0];
    b[ip0+10] = ck[15:8]; b[ip0+11] = ck[7:0];
    b.push_back(udp_src[15:8]); b.push_back(udp_src[7:0]);
    b.push_back(udp_dst[15:8]); b.push_back(udp_dst[7:0]);
    b.push_back(udp_len[15:8]); b.push_back(udp_len[7:0]);
    b.push_back(8'h00); b.push_back(8'h00);          // UDP checksum
    b.push_back(8'h00); b.push_back(8'h00);          // reserved
    for (int k = 3; k >= 0; k--) b.push_back(seq[8*k +: 8]);
    foreach (samples[i]) for (int k = 3; k >= 0; k--) b.push_back(samples[i][8*k +: 8]);
    words.delete();
    words.push_back({8'hFF, 16'h0001, 16'(b.size() / 8), 16'h0000, 16'(b.size())});
    for (int i = 0; i < b.size(); i += 8) begin
      for (int k = 0; k < 8; k++) w[63 - 8*k -: 8] = b[i+k];
      words.push_back({(i + 8 >= b.size()) ? 8'h01 : 8'h00, w});
    end
  endfunction

endpackage
