// packet_generator: packs IQ samples into UDP/IPv4/Ethernet packets on the
// NetFPGA 64-bit data path.
//
// Incoming 32-bit samples are paired into 64-bit payload words (the earlier
// sample in bits 63:32) and queued in a FIFO of FIFO_DEPTH words. When the
// FIFO holds a whole packet's worth, SAMPLES_PER_PKT samples, the generator
// latches the packet parameters and emits, one word per cycle while
// out_rdy is high:
//   CTRL 0xFF  IOQ module header {port_dst, word_length, port_src, byte_length}
//   CTRL 0x00  {mac_dst, mac_src[47:32]}
//   CTRL 0x00  {mac_src[31:0], ethertype 0x0800, version/IHL 0x45, ToS 0}
//   CTRL 0x00  {ip_total_length, ip_id, flags DF + offset 0, TTL, protocol 17}
//   CTRL 0x00  {ip_header_checksum, ip_src, ip_dst[31:16]}
//   CTRL 0x00  {ip_dst[15:0], udp_src, udp_dst, udp_length}
//   CTRL 0x00  {udp_checksum 0, reserved 0, sequence number}
//   CTRL 0x00  two IQ samples per word ...
//   CTRL 0x01  the last two IQ samples
// The sequence number starts at 0 after reset and increases by one per
// packet; the IP identification is its low 16 bits. A packet of N samples
// takes 7 + N/2 cycles when out_rdy stays high; a low out_rdy stalls the
// output word for word (out_wr is only raised when out_rdy is high).
//
// The word layout, CTRL codes, field widths, the reserved field and the
// 32-bit sequence number follow the AirFPGA packet format. The samples per
// packet, the fixed header values (TTL, DF flag, IP id, zero UDP checksum,
// zero reserved field), the output port code and the FIFO size are this
// design's choices.
module packet_generator
  import airfpga_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_PKT = 256,
  parameter int unsigned FIFO_DEPTH      = 512,
  parameter logic [15:0] OUT_PORT        = 16'h0001,
  parameter logic [15:0] SRC_PORT        = 16'h0000,
  parameter logic [7:0]  IP_TTL          = 8'd64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pkt_cfg_t             cfg,
  // sample stream
  input  logic                 in_valid,
  input  iq_t                  in_data,
  output logic                 in_ready,
  // NetFPGA output port towards a MAC transmit queue
  output logic [DATA_W-1:0]    out_data,
  output logic [CTRL_W-1:0]    out_ctrl,
  output logic                 out_wr,
  input  logic                 out_rdy
);
  localparam int unsigned PAYLOAD_WORDS = SAMPLES_PER_PKT / 2;
  localparam int unsigned PKT_WORDS     = 1 + HDR_WORDS + PAYLOAD_WORDS;
  localparam logic [15:0] BYTE_LEN      = 16'(HDR_BYTES + 4 * SAMPLES_PER_PKT);
  localparam logic [15:0] WORD_LEN      = 16'(HDR_WORDS + PAYLOAD_WORDS);
  localparam logic [15:0] IP_TOT_LEN    = 16'(20 + 8 + 6 + 4 * SAMPLES_PER_PKT);
  localparam logic [15:0] UDP_LEN       = 16'(8 + 6 + 4 * SAMPLES_PER_PKT);
  localparam int unsigned WCW           = $clog2(PKT_WORDS);
  localparam int unsigned FCW           = $clog2(FIFO_DEPTH+1);

  // ---------------- sample pairing and payload FIFO ----------------
  logic          half_valid;
  iq_t           half;
  logic          fifo_full, fifo_empty, fifo_rd;
  logic [63:0]   fifo_q;
  logic [FCW-1:0] fifo_count;
  logic          accept;

  assign in_ready = !half_valid || !fifo_full;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_valid <= 1'b0;
      half       <= '0;
    end else if (accept) begin
      half_valid <= !half_valid;
      if (!half_valid) half <= in_data;
    end
  end

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_payload (
    .clk, .rst_n,
    .wr_en  (accept && half_valid),
    .wr_data({half, in_data}),
    .full   (fifo_full),
    .rd_en  (fifo_rd),
    .rd_data(fifo_q),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  // ---------------- packet sequencing ----------------
  typedef enum logic {S_IDLE, S_SEND} state_e;
  state_e        state;
  logic [WCW-1:0] widx;
  pkt_cfg_t      pc;        // parameters latched for the packet being sent
  logic [31:0]   seq;
  logic [15:0]   cksum;

  logic start, advance, last_word;
  assign start     = (state == S_IDLE) && (fifo_count >= FCW'(PAYLOAD_WORDS));
  assign advance   = (state == S_SEND) && out_rdy;
  assign last_word = (widx == WCW'(PKT_WORDS - 1));
  assign fifo_rd   = advance && (widx > WCW'(HDR_WORDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      widx  <= '0;
      pc    <= '0;
      seq   <= '0;
      cksum <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_SEND;
          widx  <= '0;
          pc    <= cfg;
          cksum <= ip_checksum(IP_TOT_LEN, seq[15:0], IP_TTL, cfg.ip_src, cfg.ip_dst);
        end
        S_SEND: if (advance) begin
          if (last_word) begin
            state <= S_IDLE;
            seq   <= seq + 1'b1;
          end
          widx <= widx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out_wr   = advance;
    out_ctrl = CTRL_DATA;
    out_data = fifo_q;
    unique case (widx)
      WCW'(0): begin
        out_ctrl = CTRL_MODULE_HDR;
        out_data = {OUT_PORT, WORD_LEN, SRC_PORT, BYTE_LEN};
      end
      WCW'(1): out_data = {pc.mac_dst, pc.mac_src[47:32]};
      WCW'(2): out_data = {pc.mac_src[31:0], ETHERTYPE_IPV4, IP_VER_IHL, 8'h00};
      WCW'(3): out_data = {IP_TOT_LEN, seq[15:0], IP_FLAGS_DF, 13'd0, IP_TTL, IP_PROTO_UDP};
      WCW'(4): out_data = {cksum, pc.ip_src, pc.ip_dst[31:16]};
      WCW'(5): out_data = {pc.ip_dst[15:0], pc.udp_src, pc.udp_dst, UDP_LEN};
      WCW'(6): out_data = {16'h0000, 16'h0000, seq};
      default: if (last_word) out_ctrl = CTRL_EOP;
    endcase
  end

  // parameter rules and handshake rules
  initial begin
    assert (SAMPLES_PER_PKT >= 2 && SAMPLES_PER_PKT % 2 == 0)
      else $error("SAMPLES_PER_PKT must be even and at least 2");
    assert (FIFO_DEPTH >= PAYLOAD_WORDS)
      else $error("FIFO_DEPTH must hold one packet of payload words");
  end
  a_wr_only_when_rdy: assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> out_rdy);
  a_payload_present:  assert property (@(posedge clk) disable iff (!rst_n) fifo_rd |-> !fifo_empty);

endmodule
