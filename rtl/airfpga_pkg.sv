// airfpga_pkg: types and constants shared by the AirFPGA data path.
//
// The data path moves NetFPGA-style words: 64 data bits plus an 8-bit
// control field (CTRL). CTRL 0xFF marks the IOQ module header word, 0x00 a
// data word, and 0x01 the last word of a packet with all eight bytes valid.
// Bit 63 is the first bit on the wire, so the first field of a packet
// header occupies the most significant bits of a word.
//
// One IQ sample is 32 bits: Q in the upper half, I in the lower half, so
// that Q precedes I on the wire. The same 32-bit word is the unit stored in
// SRAM.
//
// Register map (word addresses on the host register bus): the eleven
// AirFPGA registers sit at indices 0..10 in the order of the register
// enum below; bit 22 of the address selects the SRAM window instead, with
// the low SRAM_AW bits as the SRAM word address. The register order and the
// packet layout follow the AirFPGA register list and packet format; the
// address bases, SRAM geometry and fixed header values are this design's
// choices.
package airfpga_pkg;

  localparam int unsigned DATA_W     = 64;
  localparam int unsigned CTRL_W     = 8;
  localparam int unsigned SAMPLE_W   = 32;
  localparam int unsigned REG_AW     = 23;
  localparam int unsigned REG_DW     = 32;
  localparam int unsigned SRAM_AW    = 19;
  localparam int unsigned SRAM_DW    = 32;
  // Address bit that selects the SRAM window on the register bus.
  localparam int unsigned SRAM_WIN_BIT = 22;

  localparam logic [CTRL_W-1:0] CTRL_MODULE_HDR = 8'hFF;
  localparam logic [CTRL_W-1:0] CTRL_DATA       = 8'h00;
  localparam logic [CTRL_W-1:0] CTRL_EOP        = 8'h01;

  // Header bytes following the module header: Ethernet 14, IPv4 20, UDP 8,
  // AirFPGA reserved 2 + sequence number 4. Exactly six 64-bit words.
  localparam int unsigned HDR_BYTES  = 48;
  localparam int unsigned HDR_WORDS  = 6;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_VER_IHL     = 8'h45;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam logic [2:0]  IP_FLAGS_DF    = 3'b010;

  typedef struct packed {
    logic [15:0] q;
    logic [15:0] i;
  } iq_t;

  typedef enum logic [3:0] {
    REG_MAC_SRC_HI  = 4'd0,
    REG_MAC_SRC_LO  = 4'd1,
    REG_MAC_DST_HI  = 4'd2,
    REG_MAC_DST_LO  = 4'd3,
    REG_IP_SRC      = 4'd4,
    REG_IP_DST      = 4'd5,
    REG_UDP_SRC     = 4'd6,
    REG_UDP_DST     = 4'd7,
    REG_SIM_ADDR_LO = 4'd8,
    REG_SIM_ADDR_HI = 4'd9,
    REG_SIM_ENABLE  = 4'd10
  } reg_idx_e;

  localparam int unsigned NUM_REGS = 11;

  // Packet parameters written by the host.
  typedef struct packed {
    logic [47:0] mac_src;
    logic [47:0] mac_dst;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    logic [15:0] udp_src;
    logic [15:0] udp_dst;
  } pkt_cfg_t;

  // DSP simulator control written by the host.
  typedef struct packed {
    logic [SRAM_AW-1:0] addr_lo;
    logic [SRAM_AW-1:0] addr_hi;
    logic               enable;
  } sim_ctrl_t;

  // One's-complement 16-bit addition with end-around carry.
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // IPv4 header checksum for the header this design emits.
  function automatic logic [15:0] ip_checksum(
      input logic [15:0] total_len, input logic [15:0] id, input logic [7:0] ttl,
      input logic [31:0] src, input logic [31:0] dst);
    logic [15:0] s;
    s = {IP_VER_IHL, 8'h00};
    s = oc_add(s, total_len);
    s = oc_add(s, id);
    s = oc_add(s, {IP_FLAGS_DF, 13'd0});
    s = oc_add(s, {ttl, IP_PROTO_UDP});
    s = oc_add(s, src[31:16]);
    s = oc_add(s, src[15:0]);
    s = oc_add(s, dst[31:16]);
    s = oc_add(s, dst[15:0]);
    return ~s;
  endfunction

endpackage
