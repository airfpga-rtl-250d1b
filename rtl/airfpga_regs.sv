// airfpga_regs: the AirFPGA register block ("Register I/O").
//
// Holds the eleven host-visible registers: source and destination MAC
// (each split into a 16-bit high and a 32-bit low register), source and
// destination IP, source and destination UDP port, and the DSP simulator's
// SRAM start address, end address and enable bit. Their contents drive the
// packet generator (cfg) and the DSP simulator (sim). The same bus also
// reaches the SRAM: an access with address bit 22 set is forwarded to the
// SRAM interface, which is how the host loads recorded IQ samples.
//
// Host bus: reg_req is a one-cycle request with reg_rd_wr_L (1 = read,
// 0 = write), reg_addr (word address) and reg_wr_data. The block answers
// with a one-cycle reg_ack, with reg_rd_data valid in that cycle. Register
// accesses are acknowledged one cycle after the request; SRAM accesses when
// the SRAM interface reports hst_done. A new request may only be issued
// in a cycle after the previous one was acknowledged. Reads of unused register
// addresses return zero and writes to them are ignored.
//
// The register set follows the AirFPGA register list; the bus handshake,
// the address map and the all-zero reset values are this design's own.
module airfpga_regs
  import airfpga_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // host register bus
  input  logic                 reg_req,
  input  logic                 reg_rd_wr_L,
  input  logic [REG_AW-1:0]    reg_addr,
  input  logic [REG_DW-1:0]    reg_wr_data,
  output logic                 reg_ack,
  output logic [REG_DW-1:0]    reg_rd_data,
  // register contents
  output pkt_cfg_t             cfg,
  output sim_ctrl_t            sim,
  // host access to SRAM
  output logic                 hst_req,
  output logic                 hst_we,
  output logic [SRAM_AW-1:0]   hst_addr,
  output logic [SRAM_DW-1:0]   hst_wdata,
  input  logic                 hst_done,
  input  logic [SRAM_DW-1:0]   hst_rdata
);

  logic [REG_DW-1:0] regs [NUM_REGS];

  logic is_sram;
  logic [3:0] idx;
  assign is_sram = reg_addr[SRAM_WIN_BIT];
  assign idx     = reg_addr[3:0];

  // register write and read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_REGS; k++) regs[k] <= '0;
    end else if (reg_req && !is_sram && !reg_rd_wr_L && (idx < 4'(NUM_REGS))
                 && (reg_addr[SRAM_WIN_BIT-1:4] == '0)) begin
      regs[idx] <= reg_wr_data;
    end
  end

  function automatic logic [REG_DW-1:0] read_reg(input logic [SRAM_WIN_BIT-1:0] a);
    if (a[SRAM_WIN_BIT-1:4] != '0 || a[3:0] >= 4'(NUM_REGS)) return '0;
    return regs[a[3:0]];
  endfunction

  // bus response and SRAM forwarding
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_ack     <= 1'b0;
      reg_rd_data <= '0;
      hst_req     <= 1'b0;
      hst_we      <= 1'b0;
      hst_addr    <= '0;
      hst_wdata   <= '0;
    end else begin
      reg_ack <= 1'b0;
      if (reg_req) begin
        if (is_sram) begin
          hst_req   <= 1'b1;
          hst_we    <= !reg_rd_wr_L;
          hst_addr  <= reg_addr[SRAM_AW-1:0];
          hst_wdata <= reg_wr_data;
        end else begin
          reg_ack     <= 1'b1;
          reg_rd_data <= reg_rd_wr_L ? read_reg(reg_addr[SRAM_WIN_BIT-1:0]) : '0;
        end
      end
      if (hst_req && hst_done) begin
        hst_req     <= 1'b0;
        reg_ack     <= 1'b1;
        reg_rd_data <= hst_we ? '0 : hst_rdata;
      end
    end
  end

  always_comb begin
    cfg.mac_src = {regs[REG_MAC_SRC_HI][15:0], regs[REG_MAC_SRC_LO]};
    cfg.mac_dst = {regs[REG_MAC_DST_HI][15:0], regs[REG_MAC_DST_LO]};
    cfg.ip_src  = regs[REG_IP_SRC];
    cfg.ip_dst  = regs[REG_IP_DST];
    cfg.udp_src = regs[REG_UDP_SRC][15:0];
    cfg.udp_dst = regs[REG_UDP_DST][15:0];
    sim.addr_lo = regs[REG_SIM_ADDR_LO][SRAM_AW-1:0];
    sim.addr_hi = regs[REG_SIM_ADDR_HI][SRAM_AW-1:0];
    sim.enable  = regs[REG_SIM_ENABLE][0];
  end

  // Protocol rule: one outstanding request at a time.
  logic busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= 1'b0;
    else if (reg_req) busy <= 1'b1;
    else if (reg_ack) busy <= 1'b0;
  end
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
                                      reg_req |-> !busy);

endmodule
