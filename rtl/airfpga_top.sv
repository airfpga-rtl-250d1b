// airfpga_top: the AirFPGA user data path on a NetFPGA card, in its
// playback configuration.
//
// The host loads recorded baseband IQ samples into the board SRAM through
// the register bus, sets the packet parameters (MAC, IP and UDP addresses
// and ports) and the playback window, and sets the enable bit. The DSP
// simulator then reads the window from SRAM in a loop and hands the
// samples to the packet generator, which wraps them into UDP packets with a
// sequence number and writes them, 64 data bits and 8 CTRL bits per cycle,
// towards the transmit queue of one Gigabit Ethernet MAC.
//
//   host bus -> airfpga_regs --(cfg)-----------------------> packet_generator -> out_*
//                    |  \--(sim)--> dsp_simulator --samples--^
//                    |                    |
//                    +--host--> sram_interface <--reads--+
//                                     |
//                                  sram_* (board SRAM)
//
// Ports: the register bus (see airfpga_regs), the synchronous SRAM port
// (see sram_interface) and the NetFPGA output port out_data/out_ctrl/
// out_wr/out_rdy. One clock, asynchronous active-low reset.
//
// The block structure and the current-path wiring (SRAM, DSP simulator,
// packet generator, register I/O) follow the AirFPGA data path; the
// envisioned radio interface and DSP modules are not built, and the
// NetFPGA MAC queues, register system and SRAM chip lie outside.
module airfpga_top
  import airfpga_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_PKT = 256,
  parameter int unsigned FIFO_DEPTH      = 512,
  parameter int unsigned SKID_DEPTH      = 8,
  parameter int unsigned SRAM_RD_LATENCY = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // host register bus
  input  logic                reg_req,
  input  logic                reg_rd_wr_L,
  input  logic [REG_AW-1:0]   reg_addr,
  input  logic [REG_DW-1:0]   reg_wr_data,
  output logic                reg_ack,
  output logic [REG_DW-1:0]   reg_rd_data,
  // board SRAM
  output logic                sram_en,
  output logic                sram_we,
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [SRAM_DW-1:0]  sram_wdata,
  input  logic [SRAM_DW-1:0]  sram_rdata,
  // towards the MAC transmit queue
  output logic [DATA_W-1:0]   out_data,
  output logic [CTRL_W-1:0]   out_ctrl,
  output logic                out_wr,
  input  logic                out_rdy
);

  pkt_cfg_t  cfg;
  sim_ctrl_t sim;

  logic               hst_req, hst_we, hst_done;
  logic [SRAM_AW-1:0] hst_addr;
  logic [SRAM_DW-1:0] hst_wdata, hst_rdata;

  logic               rd_req, rd_gnt, rd_valid;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;

  logic smp_valid, smp_ready;
  iq_t  smp;

  airfpga_regs u_regs (
    .clk, .rst_n,
    .reg_req, .reg_rd_wr_L, .reg_addr, .reg_wr_data, .reg_ack, .reg_rd_data,
    .cfg, .sim,
    .hst_req, .hst_we, .hst_addr, .hst_wdata, .hst_done, .hst_rdata
  );

  sram_interface #(.RD_LATENCY(SRAM_RD_LATENCY)) u_sram_if (
    .clk, .rst_n,
    .hst_req, .hst_we, .hst_addr, .hst_wdata, .hst_done, .hst_rdata,
    .sim_req(rd_req), .sim_addr(rd_addr), .sim_gnt(rd_gnt),
    .sim_rvalid(rd_valid), .sim_rdata(rd_data),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

  dsp_simulator #(.SKID_DEPTH(SKID_DEPTH)) u_dsp_sim (
    .clk, .rst_n, .sim,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .out_valid(smp_valid), .out_data(smp), .out_ready(smp_ready)
  );

  packet_generator #(
    .SAMPLES_PER_PKT(SAMPLES_PER_PKT),
    .FIFO_DEPTH     (FIFO_DEPTH)
  ) u_pkt_gen (
    .clk, .rst_n, .cfg,
    .in_valid(smp_valid), .in_data(smp), .in_ready(smp_ready),
    .out_data, .out_ctrl, .out_wr, .out_rdy
  );

endmodule
