// sram_interface: shares the board SRAM between the host and the DSP
// simulator.
//
// Two requesters reach one synchronous SRAM port. The host port (from the
// register block) carries single reads and writes used to load recorded
// samples; the simulator port carries a stream of reads. Each cycle at most
// one access is issued to the SRAM, the host first: a host request is
// granted when no host access is in flight, and in every other cycle the
// simulator's request is granted (sim_gnt). Read data returns RD_LATENCY
// cycles after issue; a small tag pipeline steers it back to the host
// (hst_done with hst_rdata) or to the simulator (sim_rvalid with
// sim_rdata). A host write completes (hst_done) in the cycle it is issued.
//
// SRAM port: sram_en qualifies sram_we, sram_addr and sram_wdata in a
// cycle; sram_rdata holds the word read RD_LATENCY cycles earlier. The
// AirFPGA design names this block and its two users; its insides, the
// latency of 2 and the host-first policy are this implementation's choices.
module sram_interface
  import airfpga_pkg::*;
#(
  parameter int unsigned RD_LATENCY = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // host port
  input  logic                hst_req,
  input  logic                hst_we,
  input  logic [SRAM_AW-1:0]  hst_addr,
  input  logic [SRAM_DW-1:0]  hst_wdata,
  output logic                hst_done,
  output logic [SRAM_DW-1:0]  hst_rdata,
  // DSP simulator read port
  input  logic                sim_req,
  input  logic [SRAM_AW-1:0]  sim_addr,
  output logic                sim_gnt,
  output logic                sim_rvalid,
  output logic [SRAM_DW-1:0]  sim_rdata,
  // external SRAM
  output logic                sram_en,
  output logic                sram_we,
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [SRAM_DW-1:0]  sram_wdata,
  input  logic [SRAM_DW-1:0]  sram_rdata
);

  typedef struct packed {
    logic valid;
    logic host;
  } tag_t;

  tag_t tags [RD_LATENCY];
  logic host_busy;   // a host read is in flight
  logic hst_gnt;

  assign hst_gnt = hst_req && !host_busy;
  assign sim_gnt = sim_req && !hst_gnt;

  always_comb begin
    sram_en    = hst_gnt || sim_gnt;
    sram_we    = hst_gnt && hst_we;
    sram_addr  = hst_gnt ? hst_addr : sim_addr;
    sram_wdata = hst_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < RD_LATENCY; k++) tags[k] <= '0;
      host_busy <= 1'b0;
    end else begin
      tags[0].valid <= (hst_gnt && !hst_we) || sim_gnt;
      tags[0].host  <= hst_gnt;
      for (int k = 1; k < RD_LATENCY; k++) tags[k] <= tags[k-1];
      if (hst_gnt && !hst_we) host_busy <= 1'b1;
      else if (hst_done) host_busy <= 1'b0;
    end
  end

  tag_t last;
  assign last = tags[RD_LATENCY-1];

  always_comb begin
    hst_done   = (hst_gnt && hst_we) || (last.valid && last.host);
    hst_rdata  = sram_rdata;
    sim_rvalid = last.valid && !last.host;
    sim_rdata  = sram_rdata;
  end

endmodule
