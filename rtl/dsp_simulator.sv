// dsp_simulator: plays recorded IQ samples from SRAM into the packet
// generator as if they were the output of on-board DSP.
//
// While sim.enable is set it reads SRAM words in address order from
// sim.addr_lo up to and including sim.addr_hi, then starts again at
// sim.addr_lo, so a recording is replayed in a loop. While enable is clear,
// and in the first cycle after it is set, the read address is loaded from
// sim.addr_lo, so each enable starts at the beginning of the recording;
// reads begin in the second enabled cycle. Reads that are already in
// flight when enable drops are still delivered. An end address below the
// start address plays only the start word.
//
// SRAM side: rd_req/rd_addr ask for a read, rd_gnt accepts it in the same
// cycle, and the data returns later as rd_valid/rd_data (any latency). A
// credit count (reads in flight plus words buffered) keeps the reads within
// the room of a SKID_DEPTH-word buffer, so no returned word is ever lost.
// Output side: a valid/ready stream of 32-bit IQ samples; with out_ready
// held high and no competing SRAM traffic it delivers one sample per cycle.
//
// That the simulator reads the start-to-end window when enabled follows the
// AirFPGA design; the looping, the restart on enable and the buffer are
// this implementation's choices.
module dsp_simulator
  import airfpga_pkg::*;
#(
  parameter int unsigned SKID_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sim_ctrl_t           sim,
  // SRAM read port
  output logic                rd_req,
  output logic [SRAM_AW-1:0]  rd_addr,
  input  logic                rd_gnt,
  input  logic                rd_valid,
  input  logic [SRAM_DW-1:0]  rd_data,
  // sample stream to the packet generator
  output logic                out_valid,
  output iq_t                 out_data,
  input  logic                out_ready
);
  localparam int unsigned CW = $clog2(SKID_DEPTH+1);

  logic [CW-1:0] inflight, buffered;
  logic          empty, full;
  logic [SAMPLE_W-1:0] fifo_q;

  sync_fifo #(.WIDTH(SAMPLE_W), .DEPTH(SKID_DEPTH)) u_skid (
    .clk, .rst_n,
    .wr_en  (rd_valid),
    .wr_data(rd_data),
    .full   (full),
    .rd_en  (out_valid && out_ready),
    .rd_data(fifo_q),
    .empty  (empty),
    .count  (buffered)
  );

  assign out_valid = !empty;
  assign out_data  = iq_t'(fifo_q);

  logic [CW:0] credits_used;
  assign credits_used = {1'b0, inflight} + {1'b0, buffered};
  // running: enable was already set in the previous cycle, so rd_addr
  // holds the start address that was current when enable rose
  logic running;
  assign rd_req = sim.enable && running && (credits_used < (CW+1)'(SKID_DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
      rd_addr  <= '0;
      running  <= 1'b0;
    end else begin
      inflight <= inflight + CW'(rd_gnt) - CW'(rd_valid);
      running  <= sim.enable;
      if (!sim.enable || !running)
        rd_addr <= sim.addr_lo;
      else if (rd_gnt)
        rd_addr <= (rd_addr >= sim.addr_hi) ? sim.addr_lo : rd_addr + 1'b1;
    end
  end

  a_gnt_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) rd_gnt |-> rd_req);
  a_no_lost_data:    assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> !full);

endmodule
