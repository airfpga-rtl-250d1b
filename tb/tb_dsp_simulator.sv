// tb_dsp_simulator: self-checking test of the SRAM playback unit.
//
// A testbench SRAM responder grants reads on random cycles and returns,
// a fixed LAT cycles later, a word that encodes the address it was read
// from. The output stream, with random ready, must be the addresses
// lo, lo+1, ..., hi, lo, ... in order with none lost or repeated, and
// each new enable must restart at lo. With every read granted and ready
// held high the unit must deliver one sample per cycle.
module tb_dsp_simulator;
  import airfpga_pkg::*;

  localparam int unsigned LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sim_ctrl_t sim;
  logic rd_req, rd_gnt, rd_valid, out_valid, out_ready;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;
  iq_t out_data;

  dsp_simulator #(.SKID_DEPTH(8)) dut (.*);

  function automatic logic [31:0] enc(input logic [SRAM_AW-1:0] a);
    return {13'h1A5, a} ^ 32'h5A5A_0000;
  endfunction

  // SRAM responder
  int gnt_pct = 50;
  logic [LAT-1:0] vpipe;
  logic [SRAM_DW-1:0] dpipe [LAT];
  always @(negedge clk) rd_gnt = rd_req && ($urandom_range(99) < gnt_pct);
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      for (int k = 0; k < LAT; k++) dpipe[k] <= '0;
    end else begin
      vpipe <= {vpipe[LAT-2:0], rd_gnt};
      dpipe[0] <= enc(rd_addr);
      for (int k = 1; k < LAT; k++) dpipe[k] <= dpipe[k-1];
    end
  end
  assign rd_valid = vpipe[LAT-1];
  assign rd_data  = dpipe[LAT-1];

  int checks = 0, failures = 0, received = 0, wraps = 0, restarts = 0;
  logic [SRAM_AW-1:0] exp_addr;
  bit expect_restart;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ready_pct = 70;
  always @(negedge clk) out_ready = ($urandom_range(99) < ready_pct);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (expect_restart) begin
      exp_addr = sim.addr_lo;
      expect_restart = 0;
      restarts++;
    end
    check(out_data == enc(exp_addr), $sformatf("sample %0d got %h exp %h", received, out_data, enc(exp_addr)));
    received++;
    if (exp_addr == sim.addr_hi) begin
      exp_addr = sim.addr_lo;
      wraps++;
    end else exp_addr++;
  end

  task automatic run(input int lo, input int hi, input int samples);
    int target;
    @(negedge clk);
    sim.addr_lo = SRAM_AW'(lo);
    sim.addr_hi = SRAM_AW'(hi);
    sim.enable  = 1;
    expect_restart = 1;
    target = received + samples;
    wait (received >= target);
    @(negedge clk) sim.enable = 0;
    // drain what is still in flight or buffered
    repeat (40) @(posedge clk);
    check(!out_valid, "data left after disable");
  endtask

  initial begin
    int r0, c0;
    sim = '0;
    expect_restart = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(100, 109, 57);
    run(7, 7, 5);
    gnt_pct = 100; ready_pct = 30;
    run(20000, 20050, 200);
    // throughput: every read granted, ready high
    gnt_pct = 100; ready_pct = 100;
    @(negedge clk);
    sim.addr_lo = 19'd5; sim.addr_hi = 19'd900; sim.enable = 1;
    expect_restart = 1;
    repeat (20) @(posedge clk);
    r0 = received;
    repeat (100) @(posedge clk);
    check(received - r0 == 100, $sformatf("%0d samples in 100 cycles", received - r0));
    @(negedge clk) sim.enable = 0;
    repeat (20) @(posedge clk);
    check(wraps >= 10, $sformatf("only %0d wraps", wraps));
    check(restarts == 4, $sformatf("%0d restarts", restarts));
    $display("received=%0d wraps=%0d restarts=%0d", received, wraps, restarts);
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
