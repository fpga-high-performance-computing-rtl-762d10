// Self-checking testbench for axi_read_master.
//
// A DDR bank model with random idle cycles answers the reads. Several
// transfers are run: lengths of 1 beat, a few beats, a non-multiple of the
// burst length, and a long one starting just below a 4 KiB boundary, with a
// stream consumer that is randomly not ready. Every streamed beat is compared
// with the memory contents, the beat count and the done pulse are checked,
// and the number of bursts in flight must reach the outstanding limit but
// never exceed it. A final transfer with no stalls checks the rate: after the
// memory latency, one beat per clock.
module tb_axi_read_master;
  import hpc_pkg::*;

  localparam int DEPTH = 1024;
  localparam int LAT   = 20;

  logic clk = 0, rst = 1;
  logic start, busy, done;
  addr_t base_addr;
  logic [31:0] n_beats;
  logic arvalid, arready, rvalid, rready, rlast;
  addr_t araddr;
  logic [7:0] arlen;
  logic [BEAT_W-1:0] rdata, m_data;
  logic m_valid, m_ready;
  int checks = 0, failures = 0;
  int stall_pct = 30;

  axi_read_master dut (.*);

  logic awvalid = 0, wvalid = 0, wlast = 0, bready = 1, awready, wready, bvalid;
  logic [63:0] awaddr = 0;
  logic [7:0] awlen = 0;
  logic [BEAT_W-1:0] wdata = '0;
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT), .STALL_PCT(10)) u_ddr (.*);

  always #5 clk = ~clk;


  always @(negedge clk) m_ready <= ($urandom_range(0, 99) >= stall_pct);

  task automatic run(input int unsigned word, input int unsigned n, output int cycles);
    int got;
    int t0;
    got = 0;
    @(negedge clk);
    base_addr = addr_t'(word) * (BEAT_W / 8);
    n_beats = n;
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (1) begin
      @(posedge clk);
      t0++;
      if (m_valid && m_ready) begin
        checks++;
        if (m_data !== u_ddr.mem[(word + got) % DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL beat %0d of %0d", got, n);
        end
        got++;
      end
      if (done) break;
      if (t0 > 100000) break;
    end
    cycles = t0;
    checks++;
    if (got != n || busy) begin
      failures++;
      $display("FAIL transfer of %0d beats delivered %0d", n, got);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < DEPTH; i++)
      for (int l = 0; l < LANES; l++) u_ddr.mem[i][l*32 +: 32] = $urandom;
    start = 0; base_addr = 0; n_beats = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 1, cyc);
    run(3, 5, cyc);
    run(100, 37, cyc);
    run(64 - 3, 300, cyc);       // starts 3 beats below a 4 KiB boundary
    run(7, 0, cyc);              // empty transfer still completes
    // rate: no consumer stalls, memory stalls only as the model makes them
    stall_pct = 0;
    run(0, 512, cyc);
    checks++;
    if (cyc > 512 + LAT + 40 + 512 / 10 * 2) begin
      failures++;
      $display("FAIL 512 beats took %0d cycles", cyc);
    end
    checks++;
    if (u_ddr.max_read_outstanding != MAX_OUTSTANDING) begin
      failures++;
      $display("FAIL bursts in flight peaked at %0d, limit %0d", u_ddr.max_read_outstanding, MAX_OUTSTANDING);
    end
    // AXI protocol violations seen by the memory models count as failures
    checks++;
    failures += int'(u_ddr.protocol_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
