// Self-checking testbench for axi_write_master.
//
// A DDR bank model with random idle cycles accepts the writes, and a stream
// source offers random data with random gaps. Transfers of 1 beat, a few
// beats, a length that is not a multiple of the burst length, and a long one
// that starts just below a 4 KiB boundary are written; afterwards every
// written word is compared with what was sent and the words around each
// region are checked to be untouched. Also checks the done pulse, that no
// more than MAX_OUTSTANDING bursts await a response, and the rate of a
// stall-free transfer (about one beat per clock).
module tb_axi_write_master;
  import hpc_pkg::*;

  localparam int DEPTH = 1024;

  logic clk = 0, rst = 1;
  logic start, busy, done;
  addr_t base_addr;
  logic [31:0] n_beats;
  logic s_valid, s_ready;
  logic [BEAT_W-1:0] s_data;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  addr_t awaddr;
  logic [7:0] awlen;
  logic [BEAT_W-1:0] wdata;
  int checks = 0, failures = 0;
  int gap_pct = 30;

  axi_write_master dut (.*);

  logic arvalid = 0, rready = 1, arready, rvalid, rlast;
  logic [63:0] araddr = 0;
  logic [7:0] arlen = 0;
  logic [BEAT_W-1:0] rdata;
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(5), .STALL_PCT(10)) u_ddr (.*);

  always #5 clk = ~clk;

  logic [BEAT_W-1:0] src [$];
  int sent;
  bit taken = 1;
  // a beat offered stays offered until the clock edge that takes it
  always @(negedge clk) begin
    if (!s_valid || taken) begin
      s_valid <= (sent < src.size()) && ($urandom_range(0, 99) >= gap_pct);
    end
  end
  assign s_data = src[sent];
  always @(posedge clk) begin
    taken <= s_valid && s_ready;
    if (s_valid && s_ready) sent <= sent + 1;
  end

  int max_out = 0, cur_out = 0;
  always @(posedge clk) begin
    if (awvalid && awready) cur_out = cur_out + 1;
    if (bvalid && bready) cur_out = cur_out - 1;
    if (cur_out > max_out) max_out = cur_out;
  end

  task automatic run(input int unsigned word, input int unsigned n, output int cycles);
    logic [BEAT_W-1:0] guard_lo, guard_hi;
    guard_lo = {16{32'hDEAD_BEEF}};
    guard_hi  = {16{32'hFEED_F00D}};
    if (word > 0) u_ddr.mem[word - 1] = guard_lo;
    u_ddr.mem[(word + n) % DEPTH] = guard_hi;
    src.delete();
    for (int i = 0; i < n; i++) begin
      logic [BEAT_W-1:0] v;
      for (int l = 0; l < LANES; l++) v[l*32 +: 32] = $urandom;
      src.push_back(v);
    end
    @(negedge clk);
    sent = 0;
    base_addr = addr_t'(word) * (BEAT_W / 8);
    n_beats = n;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done && cycles < 100000) begin
      @(posedge clk);
      cycles++;
    end
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (u_ddr.mem[(word + i) % DEPTH] !== src[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d of %0d", i, n);
      end
    end
    checks++;
    if ((word > 0 && u_ddr.mem[word - 1] !== guard_lo) || u_ddr.mem[(word + n) % DEPTH] !== guard_hi || busy) begin
      failures++;
      $display("FAIL transfer of %0d beats wrote outside its region or did not finish", n);
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
    s_valid = 0; sent = 0;
    start = 0; base_addr = 0; n_beats = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(1, 1, cyc);
    run(10, 5, cyc);
    run(100, 37, cyc);
    run(64 - 3, 300, cyc);
    checks++;
    if (max_out > MAX_OUTSTANDING || max_out < 2) begin
      failures++;
      $display("FAIL bursts awaiting response peaked at %0d", max_out);
    end
    gap_pct = 0;
    run(400, 512, cyc);
    checks++;
    if (cyc > 512 + 512 / 10 * 2 + 40) begin
      failures++;
      $display("FAIL 512 beats took %0d cycles", cyc);
    end
    // AXI protocol violations seen by the memory models count as failures
    checks++;
    failures += int'(u_ddr.protocol_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
