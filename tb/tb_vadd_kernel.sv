// Self-checking testbench for vadd_kernel in its two-bank mapping.
//
// Bank 0 holds in1 and out, bank 1 holds in2, as in the two-bank
// configuration of the design. The vectors hold floats that are whole
// numbers below 2^21 in magnitude, so the expected sums are exact and are
// computed by the testbench as integers. Runs vectors of 16, 48 and 1024
// items and checks every output item, that nothing outside out is written,
// and the done pulse. Rate check: bank 0 serves one in1 read beat and one
// out write beat per item beat, so a long run may take at most about two
// clocks per beat plus the memory latency.
module tb_vadd_kernel;
  import hpc_pkg::*;

  localparam int DEPTH = 4096;
  localparam int LAT   = 20;

  logic clk = 0, rst = 1;
  logic start, busy, done;
  addr_t in1_addr, in2_addr, out_addr;
  logic [31:0] size;
  logic in1_arvalid, in1_arready, in1_rvalid, in1_rready, in1_rlast;
  addr_t in1_araddr; logic [7:0] in1_arlen; logic [BEAT_W-1:0] in1_rdata;
  logic in2_arvalid, in2_arready, in2_rvalid, in2_rready, in2_rlast;
  addr_t in2_araddr; logic [7:0] in2_arlen; logic [BEAT_W-1:0] in2_rdata;
  logic out_awvalid, out_awready, out_wvalid, out_wready, out_wlast, out_bvalid, out_bready;
  addr_t out_awaddr; logic [7:0] out_awlen; logic [BEAT_W-1:0] out_wdata;
  int checks = 0, failures = 0;

  vadd_kernel dut (.*);

  // bank 0: in1 reads and out writes share one port
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT)) u_ddr0 (
    .clk, .rst,
    .arvalid(in1_arvalid), .arready(in1_arready), .araddr(in1_araddr), .arlen(in1_arlen),
    .rvalid(in1_rvalid), .rready(in1_rready), .rdata(in1_rdata), .rlast(in1_rlast),
    .awvalid(out_awvalid), .awready(out_awready), .awaddr(out_awaddr), .awlen(out_awlen),
    .wvalid(out_wvalid), .wready(out_wready), .wdata(out_wdata), .wlast(out_wlast),
    .bvalid(out_bvalid), .bready(out_bready));

  // bank 1: in2 reads only
  logic nc_awready, nc_wready, nc_bvalid;
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT)) u_ddr1 (
    .clk, .rst,
    .arvalid(in2_arvalid), .arready(in2_arready), .araddr(in2_araddr), .arlen(in2_arlen),
    .rvalid(in2_rvalid), .rready(in2_rready), .rdata(in2_rdata), .rlast(in2_rlast),
    .awvalid(1'b0), .awready(nc_awready), .awaddr(64'd0), .awlen(8'd0),
    .wvalid(1'b0), .wready(nc_wready), .wdata('0), .wlast(1'b0),
    .bvalid(nc_bvalid), .bready(1'b1));

  always #5 clk = ~clk;

  function automatic logic [31:0] i2f(input int n);
    logic [31:0] m;
    int e;
    if (n == 0) return 32'd0;
    m = (n < 0) ? 32'(-n) : 32'(n);
    e = 0;
    for (int i = 0; i < 32; i++) if (m[i]) e = i;
    return {(n < 0), 8'(127 + e), 23'((m << (23 - e)) & 32'h007F_FFFF)};
  endfunction

  task automatic run(input int in1_w, input int in2_w, input int out_w, input int n_items, output int cycles);
    int nb;
    logic [BEAT_W-1:0] expect_mem [];
    nb = n_items / LANES;
    expect_mem = new[nb];
    for (int k = 0; k < nb; k++)
      for (int l = 0; l < LANES; l++) begin
        int x, z;
        x = $urandom_range(0, 2097151) - 1048576;
        z = $urandom_range(0, 2097151) - 1048576;
        u_ddr0.mem[in1_w + k][l*32 +: 32] = i2f(x);
        u_ddr1.mem[in2_w + k][l*32 +: 32] = i2f(z);
        expect_mem[k][l*32 +: 32] = i2f(x + z);
      end
    u_ddr0.mem[out_w + nb] = '1;
    @(negedge clk);
    in1_addr = addr_t'(in1_w) * 64;
    in2_addr = addr_t'(in2_w) * 64;
    out_addr = addr_t'(out_w) * 64;
    size = n_items;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 100000) begin
      @(posedge clk);
      cycles++;
    end
    @(negedge clk);
    for (int k = 0; k < nb; k++) begin
      checks++;
      if (u_ddr0.mem[out_w + k] !== expect_mem[k]) begin
        failures++;
        if (failures < 10) $display("FAIL out beat %0d of %0d", k, nb);
      end
    end
    checks++;
    if (u_ddr0.mem[out_w + nb] !== '1 || busy) begin
      failures++;
      $display("FAIL write past the end of out, or still busy");
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; size = 0; in1_addr = 0; in2_addr = 0; out_addr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 0, 2048, 16, cyc);
    run(10, 20, 2100, 48, cyc);
    run(64, 128, 2200, 1024 * 16, cyc);
    $display("vadd: %0d beats in %0d cycles", 1024, cyc);
    checks++;
    if (cyc > 2 * 1024 + 2 * LAT + 64) begin
      failures++;
      $display("FAIL rate: %0d cycles for 1024 beats", cyc);
    end
    // AXI protocol violations seen by the memory models count as failures
    checks++;
    failures += int'(u_ddr0.protocol_errors + u_ddr1.protocol_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
