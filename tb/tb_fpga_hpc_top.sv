// End-to-end testbench of fpga_hpc_top at its default sizes.
//
// Four DDR bank models are attached as in the main mapping: the vector
// addition uses bank 0 for in1 and out and bank 1 for in2; the stencil
// reads its image from a bank 0 and writes to a bank 1 (separate model
// instances, since the two kernels are independent designs). Coefficients
// are loaded through the PLRAM host port. Both kernels run at the same time.
//
// Work done: a 4096-item float vector addition whose buffers start off a
// 4 KiB boundary, then two stencil images (32 x 32, where the line FIFOs
// forward items written in the same clock, and 50 x 50 with random
// coefficients) while a second vector addition runs. Every result item is
// compared with a reference computed here. The testbench also counts how
// often each mechanism of the design was exercised and fails if one never
// happened: bank-0 read/write sharing, bursts cut at a 4 KiB boundary, the
// outstanding-burst limit, stream back-pressure, coefficient loading,
// border pass-through and inner stencil points, line-FIFO forwarding, and
// zero padding beats after the image.
module tb_fpga_hpc_top;
  import hpc_pkg::*;

  localparam int P = LANES;
  localparam int DEPTH = 4096;
  localparam int LAT = 24;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic vadd_start, vadd_busy, vadd_done;
  addr_t vadd_in1_addr, vadd_in2_addr, vadd_out_addr;
  logic [31:0] vadd_size;
  logic vadd_in1_arvalid, vadd_in1_arready, vadd_in1_rvalid, vadd_in1_rready, vadd_in1_rlast;
  addr_t vadd_in1_araddr; logic [7:0] vadd_in1_arlen; logic [BEAT_W-1:0] vadd_in1_rdata;
  logic vadd_in2_arvalid, vadd_in2_arready, vadd_in2_rvalid, vadd_in2_rready, vadd_in2_rlast;
  addr_t vadd_in2_araddr; logic [7:0] vadd_in2_arlen; logic [BEAT_W-1:0] vadd_in2_rdata;
  logic vadd_out_awvalid, vadd_out_awready, vadd_out_wvalid, vadd_out_wready, vadd_out_wlast;
  logic vadd_out_bvalid, vadd_out_bready;
  addr_t vadd_out_awaddr; logic [7:0] vadd_out_awlen; logic [BEAT_W-1:0] vadd_out_wdata;

  logic st_start, st_busy, st_done;
  addr_t st_in_addr, st_out_addr, st_coef_addr;
  logic [15:0] st_width;
  logic plram_we; logic [14:0] plram_addr; word_t plram_wdata;
  logic st_in_arvalid, st_in_arready, st_in_rvalid, st_in_rready, st_in_rlast;
  addr_t st_in_araddr; logic [7:0] st_in_arlen; logic [BEAT_W-1:0] st_in_rdata;
  logic st_out_awvalid, st_out_awready, st_out_wvalid, st_out_wready, st_out_wlast;
  logic st_out_bvalid, st_out_bready;
  addr_t st_out_awaddr; logic [7:0] st_out_awlen; logic [BEAT_W-1:0] st_out_wdata;

  fpga_hpc_top dut (.*);

  // unused channels of the bank models
  logic n1_awready, n1_wready, n1_bvalid;
  logic n2_awready, n2_wready, n2_bvalid;
  logic n3_arready, n3_rvalid, n3_rlast; logic [BEAT_W-1:0] n3_rdata;

  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT), .STALL_PCT(5)) u_vddr0 (
    .clk, .rst,
    .arvalid(vadd_in1_arvalid), .arready(vadd_in1_arready), .araddr(vadd_in1_araddr), .arlen(vadd_in1_arlen),
    .rvalid(vadd_in1_rvalid), .rready(vadd_in1_rready), .rdata(vadd_in1_rdata), .rlast(vadd_in1_rlast),
    .awvalid(vadd_out_awvalid), .awready(vadd_out_awready), .awaddr(vadd_out_awaddr), .awlen(vadd_out_awlen),
    .wvalid(vadd_out_wvalid), .wready(vadd_out_wready), .wdata(vadd_out_wdata), .wlast(vadd_out_wlast),
    .bvalid(vadd_out_bvalid), .bready(vadd_out_bready));
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT), .STALL_PCT(5)) u_vddr1 (
    .clk, .rst,
    .arvalid(vadd_in2_arvalid), .arready(vadd_in2_arready), .araddr(vadd_in2_araddr), .arlen(vadd_in2_arlen),
    .rvalid(vadd_in2_rvalid), .rready(vadd_in2_rready), .rdata(vadd_in2_rdata), .rlast(vadd_in2_rlast),
    .awvalid(1'b0), .awready(n1_awready), .awaddr(64'd0), .awlen(8'd0),
    .wvalid(1'b0), .wready(n1_wready), .wdata('0), .wlast(1'b0), .bvalid(n1_bvalid), .bready(1'b1));
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT), .STALL_PCT(5)) u_sddr0 (
    .clk, .rst,
    .arvalid(st_in_arvalid), .arready(st_in_arready), .araddr(st_in_araddr), .arlen(st_in_arlen),
    .rvalid(st_in_rvalid), .rready(st_in_rready), .rdata(st_in_rdata), .rlast(st_in_rlast),
    .awvalid(1'b0), .awready(n2_awready), .awaddr(64'd0), .awlen(8'd0),
    .wvalid(1'b0), .wready(n2_wready), .wdata('0), .wlast(1'b0), .bvalid(n2_bvalid), .bready(1'b1));
  ddr_model #(.DATA_W(BEAT_W), .DEPTH(DEPTH), .LATENCY(LAT), .STALL_PCT(40)) u_sddr1 (
    .clk, .rst,
    .arvalid(1'b0), .arready(n3_arready), .araddr(64'd0), .arlen(8'd0),
    .rvalid(n3_rvalid), .rready(1'b1), .rdata(n3_rdata), .rlast(n3_rlast),
    .awvalid(st_out_awvalid), .awready(st_out_awready), .awaddr(st_out_awaddr), .awlen(st_out_awlen),
    .wvalid(st_out_wvalid), .wready(st_out_wready), .wdata(st_out_wdata), .wlast(st_out_wlast),
    .bvalid(st_out_bvalid), .bready(st_out_bready));

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_bank_share = 0, n_burst_4k = 0, n_out_limit = 0, n_backpressure = 0;
  int n_coef_beats = 0, n_border = 0, n_inner = 0, n_forward = 0, n_padding = 0;
  always @(posedge clk) if (!rst) begin
    // one port of bank 0 has both in1 reads and out writes waiting
    if (u_vddr0.rq.size() != 0 && u_vddr0.wq.size() != 0) n_bank_share++;
    if (vadd_in1_arvalid && vadd_in1_arready && vadd_in1_arlen != 8'(BURST_LEN - 1)
        && ((vadd_in1_araddr + 64'(vadd_in1_arlen + 1) * 64) % 4096 == 0)) n_burst_4k++;
    if (dut.u_vadd.u_rd1.busy && dut.u_vadd.u_rd1.ar_left != 0 && !vadd_in1_arvalid) n_out_limit++;
    if (dut.u_stencil.co_valid && !dut.u_stencil.co_ready) n_backpressure++;
    if (dut.u_stencil.c_valid) n_coef_beats++;
    if (dut.u_stencil.u_core.adv) begin
      if (!dut.u_stencil.from_mem) n_padding++;
      if (dut.u_stencil.u_core.fill < 18'(P)) n_forward++;
    end
  end

  // per lane: centres inside the image, split into border and inner points
  for (genvar i = 0; i < P; i++) begin : g_lane_count
    always @(posedge clk) if (!rst && dut.u_stencil.u_core.adv) begin
      if (dut.u_stencil.u_core.g_pe[i].yi >= 0 && dut.u_stencil.u_core.g_pe[i].yi < 18'(st_width)) begin
        if (dut.u_stencil.u_core.g_pe[i].border) n_border++;
        else n_inner++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] i2f(input int n);
    logic [31:0] m;
    int e;
    if (n == 0) return 32'd0;
    m = (n < 0) ? 32'(-n) : 32'(n);
    e = 0;
    for (int i = 0; i < 32; i++) if (m[i]) e = i;
    return {(n < 0), 8'(127 + e), 23'((m << (23 - e)) & 32'h007F_FFFF)};
  endfunction

  // ---------------- vector addition ----------------
  task automatic vadd_run(input int in1_w, input int in2_w, input int out_w, input int n_items);
    int nb, cyc;
    logic [BEAT_W-1:0] expect_mem [];
    nb = n_items / P;
    expect_mem = new[nb];
    for (int k = 0; k < nb; k++)
      for (int l = 0; l < P; l++) begin
        int x, z;
        x = $urandom_range(0, 4194303) - 2097152;
        z = $urandom_range(0, 4194303) - 2097152;
        u_vddr0.mem[in1_w + k][l*32 +: 32] = i2f(x);
        u_vddr1.mem[in2_w + k][l*32 +: 32] = i2f(z);
        expect_mem[k][l*32 +: 32] = i2f(x + z);
      end
    @(negedge clk);
    vadd_in1_addr = addr_t'(in1_w) * 64;
    vadd_in2_addr = addr_t'(in2_w) * 64;
    vadd_out_addr = addr_t'(out_w) * 64;
    vadd_size = n_items;
    vadd_start = 1;
    @(negedge clk);
    vadd_start = 0;
    cyc = 1;
    while (!vadd_done && cyc < 200000) begin
      @(posedge clk);
      cyc++;
    end
    @(negedge clk);
    for (int k = 0; k < nb; k++) begin
      checks++;
      if (u_vddr0.mem[out_w + k] !== expect_mem[k]) begin
        failures++;
        if (failures < 10) $display("FAIL vadd beat %0d", k);
      end
    end
    $display("vadd: %0d items in %0d clocks", n_items, cyc);
  endtask

  // ---------------- stencil ----------------
  task automatic st_run(input int w, input bit pattern);
    word_t img [];
    word_t ref_out [];
    word_t c [STENCIL_SIZE];
    int n, skew, cyc;
    n = w * w;
    img = new[n];
    ref_out = new[n];
    for (int i = 0; i < n; i++) img[i] = pattern ? word_t'((i / w) * 10 + i % w) : $urandom;
    for (int i = 0; i < STENCIL_SIZE; i++) c[i] = pattern ? 1 : $urandom;
    for (int y = 0; y < w; y++)
      for (int x = 0; x < w; x++) begin
        int k;
        k = y * w + x;
        if (y == 0 || y == w - 1 || x == 0 || x == w - 1) ref_out[k] = img[k];
        else ref_out[k] = c[0] * img[k - w] + c[1] * img[k - 1] + c[2] * img[k]
                          + c[3] * img[k + 1] + c[4] * img[k + w];
      end
    for (int i = 0; i < n; i++) u_sddr0.mem[i / P][(i % P) * 32 +: 32] = img[i];
    for (int i = 0; i < STENCIL_SIZE; i++) begin
      @(negedge clk);
      plram_we = 1;
      plram_addr = 15'(16 + i);
      plram_wdata = c[i];
    end
    @(negedge clk);
    plram_we = 0;
    st_in_addr = 0;
    st_out_addr = 0;
    st_coef_addr = 16 * 4;
    st_width = 16'(w);
    st_start = 1;
    @(negedge clk);
    st_start = 0;
    cyc = 1;
    while (!st_done && cyc < 200000) begin
      @(posedge clk);
      cyc++;
    end
    @(negedge clk);
    skew = w + P + 1;
    for (int k = 0; k < n; k++) begin
      int q;
      q = k + skew;
      checks++;
      if (u_sddr1.mem[q / P][(q % P) * 32 +: 32] !== ref_out[k]) begin
        failures++;
        if (failures < 10) $display("FAIL stencil width %0d point (%0d,%0d)", w, k % w, k / w);
      end
    end
    $display("stencil: %0d x %0d in %0d clocks", w, w, cyc);
  endtask

  initial begin
    vadd_start = 0; vadd_size = 0; vadd_in1_addr = 0; vadd_in2_addr = 0; vadd_out_addr = 0;
    st_start = 0; st_width = 0; st_in_addr = 0; st_out_addr = 0; st_coef_addr = 0;
    plram_we = 0; plram_addr = 0; plram_wdata = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    // 4096 items = 256 beats; in1 starts 5 beats before a 4 KiB boundary
    vadd_run(59, 3, 2048, 4096);
    fork
      begin
        st_run(32, 1);
        st_run(50, 0);
      end
      vadd_run(1000, 1000, 3000, 1024);
    join
    // each mechanism must have happened
    begin
      string names [9];
      int counts [9];
      names = '{"bank-0 sharing", "4 KiB burst cut", "outstanding limit", "stream back-pressure",
                "coefficient load", "border pass-through", "inner points", "FIFO forwarding",
                "zero padding"};
      counts = '{n_bank_share, n_burst_4k, n_out_limit, n_backpressure, n_coef_beats,
                 n_border, n_inner, n_forward, n_padding};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %-22s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
      checks++;
      if (n_coef_beats != 2 * STENCIL_SIZE || n_border != 4 * 31 + 4 * 49 || n_inner != 30 * 30 + 48 * 48) begin
        failures++;
        $display("FAIL counts: %0d coefficient beats, %0d border, %0d inner", n_coef_beats, n_border, n_inner);
      end
    end
    // AXI protocol violations seen by the memory models count as failures
    checks++;
    failures += int'(u_vddr0.protocol_errors + u_vddr1.protocol_errors + u_sddr0.protocol_errors + u_sddr1.protocol_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
