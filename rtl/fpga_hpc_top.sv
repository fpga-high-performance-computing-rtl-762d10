// Accelerator top: the vector-addition kernel and the 5-point stencil
// kernel side by side, with the on-chip coefficient memory (PLRAM).
//
// Both kernels are streaming designs that move sixteen 32-bit items per
// clock through 512-bit memory ports; they are independent and each has its
// own control and its own memory ports, brought out here to be connected to
// the card's DDR banks. The intended mapping, as in the design's main
// configuration:
//   vector addition  in1 -> DDR bank 0, in2 -> DDR bank 1, out -> DDR bank 0
//   stencil          in  -> DDR bank 0, out -> DDR bank 1,
//                    coefficients -> PLRAM (inside this top)
// The DDR banks, their controllers and the host link (PCIe, DMA) belong to
// the card's platform and are not part of this RTL; a host loads the
// coefficients through the PLRAM write port and starts a kernel with a
// one-clock start pulse plus its arguments.
module fpga_hpc_top
  import hpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,

  // ---- vector addition: control
  input  logic              vadd_start,
  input  addr_t             vadd_in1_addr,
  input  addr_t             vadd_in2_addr,
  input  addr_t             vadd_out_addr,
  input  logic [31:0]       vadd_size,
  output logic              vadd_busy,
  output logic              vadd_done,
  // in1 (bank 0) read port
  output logic              vadd_in1_arvalid,
  input  logic              vadd_in1_arready,
  output addr_t             vadd_in1_araddr,
  output logic [7:0]        vadd_in1_arlen,
  input  logic              vadd_in1_rvalid,
  output logic              vadd_in1_rready,
  input  logic [BEAT_W-1:0] vadd_in1_rdata,
  input  logic              vadd_in1_rlast,
  // in2 (bank 1) read port
  output logic              vadd_in2_arvalid,
  input  logic              vadd_in2_arready,
  output addr_t             vadd_in2_araddr,
  output logic [7:0]        vadd_in2_arlen,
  input  logic              vadd_in2_rvalid,
  output logic              vadd_in2_rready,
  input  logic [BEAT_W-1:0] vadd_in2_rdata,
  input  logic              vadd_in2_rlast,
  // out (bank 0) write port
  output logic              vadd_out_awvalid,
  input  logic              vadd_out_awready,
  output addr_t             vadd_out_awaddr,
  output logic [7:0]        vadd_out_awlen,
  output logic              vadd_out_wvalid,
  input  logic              vadd_out_wready,
  output logic [BEAT_W-1:0] vadd_out_wdata,
  output logic              vadd_out_wlast,
  input  logic              vadd_out_bvalid,
  output logic              vadd_out_bready,

  // ---- stencil: control
  input  logic              st_start,
  input  addr_t             st_in_addr,
  input  addr_t             st_out_addr,
  input  addr_t             st_coef_addr,
  input  logic [15:0]       st_width,
  output logic              st_busy,
  output logic              st_done,
  // PLRAM host write port
  input  logic              plram_we,
  input  logic [14:0]       plram_addr,
  input  word_t             plram_wdata,
  // image (bank 0) read port
  output logic              st_in_arvalid,
  input  logic              st_in_arready,
  output addr_t             st_in_araddr,
  output logic [7:0]        st_in_arlen,
  input  logic              st_in_rvalid,
  output logic              st_in_rready,
  input  logic [BEAT_W-1:0] st_in_rdata,
  input  logic              st_in_rlast,
  // result (bank 1) write port
  output logic              st_out_awvalid,
  input  logic              st_out_awready,
  output addr_t             st_out_awaddr,
  output logic [7:0]        st_out_awlen,
  output logic              st_out_wvalid,
  input  logic              st_out_wready,
  output logic [BEAT_W-1:0] st_out_wdata,
  output logic              st_out_wlast,
  input  logic              st_out_bvalid,
  output logic              st_out_bready
);

  logic  c_arvalid, c_arready, c_rvalid, c_rready, c_rlast;
  addr_t c_araddr;
  logic [7:0] c_arlen;
  word_t c_rdata;

  vadd_kernel u_vadd (
    .clk, .rst,
    .start(vadd_start), .in1_addr(vadd_in1_addr), .in2_addr(vadd_in2_addr),
    .out_addr(vadd_out_addr), .size(vadd_size), .busy(vadd_busy), .done(vadd_done),
    .in1_arvalid(vadd_in1_arvalid), .in1_arready(vadd_in1_arready), .in1_araddr(vadd_in1_araddr),
    .in1_arlen(vadd_in1_arlen), .in1_rvalid(vadd_in1_rvalid), .in1_rready(vadd_in1_rready),
    .in1_rdata(vadd_in1_rdata), .in1_rlast(vadd_in1_rlast),
    .in2_arvalid(vadd_in2_arvalid), .in2_arready(vadd_in2_arready), .in2_araddr(vadd_in2_araddr),
    .in2_arlen(vadd_in2_arlen), .in2_rvalid(vadd_in2_rvalid), .in2_rready(vadd_in2_rready),
    .in2_rdata(vadd_in2_rdata), .in2_rlast(vadd_in2_rlast),
    .out_awvalid(vadd_out_awvalid), .out_awready(vadd_out_awready), .out_awaddr(vadd_out_awaddr),
    .out_awlen(vadd_out_awlen), .out_wvalid(vadd_out_wvalid), .out_wready(vadd_out_wready),
    .out_wdata(vadd_out_wdata), .out_wlast(vadd_out_wlast),
    .out_bvalid(vadd_out_bvalid), .out_bready(vadd_out_bready));

  stencil_kernel u_stencil (
    .clk, .rst,
    .start(st_start), .in_addr(st_in_addr), .out_addr(st_out_addr), .coef_addr(st_coef_addr),
    .width(st_width), .busy(st_busy), .done(st_done),
    .c_arvalid, .c_arready, .c_araddr, .c_arlen, .c_rvalid, .c_rready, .c_rdata, .c_rlast,
    .in_arvalid(st_in_arvalid), .in_arready(st_in_arready), .in_araddr(st_in_araddr),
    .in_arlen(st_in_arlen), .in_rvalid(st_in_rvalid), .in_rready(st_in_rready),
    .in_rdata(st_in_rdata), .in_rlast(st_in_rlast),
    .out_awvalid(st_out_awvalid), .out_awready(st_out_awready), .out_awaddr(st_out_awaddr),
    .out_awlen(st_out_awlen), .out_wvalid(st_out_wvalid), .out_wready(st_out_wready),
    .out_wdata(st_out_wdata), .out_wlast(st_out_wlast),
    .out_bvalid(st_out_bvalid), .out_bready(st_out_bready));

  plram #(.DEPTH(32768)) u_plram (
    .clk, .rst,
    .host_we(plram_we), .host_addr(plram_addr), .host_wdata(plram_wdata),
    .arvalid(c_arvalid), .arready(c_arready), .araddr(c_araddr), .arlen(c_arlen),
    .rvalid(c_rvalid), .rready(c_rready), .rdata(c_rdata), .rlast(c_rlast));

endmodule
