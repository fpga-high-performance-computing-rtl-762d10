// PLRAM: on-chip RAM next to the kernel, holding the stencil coefficients.
//
// The stencil kernel reads its five coefficients from this memory rather
// than from DDR, so that the coefficient port does not need a third,
// distant memory bank. The document gives its role and its maximum size
// (128 KB); its access logic here is this design's own: a host write port
// (one 32-bit word per clock) and an AXI4-subset read slave of WORD_W bits
// that serves one burst at a time, one beat per clock.
//
// Interface: host_we writes host_wdata to word host_addr. Read bursts are
// accepted on AR when no burst is in progress and no beat is waiting; beats appear on R starting
// the clock after the address is accepted, rlast marks the last one. Word
// addresses are byte addresses divided by 4, modulo DEPTH.
// The upper address bits and the two byte-offset bits are ignored on purpose.
module plram
  import hpc_pkg::*;
#(
  parameter int unsigned DEPTH = 32768     // 128 KB of 32-bit words
) (
  input  logic        clk,
  input  logic        rst,
  // host write port
  input  logic        host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  word_t       host_wdata,
  // AXI read slave
  input  logic        arvalid,
  output logic        arready,
  input  addr_t       araddr,
  input  logic [7:0]  arlen,
  output logic        rvalid,
  input  logic        rready,
  output word_t       rdata,
  output logic        rlast
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic          active;
  logic [AW-1:0] addr;
  logic [7:0]    left;            // beats after the current one
  logic          advance;

  assign arready = !active && !rvalid;
  assign advance = !rvalid || rready;

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      rvalid <= 1'b0;
      rlast  <= 1'b0;
      addr   <= '0;
      left   <= '0;
    end else begin
      if (arvalid && arready) begin
        active <= 1'b1;
        addr   <= araddr[AW+1:2];
        left   <= arlen;
      end else if (active && advance) begin
        rdata  <= mem[addr];
        rvalid <= 1'b1;
        rlast  <= (left == 0);
        addr   <= addr + 1'b1;
        left   <= left - 1'b1;
        if (left == 0) active <= 1'b0;
      end else if (rvalid && rready) begin
        rvalid <= 1'b0;
        rlast  <= 1'b0;
      end
    end
  end

  a_r_stable: assert property (@(posedge clk) disable iff (rst)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rlast));

endmodule
