// Line FIFO of the sliding-window stencil (the Fifo class of the kernel).
//
// A circular buffer of DEPTH 32-bit items that, on every advancing clock,
// accepts P consecutive items at its write pointer and returns P consecutive
// items from its read pointer. To make P reads and P writes possible in one
// clock, the storage is split cyclically into P banks, as the document does
// with a cyclic array partition: item a lives in bank a mod P at row a / P,
// so any P consecutive items fall in P different banks. Each bank does one
// read and one write per clock; a rotation maps banks to lanes.
//
// The read pointer starts at 0 and the write pointer at `fill`, so the FIFO
// behaves as a delay line holding `fill` items: an item written at a given
// position comes out fill items later in the stream. The stencil core uses
// fill = width - P - 2, which makes each FIFO delay the window by exactly one
// image row. Items that are read in the same clock as they are written (when
// fill < P) are forwarded from the write data.
//
// Interface: init (one clock) resets both pointers; on each clock with adv
// high wdata is stored and both pointers move by P. rdata is combinational
// from the current read pointer and this clock's write data. The storage is
// not reset: what comes out before `fill` items have gone in is undefined,
// and the stencil core discards the results that depend on it. The read
// port is asynchronous (distributed RAM); this is a choice of this design.
// In each bank the low bits of the computed item index always equal the bank
// number, so only its row bits are used; lint reports the low bits as unused.
module line_fifo
  import hpc_pkg::*;
#(
  parameter int unsigned P     = LANES,
  parameter int unsigned DEPTH = MAX_WIDTH    // power of two, multiple of P
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 init,
  input  logic [$clog2(DEPTH):0] fill,
  input  logic                 adv,
  input  word_t                wdata [P],
  output word_t                rdata [P]
);

  localparam int unsigned AW   = $clog2(DEPTH);
  localparam int unsigned PW   = $clog2(P);
  localparam int unsigned ROWS = DEPTH / P;
  localparam int unsigned RW   = $clog2(ROWS);

  logic [AW-1:0] rd_ptr, wr_ptr;
  word_t         bank_q [P];               // bank read data, after forwarding

  always_ff @(posedge clk) begin
    if (rst || init) begin
      rd_ptr <= '0;
      wr_ptr <= AW'(fill);
    end else if (adv) begin
      rd_ptr <= rd_ptr + AW'(P);
      wr_ptr <= wr_ptr + AW'(P);
    end
  end

  for (genvar b = 0; b < P; b++) begin : g_bank
    word_t          mem [ROWS];
    logic [PW-1:0]  r_lane, w_lane;          // lane whose item sits in this bank
    logic [AW-1:0]  r_item, w_item;
    logic [RW-1:0]  r_row, w_row;

    always_comb begin
      r_lane = PW'(b) - rd_ptr[PW-1:0];
      w_lane = PW'(b) - wr_ptr[PW-1:0];
      r_item = rd_ptr + AW'(r_lane);
      w_item = wr_ptr + AW'(w_lane);
      r_row  = r_item[AW-1:PW];
      w_row  = w_item[AW-1:PW];
      bank_q[b] = (adv && (w_row == r_row)) ? wdata[w_lane] : mem[r_row];
    end

    always_ff @(posedge clk) begin
      if (adv) mem[w_row] <= wdata[w_lane];
    end
  end

  // rotate bank outputs back into stream order
  always_comb begin
    for (int j = 0; j < P; j++) rdata[j] = bank_q[PW'(rd_ptr[PW-1:0] + PW'(j))];
  end

  a_fill_range: assert property (@(posedge clk) init |-> 32'(fill) + P <= DEPTH);

endmodule
