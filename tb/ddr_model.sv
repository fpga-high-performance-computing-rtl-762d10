// Behavioural model of one external DDR memory bank with a single access
// port, for simulation only (not synthesizable: queues, delays in cycles).
//
// It accepts AXI4 read and write bursts (the subset the kernels use: INCR,
// full-width beats, no IDs) and, like a real bank behind one port, moves at
// most one beat per clock, either a read beat or a write beat, alternating
// between the two when both are waiting. A read burst's first beat is
// available LATENCY cycles after its address was accepted. STALL_PCT adds
// random idle cycles to exercise back-pressure. The storage is a plain
// array `mem` of DEPTH words that testbenches fill and inspect directly;
// byte addresses are taken modulo DEPTH words.
// Bursts that cross a 4 KiB boundary and misplaced wlast beats are printed
// and counted in protocol_errors, which the testbenches add to their failures.
module ddr_model #(
  parameter int unsigned DATA_W    = 512,
  parameter int unsigned DEPTH     = 4096,
  parameter int unsigned LATENCY   = 20,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              arvalid,
  output logic              arready,
  input  logic [63:0]       araddr,
  input  logic [7:0]        arlen,
  output logic              rvalid,
  input  logic              rready,
  output logic [DATA_W-1:0] rdata,
  output logic              rlast,
  input  logic              awvalid,
  output logic              awready,
  input  logic [63:0]       awaddr,
  input  logic [7:0]        awlen,
  input  logic              wvalid,
  output logic              wready,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wlast,
  output logic              bvalid,
  input  logic              bready
);

  localparam int unsigned BYTES = DATA_W / 8;

  typedef struct {
    longint unsigned word;
    int              beats;
    longint unsigned ready_at;
  } req_t;

  logic [DATA_W-1:0] mem [DEPTH];
  req_t rq [$];
  req_t wq [$];
  int   bq = 0;
  longint unsigned now = 0;
  bit   prefer_write = 0;

  // counters the testbenches may read
  int unsigned read_beats = 0, write_beats = 0, read_bursts = 0, write_bursts = 0;
  int unsigned max_read_outstanding = 0;
  int unsigned protocol_errors = 0;      // AXI rule violations seen

  assign arready = 1'b1;
  assign awready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid <= 1'b0;
      wready <= 1'b0;
      bvalid <= 1'b0;
      rlast  <= 1'b0;
      rq.delete();
      wq.delete();
      bq = 0;
    end else begin
      bit can_read, can_write, do_read;
      now <= now + 1;
      // address channels
      if (arvalid) begin
        req_t r;
        r.word = araddr / BYTES; r.beats = int'(arlen) + 1; r.ready_at = now + LATENCY;
        rq.push_back(r);
        read_bursts++;
        if (rq.size() > max_read_outstanding) max_read_outstanding = rq.size();
        if ((araddr % 4096) + (longint'(arlen) + 1) * BYTES > 4096)
          begin protocol_errors++; $display("FAIL ddr_model: read burst crosses a 4 KiB boundary"); end
      end
      if (awvalid) begin
        req_t w;
        w.word = awaddr / BYTES; w.beats = int'(awlen) + 1; w.ready_at = now;
        wq.push_back(w);
        write_bursts++;
        if ((awaddr % 4096) + (longint'(awlen) + 1) * BYTES > 4096)
          begin protocol_errors++; $display("FAIL ddr_model: write burst crosses a 4 KiB boundary"); end
      end
      // write data
      if (wvalid && wready) begin
        mem[wq[0].word % DEPTH] <= wdata;
        write_beats++;
        wq[0].word++;
        wq[0].beats--;
        if (wlast != (wq[0].beats == 0)) begin protocol_errors++; $display("FAIL ddr_model: wlast misplaced"); end
        if (wq[0].beats == 0) begin
          void'(wq.pop_front());
          bq++;
        end
      end
      // read data
      if (rvalid && rready) begin
        read_beats++;
        rq[0].word++;
        rq[0].beats--;
        if (rq[0].beats == 0) void'(rq.pop_front());
      end
      // write response
      if (bvalid && bready) bq--;
      bvalid <= (bq > 0);
      // choose the next access of the single port
      if (!(rvalid && !rready)) begin
        can_read  = (rq.size() != 0) && (rq[0].ready_at <= now) && ($urandom_range(0, 99) >= STALL_PCT);
        can_write = (wq.size() != 0) && ($urandom_range(0, 99) >= STALL_PCT);
        do_read   = can_read && !(can_write && prefer_write);
        if (can_read && can_write) prefer_write <= !prefer_write;
        rvalid <= do_read;
        wready <= can_write && !do_read;
        if (do_read) begin
          rdata <= mem[rq[0].word % DEPTH];
          rlast <= (rq[0].beats == 1);
        end
      end else begin
        wready <= 1'b0;
      end
    end
  end

endmodule
