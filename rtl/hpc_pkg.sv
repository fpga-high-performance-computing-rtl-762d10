// Shared constants and types of the two streaming accelerator kernels
// (16-lane vector addition and 16-lane 5-point stencil).
//
// The numbers follow the design as published: 512-bit memory ports carrying
// sixteen 32-bit items per beat, a stencil unroll factor of 16, five
// stencil coefficients and a maximum stencil row width of 16384 items.
// Burst length and outstanding-request limits are this implementation's own
// choices (the platform defaults of common HLS flows).
package hpc_pkg;

  localparam int unsigned WORD_W       = 32;               // one float / uint32 item
  localparam int unsigned LANES        = 16;               // items per 512-bit beat (P_UNROLL)
  localparam int unsigned BEAT_W       = WORD_W * LANES;   // 512-bit port width
  localparam int unsigned ADDR_W       = 64;               // byte address width of a memory port
  localparam int unsigned STENCIL_SIZE = 5;                // number of stencil coefficients
  localparam int unsigned MAX_WIDTH    = 16384;            // largest stencil row width (FIFO size)
  localparam int unsigned BURST_LEN    = 16;               // beats per AXI burst
  localparam int unsigned MAX_OUTSTANDING = 4;             // bursts in flight per port

  typedef logic [WORD_W-1:0]             word_t;
  typedef logic [LANES-1:0][WORD_W-1:0]  beat_t;           // lane i = item i of the beat
  typedef logic [ADDR_W-1:0]             addr_t;

  // Kernel control states shared by both kernels.
  typedef enum logic [2:0] {
    K_IDLE,
    K_LOAD_COEF,
    K_RUN,
    K_DONE
  } kstate_e;

endpackage
