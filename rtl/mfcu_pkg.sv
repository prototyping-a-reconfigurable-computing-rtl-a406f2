// Shared types and constants of the reconfigurable image-processing board.
//
// Pixels are 8-bit gray levels (0 = black, 255 = white). A nine-cell window
// holds P1..P9 in row-major order, P5 being the pixel being computed:
//     P1 P2 P3
//     P4 P5 P6
//     P7 P8 P9
// Index k of window_t holds P(k+1). The filter mode chooses which of the four
// image-processing IPs produces a node's result. The link between the main
// FPGA and an image node is a request/response pair of structs; the request
// address is LINK_AW bits wide, bit LINK_AW-1 selecting the result memory.
package mfcu_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned LINK_AW = 12;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef pixel_t [8:0] window_t;

  typedef enum logic [1:0] {
    MODE_EDGE     = 2'd0,
    MODE_EXPAND   = 2'd1,
    MODE_EROSION  = 2'd2,
    MODE_NEGATIVE = 2'd3
  } filter_mode_e;

  // Main FPGA -> image node.
  typedef struct packed {
    logic               req;    // one-cycle memory access
    logic               we;     // write (1) or read (0)
    logic [LINK_AW-1:0] addr;   // [LINK_AW-1]: 0 = input quarter, 1 = result
    pixel_t             wdata;
    logic               start;  // one-cycle pulse: filter the stored quarter
    filter_mode_e       mode;   // sampled with start
  } link_req_t;

  // Image node -> main FPGA.
  typedef struct packed {
    logic   rvalid;  // read data valid, one cycle after a read request
    pixel_t rdata;
    logic   busy;    // scanning the quarter
    logic   done;    // quarter finished since the last start
  } link_rsp_t;

endpackage
