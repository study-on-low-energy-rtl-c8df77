// vn8w_pkg: types and constants shared by the VN_8W post-processor.
//
// VN_8W processes eight raw bits at a time. Each half (four bits) is
// described by its Hamming weight N (0..4), two "direct" symbol bits D and
// a base-3 waiting flag W (0..2, only meaningful for weight 2). The 8-bit
// stage combines two halves into up to six direct output bits and an
// optional base-7 waiting flag; two base-7 flags are later merged into up to
// five more bits (7*7 = 49 = 32 + 16 + 1).
package vn8w_pkg;

  // Summary of one 4-bit half, produced by vn_4bit_logic.
  typedef struct packed {
    logic [2:0] n;  // Hamming weight, 0..4
    logic [1:0] d;  // direct symbol bits
    logic [1:0] w;  // base-3 waiting flag (weight-2 halves only)
  } half_t;

  // Base-7 waiting flag, 0..6.
  typedef logic [2:0] flag7_t;

  localparam int unsigned FRAME_BITS = 8;   // raw bits per mapping step
  localparam int unsigned DOUT_W     = 6;   // direct output bits per frame
  localparam int unsigned WOUT_W     = 5;   // waiting output bits per flag pair

endpackage
