// aer_conv_pkg: types and constants shared by the two spike-based convolution
// processors.
//
// The RAM-integrator processor works on a 64x64 array of 8-bit integrator
// cells and an 11x11 kernel of signed 8-bit weights; those sizes are the
// published configuration. The probabilistic mapper keeps, per input
// address, a list of mapped output events in an external SRAM; the layout of
// one SRAM word (map_entry_t) is this design's own choice, since only its
// three fields (repetition, probability, event) are given.
package aer_conv_pkg;

  // Image side is 2**IMG_BITS cells (64x64 address space).
  localparam int unsigned IMG_BITS  = 6;
  localparam int unsigned ADDR_W    = 2 * IMG_BITS;  // AER address {i, j}
  localparam int unsigned CELL_W    = 8;             // integrator width
  localparam int unsigned KW        = 8;             // kernel weight width
  localparam int unsigned KMAX      = 11;            // largest kernel side
  localparam int unsigned KENTRIES  = KMAX * KMAX;   // kernel RAM depth
  localparam int unsigned KADDR_W   = $clog2(KENTRIES);
  localparam int unsigned DELTA_W   = 9;             // signed update amount

  // Configuration frame opcodes, carried over the SPI link (own encoding).
  typedef enum logic [7:0] {
    OP_KERNEL  = 8'h01,   // payload[14:8] kernel index, payload[7:0] weight
    OP_KSIZE   = 8'h02,   // payload[3:0] kernel side N (odd, 1..11)
    OP_FPERIOD = 8'h03,   // payload[23:0] forgetting period in clock cycles
    OP_FQUANT  = 8'h04    // payload[7:0] forgetting quantity
  } cfg_op_e;

  // Mapper output event: sign bit on top of the 12-bit pixel address.
  localparam int unsigned MEV_W = ADDR_W + 1;

  // One 32-bit word of the mapping table.
  typedef struct packed {
    logic [4:0]        unused;
    logic              valid;   // slot holds a mapped event
    logic              last;    // last mapped event of this input address
    logic [3:0]        rep;     // repetition factor R
    logic [7:0]        prob;    // probability P, sent when rnd <= prob
    logic [MEV_W-1:0]  event_;  // {sign, i, j}
  } map_entry_t;

endpackage
