// efpga_pkg: constants and types shared by the embedded-FPGA fabric.
//
// The fabric is built from tiles, each holding one logic cell and one
// interconnection box (DyRIBox). Both carry a DUCK, a context register that
// sits on a word-wide configuration scan path and is exchanged with the
// resource's live configuration on command. The numbers here are those of the
// fabric's main configuration: a 6-bit configuration path, 20 configuration
// bits per logic cell and 10 per DyRIBox (30 bits = 5 path words per tile).
// The bit layout of the logic-cell configuration word is this design's own.
package efpga_pkg;

  // Width of a configuration path word (ConfIn / ConfOut).
  localparam int unsigned CONF_W = 6;

  // Logic cell: a 4-input LUT plus four mode bits.
  localparam int unsigned LUT_K       = 4;
  localparam int unsigned LUT_BITS    = 1 << LUT_K;
  localparam int unsigned LC_CFG_BITS = LUT_BITS + 4;  // 20

  // DyRIBox of a tile: five inputs (N, E, S, W, logic-cell output), five
  // outputs (N, E, S, W, logic-cell data input), four reachable inputs per
  // output, so 5 x log2(4) = 10 configuration bits.
  localparam int unsigned DY_N_IN  = 5;
  localparam int unsigned DY_M_OUT = 5;
  localparam int unsigned DY_P     = 4;
  localparam int unsigned DY_CFG_BITS = DY_M_OUT * $clog2(DY_P);  // 10

  localparam int unsigned TILE_CFG_BITS = LC_CFG_BITS + DY_CFG_BITS;  // 30

  // Side numbering, used both for DyRIBox ports and for LUT inputs.
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  // DyRIBox input/output index of the logic cell (after the four sides).
  localparam int unsigned DY_LC = 4;

  // Logic-cell configuration word. Within a tile context the cell's bits are
  // the upper 20 of 30, so bit 19 is the first bit of a tile on the path.
  typedef struct packed {
    logic                ram_mode;   // [19] LUT written as a 16x1 RAM
    logic                carry_sel;  // [18] 1: carry input from the chain, 0: carry input 0
    logic                seq_sel;    // [17] 1: registered output, 0: combinational output
    logic                ff_init;    // [16] value the output register is set/reset to
    logic [LUT_BITS-1:0] lut;        // [15:0] truth table, indexed by {W,S,E,N}
  } lc_cfg_t;

endpackage
