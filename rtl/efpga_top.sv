// efpga_top: embedded FPGA with fast dynamic reconfiguration.
//
// The fabric is a 2D array of tiles (one logic cell and one DyRIBox each),
// stacked from DOMAINS reconfiguration domains of ROWS_PER_DOMAIN x COLS tiles
// (domain 0 is the southern one). Every configurable resource has a DUCK: the
// next context is shifted into the DUCKs over a 6-bit scan path while the
// fabric keeps computing with the current one, then a swap exchanges the two
// contexts (one cycle for routing, 20 cycles for the logic cells) and the old
// context can be shifted out to be saved.
//
// Each domain d has its own path, conf_in[d] -> conf_out[d] with shift
// enable conf_shift[d], its own swap[d] pulse and busy[d] flag, so the
// domains load in parallel (a context takes 5*ROWS_PER_DOMAIN*COLS cycles,
// the same for any number of domains) and may be swapped together or
// separately. The fabric's datapath edges are ports: north/south per column,
// west/east per row (row 0 is the southern row of domain 0), a carry input
// per column at the south edge and a carry output per column at the north
// edge, a fabric-wide RAM write enable and a fabric-wide user reset that
// sets or resets every logic-cell register to its context's value.
//
// Defaults follow the document's implementation: 8 domains of 620 logic
// cells (4960 in all) on a 6-bit configuration path. The 20 x 31 shape of a
// domain is this design's choice.
module efpga_top
  import efpga_pkg::*;
#(
  parameter int unsigned DOMAINS         = 8,
  parameter int unsigned ROWS_PER_DOMAIN = 20,
  parameter int unsigned COLS            = 31,
  localparam int unsigned ROWS           = DOMAINS * ROWS_PER_DOMAIN
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // configuration paths, one per domain
  input  logic [DOMAINS-1:0]              conf_shift,
  input  logic [DOMAINS-1:0][CONF_W-1:0]  conf_in,
  output logic [DOMAINS-1:0][CONF_W-1:0]  conf_out,
  input  logic [DOMAINS-1:0]              swap,
  output logic [DOMAINS-1:0]              busy,
  // fabric datapath edges
  input  logic [COLS-1:0]                 north_in,
  output logic [COLS-1:0]                 north_out,
  input  logic [COLS-1:0]                 south_in,
  output logic [COLS-1:0]                 south_out,
  input  logic [ROWS-1:0]                 west_in,
  output logic [ROWS-1:0]                 west_out,
  input  logic [ROWS-1:0]                 east_in,
  output logic [ROWS-1:0]                 east_out,
  input  logic [COLS-1:0]                 carry_in,
  output logic [COLS-1:0]                 carry_out,
  input  logic                            ram_we,
  input  logic                            user_rst
);

  // vertical links between domains: index d is the boundary below domain d
  logic [COLS-1:0] up   [DOMAINS+1];  // northward signals
  logic [COLS-1:0] down [DOMAINS+1];  // southward signals
  logic [COLS-1:0] cy   [DOMAINS+1];

  assign up[0]         = south_in;   // enters domain 0 from the south
  assign south_out     = down[0];
  assign cy[0]         = carry_in;
  assign down[DOMAINS] = north_in;
  assign north_out     = up[DOMAINS];
  assign carry_out     = cy[DOMAINS];

  for (genvar d = 0; d < DOMAINS; d++) begin : g_dom
    localparam int unsigned R0 = d * ROWS_PER_DOMAIN;

    config_domain #(.ROWS(ROWS_PER_DOMAIN), .COLS(COLS)) u_domain (
      .clk, .rst_n,
      .north_in   (down[d+1]),
      .north_out  (up[d+1]),
      .south_in   (up[d]),
      .south_out  (down[d]),
      .west_in    (west_in[R0 +: ROWS_PER_DOMAIN]),
      .west_out   (west_out[R0 +: ROWS_PER_DOMAIN]),
      .east_in    (east_in[R0 +: ROWS_PER_DOMAIN]),
      .east_out   (east_out[R0 +: ROWS_PER_DOMAIN]),
      .carry_in   (cy[d]),
      .carry_out  (cy[d+1]),
      .ram_we     (ram_we),
      .user_rst   (user_rst),
      .conf_shift (conf_shift[d]),
      .conf_in    (conf_in[d]),
      .conf_out   (conf_out[d]),
      .swap       (swap[d]),
      .busy       (busy[d])
    );
  end

endmodule
