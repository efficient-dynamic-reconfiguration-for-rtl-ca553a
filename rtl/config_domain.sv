// config_domain: one reconfiguration domain of the fabric.
//
// A band of ROWS x COLS tiles (row 0 is the southern row) whose DUCKs form a
// single configuration scan path of CONF_W bits, ConfIn -> ConfOut. The path
// visits the tiles row by row from the south-west corner: tile (r, c) is
// chain position k = r*COLS + c, and each tile is 5 path words (30 bits).
// Loading a domain context therefore takes 5*ROWS*COLS shift cycles; the
// word entered first ends up in the last tile of the chain. Each domain has
// its own path and its own swap input, so several domains load in parallel
// and can be swapped together or one at a time (partial reconfiguration).
//
// swap is a one-cycle pulse broadcast to every tile: DyRIBox contexts are
// exchanged on the next edge and logic-cell contexts over the next 20 cycles,
// during which busy is high and conf_shift must stay low (asserted). The
// tiles keep computing throughout. After a
// swap the previous context sits in the DUCKs and is read back on conf_out by
// shifting, which is how a preempted task is saved.
//
// Datapath: neighbouring tiles are connected on all four sides and by a
// south-to-north carry chain; the band's edges are ports so that domains
// stack into the full fabric. Because routing is configurable, a context can
// close a combinational loop through DyRIBoxes and logic cells; tools see
// these structural loops, and contexts are expected not to form them.
//
// Domains with separate ConfIn/ConfOut paths follow the document; the band
// shape and the chain order are this design's choices.
module config_domain
  import efpga_pkg::*;
#(
  parameter int unsigned ROWS   = 20,
  parameter int unsigned COLS   = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  // datapath edges
  input  logic [COLS-1:0]   north_in,
  output logic [COLS-1:0]   north_out,
  input  logic [COLS-1:0]   south_in,
  output logic [COLS-1:0]   south_out,
  input  logic [ROWS-1:0]   west_in,
  output logic [ROWS-1:0]   west_out,
  input  logic [ROWS-1:0]   east_in,
  output logic [ROWS-1:0]   east_out,
  input  logic [COLS-1:0]   carry_in,   // into the southern row
  output logic [COLS-1:0]   carry_out,  // out of the northern row
  input  logic              ram_we,
  input  logic              user_rst,
  // configuration path
  input  logic              conf_shift,
  input  logic [CONF_W-1:0] conf_in,
  output logic [CONF_W-1:0] conf_out,
  input  logic              swap,
  output logic              busy
);

  localparam int unsigned NT = ROWS * COLS;

  logic [3:0]        t_in   [ROWS][COLS];
  logic [3:0]        t_out  [ROWS][COLS];
  logic              t_cin  [ROWS][COLS];
  logic              t_cout [ROWS][COLS];
  logic [CONF_W-1:0] chain  [NT+1];
  logic [NT-1:0]     t_busy;

  assign chain[0] = conf_in;
  assign conf_out = chain[NT];
  assign busy     = |t_busy;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned K = r * COLS + c;

      if (r == ROWS - 1) begin : g_n_edge
        assign t_in[r][c][SIDE_N] = north_in[c];
        assign north_out[c]       = t_out[r][c][SIDE_N];
        assign carry_out[c]       = t_cout[r][c];
      end else begin : g_n_inner
        assign t_in[r][c][SIDE_N] = t_out[r+1][c][SIDE_S];
      end

      if (r == 0) begin : g_s_edge
        assign t_in[r][c][SIDE_S] = south_in[c];
        assign south_out[c]       = t_out[r][c][SIDE_S];
        assign t_cin[r][c]        = carry_in[c];
      end else begin : g_s_inner
        assign t_in[r][c][SIDE_S] = t_out[r-1][c][SIDE_N];
        assign t_cin[r][c]        = t_cout[r-1][c];
      end

      if (c == COLS - 1) begin : g_e_edge
        assign t_in[r][c][SIDE_E] = east_in[r];
        assign east_out[r]        = t_out[r][c][SIDE_E];
      end else begin : g_e_inner
        assign t_in[r][c][SIDE_E] = t_out[r][c+1][SIDE_W];
      end

      if (c == 0) begin : g_w_edge
        assign t_in[r][c][SIDE_W] = west_in[r];
        assign west_out[r]        = t_out[r][c][SIDE_W];
      end else begin : g_w_inner
        assign t_in[r][c][SIDE_W] = t_out[r][c-1][SIDE_E];
      end

      efpga_tile u_tile (
        .clk, .rst_n,
        .side_in    (t_in[r][c]),
        .side_out   (t_out[r][c]),
        .cin        (t_cin[r][c]),
        .cout       (t_cout[r][c]),
        .ram_we     (ram_we),
        .user_rst   (user_rst),
        .conf_shift (conf_shift),
        .conf_in    (chain[K]),
        .conf_out   (chain[K+1]),
        .swap       (swap),
        .busy       (t_busy[K])
      );
    end
  end

  a_no_shift_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !((busy || swap) && conf_shift));

endmodule
