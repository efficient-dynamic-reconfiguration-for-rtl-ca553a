// efpga_tile: one tile of the fabric, a logic cell with its DyRIBox.
//
// Datapath: the four LUT inputs of the logic cell are the signals arriving
// from the four neighbours (side_in, indexed N, E, S, W). The DyRIBox has
// these four plus the logic-cell output as inputs, and drives the four side
// outputs plus the logic cell's RAM write-data input. The carry chain runs
// from the south neighbour (cin) to the north neighbour (cout); the RAM write
// enable and the register set/reset (user_rst) are fabric-wide signals. Bit width is 1 (fine-grained fabric).
//
// Configuration: the tile's two DUCKs are chained on the CONF_W-bit scan
// path, conf_in -> DyRIBox DUCK (10 bits) -> logic-cell DUCK (20 bits) ->
// conf_out, so the tile is a 30-bit shift register advancing one path word
// per cycle: a whole tile context is 5 words. Viewed as one register, the
// logic-cell context is bits [29:10] and the DyRIBox context bits [9:0]. A
// swap pulse exchanges both contexts: the DyRIBox on the next clock edge, the
// logic cell one bit per cycle over the following 20 cycles (busy high). The
// tile keeps computing throughout; scan shifting is allowed whenever busy is
// low, so the next context loads while the current one runs.
//
// The pairing of one DyRIBox and one logic cell per tile, each with a DUCK,
// and the 20 + 10 bit split follow the document; the wiring of the LUT inputs
// and the order of the DUCKs on the path are this design's choices.
module efpga_tile
  import efpga_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // fabric datapath
  input  logic [3:0]        side_in,   // from neighbours, indexed by side_e
  output logic [3:0]        side_out,  // to neighbours, indexed by side_e
  input  logic              cin,       // carry from the south neighbour
  output logic              cout,      // carry to the north neighbour
  input  logic              ram_we,
  input  logic              user_rst,  // sets/resets logic-cell registers
  // configuration path
  input  logic              conf_shift,
  input  logic [CONF_W-1:0] conf_in,
  output logic [CONF_W-1:0] conf_out,
  input  logic              swap,
  output logic              busy
);

  logic [CONF_W-1:0]      conf_mid;
  logic [DY_CFG_BITS-1:0] dy_cfg_q, dy_ctx_q;
  logic [0:0]             dy_in  [DY_N_IN];
  logic [0:0]             dy_out [DY_M_OUT];
  logic                   lc_out;
  logic [4:0]             lc_idx;
  logic                   lc_we, lc_wd, lc_rd;

  for (genvar s = 0; s < 4; s++) begin : g_side
    assign dy_in[s]    = side_in[s];
    assign side_out[s] = dy_out[s][0];
  end
  assign dy_in[DY_LC] = lc_out;

  duck #(.CTX_BITS(DY_CFG_BITS), .CONF_W(CONF_W)) u_dy_duck (
    .clk, .rst_n,
    .shift_en  (conf_shift),
    .conf_in   (conf_in),
    .conf_out  (conf_mid),
    .swap      (swap),
    .res_cfg_q (dy_cfg_q),
    .ctx_q     (dy_ctx_q)
  );

  dyribox #(.B(1), .N_IN(DY_N_IN), .M_OUT(DY_M_OUT), .P(DY_P)) u_dyribox (
    .clk, .rst_n,
    .in_data  (dy_in),
    .out_data (dy_out),
    .cfg_load (swap),
    .cfg_d    (dy_ctx_q),
    .cfg_q    (dy_cfg_q)
  );

  duck_serial #(.CTX_BITS(LC_CFG_BITS), .CONF_W(CONF_W)) u_lc_duck (
    .clk, .rst_n,
    .shift_en   (conf_shift),
    .conf_in    (conf_mid),
    .conf_out   (conf_out),
    .swap       (swap),
    .busy       (busy),
    .cell_idx   (lc_idx),
    .cell_we    (lc_we),
    .cell_wd    (lc_wd),
    .cell_rd    (lc_rd)
  );

  logic_cell u_lc (
    .clk, .rst_n,
    .cfg_idx   (lc_idx),
    .cfg_we    (lc_we),
    .cfg_wd    (lc_wd),
    .cfg_rd    (lc_rd),
    .user_rst  (user_rst),
    .in        (side_in),
    .wdata     (dy_out[DY_LC][0]),
    .we        (ram_we),
    .cin       (cin),
    .cout      (cout),
    .out       (lc_out)
  );

endmodule
