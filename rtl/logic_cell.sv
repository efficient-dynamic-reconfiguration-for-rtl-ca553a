// logic_cell: fine-grained logic cell of the fabric.
//
// A 4-input LUT drives the cell. Its output is XORed with the carry input, so
// with the carry input forced to 0 (carry_sel = 0) the cell is a plain LUT,
// and with the carry chain selected it is one bit of a ripple adder: the LUT
// computes the propagate term, the carry out is the carry in when propagating
// and in[0] otherwise. The result goes out either directly or through the
// output register (seq_sel). The fabric-wide user_rst sets or resets the
// output register to the context's ff_init bit. In RAM mode the LUT doubles
// as a 16x1 memory: with we high, wdata is written on the clock edge at the
// address given by the four LUT inputs.
//
// The 20 configuration bits (efpga_pkg::lc_cfg_t) are reached one at a time:
// cfg_idx selects a bit, cfg_rd returns it, and with cfg_we high the clock
// edge writes cfg_wd into it. The cell's DUCK walks cfg_idx over all 20 bits
// with a counter, so a context takes 20 cycles to load, and a bit rewritten
// with its own value changes nothing: swapping in the running context does
// not disturb the cell. A configuration write takes precedence over a RAM
// write. A synchronous active-low reset clears configuration and register.
//
// The four functional areas (mode bits, RAM, carry, LUT) and the counter-
// driven, bit-at-a-time 20-cycle configuration follow the document; the bit
// layout, the carry equations, in[0] as generate term, the separate user
// reset and the addressed (rather than shifted) access are this design's.
module logic_cell
  import efpga_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // configuration access, one bit per cycle
  input  logic [4:0]       cfg_idx,
  input  logic             cfg_we,
  input  logic             cfg_wd,
  output logic             cfg_rd,
  // datapath
  input  logic             user_rst,  // sets/resets the register to ff_init
  input  logic [LUT_K-1:0] in,        // indexed by side_e: N, E, S, W
  input  logic             wdata,     // RAM write data
  input  logic             we,        // RAM write enable (used in RAM mode only)
  input  logic             cin,
  output logic             cout,
  output logic             out
);

  lc_cfg_t cfg;
  logic    ff;
  logic    lut_o, ci, sum;

  assign cfg_rd = (cfg_idx < 5'(LC_CFG_BITS)) ? cfg[cfg_idx] : 1'b0;

  always_comb begin
    lut_o = cfg.lut[in];
    ci    = cfg.carry_sel & cin;
    sum   = lut_o ^ ci;
    cout  = lut_o ? ci : in[0];
    out   = cfg.seq_sel ? ff : sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (cfg_we) begin
      if (cfg_idx < 5'(LC_CFG_BITS)) cfg[cfg_idx] <= cfg_wd;
    end else if (cfg.ram_mode && we) begin
      cfg.lut[in] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        ff <= 1'b0;
    else if (user_rst) ff <= cfg.ff_init;
    else               ff <= sum;
  end

endmodule
