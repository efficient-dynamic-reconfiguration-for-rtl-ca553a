// dyribox: Dynamically Reconfigurable Interconnection Box.
//
// Switches B-bit signals from N_IN input ports to M_OUT output ports. To keep
// the configuration small, each output can reach only P of the inputs and so
// needs a p = log2(P) bit configuration register; the box holds M_OUT such
// registers (M_OUT*p bits in all, packed with output j at bits [j*p +: p]).
// One input may feed several outputs.
//
// Which P inputs an output reaches is this design's choice: output j with
// select value s takes input (j + 1 + s) mod N_IN, and select values of P or
// more drive 0. With the tile's five ports (N, E, S, W, logic cell) this lets
// every side output take any other side or the logic cell, never its own
// side's input, and the logic-cell data output take any of the four sides.
//
// The configuration registers are loaded in parallel from cfg_d when cfg_load
// is high, which is how the DUCK swaps a context in within one clock cycle;
// cfg_q lets the DUCK capture the context being replaced. The switch itself
// is purely combinational, so the configuration path adds nothing to it.
// Reset clears the registers (every output takes select value 0) and, while
// it is held, also forces every output to 0, so that whatever the registers
// hold before reset, no combinational loop can be closed through the box.
module dyribox #(
  parameter int unsigned B     = 1,
  parameter int unsigned N_IN  = 5,
  parameter int unsigned M_OUT = 5,
  parameter int unsigned P     = 4,
  localparam int unsigned PW      = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned CFG_BITS = M_OUT * PW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [B-1:0]        in_data  [N_IN],
  output logic [B-1:0]        out_data [M_OUT],
  input  logic                cfg_load,
  input  logic [CFG_BITS-1:0] cfg_d,
  output logic [CFG_BITS-1:0] cfg_q
);

  logic [CFG_BITS-1:0] cfg;

  if (P > N_IN || P < 2) begin : g_bad_p
    $error("dyribox: P must be between 2 and N_IN");
  end

  assign cfg_q = cfg;

  always_ff @(posedge clk) begin
    if (!rst_n)        cfg <= '0;
    else if (cfg_load) cfg <= cfg_d;
  end

  for (genvar j = 0; j < M_OUT; j++) begin : g_out
    logic [PW-1:0] sel;
    assign sel = cfg[j*PW +: PW];
    always_comb begin
      out_data[j] = '0;
      if (rst_n) for (int unsigned s = 0; s < P; s++) begin
        if (sel == PW'(s)) out_data[j] = in_data[(j + 1 + s) % N_IN];
      end
    end
  end

endmodule
