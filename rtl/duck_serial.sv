// duck_serial: DUCK for a resource whose configuration registers are
// reached one bit at a time (the logic cell).
//
// Like duck, it holds a CTX_BITS context register on the CONF_W-bit scan path
// (shift_en shifts in one path word per clock, the top word is conf_out).
// A swap pulse starts the exchange with the resource: a counter selects each
// configuration bit of the resource in turn (cell_idx), writes the
// corresponding context bit into it (cell_we, cell_wd) and takes the bit it
// held (cell_rd) into the context in its place. After CTX_BITS cycles the
// resource holds the new context and the DUCK the previous one, ready to be
// shifted out. Bits equal to the running context are rewritten unchanged, so
// swapping in an identical context does not disturb the resource.
//
// Timing: swap at clock edge 0; busy is high for the next CTX_BITS cycles,
// the last bit being written on edge CTX_BITS. Shift requests while busy are
// not allowed (asserted) and ignored; reset clears the context. The counter
// that walks the configuration registers and the 20-cycle load follow the
// document; the exchange of the previous context is this design's choice.
module duck_serial #(
  parameter int unsigned CTX_BITS = 20,
  parameter int unsigned CONF_W   = 6,
  localparam int unsigned CW      = $clog2(CTX_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [CONF_W-1:0] conf_in,
  output logic [CONF_W-1:0] conf_out,
  input  logic              swap,
  output logic              busy,
  // resource's bit-addressed configuration access
  output logic [CW-1:0]     cell_idx,
  output logic              cell_we,
  output logic              cell_wd,
  input  logic              cell_rd
);

  logic [CTX_BITS-1:0] ctx;
  logic [CW-1:0]       cnt;

  if (CTX_BITS < CONF_W) begin : g_bad_size
    $error("duck_serial: CTX_BITS must be at least CONF_W");
  end

  assign conf_out = ctx[CTX_BITS-1 -: CONF_W];
  assign cell_idx = cnt;
  assign cell_we  = busy;
  assign cell_wd  = ctx[cnt];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctx  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (busy) begin
      ctx[cnt] <= cell_rd;
      if (cnt == CW'(CTX_BITS - 1)) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end else if (swap) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (shift_en) begin
      ctx <= (ctx << CONF_W) | CTX_BITS'(conf_in);
    end
  end

  a_no_shift_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !((busy || swap) && shift_en));

endmodule
