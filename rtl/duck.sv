// duck: Dynamic Unifier and reConfiguration block for a resource whose
// configuration registers can be exchanged in parallel (the DyRIBox).
//
// The DUCK holds one context register of CTX_BITS bits. It sits on the
// configuration scan path, which is CONF_W bits wide: while shift_en is high,
// each clock shifts the register left by CONF_W bits, taking conf_in at the
// bottom and presenting the top CONF_W bits on conf_out for the next DUCK of
// the chain. Chained DUCKs therefore behave as one long shift register that
// advances one path word per cycle, whatever each one's size.
//
// A one-cycle swap pulse exchanges the context with the resource's
// configuration registers: the resource loads ctx_q (its cfg_load input is
// driven by swap) and the DUCK captures the configuration it replaces, which
// can then be shifted out on the same path (preemption/readback). Swapping in
// a context equal to the current one leaves the resource undisturbed.
//
// Timing: conf_out is the register's top word, so a word entering at conf_in
// appears on conf_out CTX_BITS/CONF_W cycles later when that is whole. Swap
// and shift must not be raised together (asserted); reset clears the context.
// Scan-path shifting, one-cycle exchange and readback follow the document;
// the word-shift arrangement and reset are this design's choices.
module duck #(
  parameter int unsigned CTX_BITS = 10,
  parameter int unsigned CONF_W   = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic [CONF_W-1:0]   conf_in,
  output logic [CONF_W-1:0]   conf_out,
  input  logic                swap,
  input  logic [CTX_BITS-1:0] res_cfg_q,  // resource's current configuration
  output logic [CTX_BITS-1:0] ctx_q       // context loaded by the resource on swap
);

  logic [CTX_BITS-1:0] ctx;

  if (CTX_BITS < CONF_W) begin : g_bad_size
    $error("duck: CTX_BITS must be at least CONF_W");
  end

  assign ctx_q    = ctx;
  assign conf_out = ctx[CTX_BITS-1 -: CONF_W];

  always_ff @(posedge clk) begin
    if (!rst_n)        ctx <= '0;
    else if (swap)     ctx <= res_cfg_q;
    else if (shift_en) ctx <= (ctx << CONF_W) | CTX_BITS'(conf_in);
  end

  a_no_shift_during_swap: assert property (@(posedge clk) disable iff (!rst_n)
    !(swap && shift_en));

endmodule
