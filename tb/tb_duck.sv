// tb_duck: self-checking testbench for duck (parallel-exchange DUCK).
//
// A small model resource register stands in for the DyRIBox configuration.
// The test shifts random contexts in word by word, checks the word-level
// shift register behaviour on conf_out against a reference queue of bits,
// then pulses swap and checks that the context and the resource's
// configuration are exchanged in exactly one clock cycle, and that the old
// configuration is then read back on the path.
module tb_duck;
  localparam int unsigned CTX = 10;
  localparam int unsigned W   = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en = 1'b0, swap = 1'b0;
  logic [W-1:0] conf_in = '0, conf_out;
  logic [CTX-1:0] res_cfg_q, ctx_q;
  logic [CTX-1:0] res = '0;   // model resource configuration register

  int checks = 0, failures = 0;

  duck #(.CTX_BITS(CTX), .CONF_W(W)) dut (.*);

  assign res_cfg_q = res;
  always_ff @(posedge clk) if (swap) res <= ctx_q;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [CTX-1:0] model;   // reference context register

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int unsigned op;
      op = $urandom_range(0, 9);
      @(negedge clk);
      if (op < 7) begin
        logic [W-1:0] w;
        w = W'($urandom);
        shift_en = 1'b1; conf_in = w;
        @(negedge clk);
        shift_en = 1'b0;
        model = {model[CTX-W-1:0], w};
        check(conf_out == model[CTX-1 -: W], "conf_out after shift");
        check(ctx_q == model, "context after shift");
      end else begin
        logic [CTX-1:0] old_res;
        old_res = res;
        swap = 1'b1;
        @(negedge clk);
        swap = 1'b0;
        // exchanged after exactly one clock edge
        check(res == model, "resource loaded with context on swap");
        check(ctx_q == old_res, "old configuration captured on swap");
        model = old_res;
        // read back part of the previous configuration
        if (op == 9) begin
          for (int k = 0; k < 2; k++) begin
            shift_en = 1'b1; conf_in = 0;
            @(negedge clk);
          end
          shift_en = 1'b0;
          model = {model[CTX-W-1:0], W'(0)};
          model = {model[CTX-W-1:0], W'(0)};
          check(ctx_q == model, "readback shift");
        end
      end
    end
    // identical context: reload the current configuration and swap; the
    // resource sees no change
    begin
      logic [CTX-1:0] keep;
      keep = res;
      shift_en = 1'b1; conf_in = W'(keep >> W);
      @(negedge clk);
      conf_in = keep[W-1:0];
      @(negedge clk);
      shift_en = 1'b0;
      check(ctx_q == keep, "two words load a 10-bit context");
      swap = 1'b1;
      @(negedge clk);
      swap = 1'b0;
      check(res == keep && ctx_q == keep, "identical swap leaves resource unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
