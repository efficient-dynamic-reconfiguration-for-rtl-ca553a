// tb_duck_serial: self-checking testbench for duck_serial (logic-cell DUCK).
//
// A 20-bit register with bit-addressed access in the testbench stands in for
// the logic cell's configuration. The test shifts contexts in over the 6-bit
// path, checks conf_out against a reference register, then swaps and checks
// that busy lasts exactly 20 cycles, that each bit is visited once in order,
// that the cell then holds the new context and that the DUCK returns the old
// one on the path.
module tb_duck_serial;
  localparam int unsigned CTX = 20;
  localparam int unsigned W   = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en = 1'b0, swap = 1'b0, busy;
  logic [W-1:0] conf_in = '0, conf_out;
  logic [4:0] cell_idx;
  logic cell_we, cell_wd, cell_rd;
  logic [CTX-1:0] chain = '0;   // model of the cell's configuration bits

  int checks = 0, failures = 0;

  duck_serial #(.CTX_BITS(CTX), .CONF_W(W)) dut (.*);

  assign cell_rd = chain[cell_idx];
  always_ff @(posedge clk) if (cell_we) chain[cell_idx] <= cell_wd;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  logic [CTX-1:0] model;

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 60; t++) begin
      // load a random context: four words reach every bit of 20
      for (int k = 0; k < 4; k++) begin
        logic [W-1:0] w;
        w = W'($urandom);
        shift_en = 1'b1; conf_in = w;
        @(negedge clk);
        model = CTX'({model, w});
        check(conf_out == model[CTX-1 -: W], "conf_out after shift");
      end
      shift_en = 1'b0;
      begin
        logic [CTX-1:0] old_chain;
        int busy_cycles, loads;
        old_chain = chain;
        swap = 1'b1;
        @(negedge clk);
        swap = 1'b0;
        busy_cycles = 0; loads = 0;
        while (busy) begin
          busy_cycles++;
          check(cell_we && cell_idx == 5'(busy_cycles - 1), "bits visited in order");
          @(negedge clk);
        end
        check(busy_cycles == CTX, "exchange takes 20 cycles");
        check(chain == model, "cell chain holds new context");
        check(conf_out == old_chain[CTX-1 -: W], "DUCK holds previous context");
        model = old_chain;
        // read the previous context back over the path (preemption)
        for (int k = 0; k < 3; k++) begin
          shift_en = 1'b1; conf_in = '0;
          @(negedge clk);
          model = CTX'({model, W'(0)});
          check(conf_out == model[CTX-1 -: W], "readback of previous context");
        end
        shift_en = 1'b0;
        // shift requests during busy are not allowed; none are issued
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
