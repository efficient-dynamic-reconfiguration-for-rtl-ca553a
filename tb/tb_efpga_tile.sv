// tb_efpga_tile: self-checking testbench for efpga_tile.
//
// Repeatedly: shifts a random tile context in (5 words) while the tile keeps
// computing with the current one and checks its outputs meanwhile; swaps and
// checks that busy lasts 20 cycles;
// then checks the side outputs, carry out and logic-cell output against the
// reference model for random inputs, and reads the previous context back
// from conf_out during the next load. Registered-output contexts check the
// set/reset value applied by user_rst.
module tb_efpga_tile;
  import efpga_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] side_in = '0, side_out;
  logic cin = 1'b0, cout, ram_we = 1'b0, user_rst = 1'b0;
  logic conf_shift = 1'b0, swap = 1'b0, busy;
  logic [W-1:0] conf_in = '0, conf_out;

  int checks = 0, failures = 0;

  efpga_tile dut (.*);

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

  tile_ctx_t prv, cur, nxt;
  tile_ctx_t one[];

  // outputs expected from the combinational part of context c
  task automatic check_outputs(input tile_ctx_t c, input string what);
    logic lc_o;
    #1;
    lc_o = c.lc[17] ? 1'bx : lc_sum(c.lc, side_in, cin);
    if (!c.lc[17]) begin
      for (int j = 0; j < 4; j++)
        check(side_out[j] == dy_out(c.dy, j, {lc_o, side_in}), what);
    end else begin
      // registered output: only check routes that do not pass the cell
      for (int j = 0; j < 4; j++)
        if (((j + 1 + int'(c.dy[2*j +: 2])) % 5) != 4)
          check(side_out[j] == dy_out(c.dy, j, {1'b0, side_in}), what);
    end
    check(cout == lc_cout(c.lc, side_in, cin), {what, " (carry)"});
  endtask

  initial begin
    one = new[1];
    cur = '0;
    prv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 80; t++) begin
      nxt = tile_ctx_t'({$urandom, $urandom});
      nxt.lc[19] = 1'b0;              // no RAM mode here
      if (t % 3 != 0) nxt.lc[17] = 1'b0;
      // load while computing; old context comes out on conf_out
      for (int k = 0; k < TILE_WORDS; k++) begin
        one[0] = prv;
        check(conf_out == stream_word(one, k), "readback of previous context");
        one[0] = nxt;
        conf_shift = 1'b1;
        conf_in = stream_word(one, k);
        side_in = 4'($urandom); cin = 1'($urandom);
        check_outputs(cur, "outputs unchanged while loading");
        @(negedge clk);
      end
      conf_shift = 1'b0;
      // swap
      swap = 1'b1;
      @(negedge clk);
      swap = 1'b0;
      begin
        int n;
        n = 0;
        while (busy) begin
          n++;
          @(negedge clk);
        end
        check(n == 20, "logic-cell swap takes 20 cycles");
      end
      prv = cur;
      cur = nxt;
      // user_rst sets the registered output to the context's value
      user_rst = 1'b1;
      @(negedge clk);
      user_rst = 1'b0;
      if (cur.lc[17]) begin
        for (int j = 0; j < 4; j++)
          if (((j + 1 + int'(cur.dy[2*j +: 2])) % 5) == 4)
            check(side_out[j] == cur.lc[16], "register set/reset value after swap");
      end
      for (int v = 0; v < 16; v++) begin
        side_in = 4'($urandom); cin = 1'($urandom);
        check_outputs(cur, "outputs after swap");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
