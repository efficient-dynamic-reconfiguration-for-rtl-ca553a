// tb_logic_cell: self-checking testbench for logic_cell.
//
// Writes random 20-bit configurations one bit per cycle through the
// addressed configuration port (20 cycles per context), checking that each
// bit read back before it is overwritten belongs to the previous context.
// It then checks the LUT output for all 16 input values and both carry
// inputs, the carry out, the registered output and its set/reset by
// user_rst, RAM-mode writes, and that rewriting the running context bit by
// bit leaves a registered output and the cell's function undisturbed.
// Expected values are computed here from the configuration word alone.
module tb_logic_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] cfg_idx = '0;
  logic cfg_we = 1'b0, cfg_wd = 1'b0, cfg_rd;
  logic user_rst = 1'b0;
  logic [3:0] in = '0;
  logic wdata = 1'b0, we = 1'b0, cin = 1'b0, cout, out;

  int checks = 0, failures = 0;

  logic_cell dut (.*);

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

  // write a context bit by bit, checking the previous bits as they go
  task automatic load(input logic [19:0] c, input logic [19:0] prev);
    for (int i = 0; i < 20; i++) begin
      cfg_idx = 5'(i); cfg_we = 1'b1; cfg_wd = c[i];
      #1 check(cfg_rd == prev[i], "previous bit read back");
      @(negedge clk);
    end
    cfg_we = 1'b0;
  endtask

  task automatic read_all(output logic [19:0] c);
    for (int i = 0; i < 20; i++) begin
      cfg_idx = 5'(i);
      #1 c[i] = cfg_rd;
    end
  endtask

  logic [19:0] cur, nxt, got;
  logic exp_ff;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cur = '0;
    for (int t = 0; t < 40; t++) begin
      nxt = 20'($urandom);
      nxt[19] = 1'b0;  // no RAM mode in this loop
      load(nxt, cur);
      cur = nxt;
      read_all(got);
      check(got == cur, "context after 20 writes");
      // combinational behaviour for every input and carry value
      for (int v = 0; v < 32; v++) begin
        logic lut_o, ci;
        in  = v[3:0];
        cin = v[4];
        #1;
        lut_o = cur[{1'b0, v[3:0]}];
        ci    = cur[18] & v[4];
        if (!cur[17]) check(out == (lut_o ^ ci), "combinational output");
        check(cout == (lut_o ? ci : v[0]), "carry out");
        @(negedge clk);
        if (cur[17]) check(out == (lut_o ^ ci), "registered output");
      end
      // user_rst sets or resets the register
      user_rst = 1'b1;
      @(negedge clk);
      user_rst = 1'b0;
      if (cur[17]) check(out == cur[16], "register set/reset value");
      // rewriting the same context leaves a registered output running
      in = 4'($urandom); cin = 1'b0;
      @(negedge clk);
      exp_ff = cur[{1'b0, in}];
      for (int i = 0; i < 20; i++) begin
        cfg_idx = 5'(i); cfg_we = 1'b1; cfg_wd = cur[i];
        #1;
        if (cur[17]) check(out == exp_ff, "identical context: register undisturbed");
        else         check(out == cur[{1'b0, in}], "identical context: LUT undisturbed");
        @(negedge clk);
      end
      cfg_we = 1'b0;
    end
    // RAM mode: combinational read, writes at the LUT-input address
    begin
      logic [15:0] mem;
      nxt = {1'b1, 1'b0, 1'b0, 1'b0, 16'($urandom)};
      load(nxt, cur);
      mem = nxt[15:0];
      for (int k = 0; k < 200; k++) begin
        logic [3:0] a;
        logic d, w;
        a = 4'($urandom); d = 1'($urandom); w = 1'($urandom);
        in = a; wdata = d; we = w;
        #1 check(out == mem[a], "RAM read");
        @(negedge clk);
        if (w) mem[a] = d;
      end
      we = 1'b0;
      read_all(got);
      check(got[15:0] == mem, "RAM contents");
      cur = got;
    end
    // writes ignored outside RAM mode
    begin
      nxt = {1'b0, 3'b000, 16'($urandom)};
      load(nxt, cur);
      we = 1'b1; wdata = ~nxt[0]; in = 4'd0;
      @(negedge clk);
      we = 1'b0;
      read_all(got);
      check(got == nxt, "no write outside RAM mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
