// tb_config_domain: self-checking testbench for config_domain.
//
// A 3 x 4 domain (12 tiles, 60 path words per context) runs random contexts
// against the cycle model in efpga_model_pkg, with random edge inputs, RAM
// writes and user resets, checking every edge output on every cycle:
//  - a context loads in exactly 5 words per tile while the current context
//    keeps computing, and the previous context comes out on conf_out;
//  - a swap exchanges routing at once and the logic cells bit by bit over
//    20 cycles (busy high), the fabric computing with the partly swapped
//    configuration meanwhile;
//  - swapping in the context already running changes nothing.
module tb_config_domain;
  import efpga_model_pkg::*;

  localparam int unsigned ROWS = 3, COLS = 4, NT = ROWS * COLS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [COLS-1:0] north_in = '0, north_out, south_in = '0, south_out;
  logic [ROWS-1:0] west_in = '0, west_out, east_in = '0, east_out;
  logic [COLS-1:0] carry_in = '0, carry_out;
  logic ram_we = 1'b0, user_rst = 1'b0;
  logic conf_shift = 1'b0, swap = 1'b0, busy;
  logic [W-1:0] conf_in = '0, conf_out;

  int checks = 0, failures = 0;
  int n_loads = 0, n_swaps = 0, n_identical = 0, n_ram_writes = 0, n_checked_in_swap = 0;

  config_domain #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  fabric_model m;
  tile_ctx_t   duck_ctx[];   // what the DUCKs hold
  tile_ctx_t   old_lc[], new_lc[];
  int          swap_phase;   // -1: no swap in progress, else bits done
  bit          model_valid;  // routing follows a rand_ctx context

  // drive random edge inputs, check outputs, then advance one clock
  task automatic step(input bit allow_we);
    logic ni[], si[], ei[], wi[], ci[];
    ni = new[COLS]; si = new[COLS]; ci = new[COLS]; ei = new[ROWS]; wi = new[ROWS];
    north_in = COLS'($urandom); south_in = COLS'($urandom); carry_in = COLS'($urandom);
    east_in  = ROWS'($urandom); west_in  = ROWS'($urandom);
    ram_we   = allow_we ? 1'($urandom) : 1'b0;
    user_rst = ($urandom_range(0, 15) == 0);
    foreach (ni[i]) begin ni[i] = north_in[i]; si[i] = south_in[i]; ci[i] = carry_in[i]; end
    foreach (ei[i]) begin ei[i] = east_in[i]; wi[i] = west_in[i]; end
    // logic-cell configuration during a swap: first swap_phase bits new
    if (swap_phase >= 0)
      foreach (m.cfg[k])
        for (int b = 0; b < 20; b++)
          m.cfg[k].lc[b] = (b < swap_phase) ? new_lc[k].lc[b] : old_lc[k].lc[b];
    m.eval(ni, si, ei, wi, ci);
    #1;
    if (model_valid) for (int c = 0; c < COLS; c++) begin
      check(north_out[c] == m.north_out[c], "north edge");
      check(south_out[c] == m.south_out[c], "south edge");
      check(carry_out[c] == m.carry_out[c], "carry out");
    end
    if (model_valid) for (int r = 0; r < ROWS; r++) begin
      check(east_out[r] == m.east_out[r], "east edge");
      check(west_out[r] == m.west_out[r], "west edge");
    end
    if (swap_phase >= 0) n_checked_in_swap++;
    foreach (m.cfg[k]) if (m.cfg[k].lc[19] && ram_we) n_ram_writes++;
    m.clock(ram_we, user_rst);
    @(negedge clk);
  endtask

  // shift a full domain context in while the fabric runs
  task automatic load(input tile_ctx_t nxt[]);
    int cycles;
    cycles = 0;
    for (int k = 0; k < NT * TILE_WORDS; k++) begin
      check(conf_out == stream_word(duck_ctx, k), "readback of previous context");
      conf_shift = 1'b1;
      conf_in = stream_word(nxt, k);
      step(1'b1);
      cycles++;
    end
    conf_shift = 1'b0;
    check(cycles == 5 * NT, "load takes 5 words per tile");
    duck_ctx = nxt;
    n_loads++;
  endtask

  task automatic do_swap();
    int n;
    old_lc = m.cfg;
    new_lc = duck_ctx;
    duck_ctx = m.cfg;
    swap = 1'b1;
    step(1'b0);                 // edge 0: routing exchanged, busy rises
    swap = 1'b0;
    foreach (m.cfg[k]) m.cfg[k].dy = new_lc[k].dy;
    model_valid = 1'b1;
    swap_phase = 0;
    n = 0;
    while (busy) begin
      n++;
      step(1'b0);               // one logic-cell bit per edge
      swap_phase++;
    end
    check(n == 20, "logic-cell exchange takes 20 cycles");
    swap_phase = -1;
    foreach (m.cfg[k]) m.cfg[k] = new_lc[k];
    // the old context's cells return exactly as they ran
    foreach (duck_ctx[k]) duck_ctx[k].lc = old_lc[k].lc;
    n_swaps++;
  endtask

  tile_ctx_t ctx[];

  initial begin
    m = new(ROWS, COLS);
    duck_ctx = new[NT];
    ctx = new[NT];
    foreach (duck_ctx[k]) duck_ctx[k] = '0;
    swap_phase = -1;
    model_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset routing can form loops: start from a loop-free context
    for (int t = 0; t < 6; t++) begin
      foreach (ctx[k]) ctx[k] = rand_ctx(1'b1);
      load(ctx);
      do_swap();
      // settle registers to known values with the fresh context
      user_rst = 1'b1;
      repeat (10) step(1'b1);
      if (t == 3) begin
        // identical context: load what runs and swap it in
        ctx = m.cfg;
        load(ctx);
        do_swap();
        n_identical++;
        repeat (5) step(1'b1);
      end
    end
    check(n_loads > 0 && n_swaps > 0 && n_identical > 0 && n_ram_writes > 0
          && n_checked_in_swap > 0, "every mechanism exercised");
    $display("loads=%0d swaps=%0d identical=%0d ram_writes=%0d cycles_checked_in_swap=%0d",
             n_loads, n_swaps, n_identical, n_ram_writes, n_checked_in_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
