// tb_efpga_top: end-to-end testbench of efpga_top at reduced size.
//
// Three domains of 2 x 3 tiles (six tile rows, 30 path words per domain
// context) run random loop-free contexts against the cycle model in
// efpga_model_pkg; every fabric edge output is checked on every cycle,
// including while contexts load and while they are swapped. The sequence
// exercises and counts each reconfiguration mechanism:
//  - loading all domains in parallel while the fabric computes (the load
//    takes 5 words per tile of one domain, whatever the number of domains);
//  - a full swap (routing at once, logic cells over 20 cycles, busy);
//  - a partial swap of one domain while the others keep their context;
//  - readback of the preempted context on conf_out (each domain);
//  - swapping in the running context, which disturbs nothing;
//  - RAM-mode writes, user resets and the carry chain across domains.
module tb_efpga_top;
  import efpga_model_pkg::*;

  localparam int unsigned D = 3, RPD = 2, COLS = 3;
  localparam int unsigned ROWS = D * RPD, NTD = RPD * COLS, NT = D * NTD;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [D-1:0] conf_shift = '0, swap = '0, busy;
  logic [D-1:0][W-1:0] conf_in = '0, conf_out;
  logic [COLS-1:0] north_in = '0, north_out, south_in = '0, south_out;
  logic [ROWS-1:0] west_in = '0, west_out, east_in = '0, east_out;
  logic [COLS-1:0] carry_in = '0, carry_out;
  logic ram_we = 1'b0, user_rst = 1'b0;

  int checks = 0, failures = 0;
  int n_parallel_loads = 0, n_full_swaps = 0, n_partial_swaps = 0, n_readback_words = 0;
  int n_identical = 0, n_ram_writes = 0, n_user_rst = 0, n_carry_chain = 0;
  int n_checked_in_load = 0, n_checked_in_swap = 0;

  efpga_top #(.DOMAINS(D), .ROWS_PER_DOMAIN(RPD), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
  tile_ctx_t   duck_ctx[];            // DUCK contents, whole fabric
  tile_ctx_t   old_c[], new_c[];
  int          phase[D];              // -1 or logic-cell bits swapped so far
  bit          model_valid;

  function automatic ctx_arr_t slice_of(tile_ctx_t a[], int d);
    ctx_arr_t s;
    s = new[NTD];
    foreach (s[i]) s[i] = a[d*NTD + i];
    return s;
  endfunction

  task automatic step(input bit allow_we);
    logic ni[], si[], ei[], wi[], ci[];
    bit in_swap;
    ni = new[COLS]; si = new[COLS]; ci = new[COLS]; ei = new[ROWS]; wi = new[ROWS];
    north_in = COLS'($urandom); south_in = COLS'($urandom); carry_in = COLS'($urandom);
    east_in  = ROWS'($urandom); west_in  = ROWS'($urandom);
    ram_we   = allow_we ? 1'($urandom) : 1'b0;
    user_rst = ($urandom_range(0, 15) == 0);
    foreach (ni[i]) begin ni[i] = north_in[i]; si[i] = south_in[i]; ci[i] = carry_in[i]; end
    foreach (ei[i]) begin ei[i] = east_in[i]; wi[i] = west_in[i]; end
    in_swap = 1'b0;
    for (int d = 0; d < D; d++) if (phase[d] >= 0) begin
      in_swap = 1'b1;
      for (int k = d*NTD; k < (d+1)*NTD; k++)
        for (int b = 0; b < 20; b++)
          m.cfg[k].lc[b] = (b < phase[d]) ? new_c[k].lc[b] : old_c[k].lc[b];
    end
    m.eval(ni, si, ei, wi, ci);
    #1;
    if (model_valid) begin
      for (int c = 0; c < COLS; c++) begin
        check(north_out[c] == m.north_out[c], "north edge");
        check(south_out[c] == m.south_out[c], "south edge");
        check(carry_out[c] == m.carry_out[c], "carry out");
      end
      for (int r = 0; r < ROWS; r++) begin
        check(east_out[r] == m.east_out[r], "east edge");
        check(west_out[r] == m.west_out[r], "west edge");
      end
      if (in_swap) n_checked_in_swap++;
      if (|conf_shift) n_checked_in_load++;
    end
    foreach (m.cfg[k]) begin
      if (m.cfg[k].lc[19] && ram_we) n_ram_writes++;
      // a carry crossing from one domain into the next
      if (k >= NTD && (k % NTD) < COLS && m.cfg[k].lc[18] && m.cfg[k-COLS].lc[18])
        n_carry_chain++;
    end
    if (user_rst) n_user_rst++;
    m.clock(ram_we, user_rst);
    @(negedge clk);
  endtask

  // load the given domains' parts of nxt in parallel, reading back the old
  task automatic load(input logic [D-1:0] mask, input tile_ctx_t nxt[]);
    int cycles;
    cycles = 0;
    for (int k = 0; k < NTD * TILE_WORDS; k++) begin
      for (int d = 0; d < D; d++) if (mask[d]) begin
        check(conf_out[d] == stream_word(slice_of(duck_ctx, d), k), "readback");
        n_readback_words++;
        conf_shift[d] = 1'b1;
        conf_in[d] = stream_word(slice_of(nxt, d), k);
      end
      step(1'b1);
      cycles++;
    end
    conf_shift = '0;
    check(cycles == 5 * NTD, "a load takes 5 words per tile of one domain");
    for (int d = 0; d < D; d++) if (mask[d])
      for (int k = d*NTD; k < (d+1)*NTD; k++) duck_ctx[k] = nxt[k];
    if (mask == '1) n_parallel_loads++;
  endtask

  task automatic do_swap(input logic [D-1:0] mask);
    int n;
    old_c = m.cfg;
    new_c = m.cfg;
    for (int d = 0; d < D; d++) if (mask[d])
      for (int k = d*NTD; k < (d+1)*NTD; k++) begin
        new_c[k] = duck_ctx[k];
        duck_ctx[k] = m.cfg[k];
      end
    swap = mask;
    step(1'b0);
    swap = '0;
    foreach (m.cfg[k]) m.cfg[k].dy = new_c[k].dy;
    model_valid = 1'b1;
    for (int d = 0; d < D; d++) if (mask[d]) phase[d] = 0;
    n = 0;
    while (|busy) begin
      check(busy == mask, "busy only in swapped domains");
      n++;
      step(1'b0);
      for (int d = 0; d < D; d++) if (mask[d]) phase[d]++;
    end
    check(n == 20, "logic-cell exchange takes 20 cycles");
    for (int d = 0; d < D; d++) phase[d] = -1;
    m.cfg = new_c;
    if (mask == '1) n_full_swaps++;
    else n_partial_swaps++;
  endtask

  tile_ctx_t ctx[];

  initial begin
    m = new(ROWS, COLS);
    duck_ctx = new[NT];
    ctx = new[NT];
    foreach (duck_ctx[k]) duck_ctx[k] = '0;
    for (int d = 0; d < D; d++) phase[d] = -1;
    model_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      // all domains: load in parallel, swap together
      foreach (ctx[k]) begin
        ctx[k] = rand_ctx(1'b1);
        ctx[k].lc[18] = ($urandom_range(0, 1) == 0);   // plenty of carry chains
      end
      load('1, ctx);
      do_swap('1);
      repeat (8) step(1'b1);
      // one domain alone: partial reconfiguration
      begin
        int d;
        d = $urandom_range(0, D-1);
        foreach (ctx[k]) ctx[k] = rand_ctx(1'b1);
        load(D'(1) << d, ctx);
        do_swap(D'(1) << d);
        repeat (8) step(1'b1);
        // swap it back: the preempted context resumes
        do_swap(D'(1) << d);
        repeat (8) step(1'b1);
      end
      if (t == 2) begin
        // identical context in every domain
        ctx = m.cfg;
        load('1, ctx);
        do_swap('1);
        n_identical++;
        repeat (8) step(1'b1);
      end
    end
    $display("parallel_loads=%0d full_swaps=%0d partial_swaps=%0d readback_words=%0d",
             n_parallel_loads, n_full_swaps, n_partial_swaps, n_readback_words);
    $display("identical_swaps=%0d ram_writes=%0d user_resets=%0d carry_links=%0d",
             n_identical, n_ram_writes, n_user_rst, n_carry_chain);
    $display("cycles_checked_while_loading=%0d cycles_checked_while_swapping=%0d",
             n_checked_in_load, n_checked_in_swap);
    check(n_parallel_loads > 0, "parallel load happened");
    check(n_full_swaps > 0, "full swap happened");
    check(n_partial_swaps > 0, "partial swap happened");
    check(n_readback_words > 0, "readback happened");
    check(n_identical > 0, "identical swap happened");
    check(n_ram_writes > 0, "RAM write happened");
    check(n_user_rst > 0, "user reset happened");
    check(n_carry_chain > 0, "carry across domains happened");
    check(n_checked_in_load > 0 && n_checked_in_swap > 0, "computing during load and swap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
