// efpga_model_pkg: reference model of the fabric used by the testbenches.
//
// Written from the fabric's rules, independently of the RTL: the DyRIBox
// selection rule (output j, select s -> input (j+1+s) mod 5), the logic-cell
// LUT/carry equations, and the layout of a tile context on the 6-bit
// configuration path (30 bits, logic cell [29:10], DyRIBox [9:0]).
package efpga_model_pkg;

  localparam int unsigned W = 6;
  localparam int unsigned TILE_BITS = 30;
  localparam int unsigned TILE_WORDS = TILE_BITS / W;

  typedef struct packed {
    logic [19:0] lc;   // {ram_mode, carry_sel, seq_sel, ff_init, lut[15:0]}
    logic [9:0]  dy;   // output j select at [2j +: 2]
  } tile_ctx_t;

  typedef tile_ctx_t ctx_arr_t[];

  // DyRIBox output j given the five inputs {lc, W, S, E, N} (index 0..4)
  function automatic logic dy_out(input logic [9:0] dy, input int j, input logic [4:0] ins);
    int s;
    s = int'(dy[2*j +: 2]);
    return ins[(j + 1 + s) % 5];
  endfunction

  function automatic logic lut_out(input logic [19:0] lc, input logic [3:0] in);
    return lc[in];
  endfunction

  function automatic logic lc_sum(input logic [19:0] lc, input logic [3:0] in, input logic cin);
    return lc[in] ^ (lc[18] & cin);
  endfunction

  function automatic logic lc_cout(input logic [19:0] lc, input logic [3:0] in, input logic cin);
    return lc[in] ? (lc[18] & cin) : in[0];
  endfunction

  // word k (k = 0 first) that must be shifted in so that a chain of
  // tile contexts ends up holding them; tiles[0] is nearest to conf_in.
  function automatic logic [W-1:0] stream_word(input tile_ctx_t tiles[], input int k);
    int n, bit_hi;
    logic [W-1:0] w;
    n = tiles.size();
    // the chain as one register of n*30 bits: tile i occupies bits
    // [30*i +: 30]; the word entered first ends in the top word
    bit_hi = n * TILE_BITS - 1 - W * k;
    for (int b = 0; b < W; b++) begin
      int g;
      g = bit_hi - b;
      w[W-1-b] = tiles[g / TILE_BITS][g % TILE_BITS];
    end
    return w;
  endfunction

  // Random context whose routing cannot close a combinational loop: the
  // east output takes the west input or the cell, the north output the south
  // input or the cell, the west output the east input and the south output
  // the north input. The cell's data input may take any side.
  function automatic tile_ctx_t rand_ctx(input bit allow_ram);
    tile_ctx_t c;
    c.lc = 20'($urandom);
    if (!allow_ram || ($urandom_range(0, 3) != 0)) c.lc[19] = 1'b0;
    c.dy[1:0] = $urandom_range(0, 1) ? 2'd1 : 2'd3;   // N <- S or cell
    c.dy[3:2] = $urandom_range(0, 1) ? 2'd1 : 2'd2;   // E <- W or cell
    c.dy[5:4] = 2'd2;                                 // S <- N
    c.dy[7:6] = 2'd2;                                 // W <- E
    c.dy[9:8] = 2'($urandom);                         // cell data <- any side
    return c;
  endfunction

  // Cycle model of a rows x cols fabric (row 0 south) running contexts made
  // by rand_ctx. Tile (r, c) is index r*cols + c.
  class fabric_model;
    int rows, cols;
    tile_ctx_t cfg[];
    logic      ff[];
    logic      sum[], wd[];
    logic [3:0] tin[];
    logic north_out[], south_out[], east_out[], west_out[], carry_out[];

    function new(int r, int c);
      rows = r; cols = c;
      cfg = new[r*c]; ff = new[r*c]; sum = new[r*c]; wd = new[r*c]; tin = new[r*c];
      foreach (cfg[i]) begin cfg[i] = '0; ff[i] = 1'b0; end
      north_out = new[c]; south_out = new[c]; carry_out = new[c];
      east_out = new[r]; west_out = new[r];
    endfunction

    // settle the combinational fabric for the given edge inputs
    function void eval(logic north_in[], logic south_in[], logic east_in[],
                       logic west_in[], logic carry_in[]);
      logic outn[], oute[], couts[];
      outn = new[rows*cols]; oute = new[rows*cols]; couts = new[rows*cols];
      for (int r = 0; r < rows; r++) begin
        for (int c = 0; c < cols; c++) begin
          int k;
          logic [3:0] in;
          logic ci, lo;
          k = r*cols + c;
          in[0] = north_in[c];                               // via S<-N chain
          in[1] = east_in[r];                                // via W<-E chain
          in[2] = (r == 0) ? south_in[c] : outn[k-cols];
          in[3] = (c == 0) ? west_in[r]  : oute[k-1];
          ci    = (r == 0) ? carry_in[c] : couts[k-cols];
          tin[k]   = in;
          sum[k]   = lc_sum(cfg[k].lc, in, ci);
          couts[k] = lc_cout(cfg[k].lc, in, ci);
          lo       = cfg[k].lc[17] ? ff[k] : sum[k];
          outn[k]  = dy_out(cfg[k].dy, 0, {lo, in});
          oute[k]  = dy_out(cfg[k].dy, 1, {lo, in});
          wd[k]    = dy_out(cfg[k].dy, 4, {lo, in});
        end
      end
      for (int c = 0; c < cols; c++) begin
        north_out[c] = outn[(rows-1)*cols + c];
        carry_out[c] = couts[(rows-1)*cols + c];
        south_out[c] = north_in[c];
      end
      for (int r = 0; r < rows; r++) begin
        east_out[r] = oute[r*cols + cols - 1];
        west_out[r] = east_in[r];
      end
    endfunction

    // clock edge, after eval with the inputs present at the edge
    function void clock(logic ram_we, logic user_rst);
      foreach (cfg[k]) begin
        ff[k] = user_rst ? cfg[k].lc[16] : sum[k];
        if (cfg[k].lc[19] && ram_we) cfg[k].lc[tin[k]] = wd[k];
      end
    endfunction
  endclass

endpackage
