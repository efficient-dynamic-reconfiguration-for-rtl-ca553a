// tb_dyribox: self-checking testbench for dyribox.
//
// Uses an 8-bit wide box with the tile's 5 x 5 ports and P = 4, plus a
// 16-bit box with P = 5 (five ports, every output reaching every input)
// to check the generic selection rule. Random configurations are loaded
// through cfg_load; every output is compared with the input the rule
// "output j, select s -> input (j + 1 + s) mod N" names, worked out here.
module tb_dyribox;
  localparam int unsigned B = 8, N = 5, M = 5, P = 4, PW = 2;
  localparam int unsigned B2 = 16, P2 = 5, PW2 = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [B-1:0]  in_data  [N];
  logic [B-1:0]  out_data [M];
  logic          cfg_load = 1'b0;
  logic [M*PW-1:0] cfg_d = '0, cfg_q;
  logic [B2-1:0] in2  [N];
  logic [B2-1:0] out2 [M];
  logic          load2 = 1'b0;
  logic [M*PW2-1:0] cfg2_d = '0, cfg2_q;

  int checks = 0, failures = 0;

  dyribox #(.B(B), .N_IN(N), .M_OUT(M), .P(P)) dut (
    .clk, .rst_n, .in_data, .out_data, .cfg_load, .cfg_d, .cfg_q);
  dyribox #(.B(B2), .N_IN(N), .M_OUT(M), .P(P2)) dut2 (
    .clk, .rst_n, .in_data(in2), .out_data(out2), .cfg_load(load2),
    .cfg_d(cfg2_d), .cfg_q(cfg2_q));

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

  initial begin
    for (int i = 0; i < N; i++) begin in_data[i] = '0; in2[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg_q == '0, "reset clears configuration");
    for (int t = 0; t < 300; t++) begin
      logic [M*PW-1:0]  c1;
      logic [M*PW2-1:0] c2;
      c1 = (M*PW)'($urandom);
      c2 = (M*PW2)'($urandom);
      cfg_d <= c1; cfg_load <= 1'b1;
      cfg2_d <= c2; load2 <= 1'b1;
      @(negedge clk);
      cfg_load <= 1'b0; load2 <= 1'b0;
      check(cfg_q == c1 && cfg2_q == c2, "configuration loaded in one cycle");
      for (int v = 0; v < 4; v++) begin
        for (int i = 0; i < N; i++) begin
          in_data[i] = B'($urandom);
          in2[i]     = B2'($urandom);
        end
        #1;
        for (int j = 0; j < M; j++) begin
          int unsigned s1, s2;
          s1 = c1[j*PW +: PW];
          s2 = c2[j*PW2 +: PW2];
          check(out_data[j] == in_data[(j + 1 + s1) % N], "P=4 routing");
          if (s2 < P2) check(out2[j] == in2[(j + 1 + s2) % N], "P=5 routing");
          else         check(out2[j] == '0, "unused select drives 0");
        end
        // configuration holds while cfg_load is low
        cfg_d <= ~c1;
        @(negedge clk);
        check(cfg_q == c1, "configuration held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
