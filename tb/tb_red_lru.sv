// tb_red_lru: self-checking testbench of red_lru at full size.
// Checks the reset ages (way k has age k), then applies random updates
// (random set, block size and way) to the DUT and to a shadow model of the
// counter method, and after each update compares every set of the updated
// group and one random set, and checks that each set's ages stay a
// permutation of 0..3.
`timescale 1ns/1ps
module tb_red_lru;
  import rabed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic upd = 0;
  logic [7:0] upd_index = '0, r_index = '0;
  bsize_e upd_bsize = BS_16;
  logic [1:0] upd_way = '0;
  logic [1:0] r_age [4];
  int checks = 0, failures = 0;
  int ages [256][4];

  always #5 clk = ~clk;
  red_lru dut (.*);

  task automatic check_set(int s);
    bit [3:0] seen = '0;
    r_index = 8'(s);
    #0.1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (int'(r_age[w]) != ages[s][w]) begin
        failures++;
        if (failures < 10) $display("FAIL set %0d way %0d: %0d vs %0d", s, w, r_age[w], ages[s][w]);
      end
      seen[r_age[w]] = 1'b1;
    end
    checks++;
    if (seen != 4'hF) begin
      failures++;
      $display("FAIL set %0d ages not a permutation", s);
    end
  endtask

  initial begin
    for (int s = 0; s < 256; s++) for (int w = 0; w < 4; w++) ages[s][w] = w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 256; s++) check_set(s);
    for (int i = 0; i < 20000; i++) begin
      int n, s0;
      @(negedge clk);
      upd = ($urandom % 8) != 0;
      upd_index = 8'($urandom % 16);
      upd_bsize = bsize_e'($urandom % 4);
      upd_way = 2'($urandom);
      n = (upd_bsize == BS_16) ? 1 : (upd_bsize == BS_32) ? 2 : 4;
      s0 = int'(upd_index) / n * n;
      @(posedge clk);
      #1;
      if (upd)
        for (int s = s0; s < s0 + n; s++) begin
          int old;
          old = ages[s][upd_way];
          for (int w = 0; w < 4; w++) if (ages[s][w] < old) ages[s][w]++;
          ages[s][upd_way] = 0;
        end
      upd = 0;
      for (int s = s0; s < s0 + 4; s++) check_set(s);
      check_set($urandom % 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
