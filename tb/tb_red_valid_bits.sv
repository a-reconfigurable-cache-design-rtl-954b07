// tb_red_valid_bits: self-checking testbench of red_valid_bits.
// Checks that reset clears every bit, then applies random sets and clears
// (mirrored in a shadow array), reading all 256 sets after each of a
// number of writes, and finally that a second reset clears everything.
`timescale 1ns/1ps
module tb_red_valid_bits;
  import rabed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0, w_valid = 0;
  logic [1:0] w_way = '0;
  logic [7:0] w_index = '0, r_index = '0;
  logic [3:0] r_valid;
  int checks = 0, failures = 0;
  logic [3:0] shadow [256];

  always #5 clk = ~clk;
  red_valid_bits dut (.*);

  task automatic check_all();
    for (int s = 0; s < 256; s++) begin
      r_index = 8'(s);
      #0.1;
      checks++;
      if (r_valid !== shadow[s]) begin
        failures++;
        if (failures < 10) $display("FAIL set %0d: %b vs %b", s, r_valid, shadow[s]);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 256; s++) shadow[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom % 8) != 0;
      w_way = 2'($urandom);
      w_index = 8'($urandom % 32);
      w_valid = ($urandom % 3) != 0;
      @(posedge clk);
      #1;
      if (we) shadow[w_index][w_way] = w_valid;
      we = 0;
      if (i % 300 == 0) check_all();
    end
    check_all();
    rst_n = 0;
    #1;
    for (int s = 0; s < 256; s++) shadow[s] = '0;
    check_all();
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
