// tb_red_tag_ram: self-checking testbench of red_tag_ram at full size.
// Random tag writes (random way, set concentrated on a few sets) are
// mirrored in a shadow array; each write is followed by reading the written
// set and a random set on all ways and comparing with the shadow.
`timescale 1ns/1ps
module tb_red_tag_ram;
  import rabed_pkg::*;
  logic clk = 0;
  logic we = 0;
  logic [1:0] w_way = '0;
  logic [7:0] w_index = '0, r_index = '0;
  logic [11:0] w_tag = '0;
  logic [11:0] r_tag [4];
  int checks = 0, failures = 0;
  logic [11:0] shadow [4][256];
  bit written [4][256];

  always #5 clk = ~clk;
  red_tag_ram dut (.*);

  task automatic check_set(logic [7:0] s);
    r_index = s;
    #1;
    for (int w = 0; w < 4; w++)
      if (written[w][s]) begin
        checks++;
        if (r_tag[w] !== shadow[w][s]) begin
          failures++;
          if (failures < 10) $display("FAIL way %0d set %0d: %h vs %h", w, s, r_tag[w], shadow[w][s]);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      w_way = 2'($urandom);
      w_index = ($urandom % 2) ? 8'($urandom % 4) : 8'($urandom);
      w_tag = 12'($urandom);
      @(posedge clk);
      #1;
      if (we) begin
        shadow[w_way][w_index] = w_tag;
        written[w_way][w_index] = 1;
      end
      we = 0;
      check_set(w_index);
      check_set(8'($urandom % 4));
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
