// tb_red_data_ram: self-checking testbench of red_data_ram at full size.
// Random word writes with random way masks are mirrored in a shadow array;
// after every write, random positions (and the written one) are read back
// on all four ways and compared with the shadow.
`timescale 1ns/1ps
module tb_red_data_ram;
  import rabed_pkg::*;
  logic clk = 0;
  logic [3:0] we_mask = '0;
  logic [7:0] w_index = '0, r_index = '0;
  logic [3:0] w_offset = '0, r_offset = '0;
  logic [31:0] w_data = '0;
  logic [31:0] r_data [4];
  int checks = 0, failures = 0;
  logic [31:0] shadow [4][4096];
  bit          written [4][4096];

  always #5 clk = ~clk;
  red_data_ram dut (.*);

  task automatic check_pos(logic [7:0] s, logic [3:0] o);
    r_index = s; r_offset = o;
    #1;
    for (int w = 0; w < 4; w++)
      if (written[w][{s, o}]) begin
        checks++;
        if (r_data[w] !== shadow[w][{s, o}]) begin
          failures++;
          if (failures < 10) $display("FAIL way %0d set %0d word %0d: %h vs %h", w, s, o, r_data[w], shadow[w][{s, o}]);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // concentrate on a few sets so positions are overwritten
      we_mask  = 4'($urandom);
      w_index  = ($urandom % 2) ? 8'($urandom % 8) : 8'($urandom);
      w_offset = 4'($urandom);
      w_data   = $urandom;
      @(posedge clk);
      #1;
      for (int w = 0; w < 4; w++)
        if (we_mask[w]) begin
          shadow[w][{w_index, w_offset}] = w_data;
          written[w][{w_index, w_offset}] = 1;
        end
      we_mask = '0;
      check_pos(w_index, w_offset);
      check_pos(8'($urandom % 8), 4'($urandom));
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
