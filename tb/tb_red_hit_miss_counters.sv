// tb_red_hit_miss_counters: self-checking testbench of red_hit_miss_counters.
// Random increment pulses and occasional clears, with the counts kept
// independently in the testbench and compared every cycle; also checks
// that a clear wins over an increment in the same cycle.
`timescale 1ns/1ps
module tb_red_hit_miss_counters;
  logic clk = 0, rst_n = 0;
  logic clear = 0, inc_hit = 0, inc_miss = 0;
  logic [31:0] hits, misses;
  int checks = 0, failures = 0;
  int unsigned eh = 0, em = 0;

  always #5 clk = ~clk;
  red_hit_miss_counters dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      inc_hit = $urandom % 2;
      inc_miss = $urandom % 3 == 0;
      clear = ($urandom % 200) == 0;
      @(posedge clk);
      if (clear) begin eh = 0; em = 0; end
      else begin eh += inc_hit; em += inc_miss; end
      #1;
      checks++;
      if (hits != eh || misses != em) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d expected %0d/%0d", hits, misses, eh, em);
      end
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
