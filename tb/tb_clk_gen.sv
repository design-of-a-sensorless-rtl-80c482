`timescale 1ns/1ps
// tb_clk_gen: checks that clk1 and clk2 (and clk1a and clk2a) never overlap,
// that clk1a turns off TD2 before clk1, and that each clock pulses once per
// input period.
module tb_clk_gen;
  logic clkin = 0, clk1, clk2, clk1a, clk2a;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, overlaps = 0;
  realtime t1a_fall, t1_fall, t2_fall, gap_min = 1s;

  clk_gen #(.TD1(5ns), .TD2(5ns)) dut (.*);

  always #250 clkin = ~clkin;
  always @(posedge clk1) n1++;
  always @(posedge clk2) n2++;
  always @(negedge clk1a) t1a_fall = $realtime;
  always @(negedge clk1) t1_fall = $realtime;
  always @(negedge clk2) t2_fall = $realtime;
  always @(posedge clk1a) if ($realtime - t2_fall < gap_min) gap_min = $realtime - t2_fall;
  always @(clk1 or clk2 or clk1a or clk2a) begin
    #0;
    if ((clk1 && clk2) || (clk1a && clk2a)) begin overlaps++; if (overlaps < 4) $display("overlap at %t: %b%b%b%b", $realtime, clk1, clk2, clk1a, clk2a); end
  end

  initial begin
    #10_100;
    checks++;
    if (overlaps != 0) begin failures++; $display("FAIL %0d overlaps", overlaps); end
    checks++;
    if (n1 < 19 || n1 > 21 || n2 < 19 || n2 > 21) begin failures++; $display("FAIL pulses %0d %0d", n1, n2); end
    checks++;
    if (t1_fall - t1a_fall != 5ns) begin failures++; $display("FAIL advance %t", t1_fall - t1a_fall); end
    checks++;
    if (gap_min != 5ns) begin failures++; $display("FAIL clk2 fall to clk1a rise %t", gap_min); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
