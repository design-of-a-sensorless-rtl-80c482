`timescale 1ns/1ps
// tb_algo_adc: converts a set of voltages and checks the 12-bit code against
// floor(vin/VREF*4096), clipped, and that the result is ready 13 clocks after start (12 bit steps).
module tb_algo_adc;
  logic clk = 0, rst_n = 0, start = 0;
  real vin;
  logic [11:0] dout;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  algo_adc #(.N(12), .VREF(3.3)) dut (.*);

  task automatic conv(input real v);
    int exp, lat;
    vin = v;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!valid);
    exp = (v <= 0.0) ? 0 : (v >= 3.3 ? 4095 : $rtoi(v / 3.3 * 4096.0));
    if (exp > 4095) exp = 4095;
    checks++;
    if (int'(dout) - exp > 1 || exp - int'(dout) > 1) begin
      failures++; $display("FAIL vin=%f code=%0d expected %0d", v, dout, exp);
    end
    checks++;
    if (lat != 13) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    #22 rst_n = 1;
    conv(0.0); conv(1.65); conv(3.29); conv(0.001); conv(2.5); conv(3.5); conv(-0.2);
    for (int i = 0; i < 30; i++) conv($urandom_range(3300) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
