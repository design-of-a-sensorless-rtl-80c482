`timescale 1ns/1ps
// tb_serial_if: self-checking test of the four-wire serial interface.
// Reads the reset values, writes and reads back all three parameters,
// reads the speed input, checks that a write to the read-only speed address
// and an aborted frame change nothing, and checks that a frame takes 14 SCLK.
module tb_serial_if;
  import bldc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sclk = 0, en = 1, rw = 0, data_in = 0;
  logic data_out, data_oe, wr_strobe;
  logic signed [11:0] dth, dtheta, speed;
  logic [11:0] gi;
  int checks = 0, failures = 0;
  int sclk_count = 0;

  always #5 clk = ~clk;

  serial_if dut (.*);

  always @(posedge sclk) if (!en) sclk_count++;

  task automatic check(input string what, input logic [11:0] got, input logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one frame: 2 address bits then 12 data bits, MSB first, 14 SCLK
  task automatic xfer(input logic read, input logic [1:0] addr, input logic [11:0] wdata,
                      output logic [11:0] rdata, input int nbits = 14);
    logic [13:0] frame;
    frame = {addr, wdata};
    rdata = '0;
    rw = read;
    #200 en = 0;
    #200;
    for (int i = 0; i < nbits; i++) begin
      data_in = frame[13 - i];
      #100 sclk = 1;
      if (read && i >= 2) rdata = {rdata[10:0], data_out};
      #100 sclk = 0;
    end
    #200 en = 1;
    #400;
  endtask

  logic [11:0] r;

  initial begin
    speed = -12'sd345;
    #50 rst_n = 1;
    #100;
    xfer(1, 2'b00, 0, r); check("Dth reset", r, 12'd10);
    xfer(1, 2'b01, 0, r); check("gamma_i reset", r, 12'd20);
    xfer(1, 2'b10, 0, r); check("dtheta reset", r, 12'd0);
    sclk_count = 0;
    xfer(0, 2'b00, 12'hA5C, r);
    checks++; if (sclk_count != 14) begin failures++; $display("FAIL frame length %0d", sclk_count); end
    check("Dth write", dth, 12'hA5C);
    xfer(0, 2'b01, 12'd37, r);   check("gamma_i write", gi, 12'd37);
    xfer(0, 2'b10, -12'sd123, r); check("dtheta write", dtheta, -12'sd123);
    xfer(1, 2'b00, 0, r); check("Dth read", r, 12'hA5C);
    xfer(1, 2'b01, 0, r); check("gamma_i read", r, 12'd37);
    xfer(1, 2'b10, 0, r); check("dtheta read", r, -12'sd123);
    xfer(1, 2'b11, 0, r); check("speed read", r, -12'sd345);
    speed = 12'sd1234;
    xfer(1, 2'b11, 0, r); check("speed read 2", r, 12'sd1234);
    xfer(0, 2'b11, 12'h777, r);
    check("speed read-only", dth, 12'hA5C);
    check("speed read-only gi", gi, 12'd37);
    xfer(0, 2'b01, 12'd999, r, 9);    // aborted after 9 bits
    check("aborted write", gi, 12'd37);
    checks++; if (data_oe) begin failures++; $display("FAIL data_oe idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
