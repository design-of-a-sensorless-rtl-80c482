`timescale 1ns/1ps
// tb_phase_shifter: drives a square zero-crossing signal z whose level
// changes every H samples (60 electrical degrees) and checks that each
// commutation comes ceil(H*gi/gd) samples after the level change (30 degrees
// for gd = 2*gi, 20 degrees for gd = 3*gi), for several speeds. Also checks
// clamping at L, robustness to a short wrong zero crossing, and that z is
// ignored while mask is high.
module tb_phase_shifter;
  logic clk = 0, rst_n = 0;
  logic sample = 0, z = 0, mask = 0;
  logic [15:0] gi, gd, cp, cn;
  logic comm, comm_p;
  int checks = 0, failures = 0;
  int sidx = 0;          // sample counter
  int last_comm = -1;
  int ncomm = 0;

  always #5 clk = ~clk;

  phase_shifter #(.L(16'd60000)) dut (.*);

  // one sample tick every 4 clocks
  always begin
    repeat (3) @(posedge clk);
    sample <= 1;
    @(posedge clk);
    sample <= 0;
    sidx++;
  end

  always @(posedge clk) if (comm) begin
    last_comm = sidx;
    ncomm++;
  end

  task automatic samples(input int n);
    repeat (n) @(negedge sample);
  endtask

  // run a square wave of half-period h samples and check every commutation
  task automatic run_square(input int h, input int g_i, input int g_d, input int edges);
    int m, k0;
    gi = 16'(g_i); gd = 16'(g_d);
    m = (h * g_i + g_d - 1) / g_d;          // samples to count back to zero
    for (int e = 0; e < edges; e++) begin
      @(negedge sample);
      z = ~z;
      k0 = sidx;                             // next sample sees the new level
      last_comm = -1;
      samples(h - 1);
      if (e >= 6) begin
        checks++;
        if (last_comm - k0 != m) begin
          failures++;
          $display("FAIL h=%0d gi=%0d gd=%0d: commutation %0d samples after edge, expected %0d",
                   h, g_i, g_d, last_comm - k0, m);
        end
      end
    end
  endtask

  initial begin
    gi = 20; gd = 40;
    #22 rst_n = 1;
    run_square(100, 20, 40, 12);   // 30 degrees
    run_square(37, 20, 40, 12);
    run_square(500, 20, 40, 12);
    run_square(90, 20, 60, 12);    // 10 degree advance: 20 degrees after edge
    run_square(90, 20, 30, 12);    // 10 degree retard: 40 degrees after edge
    // clamp at L: 5000 samples * 20 exceeds L = 60000
    gi = 20; gd = 40;
    @(negedge sample); z = ~z;
    samples(5000);
    checks++;
    if ((z && cp != 16'd60000) || (!z && cn != 16'd60000)) begin
      failures++; $display("FAIL clamp at L: cp=%0d cn=%0d", cp, cn);
    end
    // back to a regular wave, with a wrong short zero crossing (Fig. 5c style)
    run_square(100, 20, 40, 4);
    @(negedge sample); z = ~z;            // edge 0
    samples(10); z = ~z; samples(3); z = ~z;  // glitch of 3 samples
    samples(87);
    @(negedge sample); z = ~z;            // edge 1
    samples(100);
    run_square(100, 20, 40, 4);           // errors vanish at later commutations
    // mask: z changes while masked are ignored
    ncomm = 0;
    @(negedge sample); mask = 1;
    repeat (6) begin z = ~z; samples(100); end
    mask = 0;
    checks++;
    if (ncomm > 1) begin failures++; $display("FAIL mask: %0d commutations while masked", ncomm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
