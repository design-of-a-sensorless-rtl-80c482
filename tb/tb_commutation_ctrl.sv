`timescale 1ns/1ps
// tb_commutation_ctrl: checks the six-step table against an independent
// list of conducting phase pairs, the step sources per mode (start-up steps
// only while stepping, phase shifter commutations only when sensorless),
// alignment, idle, PWM chopping of the upper switches, brake and FG.
module tb_commutation_ctrl;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic step_open = 0, comm = 0, pwm = 1, brake = 0;
  logic [2:0] step, hall;
  gates_t gates;
  phase_sel_e next_sel;
  logic fg, advanced;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  commutation_ctrl dut (.*);

  // expected conducting phases per step: source (+) and sink (-), 0=a 1=b 2=c
  int hi[6] = '{0, 0, 1, 1, 2, 2};
  int lo[6] = '{1, 2, 2, 0, 0, 1};

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (step %0d gates %b)", what, step, gates); end
  endtask

  function automatic logic [5:0] exp_gates(input int s, input logic p);
    logic [5:0] g = '0;
    g[5 - 2 * hi[s]] = p;      // upper switch of the source phase
    g[4 - 2 * lo[s]] = 1'b1;   // lower switch of the sink phase
    return g;
  endfunction

  task automatic pulse_open();
    @(posedge clk); step_open <= 1; @(posedge clk); step_open <= 0; @(posedge clk);
  endtask

  task automatic pulse_comm();
    @(posedge clk); comm <= 1; @(posedge clk); comm <= 0; @(posedge clk);
  endtask

  int fg_edges;
  logic fg_d;
  always @(posedge clk) begin fg_d <= fg; if (fg != fg_d) fg_edges++; end

  initial begin
    mode = MODE_IDLE;
    #22 rst_n = 1;
    @(posedge clk);
    chk("idle gates off", gates == '0);
    mode = MODE_ALIGN;
    @(posedge clk); #1;
    chk("align step", step == 3'd0 && gates == exp_gates(0, 1));
    pulse_comm();
    chk("comm ignored in align", step == 3'd0);
    mode = MODE_STEPPING;
    fg_edges = 0;
    for (int k = 1; k <= 12; k++) begin
      pulse_open();
      #1;
      chk($sformatf("stepping step %0d", k), step == 3'(k % 6));
      chk("stepping gates", gates == exp_gates(k % 6, 1));
      chk("non-excited phase", int'(next_sel) == 3 - hi[k % 6] - lo[k % 6]);
    end
    chk("fg toggles every step", fg_edges == 12);
    pulse_comm();
    chk("comm ignored while stepping", step == 3'd0);
    mode = MODE_SENSORLESS;
    pulse_open();
    chk("start-up step ignored when sensorless", step == 3'd0);
    for (int k = 1; k <= 6; k++) begin
      pulse_comm();
      chk("sensorless advance", step == 3'(k % 6) && gates == exp_gates(k % 6, 1));
      pwm = 0; #1;
      chk("pwm off: upper switches off", gates == exp_gates(k % 6, 0));
      pwm = 1;
    end
    // hall pattern: each signal high for three consecutive steps
    begin
      int ones[3] = '{0, 0, 0};
      for (int k = 0; k < 6; k++) begin
        pulse_comm();
        for (int j = 0; j < 3; j++) ones[j] += hall[2 - j];
      end
      chk("hall duty", ones[0] == 3 && ones[1] == 3 && ones[2] == 3);
    end
    brake = 1; #1;
    chk("brake: lower on, upper off", gates == 6'b01_01_01);
    brake = 0;
    mode = MODE_IDLE;
    @(posedge clk); #1;
    chk("idle returns to align step", gates == '0);
    @(posedge clk); #1;
    chk("idle step", step == 3'd0);
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
