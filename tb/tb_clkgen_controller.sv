// Self-checking testbench of the clock-generator controller. A model of the
// delay line stands in for the analog loop: the line is "too short"
// (LEAD) when C is below a target X, otherwise LAG. Checks the state
// sequence and its cycle counts (1 PVT cycle, 12 SAR cycles), the one-cycle
// oscillator enable, the SAR result (the largest C below X, computed here),
// the two-cycle RST_PD pattern, Lock tracking by single steps after X
// moves (as with a temperature drift), and saturation at 0 and 63.
`timescale 1ns / 1ps
module tb_clkgen_controller;
  import clkgen_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, lead, lag;
  clkgen_state_e state;
  logic [5:0] c_code;
  logic osc_en, rst_pd_n, locked;
  int checks = 0, failures = 0;
  int target = 38;

  clkgen_controller dut (.clk, .rst_n, .lead, .lag, .state, .c_code, .osc_en,
                         .rst_pd_n, .locked);

  always #50 clk = ~clk;

  // Loop model: result valid while the detector is released.
  always_comb begin
    lead = rst_pd_n && (int'(c_code) < target);
    lag  = rst_pd_n && !(int'(c_code) < target);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one acquisition to the given target and return the locked code.
  task automatic acquire(input int x);
    int osc_cycles;
    target = x;
    #3 rst_n = 1'b0;
    #3 rst_n = 1'b1;
    check(state == ST_RESET && !locked, "reset state");
    @(posedge clk); #1;
    check(state == ST_PVT && osc_en, "PVT with oscillator on");
    @(posedge clk); #1;
    check(state == ST_SAR && !osc_en && c_code == 6'b100000, "SAR starts at 100000");
    for (int k = 0; k < 12; k++) begin
      @(posedge clk); #1;
      check(rst_pd_n == (k % 2 == 0), $sformatf("RST_PD phase at SAR cycle %0d", k));
      if (k < 11) check(state == ST_SAR, "in SAR");
    end
    check(state == ST_LOCK && locked, "Lock after 12 SAR cycles");
    check(int'(c_code) == ((x > 64) ? 63 : (x < 1 ? 0 : x - 1)),
          $sformatf("SAR result %0d for target %0d", c_code, x));
  endtask

  initial begin
    int c0;
    acquire(38);
    acquire(1);
    acquire(64);
    acquire(21);
    // Lock tracking: move the target, C must walk one step per 2 cycles.
    target = 25;
    c0 = int'(c_code);
    for (int k = 1; k <= 4; k++) begin
      repeat (2) @(posedge clk);
      #1;
      check(int'(c_code) == c0 + k, $sformatf("tracking up step %0d: C=%0d", k, c_code));
    end
    target = 10;
    c0 = int'(c_code);
    for (int k = 1; k <= 3; k++) begin
      repeat (2) @(posedge clk);
      #1;
      check(int'(c_code) == c0 - k, $sformatf("tracking down step %0d: C=%0d", k, c_code));
    end
    // Saturation at 0.
    acquire(1);
    target = -5;
    repeat (8) @(posedge clk);
    #1;
    check(c_code == 0, "saturates at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
