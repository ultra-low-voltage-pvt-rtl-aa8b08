// Self-checking testbench of the programmable clock generator at its
// default 0.5 V operating point with a 5 MHz reference.
//
// Checks: the state sequence Reset -> PVT (1 cycle) -> SAR (12 cycles) ->
// Lock; the PVT count and D code against T_ref / (64 * D_NAND) computed
// here; the locked C code against the value that makes 8 passes equal one
// reference period; 8 P_OUT pulses per reference cycle in Lock; and the
// output edge count over 48 reference cycles for all eight FS settings
// (Table of ratios 1/8 ... 4).
`timescale 1ns / 1ps
module tb_programmable_clock_generator;
  import clkgen_pkg::*;

  localparam real T_REF_NS  = 200.0;
  localparam real D_NAND_NS = 0.068;

  logic clk_ref = 1'b0;
  logic rst_n   = 1'b1;
  logic [2:0] fs = 3'b111;
  logic clk_out, p_ref, p_out, locked, lead, lag;
  clkgen_state_e state;
  logic [5:0] c_code, d_code;
  logic [7:0] pvt_count;

  int checks = 0, failures = 0;

  programmable_clock_generator dut (
    .clk_ref, .rst_n, .fs, .clk_out, .p_ref, .p_out, .state, .locked,
    .c_code, .d_code, .pvt_count, .lead, .lag
  );

  always #(T_REF_NS / 2.0) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Edge counters.
  int n_out_edges = 0;
  int n_pout = 0;
  always @(posedge clk_out) n_out_edges++;
  always @(posedge p_out) n_pout++;

  int ref_cycles = 0;
  always @(posedge clk_ref) ref_cycles++;

  // Watchdog.
  initial begin
    #(T_REF_NS * 900.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int   exp_count, exp_d, n0, lock_cycle, start_cycle;
    real  c_ideal;
    int   exp_edges [8] = '{6, 8, 12, 24, 48, 64, 96, 192};
    #1 rst_n = 1'b0;
    #(T_REF_NS * 2.3);
    rst_n = 1'b1;
    start_cycle = ref_cycles;
    @(negedge clk_ref);
    #1;
    check(state == ST_PVT, "PVT state after first edge");
    @(negedge clk_ref);
    #1;
    check(state == ST_SAR, "SAR state after one PVT cycle");

    // Independent expectation of the PVT measurement.
    exp_count = $rtoi(T_REF_NS / (64.0 * D_NAND_NS));
    exp_d     = (exp_count / 4 >= 2) ? exp_count / 4 - 2 : 0;
    check(pvt_count >= exp_count - 1 && pvt_count <= exp_count + 1,
          $sformatf("pvt count %0d, expected %0d", pvt_count, exp_count));
    check(int'(d_code) == (int'(pvt_count) / 4 - 2), "D = count/4 - 2");
    check(d_code >= exp_d - 1 && d_code <= exp_d + 1,
          $sformatf("D code %0d, expected %0d", d_code, exp_d));

    // SAR takes 12 reference cycles (6 comparisons of 2 cycles).
    repeat (11) begin
      @(negedge clk_ref);
      #1;
      check(state == ST_SAR, "still in SAR");
    end
    @(negedge clk_ref);
    #1;
    check(state == ST_LOCK, "Lock after 12 SAR cycles");
    lock_cycle = ref_cycles - start_cycle;
    check(lock_cycle == 14, $sformatf("lock at reference cycle %0d, expected 14", lock_cycle));

    // Locked code: 8 * (32 D + 4 + 2 C) * D_NAND = T_ref.
    c_ideal = (T_REF_NS / (8.0 * D_NAND_NS) - 32.0 * real'(d_code) - 4.0) / 2.0;
    repeat (8) @(negedge clk_ref);
    repeat (10) begin
      @(negedge clk_ref);
      #1;
      check(real'(c_code) > c_ideal - 2.0 && real'(c_code) < c_ideal + 2.0,
            $sformatf("C %0d near ideal %f", c_code, c_ideal));
      check(locked, "stays locked");
    end

    // 8 output pulses per reference cycle while locked.
    @(posedge clk_ref);
    n0 = n_pout;
    repeat (16) @(posedge clk_ref);
    check(n_pout - n0 == 16 * 8, $sformatf("P_OUT pulses %0d in 16 cycles", n_pout - n0));

    // All frequency settings.
    for (int f = 0; f < 8; f++) begin
      fs = 3'(f);
      repeat (4) @(posedge clk_ref);
      n0 = n_out_edges;
      repeat (48) @(posedge clk_ref);
      check((n_out_edges - n0) >= exp_edges[f] - 1 && (n_out_edges - n0) <= exp_edges[f] + 1,
            $sformatf("FS=%03b: %0d output edges in 48 cycles, expected %0d",
                      f[2:0], n_out_edges - n0, exp_edges[f]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
