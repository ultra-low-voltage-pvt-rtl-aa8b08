// Workload testbench of the programmable clock generator across operating
// points: the PVT compensation must bring the reference period into the
// lock-in line's range wherever the gates are fast or slow.
//
// Five generators run side by side, each with its own reference clock and
// its own FO2-NAND delay (the parameter that stands for process corner,
// supply and temperature):
//   0.5 V typical  0.068 ns, 5 MHz reference (200 ns)
//   0.5 V fast     0.048 ns, 5 MHz
//   0.5 V slow     0.102 ns, 5 MHz
//   0.2 V          1.0 ns,   156.25 kHz reference (6.4 us)
//   0.2 V          1.0 ns,   625 kHz reference (1.6 us)
// The reference frequencies are the published ones; the fast/slow spread
// and the 0.2 V NAND delay are this testbench's own choices.
//
// Checks for each: lock 14 reference cycles after reset; the PVT count
// and D code against T_ref / (64 * D_NAND) computed here; the locked C
// code within 2 of the value that makes 8 passes equal one reference
// period; 4 output edges per reference cycle at FS = 111. For the fast and
// slow corners it also works out, here, the C code that a D code fixed at
// its typical-corner value would need, and checks that it lies outside
// 0..63: without the compensation those corners could not lock.
`timescale 1ns / 1ps
module tb_clock_generator_corners;
  import clkgen_pkg::*;

  localparam int N = 5;
  localparam real DN   [N] = '{0.068, 0.048, 0.102, 1.0, 1.0};
  localparam real TREF [N] = '{200.0, 200.0, 200.0, 6400.0, 1600.0};
  localparam int TYPICAL_D = 9;  // D code of the 0.5 V typical corner

  logic rst_n = 1'b1;
  logic [N-1:0] done = '0;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #(TREF[3] * 1.3);
    rst_n = 1'b1;
  end

  for (genvar i = 0; i < N; i++) begin : g_corner
    logic clk_ref = 1'b0;
    logic clk_out, p_ref, p_out, locked, lead, lag;
    clkgen_state_e state;
    logic [5:0] c_code, d_code;
    logic [7:0] pvt_count;
    int n_edges = 0;

    programmable_clock_generator #(.D_NAND_NS(DN[i])) dut (
      .clk_ref, .rst_n, .fs(3'b111), .clk_out, .p_ref, .p_out, .state, .locked,
      .c_code, .d_code, .pvt_count, .lead, .lag
    );

    always #(TREF[i] / 2.0) clk_ref = ~clk_ref;
    always @(posedge clk_out) n_edges++;

    initial begin
      int  exp_count, exp_d, n_ref, n0;
      real c_ideal, c_fixed;
      @(posedge rst_n);
      n_ref = 0;
      while (state != ST_LOCK && n_ref < 40) begin
        @(negedge clk_ref);
        #1;
        n_ref++;
      end
      check(n_ref == 14, $sformatf("corner %0d: lock after %0d reference cycles", i, n_ref));

      exp_count = $rtoi(TREF[i] / (64.0 * DN[i]));
      exp_d     = (exp_count / 4 >= 2) ? exp_count / 4 - 2 : 0;
      check(pvt_count >= 8'(exp_count - 1) && pvt_count <= 8'(exp_count + 1),
            $sformatf("corner %0d: PVT count %0d, expected %0d", i, pvt_count, exp_count));
      check(d_code >= 6'(exp_d - 1) && d_code <= 6'(exp_d + 1),
            $sformatf("corner %0d: D %0d, expected %0d", i, d_code, exp_d));

      repeat (6) @(negedge clk_ref);
      #1;
      c_ideal = (TREF[i] / (8.0 * DN[i]) - 32.0 * real'(d_code) - 4.0) / 2.0;
      check(locked && real'(c_code) > c_ideal - 2.0 && real'(c_code) < c_ideal + 2.0,
            $sformatf("corner %0d: C %0d, ideal %f", i, c_code, c_ideal));

      @(posedge clk_ref);
      n0 = n_edges;
      repeat (8) @(posedge clk_ref);
      check(n_edges - n0 >= 31 && n_edges - n0 <= 33,
            $sformatf("corner %0d: %0d output edges in 8 reference cycles, expected 32",
                      i, n_edges - n0));

      if (i == 1 || i == 2) begin
        c_fixed = (TREF[i] / (8.0 * DN[i]) - 32.0 * real'(TYPICAL_D) - 4.0) / 2.0;
        check(c_fixed < 0.0 || c_fixed > 63.0,
              $sformatf("corner %0d: uncompensated C %f should be out of range", i, c_fixed));
        $display("corner %0d: D %0d C %0d (with D fixed at %0d, C would need %f)",
                 i, d_code, c_code, TYPICAL_D, c_fixed);
      end else begin
        $display("corner %0d: D %0d C %0d", i, d_code, c_code);
      end
      done[i] = 1'b1;
    end
  end

  initial begin
    #(TREF[3] * 80.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
