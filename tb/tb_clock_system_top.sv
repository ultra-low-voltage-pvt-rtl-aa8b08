// End-to-end testbench of the clock system at its default parameters
// (0.5 V operating point, 5 MHz reference): the programmable generator
// acquires lock and its output is distributed by the thermally robust
// H-tree across a die whose left half is at -25 C and right half at 125 C.
//
// Checks: lock after 14 reference cycles; PVT compensation produced a
// non-zero coarse code; the SAR search both kept and cleared bits; Lock
// tracking stepped C both up and down; every FS setting gives the right
// number of clock edges at an H-tree end point over 48 reference cycles;
// the buffers on the two halves get different widths; skew between end
// points A and B is large with compensation off and small with it on.
// Each mechanism's occurrence count is printed, and a mechanism that never
// occurred counts as a failure.
`timescale 1ns / 1ps
module tb_clock_system_top;
  import clkgen_pkg::*;

  localparam real T_REF_NS = 200.0;

  logic clk_ref = 1'b0, rst_n = 1'b1, comp_en = 1'b1;
  logic [2:0] fs = 3'b111;
  logic [9:0] t_code [15];
  real temp_c [15];
  logic [7:0] clk_leaf;
  logic clk_gen, locked;
  clkgen_state_e state;
  logic [5:0] c_code, d_code;
  logic [7:0] b_code [15];

  int checks = 0, failures = 0;
  int n_pvt = 0, n_sar_keep = 0, n_sar_clear = 0, n_track_up = 0, n_track_down = 0;
  int n_fs = 0, n_comp = 0;
  int n_leaf = 0;
  realtime t_a, t_b;

  clock_system_top dut (
    .clk_ref, .rst_n, .fs, .t_code, .temp_c, .comp_en, .clk_leaf, .clk_gen,
    .locked, .state, .c_code, .d_code, .b_code
  );

  always #(T_REF_NS / 2.0) clk_ref = ~clk_ref;

  always @(posedge clk_leaf[1]) begin t_a = $realtime; n_leaf++; end
  always @(posedge clk_leaf[4]) t_b = $realtime;

  // Classify every change of the lock-in code.
  logic [5:0] c_prev;
  logic       c_prev_valid = 1'b0;
  always @(negedge clk_ref) begin
    #2;
    if (c_prev_valid && state == ST_SAR && c_code != c_prev && c_prev != 6'b0) begin
      if (c_code > c_prev) n_sar_keep++;
      else                 n_sar_clear++;
    end
    if (c_prev_valid && state == ST_LOCK && c_code == c_prev + 6'd1) n_track_up++;
    if (c_prev_valid && state == ST_LOCK && c_code + 6'd1 == c_prev) n_track_down++;
    c_prev = c_code;
    c_prev_valid = rst_n;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_gradient(input real tl, input real tr);
    for (int i = 0; i < 15; i++) begin
      // Buffers 0, 1, 3, 4, 7..10 sit on the left half.
      temp_c[i] = (i == 0 || i == 1 || i == 3 || i == 4 || (i >= 7 && i <= 10)) ? tl : tr;
      t_code[i] = 10'($rtoi((temp_c[i] + 50.0) * 4.0 + 0.5));
    end
  endtask

  task automatic measure_skew(output real s);
    repeat (3) @(posedge clk_leaf[4]);
    #10;
    s = t_a - t_b;
    if (s < 0) s = -s;
  endtask

  initial begin
    #(T_REF_NS * 2000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  cyc, n0;
    int  exp_edges [8] = '{6, 8, 12, 24, 48, 64, 96, 192};
    real sk_off, sk_on;
    set_gradient(-25.0, 125.0);
    #1 rst_n = 1'b0;
    #(T_REF_NS * 2.3);
    rst_n = 1'b1;

    // Acquisition.
    cyc = 0;
    while (!locked && cyc < 40) begin
      // The controller acts on falling reference edges.
      @(negedge clk_ref);
      #1;
      cyc++;
      if (state == ST_PVT) n_pvt++;
    end
    check(cyc == 14, $sformatf("locked after %0d reference cycles, expected 14", cyc));
    check(d_code != 0, "PVT compensation set a coarse delay");
    check(n_pvt == 1, "PVT measurement lasted one reference cycle");
    if (d_code == 0) n_pvt = 0;

    // Let tracking run.
    repeat (30) @(posedge clk_ref);
    check(locked, "still locked");

    // Frequency settings at an H-tree end point.
    for (int f = 0; f < 8; f++) begin
      fs = 3'(f);
      repeat (4) @(posedge clk_ref);
      n0 = n_leaf;
      repeat (48) @(posedge clk_ref);
      check((n_leaf - n0) >= exp_edges[f] - 1 && (n_leaf - n0) <= exp_edges[f] + 1,
            $sformatf("FS=%03b: %0d leaf edges in 48 cycles, expected %0d",
                      f[2:0], n_leaf - n0, exp_edges[f]));
      n_fs++;
    end

    // Thermal compensation in the tree.
    fs = 3'b111;
    check(b_code[8] > b_code[11], "cold-side buffer wider than hot-side buffer");
    comp_en = 1'b0;
    repeat (2) @(posedge clk_ref);
    measure_skew(sk_off);
    comp_en = 1'b1;
    repeat (2) @(posedge clk_ref);
    measure_skew(sk_on);
    $display("skew A-B at TL=-25 C, TR=125 C: %0.3f ns uncompensated, %0.4f ns compensated",
             sk_off, sk_on);
    check(sk_off > 2.0, "gradient causes skew without compensation");
    check(sk_on < 0.05, "compensation removes the skew");
    if (sk_off > 2.0 && sk_on < 0.05) n_comp++;

    $display("mechanisms: pvt=%0d sar_keep=%0d sar_clear=%0d track_up=%0d track_down=%0d fs=%0d comp=%0d",
             n_pvt, n_sar_keep, n_sar_clear, n_track_up, n_track_down, n_fs, n_comp);
    check(n_pvt > 0, "PVT compensation happened");
    check(n_sar_keep > 0, "SAR kept a bit");
    check(n_sar_clear > 0, "SAR cleared a bit");
    check(n_track_up > 0, "Lock tracking stepped up");
    check(n_track_down > 0, "Lock tracking stepped down");
    check(n_fs == 8, "all FS settings exercised");
    check(n_comp > 0, "thermal compensation observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
