// Self-checking testbench of the buffered H-tree at 0.5 V. The left half
// of the die is held at TL and the right half at TR, for the 21 (TL, TR)
// pairs of the published 0.5 V skew table (-25 C to 125 C). For each, the
// skew between end points A (leaf[1]) and B (leaf[4]) is measured with
// compensation off (fixed 128X buffers) and on (widths from the sensors'
// codes). Checks: all 8 leaves follow the source in phase; uncompensated
// skew equals 3 * D_REF * (g(TL) - g(TR)) computed here (three buffers per
// side differ); compensated skew is below 40 ps, the bound set by rounding
// each buffer width to a whole unit size (0.5X in about 100X, three buffers
// of about 1.9 ns per side).
// Prints both skews and the reduction for every pair.
`timescale 1ns / 1ps
module tb_h_tree;
  logic clk_src = 1'b0, comp_en = 1'b0;
  logic [9:0] t_code [15];
  real temp_c [15];
  logic [7:0] leaf;
  logic [7:0] b_code [15];
  int checks = 0, failures = 0;
  realtime t_a, t_b;
  int n_pairs;

  h_tree dut (.clk_src, .t_code, .temp_c, .comp_en, .leaf, .b_code);

  always @(posedge leaf[1]) t_a = $realtime;
  always @(posedge leaf[4]) t_b = $realtime;

  // Buffers on the left half: 1, 3, 4 and leaves 7..10; centre buffer 0
  // sits on the boundary and is given TL (it is common to A and B).
  function automatic bit is_left(input int i);
    return i == 0 || i == 1 || i == 3 || i == 4 || (i >= 7 && i <= 10);
  endfunction

  function automatic real inv_g(input real t);
    real v = 0.5;
    return (-2.05e-4 * t * t - 4.81e-2 * t + 15.9) * v * v
         + (6.54e-5 * t * t + 5.87e-2 * t - 8.75) * v
         + (3.21e-6 * t * t - 1.22e-2 * t + 1.30);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_temps(input real tl, input real tr);
    for (int i = 0; i < 15; i++) begin
      temp_c[i] = is_left(i) ? tl : tr;
      t_code[i] = 10'($rtoi((temp_c[i] + 50.0) * 4.0 + 0.5));
    end
  endtask

  task automatic skew(output real s);
    repeat (2) begin
      #20 clk_src = 1'b1;
      #20 clk_src = 1'b0;
    end
    #20 clk_src = 1'b1;
    #30;
    s = t_a - t_b;
    check(leaf == 8'hFF, "all leaves high with the source");
    #20 clk_src = 1'b0;
    #30;
    check(leaf == 8'h00, "all leaves low with the source");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  tl_of [21];
    int  tr_of [21];
    int  np;
    real sk_off, sk_on, exp_off, sum_red;
    // The published pairs: every TL in {-25, 0, ..., 100} with every hotter
    // TR up to 125 C.
    np = 0;
    for (int tl = -25; tl <= 100; tl += 25)
      for (int tr = tl + 25; tr <= 125; tr += 25) begin
        tl_of[np] = tl;
        tr_of[np] = tr;
        np++;
      end
    check(np == 21, "21 temperature pairs");
    sum_red = 0.0;
    n_pairs = 0;
    for (int k = 0; k < 21; k++) begin
      set_temps(real'(tl_of[k]), real'(tr_of[k]));
      comp_en = 1'b0;
      skew(sk_off);
      comp_en = 1'b1;
      skew(sk_on);
      exp_off = 3.0 * 1.9 * (inv_g(25.0) / inv_g(real'(tl_of[k]))
                           - inv_g(25.0) / inv_g(real'(tr_of[k])));
      check(sk_off > exp_off - 0.005 && sk_off < exp_off + 0.005,
            $sformatf("TL=%0d TR=%0d: skew %f expected %f", tl_of[k], tr_of[k], sk_off,
                      exp_off));
      if (sk_on < 0) sk_on = -sk_on;
      check(sk_on < sk_off && sk_on < 0.040,
            $sformatf("TL=%0d TR=%0d: compensated skew %f", tl_of[k], tr_of[k], sk_on));
      sum_red = sum_red + (1.0 - sk_on / sk_off);
      n_pairs = n_pairs + 1;
      $display("TL=%4d TR=%4d  skew off %7.3f ns  on %7.4f ns  reduction %5.1f%%",
               tl_of[k], tr_of[k], sk_off, sk_on, 100.0 * (1.0 - sk_on / sk_off));
    end
    $display("average reduction %5.1f%% over %0d pairs", 100.0 * sum_red / real'(n_pairs), n_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
