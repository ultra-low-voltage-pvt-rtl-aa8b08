// Self-checking testbench of the buffered H-tree in the sub-threshold
// region: 0.3 V supply, reference width W1 = 64X, buffer delay scale
// D_REF_NS = 34.7 ns. The left half of the die is held at TL and the right
// half at TR, for the 21 (TL, TR) pairs from -25 C to 125 C of the
// published skew table. For each pair the skew between end points A
// (leaf[1]) and B (leaf[4]) is measured with compensation off (fixed 64X
// buffers) and on (widths from the sensors' codes).
//
// Checks:
//  - all 8 leaves follow the source in phase;
//  - the uncompensated skew is within 3% of the published 0.3 V figure
//    for that pair, a test of the weak-inversion logical-effort model and
//    of the threshold voltage derived for it (D_REF_NS is fitted to one
//    pair only, -25 C / 125 C);
//  - the compensated skew equals the residue left by rounding each buffer
//    width to a whole unit size, 3 * D_REF * (g(TL)*64/B(TL) -
//    g(TR)*64/B(TR)), computed here from the weak-inversion formula within
//    5 ps.
// Prints both skews and the reduction for every pair.
`timescale 1ns / 1ps
module tb_h_tree_subthreshold;
  localparam real D_REF = 34.7;
  localparam real VT0   = 0.338;

  logic clk_src = 1'b0, comp_en = 1'b0;
  logic [9:0] t_code [15];
  real temp_c [15];
  logic [7:0] leaf;
  logic [7:0] b_code [15];
  int checks = 0, failures = 0;
  realtime t_a, t_b;

  h_tree #(.VDD_MV(300), .W1(64), .D_REF_NS(D_REF)) dut (
    .clk_src, .t_code, .temp_c, .comp_en, .leaf, .b_code
  );

  always @(posedge leaf[1]) t_a = $realtime;
  always @(posedge leaf[4]) t_b = $realtime;

  // Buffers on the left half; centre buffer 0 is given TL (it is common to
  // A and B).
  function automatic bit is_left(input int i);
    return i == 0 || i == 1 || i == 3 || i == 4 || (i >= 7 && i <= 10);
  endfunction

  // Sub-threshold 1/g of a UMC 65 nm inverter at 0.3 V.
  function automatic real inv_g(input real t);
    real e, f;
    e = 6.88e-10 * t * t * t * t - 2.37e-7 * t * t * t + 2.86e-5 * t * t + 1.20e-2 * t + 0.855;
    f = 2.90e-4 * t * t - 1.06e-1 * t + 21.1;
    return e * $exp(f * (0.3 - VT0));
  endfunction

  function automatic real g(input real t);
    return inv_g(25.0) / inv_g(t);
  endfunction

  // Delay factor of one compensated buffer: g * W1 / round(g * W1).
  function automatic real residue(input real t);
    real w;
    w = 64.0 * g(t);
    return w / real'($rtoi(w + 0.5));
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
      #500 clk_src = 1'b1;
      #500 clk_src = 1'b0;
    end
    #500 clk_src = 1'b1;
    #500;
    s = t_a - t_b;
    check(leaf == 8'hFF, "all leaves high with the source");
    #500 clk_src = 1'b0;
    #500;
    check(leaf == 8'h00, "all leaves low with the source");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published uncompensated 0.3 V skews (ns), in pair order.
    real pub [21] = '{101.4, 153.8, 183.2, 200.9, 212.2, 219.7,
                      52.4, 81.8, 99.5, 110.8, 118.3,
                      29.4, 47.1, 58.4, 65.9,
                      17.7, 29.0, 36.5,
                      11.3, 18.8,
                      7.5};
    int  tl_of [21];
    int  tr_of [21];
    int  np;
    real sk_off, sk_on, exp_on, sum_red;
    np = 0;
    for (int tl = -25; tl <= 100; tl += 25)
      for (int tr = tl + 25; tr <= 125; tr += 25) begin
        tl_of[np] = tl;
        tr_of[np] = tr;
        np++;
      end
    check(np == 21, "21 temperature pairs");
    sum_red = 0.0;
    for (int k = 0; k < 21; k++) begin
      set_temps(real'(tl_of[k]), real'(tr_of[k]));
      comp_en = 1'b0;
      skew(sk_off);
      comp_en = 1'b1;
      skew(sk_on);
      check(sk_off > 0.97 * pub[k] && sk_off < 1.03 * pub[k],
            $sformatf("TL=%0d TR=%0d: skew %f, published %f", tl_of[k], tr_of[k], sk_off,
                      pub[k]));
      exp_on = 3.0 * D_REF * (residue(real'(tl_of[k])) - residue(real'(tr_of[k])));
      check(sk_on > exp_on - 0.005 && sk_on < exp_on + 0.005,
            $sformatf("TL=%0d TR=%0d: compensated skew %f expected %f", tl_of[k], tr_of[k],
                      sk_on, exp_on));
      if (sk_on < 0) sk_on = -sk_on;
      sum_red = sum_red + (1.0 - sk_on / sk_off);
      $display("TL=%4d TR=%4d  skew off %8.2f ns (published %6.1f)  on %6.3f ns  reduction %5.1f%%",
               tl_of[k], tr_of[k], sk_off, pub[k], sk_on, 100.0 * (1.0 - sk_on / sk_off));
    end
    $display("average reduction %5.1f%% over 21 pairs", 100.0 * sum_red / 21.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
