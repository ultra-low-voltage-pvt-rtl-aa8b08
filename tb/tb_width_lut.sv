// Self-checking testbench of the width look-up table. Expected widths are
// W1 * g(0.5 V, T) with g evaluated here directly from the UMC 65 nm
// near-threshold polynomials (independently of the package), and checked
// against the source design's worked example (128X at 25 C, 172X at
// -25 C) and the ends of its width-temperature curve (about 213X at -50 C,
// 98X at 125 C) within 3X. comp_en = 0 must give W1.
// A second table at 0.3 V with W1 = 64X checks the sub-threshold model:
// expected widths come from the weak-inversion formula evaluated here,
// with the threshold voltage 0.338 V derived from that fit's normalisation,
// and widths beyond 255X must clip to 255X (below about -40 C).
`timescale 1ns / 1ps
module tb_width_lut;
  logic [9:0] t_code;
  logic comp_en;
  logic [7:0] b_code, b_code_st;
  int checks = 0, failures = 0;

  width_lut dut (.t_code, .comp_en, .b_code);
  width_lut #(.VDD_MV(300), .W1(64)) dut_st (.t_code, .comp_en, .b_code(b_code_st));

  function automatic real inv_g_st(input real t);
    real e, f;
    e = 6.88e-10 * t * t * t * t - 2.37e-7 * t * t * t + 2.86e-5 * t * t + 1.20e-2 * t + 0.855;
    f = 2.90e-4 * t * t - 1.06e-1 * t + 21.1;
    return e * $exp(f * (0.3 - 0.338));
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

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t, w;
    int  exp_w;
    int  paper_t [4] = '{25, -25, -50, 125};
    int  paper_w [4] = '{128, 172, 213, 98};
    comp_en = 1'b1;
    for (int code = 0; code <= 700; code += 7) begin
      t_code = 10'(code);
      #1;
      t = real'(code) / 4.0 - 50.0;
      w = 128.0 * inv_g(25.0) / inv_g(t);
      exp_w = $rtoi(w + 0.5);
      check(int'(b_code) == exp_w, $sformatf("T=%f: B=%0d expected %0d", t, b_code, exp_w));
    end
    for (int code = 0; code <= 700; code += 7) begin
      t_code = 10'(code);
      #1;
      t = real'(code) / 4.0 - 50.0;
      w = 64.0 * inv_g_st(25.0) / inv_g_st(t);
      exp_w = (w > 255.0) ? 255 : $rtoi(w + 0.5);
      check(int'(b_code_st) == exp_w,
            $sformatf("0.3 V, T=%f: B=%0d expected %0d", t, b_code_st, exp_w));
    end
    t_code = 10'd0;   #1; check(b_code_st == 8'd255, "0.3 V: clipped to 255X at -50 C");
    t_code = 10'd100; #1; check(b_code_st == 8'd159, "0.3 V: 159X at -25 C");
    t_code = 10'd300; #1; check(b_code_st == 8'd64,  "0.3 V: W1 at 25 C");
    t_code = 10'd700; #1; check(b_code_st == 8'd24,  "0.3 V: 24X at 125 C");
    for (int k = 0; k < 4; k++) begin
      t_code = 10'((paper_t[k] + 50) * 4);
      #1;
      check(int'(b_code) >= paper_w[k] - 3 && int'(b_code) <= paper_w[k] + 3,
            $sformatf("T=%0d C: B=%0d, published %0d", paper_t[k], b_code, paper_w[k]));
    end
    // Monotonic: colder needs wider.
    t_code = 10'd100; #1; w = real'(b_code);
    t_code = 10'd600; #1;
    check(real'(b_code) < w, "hotter gives narrower buffer");
    // Codes above 125 C read the 125 C entry.
    t_code = 10'd700; #1; exp_w = int'(b_code);
    t_code = 10'd1000; #1;
    check(int'(b_code) == exp_w, "clipped above 125 C");
    comp_en = 1'b0;
    for (int code = 0; code <= 700; code += 100) begin
      t_code = 10'(code);
      #1;
      check(b_code == 8'd128 && b_code_st == 8'd64, "bypass gives W1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
