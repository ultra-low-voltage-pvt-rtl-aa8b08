// Self-checking testbench of the phase detector: in each trial 10 P_OUT
// pulses are sent with count_e8 raised on the 8th, and one P_REF pulse at a
// chosen time. LEAD must be set exactly when the 8th P_OUT came first, LAG
// when it came second; neither when the 8th never comes. Early P_OUT
// pulses (without count_e8) must be ignored, and RST_PD must clear both.
`timescale 1ns / 1ps
module tb_phase_detector;
  logic p_ref = 1'b0, p_out = 1'b0, count_e8 = 1'b0, rst_pd_n = 1'b1;
  logic lead, lag;
  int checks = 0, failures = 0;

  phase_detector dut (.p_ref, .p_out, .count_e8, .rst_pd_n, .lead, .lag);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One trial: 8th P_OUT at 80 ns (or never), P_REF at t_ref.
  task automatic trial(input int t_ref, input bit send8);
    #1 rst_pd_n = 1'b0;
    #1 rst_pd_n = 1'b1;
    count_e8 = 1'b0;
    check(!lead && !lag, "cleared by RST_PD");
    fork
      begin
        for (int k = 1; k <= 10; k++) begin
          #10;
          if (k < 8 || send8) begin
            p_out = 1'b1;
            if (k == 8) count_e8 = 1'b1;
            #2 p_out = 1'b0;
          end
        end
      end
      begin
        #(t_ref);
        p_ref = 1'b1;
        #2 p_ref = 1'b0;
      end
    join
    #5;
    if (!send8)
      check(!lead && !lag, "no 8th pulse: neither");
    else if (t_ref > 8 * 10 + 2 * 7)
      check(lead && !lag, $sformatf("ref at %0d: expect LEAD", t_ref));
    else
      check(!lead && lag, $sformatf("ref at %0d: expect LAG", t_ref));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 8th P_OUT rises at 8*10 + 7*2 = 94 ns into the trial.
    trial(50, 1'b1);
    trial(90, 1'b1);
    trial(99, 1'b1);
    trial(140, 1'b1);
    trial(20, 1'b1);
    trial(99, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
