// Control block of the programmable clock generator: the state machine,
// the lock-in delay-line (LIDL) controller and the phase-detector reset.
//
// After reset the machine passes through:
//   ST_RESET -> ST_PVT  : the PVT-sensing ring oscillator is switched on
//                         (osc_en) for exactly one reference cycle;
//   ST_PVT   -> ST_SAR  : binary search of C[5:0], one bit per comparison,
//                         starting from 100000;
//   ST_SAR   -> ST_LOCK : after the last bit, tracking by C +/- 1.
// A comparison takes two reference cycles (phase ph): on the first edge the
// phase detector is released, on the second its result is read and it is
// cleared again. LEAD (the 8th circulated pulse came before the reference
// pulse, so the line is too short) keeps the trial bit in SAR and adds 1 in
// Lock; otherwise the bit is cleared or 1 is subtracted. C saturates at 0
// and 63. In Lock the loop stays closed so that voltage and temperature
// drift are tracked.
//
// The states, the SAR-then-counter strategy and the two-cycle period
// follow the source design. The edge the block runs on, the release/read
// timing of RST_PD and the treatment of "no 8th pulse" as lagging are this
// design's choices; RST_PD is raised during the PVT cycle so that the
// detector sees a clearing edge when SAR starts. clk is meant to be the inverted reference clock, so
// that every decision falls half a reference cycle after a reference pulse,
// while no pulse is being compared.
//
// Interface: clk, rst_n (asynchronous, active low), lead, lag -> state,
// c_code[5:0], osc_en, rst_pd_n, locked. A full lock takes 1 + 1 + 12
// cycles of clk after reset.
`timescale 1ns / 1ps
module clkgen_controller
  import clkgen_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lead,
  input  logic              lag,
  output clkgen_state_e     state,
  output logic [CODE_W-1:0] c_code,
  output logic              osc_en,
  output logic              rst_pd_n,
  output logic              locked
);

  logic                      ph;
  logic [$clog2(CODE_W)-1:0] bit_idx;
  logic                      too_short;

  // The 8th pulse arrived first: the delay line must get longer.
  assign too_short = lead & ~lag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_RESET;
      c_code   <= '0;
      osc_en   <= 1'b0;
      rst_pd_n <= 1'b0;
      ph       <= 1'b0;
      bit_idx  <= '0;
    end else begin
      unique case (state)
        ST_RESET: begin
          state    <= ST_PVT;
          osc_en   <= 1'b1;
          rst_pd_n <= 1'b1;  // pulsed so that entering SAR clears the detector
        end
        ST_PVT: begin
          state    <= ST_SAR;
          osc_en   <= 1'b0;
          bit_idx  <= $bits(bit_idx)'(CODE_W - 1);
          c_code   <= CODE_W'(1) << (CODE_W - 1);
          ph       <= 1'b0;
          rst_pd_n <= 1'b0;
        end
        ST_SAR: begin
          if (!ph) begin
            rst_pd_n <= 1'b1;
            ph       <= 1'b1;
          end else begin
            rst_pd_n <= 1'b0;
            ph       <= 1'b0;
            if (!too_short) c_code[bit_idx] <= 1'b0;
            if (bit_idx == 0) begin
              state <= ST_LOCK;
            end else begin
              c_code[bit_idx - 1'b1] <= 1'b1;
              bit_idx                <= bit_idx - 1'b1;
            end
          end
        end
        ST_LOCK: begin
          if (!ph) begin
            rst_pd_n <= 1'b1;
            ph       <= 1'b1;
          end else begin
            rst_pd_n <= 1'b0;
            ph       <= 1'b0;
            if (too_short) begin
              if (c_code != {CODE_W{1'b1}}) c_code <= c_code + 1'b1;
            end else begin
              if (c_code != '0) c_code <= c_code - 1'b1;
            end
          end
        end
        default: state <= ST_RESET;
      endcase
    end
  end

  assign locked = (state == ST_LOCK);

endmodule
