// freq_cal: start-up automatic frequency calibration of the DCO coarse word.
//
// While 'cal_start' is high the block repeatedly measures the DCO frequency:
// it counts digital-clock cycles during 'ref_window' rising edges of the
// external reference clock and compares the count with 'target_count'. A
// count above target + tol steps the 6-bit coarse word down (lower
// frequency), a count below target - tol steps it up; each such decision is
// also given as a one-cycle 'from FD' pair (fd_early = 2'b11 or
// fd_late = 2'b11) that the loop filter can take instead of the phase
// detector. A count within tolerance ends the calibration with cal_done and
// cal_ok; reaching the end of the coarse range ends it with cal_ok low.
//
// Published: a counter-based loop against an external reference, compared
// with configured registers, adjusting the coarse setting gradually until
// the DCO is within about +-30 MHz. Everything else (one coarse step per
// measurement, the tolerance input, the pulse format of the 'from FD'
// signal, the two-flip-flop synchronizer on the reference clock) is this
// RTL's choice. The reference clock must be well below half the digital
// clock frequency.
//
// Timing: all logic runs on the digital clock; rst_n is asynchronous, active
// low. A measurement takes ref_window reference periods plus 4 cycles.
module freq_cal
  import adcdr_pkg::*;
(
  input  logic                clk,          // digital clock
  input  logic                rst_n,
  input  logic                ref_clk,      // external reference, asynchronous
  input  logic                cal_start,    // level: calibrate while high
  input  logic [COARSE_W-1:0] coarse_init,
  input  logic [15:0]         ref_window,   // reference edges per measurement (>0)
  input  logic [23:0]         target_count, // expected digital-clock cycles
  input  logic [15:0]         tol,          // allowed deviation in cycles
  output logic [COARSE_W-1:0] coarse,
  output logic                cal_done,
  output logic                cal_ok,
  output logic [1:0]          fd_early,
  output logic [1:0]          fd_late,
  output logic [23:0]         last_count
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {S_IDLE, S_ALIGN, S_COUNT, S_DECIDE} state_t;

  state_t      state;
  logic [2:0]  ref_sync;
  logic        ref_rise;
  logic [15:0] ref_cnt;
  logic [23:0] clk_cnt;

  assign ref_rise = ref_sync[1] & ~ref_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync <= '0;
    end else begin
      ref_sync <= {ref_sync[1:0], ref_clk};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      coarse     <= '0;
      cal_done   <= 1'b0;
      cal_ok     <= 1'b0;
      fd_early   <= '0;
      fd_late    <= '0;
      ref_cnt    <= '0;
      clk_cnt    <= '0;
      last_count <= '0;
    end else begin
      fd_early <= '0;
      fd_late  <= '0;
      unique case (state)
        S_IDLE: begin
          if (cal_start && !cal_done) begin
            coarse <= coarse_init;
            cal_ok <= 1'b0;
            state  <= S_ALIGN;
          end
          if (!cal_start) cal_done <= 1'b0;
        end
        S_ALIGN: begin  // start counting on a reference edge
          if (ref_rise) begin
            ref_cnt <= '0;
            clk_cnt <= 24'd1;
            state   <= S_COUNT;
          end
        end
        S_COUNT: begin
          clk_cnt <= clk_cnt + 24'd1;
          if (ref_rise) begin
            ref_cnt <= ref_cnt + 16'd1;
            if (ref_cnt + 16'd1 == ref_window) begin
              last_count <= clk_cnt;
              state      <= S_DECIDE;
            end
          end
        end
        S_DECIDE: begin
          if ({8'd0, tol} + last_count < target_count) begin
            // too slow
            fd_late <= 2'b11;
            if (coarse == '1) begin
              cal_done <= 1'b1; cal_ok <= 1'b0; state <= S_IDLE;
            end else begin
              coarse <= coarse + 1'b1; state <= S_ALIGN;
            end
          end else if (last_count > target_count + {8'd0, tol}) begin
            // too fast
            fd_early <= 2'b11;
            if (coarse == '0) begin
              cal_done <= 1'b1; cal_ok <= 1'b0; state <= S_IDLE;
            end else begin
              coarse <= coarse - 1'b1; state <= S_ALIGN;
            end
          end else begin
            cal_done <= 1'b1; cal_ok <= 1'b1; state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
