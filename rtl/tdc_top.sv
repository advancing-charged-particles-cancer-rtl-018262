// tdc_top: time-to-digital converter measuring the time of flight between a
// primary-particle hit S1 and a secondary-particle hit S2.
//
// Each hit drives its own tapped delay line, DL1 and DL2, placed as mirror
// images of each other so that both lines have the same offset and bin
// structure. A line measures the fraction of a clock period from its hit to
// the next rising clock edge (T1 for S1, T3 for S2); a synchronous counter
// counts the whole periods N between those two edges. The result is
// T = T1 + N*Tclk - T3. Fine times come from per-line calibration tables,
// loaded through the cal_* port after an offline calibration; the raw bin
// codes are reported with every result so that the calibration can be made
// from the device's own output.
//
// Interface: clk is the 400 MHz system clock, rst_n an active-low synchronous
// reset, s1/s2 the hit inputs after the LVDS input buffers (a hit stays high
// for at least one clock period and returns low before the next hit).
// cal_line selects the table (0 = DL1, 1 = DL2) written by cal_we. A result
// appears on result_o with a one-cycle result_valid_o 9 clock edges after the
// edge that caught S2. overflow_o pulses when S2 does not come within 2^16-1
// periods; sat_o and bubble_o report a saturated line or a bubbled word.
//
// The delay lines are behavioural models (carry chains cannot be described in
// RTL); everything after their first sampling stage is in tdc_core, which is
// synthesizable. The structure follows the published design; widths,
// latencies, the detection rules and the model's tap delays are this design's
// choice.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned TAPS_P   = tdc_pkg::TAPS,
  parameter int unsigned CLK_PS   = tdc_pkg::CLK_PERIOD_PS,
  parameter int unsigned SEED_DL1 = 11,
  parameter int unsigned SEED_DL2 = 23
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s1,
  input  logic              s2,
  input  logic              cal_we,
  input  logic              cal_line,
  input  logic [CODE_W-1:0] cal_addr,
  input  logic [FINE_W-1:0] cal_data,
  output logic              result_valid_o,
  output tof_result_t       result_o,
  output logic              overflow_o,
  output logic              busy_o,
  output logic [1:0]        sat_o,
  output logic [1:0]        bubble_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [TAPS_P-1:0]   taps1, taps2;

  // DL1 and DL2 with their first sampling stage
  tdl_delay_line #(.TAPS(TAPS_P), .SEED(SEED_DL1)) u_dl1 (.clk, .hit(s1), .taps_q(taps1));
  tdl_delay_line #(.TAPS(TAPS_P), .SEED(SEED_DL2)) u_dl2 (.clk, .hit(s2), .taps_q(taps2));

  tdc_core #(.TAPS_P(TAPS_P), .CLK_PS(CLK_PS)) u_core (
    .clk, .rst_n, .taps1, .taps2, .cal_we, .cal_line, .cal_addr, .cal_data,
    .result_valid_o, .result_o, .overflow_o, .busy_o, .sat_o, .bubble_o
  );
endmodule
