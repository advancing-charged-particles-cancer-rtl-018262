// tdc_core: the synthesizable part of the time-to-digital converter, from
// the first sampling stage of the two delay lines to the time-of-flight
// result. It holds two fine channels (second sampling, hit detection,
// encoder, calibration table), the coarse counter and the processor that
// evaluates T = T1 + N*Tclk - T3.
//
// Interface: taps1/taps2 are the words sampled by the flip-flops of DL1 and
// DL2 on each rising edge of clk; the other ports are those of tdc_top. A
// result appears on result_o with a one-cycle result_valid_o 9 clock edges
// after the edge that caught S2 (6 in the fine channel, 1 in the counter, 2
// in the processor). The structure follows the published design; widths,
// latencies and detection rules are this design's choice.
module tdc_core
  import tdc_pkg::*;
#(
  parameter int unsigned TAPS_P   = tdc_pkg::TAPS,
  parameter int unsigned CLK_PS   = tdc_pkg::CLK_PERIOD_PS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TAPS_P-1:0] taps1,
  input  logic [TAPS_P-1:0] taps2,
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

  logic                hit1, hit2;
  logic [FINE_W-1:0]   fine1, fine2;
  logic [CODE_W-1:0]   code1, code2;
  logic                started, done;
  logic [COARSE_W-1:0] n_cycles;

  fine_channel #(.TAPS(TAPS_P)) u_ch1 (
    .clk, .rst_n, .taps_i(taps1),
    .hit_o(hit1), .fine_ps_o(fine1), .code_o(code1), .sat_o(sat_o[0]), .bubble_o(bubble_o[0]),
    .cal_we(cal_we && !cal_line), .cal_addr, .cal_data
  );

  fine_channel #(.TAPS(TAPS_P)) u_ch2 (
    .clk, .rst_n, .taps_i(taps2),
    .hit_o(hit2), .fine_ps_o(fine2), .code_o(code2), .sat_o(sat_o[1]), .bubble_o(bubble_o[1]),
    .cal_we(cal_we && cal_line), .cal_addr, .cal_data
  );

  coarse_counter #(.W(COARSE_W)) u_counter (
    .clk, .rst_n, .start_i(hit1), .stop_i(hit2),
    .started_o(started), .done_o(done), .count_o(n_cycles), .ovf_o(overflow_o), .busy_o
  );

  tof_processor #(.CLK_PS(CLK_PS)) u_proc (
    .clk, .rst_n,
    .started_i(started), .t1_i(fine1), .code1_i(code1),
    .done_i(done), .n_i(n_cycles), .t3_i(fine2), .code2_i(code2),
    .valid_o(result_valid_o), .result_o
  );
endmodule
