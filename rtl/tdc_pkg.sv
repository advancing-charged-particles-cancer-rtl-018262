// tdc_pkg: constants and types shared by the dual delay-line time-to-digital
// converter. Times are integer picoseconds throughout.
//
// The 400 MHz system clock (2500 ps period) follows the published design. The
// delay-line length of 480 taps is this design's choice: one clock region of
// an UltraScale device holds 60 CARRY8 cells of 8 taps each, and 480 taps of
// about 6 ps span slightly more than one clock period. Counter and result
// widths are likewise this design's choice.
package tdc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CLK_PERIOD_PS   = 2500; // 400 MHz system clock
  localparam int unsigned CARRY8_PER_LINE = 60;   // carry cells in one clock region
  localparam int unsigned TAPS_PER_CARRY  = 8;    // taps in one CARRY8
  localparam int unsigned TAPS            = CARRY8_PER_LINE * TAPS_PER_CARRY; // 480
  localparam int unsigned CODE_W          = $clog2(TAPS + 1); // 9: codes 0..480
  localparam int unsigned FINE_W          = 16;   // calibrated fine time, ps
  localparam int unsigned NOM_BIN_PS      = 6;    // nominal bin width, ps
  localparam int unsigned COARSE_W        = 16;   // coarse cycle counter
  localparam int unsigned RESULT_W        = 32;   // time-of-flight result, ps

  // One finished time-of-flight measurement: T = T1 + N*Tclk - T3.
  typedef struct packed {
    logic signed [RESULT_W-1:0] tof_ps;  // measured interval S1 -> S2
    logic [COARSE_W-1:0]        coarse;  // N, whole clock periods
    logic [FINE_W-1:0]          t1_ps;   // fine time of S1 (DL1)
    logic [FINE_W-1:0]          t3_ps;   // fine time of S2 (DL2)
    logic [CODE_W-1:0]          code1;   // raw DL1 bin code, for offline calibration
    logic [CODE_W-1:0]          code2;   // raw DL2 bin code
  } tof_result_t;
endpackage
