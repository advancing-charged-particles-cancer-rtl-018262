// therm_encoder: bubble-tolerant thermometer-to-binary encoder.
//
// The code is the number of ones in the sampled word (a ones counter). For a
// clean thermometer code that is the position of the 1-to-0 transition; with
// bubbles it is still a single number that grows monotonically with the time
// the hit spent in the line, which is what the calibration table needs. The
// count is made in two pipeline stages: the first counts each group of GROUP
// taps (8, one CARRY8 cell), the second adds the group counts.
//
// Interface and timing: valid_i/therm_i in, valid_o/code_o two cycles later.
// sat_o marks an all-ones word: the hit passed the whole line, so the line is
// shorter than the interval being measured and the code is not usable. The
// published design says only that an encoder converts the delay-line output
// to binary; the ones-counting method and the pipelining are this design's.
module therm_encoder #(
  parameter int unsigned TAPS   = tdc_pkg::TAPS,
  parameter int unsigned GROUP  = tdc_pkg::TAPS_PER_CARRY,
  parameter int unsigned CODE_W = $clog2(TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [TAPS-1:0]   therm_i,
  output logic              valid_o,
  output logic [CODE_W-1:0] code_o,
  output logic              sat_o
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NGROUPS = TAPS / GROUP;
  localparam int unsigned GCNT_W  = $clog2(GROUP + 1);

  logic [GCNT_W-1:0] gcnt_d [NGROUPS];
  logic [GCNT_W-1:0] gcnt_q [NGROUPS];
  logic              valid_a, sat_a;
  logic [CODE_W-1:0] total;

  // stage 1: ones per group
  always_comb begin
    for (int g = 0; g < int'(NGROUPS); g++) begin
      gcnt_d[g] = '0;
      for (int b = 0; b < int'(GROUP); b++)
        gcnt_d[g] = gcnt_d[g] + GCNT_W'(therm_i[g*GROUP + b]);
    end
  end

  // stage 2: sum of the group counts
  always_comb begin
    total = '0;
    for (int g = 0; g < int'(NGROUPS); g++)
      total = total + CODE_W'(gcnt_q[g]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_a <= 1'b0;
      sat_a   <= 1'b0;
      valid_o <= 1'b0;
      sat_o   <= 1'b0;
      code_o  <= '0;
      for (int g = 0; g < int'(NGROUPS); g++) gcnt_q[g] <= '0;
    end else begin
      valid_a <= valid_i;
      sat_a   <= &therm_i;
      for (int g = 0; g < int'(NGROUPS); g++) gcnt_q[g] <= gcnt_d[g];
      valid_o <= valid_a;
      sat_o   <= sat_a;
      code_o  <= total;
    end
  end

  initial begin
    if (TAPS % GROUP != 0) $error("TAPS must be a multiple of GROUP");
    if ((1 << CODE_W) <= TAPS) $error("CODE_W too small for TAPS");
  end
endmodule
