// tof_processor: combines the fine and coarse measurements into a
// time of flight, T = T1 + N*Tclk - T3 (all in ps).
//
// T1 is the calibrated fine time of delay line 1 (from S1 to the next clock
// edge), T3 that of delay line 2 (from S2 to the next clock edge), and N the
// coarse count of clock periods between those two edges. T1 and the DL1 code
// are captured when the coarse counter reports an accepted start; T3, the DL2
// code and N when it reports the stop. Stage 1 multiplies N by the clock
// period (one DSP multiplier) and forms T1 - T3; stage 2 adds the two.
//
// Timing: result_o is valid (valid_o high for one cycle) two cycles after
// done_i. The equation and the multiply by the clock period follow the
// published design; the pipelining is this design's choice.
module tof_processor
  import tdc_pkg::*;
#(
  parameter int unsigned CLK_PS = tdc_pkg::CLK_PERIOD_PS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                started_i,
  input  logic [FINE_W-1:0]   t1_i,
  input  logic [CODE_W-1:0]   code1_i,
  input  logic                done_i,
  input  logic [COARSE_W-1:0] n_i,
  input  logic [FINE_W-1:0]   t3_i,
  input  logic [CODE_W-1:0]   code2_i,
  output logic                valid_o,
  output tof_result_t         result_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [FINE_W-1:0]          t1_hold;
  logic [CODE_W-1:0]          code1_hold;
  logic                       s1_valid;
  logic [RESULT_W-1:0]        prod;
  logic signed [RESULT_W-1:0] diff;
  tof_result_t                s1_res;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t1_hold    <= '0;
      code1_hold <= '0;
      s1_valid   <= 1'b0;
      prod       <= '0;
      diff       <= '0;
      s1_res     <= '0;
      valid_o    <= 1'b0;
      result_o   <= '0;
    end else begin
      if (started_i) begin
        t1_hold    <= t1_i;
        code1_hold <= code1_i;
      end
      // stage 1: coarse product and fine difference
      s1_valid <= done_i;
      if (done_i) begin
        prod          <= RESULT_W'(n_i) * RESULT_W'(CLK_PS);
        diff          <= $signed(RESULT_W'(started_i ? t1_i : t1_hold)) - $signed(RESULT_W'(t3_i));
        s1_res        <= '0;
        s1_res.coarse <= n_i;
        s1_res.t1_ps  <= started_i ? t1_i : t1_hold;
        s1_res.t3_ps  <= t3_i;
        s1_res.code1  <= started_i ? code1_i : code1_hold;
        s1_res.code2  <= code2_i;
      end
      // stage 2: T = N*Tclk + (T1 - T3)
      valid_o <= s1_valid;
      if (s1_valid) begin
        result_o        <= s1_res;
        result_o.tof_ps <= $signed(prod) + diff;
      end
    end
  end
endmodule
