// fine_channel: the fine-time path of one delay line, from the sampled taps
// to a calibrated time in picoseconds.
//
// tdl_sampler adds the second sampling stage and detects the hit,
// therm_encoder turns the pseudo-thermometer word into a bin code, and
// cal_lut maps the code to the time from the hit to the clock edge that
// sampled it. The outputs are held until the next hit so that the downstream
// logic may pick them up a cycle later.
//
// Interface and timing: taps_i is the word from the delay line's first
// sampling stage. hit_o pulses six clock edges after the edge that caught
// the hit (2 sampler + 2 encoder + 1 table read + 1 hold), with fine_ps_o, code_o,
// sat_o and bubble_o for that hit. cal_we/cal_addr/cal_data write the
// calibration table. Sampler, encoder and calibration in this order follow
// the published design; the latency is this design's.
module fine_channel #(
  parameter int unsigned TAPS        = tdc_pkg::TAPS,
  parameter int unsigned CODE_W      = tdc_pkg::CODE_W,
  parameter int unsigned FINE_W      = tdc_pkg::FINE_W,
  parameter int unsigned INIT_BIN_PS = tdc_pkg::NOM_BIN_PS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TAPS-1:0]   taps_i,
  output logic              hit_o,
  output logic [FINE_W-1:0] fine_ps_o,
  output logic [CODE_W-1:0] code_o,
  output logic              sat_o,
  output logic              bubble_o,
  input  logic              cal_we,
  input  logic [CODE_W-1:0] cal_addr,
  input  logic [FINE_W-1:0] cal_data
);
  timeunit 1ps;
  timeprecision 1fs;

  logic              s_hit, s_bubble;
  logic [TAPS-1:0]   s_therm;
  logic              e_valid, e_sat;
  logic [CODE_W-1:0] e_code;
  logic [FINE_W-1:0] lut_data;
  logic [1:0]        bubble_d;
  logic              l_valid, l_sat, l_bubble;
  logic [CODE_W-1:0] l_code;

  tdl_sampler #(.TAPS(TAPS)) u_sampler (
    .clk, .rst_n, .taps_i,
    .hit_o(s_hit), .therm_o(s_therm), .bubble_o(s_bubble)
  );

  therm_encoder #(.TAPS(TAPS), .CODE_W(CODE_W)) u_encoder (
    .clk, .rst_n, .valid_i(s_hit), .therm_i(s_therm),
    .valid_o(e_valid), .code_o(e_code), .sat_o(e_sat)
  );

  cal_lut #(.ADDR_W(CODE_W), .DATA_W(FINE_W), .INIT_BIN_PS(INIT_BIN_PS)) u_lut (
    .clk, .rd_addr(e_code), .rd_data(lut_data),
    .we(cal_we), .waddr(cal_addr), .wdata(cal_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bubble_d <= '0;
      l_valid  <= 1'b0;
      l_sat    <= 1'b0;
      l_bubble <= 1'b0;
      l_code   <= '0;
    end else begin
      bubble_d <= {bubble_d[0], s_bubble};
      l_valid  <= e_valid;
      l_sat    <= e_sat;
      l_bubble <= bubble_d[1];
      l_code   <= e_code;
    end
  end

  // hold the result of the last hit
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit_o     <= 1'b0;
      fine_ps_o <= '0;
      code_o    <= '0;
      sat_o     <= 1'b0;
      bubble_o  <= 1'b0;
    end else begin
      hit_o <= l_valid;
      if (l_valid) begin
        fine_ps_o <= lut_data;
        code_o    <= l_code;
        sat_o     <= l_sat;
        bubble_o  <= l_bubble;
      end
    end
  end
endmodule
