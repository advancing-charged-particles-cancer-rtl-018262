// tdl_delay_line: BEHAVIOURAL MODEL of one tapped delay line with its first
// sampling stage. Not synthesizable: on the FPGA this is a chain of CARRY8
// cells whose carry outputs are captured by the flip-flops of the same
// slices, and its timing comes from the silicon and the layout, not from RTL.
//
// How it works: the hit enters the chain after a routing delay ROUTE_PS and
// reaches the output of tap i after ROUTE_PS plus the sum of the delays of
// taps 0..i. Each tap delay is TAP_PS plus a fixed pseudo-random deviation of
// up to +/-TAP_SPREAD_PS, drawn once from SEED, so the bins are non-uniform
// as on real carry logic. Each sampling flip-flop also sees a fixed clock skew
// of up to +/-SKEW_PS; where that skew exceeds the local tap delay the sampled
// word is not a clean thermometer code but has "bubbles". A tap whose edge
// arrives within META_PS of the sampling instant resolves to a random value
// (metastability). On each rising clock edge taps_q[i] becomes the level the
// hit input had at (edge time - effective delay of tap i).
//
// Interface: hit is the asynchronous detector signal; taps_q is the sampled
// pseudo-thermometer word, valid from just after each rising edge of clk.
// The defaults (480 taps of 6 ps) are this design's choice; the published
// design gives the 400 MHz clock, carry-chain taps, and a resolution of about
// 6 ps.
module tdl_delay_line #(
  parameter int unsigned TAPS          = tdc_pkg::TAPS,
  parameter real         TAP_PS        = 6.0,
  parameter real         TAP_SPREAD_PS = 3.0,
  parameter real         SKEW_PS       = 3.0,
  parameter real         META_PS       = 0.3,
  parameter real         ROUTE_PS      = 0.0,
  parameter int unsigned SEED          = 1
) (
  input  logic            clk,
  input  logic            hit,
  output logic [TAPS-1:0] taps_q
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned HIST = 4; // hit edges remembered

  real eff_delay [TAPS];  // hit-to-sample delay of each tap, skew included
  real edge_time [HIST];  // recent hit edges, newest in entry 0
  bit  edge_level[HIST];
  int unsigned rng_state;

  // xorshift32: a fixed, seedable source for the tap deviations
  function automatic int unsigned next_rand(inout int unsigned s);
    s ^= s << 13;
    s ^= s >> 17;
    s ^= s << 5;
    return s;
  endfunction

  // uniform value in [-1, 1)
  function automatic real unit_rand(inout int unsigned s);
    int unsigned r;
    r = next_rand(s);
    return (real'(r % 20001) - 10000.0) / 10000.0;
  endfunction

  initial begin
    real cum;
    rng_state = (SEED == 0) ? 32'h1234_5678 : SEED * 32'h9E37_79B9 + 1;
    cum = ROUTE_PS;
    for (int i = 0; i < int'(TAPS); i++) begin
      cum += TAP_PS + TAP_SPREAD_PS * unit_rand(rng_state);
      eff_delay[i] = cum + SKEW_PS * unit_rand(rng_state);
    end
    for (int k = 0; k < int'(HIST); k++) begin
      edge_time[k]  = -1.0e12;
      edge_level[k] = 1'b0;
    end
    taps_q = '0;
  end

  always @(hit) begin
    for (int k = int'(HIST) - 1; k > 0; k--) begin
      edge_time[k]  = edge_time[k-1];
      edge_level[k] = edge_level[k-1];
    end
    edge_time[0]  = $realtime;
    edge_level[0] = hit;
  end

  // level of the hit input at time t, from the edge history
  function automatic bit level_at(real t);
    for (int k = 0; k < int'(HIST); k++)
      if (edge_time[k] <= t) return edge_level[k];
    return 1'b0;
  endfunction

  // true when an edge lies within META_PS of time t
  function automatic bit near_edge(real t);
    for (int k = 0; k < int'(HIST); k++)
      if ((edge_time[k] - t) < META_PS && (t - edge_time[k]) < META_PS) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    real now;
    now = $realtime;
    for (int i = 0; i < int'(TAPS); i++) begin
      if (near_edge(now - eff_delay[i])) taps_q[i] <= next_rand(rng_state) % 2 == 1;
      else                               taps_q[i] <= level_at(now - eff_delay[i]);
    end
  end
endmodule
