// coarse_counter: counts whole clock periods between the start hit (S1, seen
// by delay line 1) and the stop hit (S2, seen by delay line 2).
//
// start_i and stop_i are the one-cycle hit strobes of the two fine channels.
// Both channels have the same pipeline latency, so the number of cycles
// between the strobes equals the number of clock edges between the edge that
// caught S1 and the edge that caught S2: the coarse term N of
// T = T1 + N*Tclk - T3. A start while idle arms the counter; further starts
// are ignored until the measurement ends. A stop while idle is ignored. Start
// and stop in the same cycle give N = 0. When N would exceed 2^W-1 the
// measurement is abandoned and ovf_o pulses.
//
// Timing: started_o pulses the cycle after an accepted start; done_o with
// count_o the cycle after the stop. The start/stop behaviour follows the
// published design; the width, the overflow rule, and the handling of extra
// or early hits are this design's choice.
module coarse_counter #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic         stop_i,
  output logic         started_o,
  output logic         done_o,
  output logic [W-1:0] count_o,
  output logic         ovf_o,
  output logic         busy_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_o    <= 1'b0;
      cnt       <= '0;
      started_o <= 1'b0;
      done_o    <= 1'b0;
      ovf_o     <= 1'b0;
      count_o   <= '0;
    end else begin
      started_o <= 1'b0;
      done_o    <= 1'b0;
      ovf_o     <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          started_o <= 1'b1;
          if (stop_i) begin
            done_o  <= 1'b1;
            count_o <= '0;
          end else begin
            busy_o <= 1'b1;
            cnt    <= W'(1);
          end
        end
      end else if (stop_i) begin
        done_o  <= 1'b1;
        count_o <= cnt;
        busy_o  <= 1'b0;
      end else if (&cnt) begin
        ovf_o  <= 1'b1;
        busy_o <= 1'b0;
      end else begin
        cnt <= cnt + W'(1);
      end
    end
  end

  // a measurement ends either with a count or with an overflow, never both
  a_done_xor_ovf: assert property (@(posedge clk) disable iff (!rst_n) !(done_o && ovf_o));
  // a result always follows a start
  a_done_after_start: assert property (@(posedge clk) disable iff (!rst_n)
                                       (start_i && !busy_o) |=> started_o);
endmodule
