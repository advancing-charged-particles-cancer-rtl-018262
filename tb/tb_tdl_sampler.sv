// tb_tdl_sampler: drives sequences of sampled delay-line words as a line
// produces them (idle zeros, the first word of a hit with or without bubbles,
// saturated ones while the hit stays high, the falling edge entering from
// tap 0) and checks, two edges after each word, the hit strobe, the captured
// word and the bubble flag against a reference kept here.
module tb_tdl_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TAPS = 480;

  logic            clk = 0, rst_n = 0;
  logic [TAPS-1:0] taps_i = '0;
  logic            hit_o, bubble_o;
  logic [TAPS-1:0] therm_o;
  int checks = 0, failures = 0, hits_seen = 0, bubbles_seen = 0;

  tdl_sampler #(.TAPS(TAPS)) dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [TAPS-1:0] hist [3];   // word presented 0, 1 and 2 cycles ago
  int              age = 0;

  function automatic logic lead(logic [TAPS-1:0] w);
    return |w[3:0];
  endfunction

  function automatic logic has_bubble(logic [TAPS-1:0] w);
    for (int i = 1; i < int'(TAPS); i++) if (w[i] && !w[i-1]) return 1'b1;
    return 1'b0;
  endfunction

  // present a word for one cycle and check the output for the word of two
  // cycles before
  task automatic present(logic [TAPS-1:0] w);
    logic exp_hit;
    taps_i <= w;
    @(posedge clk);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = w;
    age++;
    #1;
    if (age >= 2) begin
      exp_hit = lead(hist[1]) && !lead(hist[2]);
      checks++;
      if (hit_o !== exp_hit || therm_o !== hist[1] || bubble_o !== has_bubble(hist[1])) begin
        failures++;
        $display("FAIL at %0t: hit %0b/%0b bubble %0b", $time, hit_o, exp_hit, bubble_o);
      end
      hits_seen    += int'(hit_o);
      bubbles_seen += int'(bubble_o);
    end
  endtask

  initial begin
    logic [TAPS-1:0] w;
    int c;
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      repeat (1 + $urandom % 3) present('0);
      // first word of a hit: thermometer of random length, maybe bubbled
      c = 1 + $urandom % (TAPS - 1);
      w = (TAPS'(1) << c) - 1;
      if (k % 2 == 1 && c > 6) begin
        w[c - 2 - ($urandom % 3)] = 1'b0;
        w[c + ($urandom % 3)]     = 1'b1;
      end
      if (k % 7 == 3 && c > 4) w[0] = 1'b0;      // metastable first tap
      present(w);
      repeat ($urandom % 3) present('1);
      // falling edge: zeros enter from tap 0
      c = 1 + $urandom % (TAPS - 1);
      present(~((TAPS'(1) << c) - 1));
    end
    repeat (4) present('0);
    checks++;
    if (hits_seen != 400 || bubbles_seen == 0) begin
      failures++;
      $display("FAIL: %0d hits, %0d bubbled words", hits_seen, bubbles_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
