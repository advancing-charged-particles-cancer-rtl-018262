// tb_therm_encoder: drives clean thermometer words, words with bubbles, random
// words and the all-ones word through the encoder at full size (480 taps) and
// compares each code, valid and saturation flag with a ones count made here,
// exactly two cycles after the input.
module tb_therm_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TAPS = 480;
  localparam int unsigned CW   = 9;

  logic            clk = 0, rst_n = 0;
  logic            valid_i = 0;
  logic [TAPS-1:0] therm_i = '0;
  logic            valid_o, sat_o;
  logic [CW-1:0]   code_o;
  int checks = 0, failures = 0;

  therm_encoder #(.TAPS(TAPS)) dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values, delayed by two cycles
  logic          exp_v  [3];
  int unsigned   exp_c  [3];
  logic          exp_s  [3];

  function automatic int unsigned ones(logic [TAPS-1:0] w);
    int unsigned n = 0;
    for (int i = 0; i < int'(TAPS); i++) n += w[i];
    return n;
  endfunction

  task automatic drive(logic v, logic [TAPS-1:0] w);
    valid_i <= v;
    therm_i <= w;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      exp_v[2] <= exp_v[1]; exp_c[2] <= exp_c[1]; exp_s[2] <= exp_s[1];
      exp_v[1] <= valid_i;  exp_c[1] <= ones(therm_i); exp_s[1] <= &therm_i;
    end else begin
      exp_v[1] <= 0; exp_v[2] <= 0; exp_c[1] <= 0; exp_c[2] <= 0; exp_s[1] <= 0; exp_s[2] <= 0;
    end
  end

  // compare after the edge has settled
  always @(negedge clk) if (rst_n && exp_v[2] !== 1'bx) begin
    checks++;
    if (valid_o !== exp_v[2] || (exp_v[2] && (code_o !== CW'(exp_c[2]) || sat_o !== exp_s[2]))) begin
      failures++;
      $display("mismatch: valid %0b/%0b code %0d/%0d sat %0b/%0b", valid_o, exp_v[2], code_o,
               exp_c[2], sat_o, exp_s[2]);
    end
  end

  initial begin
    automatic logic [TAPS-1:0] w;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // clean thermometer codes for every length
    for (int c = 0; c <= int'(TAPS); c++) begin
      w = (c == int'(TAPS)) ? '1 : ((TAPS'(1) << c) - 1);
      drive(1, w);
    end
    // thermometer codes with bubbles near the transition
    for (int k = 0; k < 500; k++) begin
      int c = 8 + ($urandom % (TAPS - 16));
      w = (TAPS'(1) << c) - 1;
      w[c - 1 - ($urandom % 6)] = 1'b0;
      w[c + ($urandom % 6)]     = 1'b1;
      drive(1'($urandom % 2), w);
    end
    // random words
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < int'(TAPS); i += 32) w[i +: 32] = $urandom;
      drive(1, w);
    end
    drive(0, '0);
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
