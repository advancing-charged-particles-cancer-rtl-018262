// tb_cal_lut: checks the calibration table at full size (512 x 16): the
// initial linear contents c*6 - 3, the one-cycle read latency, and that
// written entries read back while the others keep their values.
module tb_cal_lut;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned AW = 9, DW = 16;

  logic          clk = 0;
  logic [AW-1:0] rd_addr = '0, waddr = '0;
  logic [DW-1:0] rd_data, wdata = '0;
  logic          we = 0;
  logic [DW-1:0] model [1 << AW];
  int checks = 0, failures = 0;

  cal_lut dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    rd_addr <= AW'(a);
    @(posedge clk);
    #1;
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("FAIL addr %0d: %0d expected %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    for (int c = 0; c < (1 << AW); c++) model[c] = (c == 0) ? '0 : DW'(6 * c - 3);
    @(posedge clk);
    for (int c = 0; c < (1 << AW); c++) read_check(c);
    // write a random calibration
    for (int k = 0; k < 300; k++) begin : wr
      int a, d;
      a = $urandom % (1 << AW);
      d = $urandom % 65536;
      we <= 1; waddr <= AW'(a); wdata <= DW'(d);
      @(posedge clk);
      model[a] = DW'(d);
    end
    we <= 0;
    for (int c = 0; c < (1 << AW); c++) read_check(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
