// cal_lut: calibration table of one delay line, one block RAM.
//
// Maps the bin code from the encoder to the fine time in picoseconds that the
// code stands for. The table is filled from an offline calibration, in which
// hits with precisely stepped time offsets are sent through the line and the
// width of every bin is measured; entry c then holds the mean time that code
// c represents. Until it is written the table holds the ideal linear
// characteristic, entry c = c*INIT_BIN_PS - INIT_BIN_PS/2 (0 for c = 0),
// loaded as the RAM's initial contents.
//
// Interface and timing: a synchronous read port (rd_addr in, rd_data one
// cycle later) and a write port (we, waddr, wdata) for loading the table.
// Both ports run on clk. A calibration table in one block RAM follows the
// published design's resource figures; its width, depth and initial contents
// are this design's choice.
module cal_lut #(
  parameter int unsigned ADDR_W      = tdc_pkg::CODE_W,
  parameter int unsigned DATA_W      = tdc_pkg::FINE_W,
  parameter int unsigned INIT_BIN_PS = tdc_pkg::NOM_BIN_PS
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int c = 0; c < int'(DEPTH); c++)
      mem[c] = (c == 0) ? '0 : DATA_W'(c * INIT_BIN_PS - INIT_BIN_PS / 2);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_data <= mem[rd_addr];
  end
endmodule
