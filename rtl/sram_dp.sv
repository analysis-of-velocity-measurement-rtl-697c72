// sram_dp: simple dual-port on-chip SRAM with independent write and read clocks.
//
// One write port (wclk) and one read port (rclk). The read is synchronous: the
// word at raddr appears on rdata one rclk edge after re is high, as in an FPGA
// block RAM. Writing and reading the same word in the same moment from the two
// clock domains returns undefined data; the sequencer of the analyser never
// does that (capture and FFT load are exclusive in time).
//
// The analyser uses two instances: the 1024 x 16 input buffer that takes ADC
// samples at the sample clock and hands them to the FFT at the slower
// processing clock, and the result buffer holding Re/Im FFT outputs. The
// 1024 x 16 size and the dual-port, two-rate use are the document's; the
// registered read and the absence of parity bits are this design's choices.
module sram_dp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
