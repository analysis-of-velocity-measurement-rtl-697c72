// tdp_ram: single-clock true dual-port RAM (two independent read/write ports).
//
// Each port either writes wdata to addr (we high) or reads addr, the word
// appearing on rdata one clock later. Read-during-write on the same port
// returns the old word. The two ports must not write the same address in the
// same cycle. This is the FFT's in-place working store: both butterfly
// operands are read in one cycle and both results written back in the next.
module tdp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 54,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end

endmodule
