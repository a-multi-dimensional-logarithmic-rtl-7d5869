// Instruction memory: DEPTH words of 24 bits holding the program and
// permanent data (filter coefficients). The CPU side is a synchronous read
// port: with en high, the word at addr appears on rdata after the next rising
// edge and holds until the next enabled read. A separate write port (we,
// waddr, wdata) loads the program; the source design does not say how the
// memory is filled, so that port and the depth are this design's choices.
module tlns_imem #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 24,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end
endmodule
