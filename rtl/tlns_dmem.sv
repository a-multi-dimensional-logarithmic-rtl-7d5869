// Data memory: DEPTH words of 24 bits with one synchronous port. With en
// high, we high writes wdata to addr on the rising edge; with en high and we
// low, the word at addr appears on rdata after the edge and holds until the
// next enabled read. Depth and read latency are this design's choices.
module tlns_dmem #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 24,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
