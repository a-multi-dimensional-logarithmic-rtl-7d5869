// Register file of the 2DLNS CPU: NREGS general purpose registers of WIDTH
// bits with two combinational read ports (A and B) and one synchronous write
// port, so two registers are read and one is written per cycle as the source
// design specifies. Register 0 always reads as zero and ignores writes (the
// example programs use it as the zero source); that and the synchronous reset
// to zero are this design's choices.
// Timing: a write on the rising clock edge is visible on the read ports in
// the next cycle.
module tlns_regfile #(
  parameter int NREGS = 16,
  parameter int WIDTH = 24,
  localparam int AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] qa,
  output logic [WIDTH-1:0] qb,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign qa = (ra == '0) ? '0 : regs[ra];
  assign qb = (rb == '0) ? '0 : regs[rb];
endmodule
