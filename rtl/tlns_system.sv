// Complete 2DLNS processor: the CPU with its instruction memory (program and
// filter coefficients) and data memory. Samples enter on Input_data and
// leave on Output_data with Output_enable; the program is written into
// instruction memory through the prog_* port while reset is held, and runs
// from address 0 after reset is released. Memory depths are parameters.
module tlns_system #(
  parameter int IMEM_DEPTH = 1024,
  parameter int DMEM_DEPTH = 1024,
  localparam int IAW = $clog2(IMEM_DEPTH),
  localparam int DAW = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [23:0]    Input_data,
  output logic [23:0]    Output_data,
  output logic           Output_enable,
  output logic           halt,
  output logic           ifetch,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [23:0]    prog_data
);
  logic [23:0]    ir_rdata, dm_rdata, dm_wdata;
  logic [IAW-1:0] ir_addr;
  logic [DAW-1:0] dm_addr;
  logic           ir_en, dm_en, dm_we;

  tlns_cpu #(.IMEM_AW(IAW), .DMEM_AW(DAW)) u_cpu (
    .clk                 (clk),
    .reset               (reset),
    .Input_data          (Input_data),
    .halt                (halt),
    .ifetch              (ifetch),
    .Output_data         (Output_data),
    .Output_enable       (Output_enable),
    .Ir_mem_read_data    (ir_rdata),
    .Ir_mem_address      (ir_addr),
    .Ir_mem_en           (ir_en),
    .Data_mem_read_data  (dm_rdata),
    .Data_mem_address    (dm_addr),
    .Data_mem_write_data (dm_wdata),
    .Data_mem_en         (dm_en),
    .Data_mem_write_en   (dm_we)
  );

  tlns_imem #(.DEPTH(IMEM_DEPTH), .WIDTH(24)) u_imem (
    .clk   (clk),
    .en    (ir_en),
    .addr  (ir_addr),
    .rdata (ir_rdata),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  tlns_dmem #(.DEPTH(DMEM_DEPTH), .WIDTH(24)) u_dmem (
    .clk   (clk),
    .en    (dm_en),
    .we    (dm_we),
    .addr  (dm_addr),
    .wdata (dm_wdata),
    .rdata (dm_rdata)
  );
endmodule
