// Self-checking testbench of the data memory: random enabled writes and
// reads with the one-cycle read latency against a reference array; a
// disabled cycle must neither write nor change the read data.
module tb_tlns_dmem;
  localparam int DEPTH = 64;
  logic clk = 0, en, we;
  logic [5:0] addr;
  logic [23:0] rdata, wdata, ref_m [DEPTH], last;
  int checks = 0, failures = 0, cycles = 0;

  tlns_dmem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = 24'($urandom); ref_m[i] = wdata;
    end
    @(negedge clk); we = 0; addr = 0;
    @(negedge clk); last = ref_m[0];
    for (int n = 0; n < 3000; n++) begin
      en = 1'($urandom); we = 1'($urandom); addr = 6'($urandom); wdata = 24'($urandom);
      @(posedge clk);
      if (en && we) ref_m[addr] = wdata;
      else if (en) last = ref_m[addr];
      @(negedge clk);
      checks++;
      if (rdata !== last) begin failures++; $display("addr %0d got %h exp %h", addr, rdata, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
