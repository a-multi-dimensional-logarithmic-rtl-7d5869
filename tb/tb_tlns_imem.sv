// Self-checking testbench of the instruction memory: random program writes
// through the load port, then enabled and disabled reads with their
// one-cycle latency, against a reference array.
module tb_tlns_imem;
  localparam int DEPTH = 64;
  logic clk = 0, en, we;
  logic [5:0] addr, waddr;
  logic [23:0] rdata, wdata, ref_m [DEPTH], last;
  int checks = 0, failures = 0, cycles = 0;

  tlns_imem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 24'($urandom); ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    @(negedge clk); en = 1; addr = 0;
    @(negedge clk); last = ref_m[0];
    for (int n = 0; n < 3000; n++) begin
      en = 1'($urandom); addr = 6'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        we = 1; waddr = 6'($urandom); wdata = 24'($urandom);
      end else we = 0;
      @(posedge clk);
      if (en) last = ref_m[addr];
      if (we) ref_m[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== last) begin failures++; $display("addr %0d got %h exp %h", addr, rdata, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
