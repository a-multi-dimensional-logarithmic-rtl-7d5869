// Self-checking testbench of the register file: random writes and dual reads
// against a reference array; register 0 must read zero.
module tb_tlns_regfile;
  logic clk = 0, rst = 1;
  logic [3:0] ra, rb, wa;
  logic [23:0] qa, qb, wd;
  logic we;
  logic [23:0] ref_r [16];
  int checks = 0, failures = 0;

  tlns_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    for (int i = 0; i < 16; i++) ref_r[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++; if (qa !== ref_r[ra]) begin failures++; $display("A r%0d got %h exp %h", ra, qa, ref_r[ra]); end
      checks++; if (qb !== ref_r[rb]) begin failures++; $display("B r%0d got %h exp %h", rb, qb, ref_r[rb]); end
      we = 1'($urandom); wa = 4'($urandom); wd = 24'($urandom);
      @(posedge clk);
      if (we && wa != 0) ref_r[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
