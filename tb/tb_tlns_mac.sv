// Self-checking testbench of the 2DLNS MAC: random runs of products with
// random dual-negation flags are accumulated and compared with sums computed
// in real arithmetic from the 2DLNS words; the two-cycle latency from input
// to accumulator and the clear, the low/high result select and the integer
// scaling of the result are checked too.
module tb_tlns_mac;
  import tlns_pkg::*;
  import tlns_tb_pkg::*;
  logic clk = 0, rst = 1;
  tlns_t x, y;
  logic in_valid, neg_high, clear, sel;
  logic [23:0] result;
  logic signed [ACC_W-1:0] low_acc, high_acc;
  int checks = 0, failures = 0;
  int cycles = 0;

  tlns_mac dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++; $display("%s got %f exp %f tol %f", what, got, exp, tol);
    end
  endtask

  initial begin
    real slo, shi, sabs, p, last, tol;
    int len;
    logic [23:0] xw, yw;
    in_valid = 0; neg_high = 0; clear = 0; sel = 0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int run = 0; run < 200; run++) begin
      len = $urandom_range(1, 40);
      @(negedge clk); clear = 1; in_valid = 0;
      @(negedge clk); clear = 0;
      slo = 0; shi = 0; sabs = 0; last = 0;
      for (int i = 0; i < len; i++) begin
        if (i == len - 1) begin
          xw = {1'b0, 6'sd8, 5'sd0, 12'h400};              // 256
          yw = {1'($urandom), 6'sd2, 5'sd0, 12'h400};      // +-4
        end else begin
          xw = rand_word(0, 14);                            // data
          yw = rand_word(-12, -1);                          // coefficient
        end
        x = tlns_t'(xw); y = tlns_t'(yw);
        in_valid = 1; neg_high = 1'($urandom);
        p = word_real(xw) * word_real(yw);
        slo += p; shi += neg_high ? -p : p; sabs += (p < 0) ? -p : p;
        last = p;
        @(negedge clk);
      end
      in_valid = 0;
      tol = 4.0 * len / 256.0 + sabs * 4.0e-5 + 1.0e-6;
      // one edge after the last input: last product not yet in
      check_close("latency", real'(low_acc) / 256.0, slo - last, tol);
      @(negedge clk);
      check_close("low", real'(low_acc) / 256.0, slo, tol);
      check_close("high", real'(high_acc) / 256.0, shi, tol);
      sel = 0; #1;
      checks++; if (result !== low_acc[FRAC +: 24]) begin failures++; $display("result low"); end
      sel = 1; #1;
      checks++; if (result !== high_acc[FRAC +: 24]) begin failures++; $display("result high"); end
      check_close("result", real'($signed(result)), shi, tol + 1.0);
    end
    // clear without new input leaves zero
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    checks++; if (low_acc != 0 || high_acc != 0) begin failures++; $display("clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
