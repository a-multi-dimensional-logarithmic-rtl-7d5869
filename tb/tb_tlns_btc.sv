// Self-checking testbench of the binary-to-2DLNS converter: random and
// corner integers are converted and the real value of the two-digit result
// (computed in real arithmetic from the digit fields) must be within 0.1 %
// (plus 1/16) of the input; zero must give the zero code. It also checks the
// one-cycle timing: the result follows the input sampled with load.
module tb_tlns_btc;
  import tlns_pkg::*;
  import tlns_tb_pkg::*;
  logic clk = 0, rst = 1, load;
  logic [23:0] x;
  tlns_t y;
  int checks = 0, failures = 0, cycles = 0;
  real worst = 0;

  tlns_btc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    real got, err, rel;
    load = 0; x = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      case (n % 4)
        0: v = int'($urandom_range(0, 65535)) - 32768;
        1: v = int'($urandom_range(0, 200)) - 100;
        2: v = int'($signed(24'($urandom)));
        default: v = (n < 8) ? ((n == 3) ? 0 : -8388608) : int'($urandom_range(0, 4095));
      endcase
      @(negedge clk); load = 1; x = 24'(v);
      @(negedge clk); load = 0; x = 24'($urandom);   // output must not follow x now
      got = word_real(y);
      err = got - real'(v);
      if (err < 0) err = -err;
      rel = (v == 0) ? 0 : err / ((v < 0) ? -real'(v) : real'(v));
      if (rel > worst) worst = rel;
      checks++;
      if (err > 0.001 * ((v < 0) ? -real'(v) : real'(v)) + 0.0625) begin
        failures++; $display("x=%0d got %f (%h)", v, got, y);
      end
      if (v == 0) begin
        checks++;
        if (y !== 24'h400400) begin failures++; $display("zero gave %h", y); end
      end
    end
    $display("worst relative error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
