// Self-checking testbench of the 2DLNS-to-binary converter: random product
// digits against 2^a*D^b computed in real arithmetic, including zero digits
// and saturation.
module tb_tlns_tbc;
  import tlns_pkg::*;
  import tlns_tb_pkg::*;
  logic zero, s, neg;
  logic signed [6:0] a;
  logic signed [5:0] b;
  logic [TBC_W-1:0] mag;
  int checks = 0, failures = 0;

  tlns_tbc dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ev, tol;
    for (int n = 0; n < 5000; n++) begin
      zero = ($urandom_range(0, 15) == 0);
      s = 1'($urandom);
      a = 7'($urandom_range(0, 60) - 36);
      b = 6'($urandom);
      #1;
      ev = $pow(2.0, real'(a)) * $pow(D, real'(b)) * 256.0;
      checks++;
      if (zero) begin
        if (mag != 0 || neg) begin failures++; $display("zero digit gave %0d", mag); end
      end else if (ev >= 4294967296.0) begin
        if (mag != '1) begin failures++; $display("no saturation a=%0d b=%0d", a, b); end
      end else begin
        tol = ev * 3.1e-5 + 1.0;
        if ((real'(mag) - ev > tol) || (ev - real'(mag) > tol) || neg != s) begin
          failures++; $display("a=%0d b=%0d got %0d exp %f", a, b, mag, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
