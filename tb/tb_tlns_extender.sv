// Self-checking testbench of the immediate extender: the four modes on
// random instruction words.
module tb_tlns_extender;
  logic [1:0] mode;
  logic [23:0] word, y, e;
  int checks = 0, failures = 0;

  tlns_extender dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      mode = 2'(n);
      word = 24'($urandom);
      #1;
      case (mode)
        0: e = 24'(int'($signed(word[9:0])));
        1: e = 24'(int'(word[9:0]));
        2: e = 24'(int'($signed(word[17:0])));
        default: e = word;
      endcase
      checks++;
      if (y !== e) begin failures++; $display("mode %0d word %h got %h exp %h", mode, word, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
