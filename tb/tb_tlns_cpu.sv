// Self-checking testbench of the CPU core with behavioural memories. A
// program that uses every instruction class (register and immediate
// arithmetic, logic, shifts, set-on-condition, lhi, lw/sw, branches, jumps
// with and without link, inpt/oupt, btc, tbc, mult, mac, halt) sends its
// results through oupt; the sequence on Output_data is compared with values
// computed here. Results of the 2DLNS instructions are checked against real
// arithmetic within the converters' accuracy.
module tb_tlns_cpu;
  import tlns_tb_pkg::*;
  logic clk = 0, reset = 1;
  logic [23:0] Input_data, Output_data, Ir_mem_read_data, Data_mem_read_data, Data_mem_write_data;
  logic halt, ifetch, Output_enable, Ir_mem_en, Data_mem_en, Data_mem_write_en;
  logic [9:0] Ir_mem_address, Data_mem_address;
  int checks = 0, failures = 0, cycles = 0;

  tlns_cpu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [23:0] imem [1024];
  logic [23:0] dmem [1024];
  always_ff @(posedge clk) begin
    if (Ir_mem_en) Ir_mem_read_data <= imem[Ir_mem_address];
    if (Data_mem_en) begin
      if (Data_mem_write_en) dmem[Data_mem_address] <= Data_mem_write_data;
      else Data_mem_read_data <= dmem[Data_mem_address];
    end
  end

  initial begin
    wait (cycles == 20000); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pc = 0;
  logic [23:0] exp_q [$];
  int          tol_q [$];
  function automatic void emit(input logic [23:0] w);
    imem[pc] = w; pc++;
  endfunction
  function automatic void out_exp(input int r, input logic [23:0] v, input int tol = 0);
    emit(enc_i(6'h11, 0, r, 0)); exp_q.push_back(v); tol_q.push_back(tol);
  endfunction

  int n_out = 0;
  always @(posedge clk) if (!reset && Output_enable) begin
    logic [23:0] e;
    int t, d;
    n_out++;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output %h", Output_data); end
    else begin
      e = exp_q.pop_front(); t = tol_q.pop_front();
      d = int'($signed(Output_data)) - int'($signed(e));
      if (d > t || d < -t) begin failures++; $display("output %0d got %h exp %h", n_out, Output_data, e); end
    end
  end

  initial begin
    int mulx;
    for (int i = 0; i < 1024; i++) begin imem[i] = 0; dmem[i] = 0; end
    Input_data = 24'h123456;
    emit(enc_i(6'h08, 0, 1, 100));            // addi r1 = 100
    emit(enc_i(6'h08, 0, 2, -7));             // addi r2 = -7
    out_exp(1, 100); out_exp(2, -7);
    emit(enc_r(6'h20, 1, 2, 3)); out_exp(3, 93);          // add
    emit(enc_r(6'h22, 1, 2, 3)); out_exp(3, 107);         // sub
    emit(enc_r(6'h24, 1, 2, 3)); out_exp(3, 100 & -7);    // and
    emit(enc_r(6'h25, 1, 2, 3)); out_exp(3, 24'(100 | -7));
    emit(enc_r(6'h26, 1, 2, 3)); out_exp(3, 24'(100 ^ -7));
    emit(enc_i(6'h0F, 0, 4, 10'h2A5)); out_exp(4, 24'h2A5 << 14);  // lhi
    emit(enc_i(6'h0D, 4, 4, 10'h3FF)); out_exp(4, (24'h2A5 << 14) | 24'h3FF); // ori (zero-extended)
    emit(enc_i(6'h09, 0, 5, -1)); out_exp(5, 24'h3FF);   // addui zero-extends
    emit(enc_i(6'h14, 2, 5, 3)); out_exp(5, 24'(-56));   // slli
    emit(enc_i(6'h16, 2, 5, 3)); out_exp(5, 24'hFFFFF9 >> 3);  // srli
    emit(enc_i(6'h17, 2, 5, 1)); out_exp(5, 24'(-4));    // srai
    emit(enc_i(6'h08, 0, 6, 2));
    emit(enc_r(6'h04, 1, 6, 5)); out_exp(5, 400);        // sll by register
    emit(enc_r(6'h2A, 2, 1, 7)); out_exp(7, 1);          // slt -7 < 100
    emit(enc_r(6'h3A, 2, 1, 7)); out_exp(7, 0);          // sltu
    emit(enc_r(6'h2D, 1, 1, 7)); out_exp(7, 1);          // sge
    emit(enc_i(6'h1B, 1, 7, 99)); out_exp(7, 1);         // sgti
    emit(enc_i(6'h18, 1, 7, 99)); out_exp(7, 0);         // seqi
    emit(enc_i(6'h0A, 1, 7, 1)); out_exp(7, 99);         // subi
    // memory
    emit(enc_i(6'h2B, 1, 3, 5));              // sw M[r1+5] = r3
    emit(enc_i(6'h23, 1, 8, 5)); out_exp(8, 24'(100 ^ -7));  // lw
    // input register
    emit(enc_i(6'h10, 0, 9, 0)); out_exp(9, 24'h123456);
    // conversions: btc then tbc gives the integer back (within 1)
    emit(enc_i(6'h06, 1, 10, 0));             // btc r10 = 2DLNS(100)
    emit(enc_i(6'h07, 10, 11, 0)); out_exp(11, 100, 1);
    emit(enc_i(6'h08, 0, 6, -300));
    emit(enc_i(6'h06, 6, 6, 0));              // r6 = 2DLNS(-300)
    emit(enc_r(6'h0E, 10, 6, 12)); out_exp(12, 24'(-30000), 40);   // mult
    emit(enc_r(6'h0F, 10, 10, 12)); out_exp(12, 24'(-20000), 40);  // mac adds 100*100
    // branches: taken beqz skips a wrong output
    emit(enc_i(6'h04, 0, 0, 1));
    out_exp(1, 24'hBAD); void'(exp_q.pop_back()); void'(tol_q.pop_back());
    emit(enc_i(6'h05, 0, 0, 5));              // bnez r0: not taken
    emit(enc_i(6'h05, 1, 0, 1));              // bnez r1: taken
    emit(enc_i(6'h11, 0, 2, 0));              // skipped
    // jal to a subroutine at +3, which outputs r1 and returns with jr r15
    emit(enc_j(6'h03, 2));                    // jal at p, target p+3
    emit(enc_i(6'h11, 0, 2, 0));              // after return
    emit(enc_j(6'h02, 3));                    // j over the subroutine
    out_exp(1, 100);                          // subroutine
    exp_q.push_back(-7); tol_q.push_back(0);
    emit(enc_i(6'h12, 15, 0, 0));             // jr r15
    emit(0);                                   // nop (skipped)
    // jalr through a register
    emit(enc_i(6'h08, 0, 13, pc + 4));        // r13 = address of sub2
    emit(enc_i(6'h13, 13, 0, 0));             // jalr r13
    emit(enc_i(6'h11, 0, 3, 0));              // after return
    emit(enc_j(6'h02, 2));
    out_exp(5, 400);                          // sub2
    exp_q.push_back(24'(100 ^ -7)); tol_q.push_back(0);
    emit(enc_i(6'h12, 15, 0, 0));
    emit(0);                                  // nop
    emit(enc_j(6'h3F, 0));                    // halt
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (halt);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    checks++;
    if (!halt || ifetch) begin failures++; $display("halt not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
