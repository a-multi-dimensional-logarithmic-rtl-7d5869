// Self-checking testbench of the controller. It plays instruction memory:
// whenever the controller fetches, the next test instruction is presented
// in the following (decode) cycle, with chosen register values on A and B.
// For each instruction it checks the number of cycles up to and including
// the next fetch, and the control word: register write address and source,
// PC load on taken branches, data-memory write for sw, and, for filter, the
// whole sequence of coefficient and data addresses (coefficient symmetry,
// circular wrap of the data buffer), the MAC strobes with the dual
// negation pattern, and the writes of r12 and r13. A 75th-order filter must
// take 82 cycles.
module tb_tlns_controller;
  import tlns_pkg::*;
  import tlns_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic [23:0] imem_data, a_val, b_val, ir;
  ctrl_t ctrl;
  int checks = 0, failures = 0, cycles = 0;

  tlns_controller dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // trace of one instruction
  int n_cyc, n_we, n_valid, n_pcload, n_dwe;
  logic [3:0] wa_list [4];
  logic [23:0] iaddr [200];
  logic [23:0] daddr [200];
  logic negs [200];
  logic dsel [4];
  int n_rd;

  // present word at decode, run until the next fetch (inclusive)
  task automatic run(input logic [23:0] word, input logic [23:0] a, input logic [23:0] b);
    n_cyc = 0; n_we = 0; n_valid = 0; n_pcload = 0; n_dwe = 0; n_rd = 0;
    // we are at a negedge in a fetch cycle
    @(negedge clk);
    imem_data = word; a_val = a; b_val = b;
    forever begin
      n_cyc++;
      if (ctrl.rf_we) begin
        if (n_we < 4) begin wa_list[n_we] = ctrl.rf_wa; dsel[n_we] = ctrl.mac_sel; end
        n_we++;
      end
      if (ctrl.mac_valid) begin negs[n_valid] = ctrl.mac_neg_high; n_valid++; end
      if (ctrl.pc_load) n_pcload++;
      if (ctrl.dmem_we) n_dwe++;
      if (ctrl.imem_en && !ctrl.ifetch && ctrl.dmem_from_ctrl) begin
        iaddr[n_rd] = ctrl.imem_addr; daddr[n_rd] = ctrl.dmem_addr; n_rd++;
      end
      if (ctrl.ifetch || ctrl.halt || n_cyc > 300) break;
      @(negedge clk);
      imem_data = 24'($urandom);   // memory output is not held after decode
    end
  endtask

  task automatic filter_case(input int order, input logic csym, input logic [1:0] fsym,
                             input int dptr, input int cbase, input int dstart, input int dend);
    int p, ci;
    run(enc_filter(2, 3, fsym, csym, order), 24'((dptr << 14) | cbase), 24'((dend << 14) | dstart));
    check($sformatf("filter order %0d cycles %0d", order, n_cyc), n_cyc == order + 7 - (fsym[0] ? 0 : 1));
    check("filter taps", n_rd == order + 1);
    check("filter mac strobes", n_valid == order + 1);
    p = dptr;
    for (int i = 0; i <= order && i < n_rd; i++) begin
      ci = (csym && i > order - i) ? order - i : i;
      check($sformatf("coef addr tap %0d", i), iaddr[i] == 24'(cbase + ci));
      check($sformatf("data addr tap %0d: %0d vs %0d", i, daddr[i], p), daddr[i] == 24'(p));
      check("dual sign", negs[i] == (fsym[0] & (1'(i) ^ fsym[1])));
      p = (p == dstart) ? dend : p - 1;
    end
    check("filter writes", n_we == (fsym[0] ? 2 : 1));
    check("r12 low", wa_list[0] == 12 && dsel[0] == 0);
    if (fsym[0]) check("r13 high", wa_list[1] == 13 && dsel[1] == 1);
  endtask

  initial begin
    imem_data = 0; a_val = 0; b_val = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check("first fetch", ctrl.ifetch);
    // ALU register-register: 2 cycles, writes rd
    run(enc_r(6'h20, 1, 2, 7), 5, 6);
    check("add cycles", n_cyc == 2);
    check("add write", n_we == 1 && wa_list[0] == 7);
    // immediate: writes second field
    run(enc_i(6'h08, 1, 9, 3), 5, 0);
    check("addi cycles", n_cyc == 2);
    check("addi write", n_we == 1 && wa_list[0] == 9);
    // beqz taken and not taken
    run(enc_i(6'h04, 6, 0, 1), 0, 0);
    check("beqz taken", n_pcload == 1 && n_cyc == 2);
    run(enc_i(6'h04, 6, 0, 1), 3, 0);
    check("beqz not taken", n_pcload == 0 && n_cyc == 2);
    run(enc_i(6'h05, 6, 0, 1), 3, 0);
    check("bnez taken", n_pcload == 1);
    // sw: 3 cycles, one data-memory write
    run(enc_i(6'h2B, 1, 7, 0), 100, 55);
    check("sw", n_cyc == 3 && n_dwe == 1 && n_we == 0);
    // lw: 4 cycles, writes second field
    run(enc_i(6'h23, 1, 4, 2), 100, 0);
    check("lw", n_cyc == 4 && n_we == 1 && wa_list[0] == 4);
    // btc: 3 cycles; mult: 4 cycles
    run(enc_i(6'h06, 6, 7, 0), 0, 0);
    check("btc", n_cyc == 3 && n_we == 1 && wa_list[0] == 7);
    run(enc_r(6'h0E, 1, 2, 5), 0, 0);
    check("mult", n_cyc == 4 && n_we == 1 && wa_list[0] == 5 && n_valid == 1);
    // jal: link in r15, then jump
    run(enc_j(6'h03, -4), 0, 0);
    check("jal", n_cyc == 3 && n_we == 1 && wa_list[0] == 15 && n_pcload == 1);
    // filters
    filter_case(75, 1'b1, 2'b01, 78, 64, 4, 511);   // source example: 82 cycles
    check("75th order filter takes 82 cycles", n_cyc == 82);
    filter_case(75, 1'b1, 2'b01, 10, 64, 4, 511);   // read wraps to the buffer end
    filter_case(20, 1'b0, 2'b11, 30, 200, 20, 40);
    filter_case(9, 1'b1, 2'b00, 5, 7, 0, 15);
    // halt
    run(enc_j(6'h3F, 0), 0, 0);
    repeat (5) @(negedge clk);
    check("halt", ctrl.halt && !ctrl.ifetch && !ctrl.imem_en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
