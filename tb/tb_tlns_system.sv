// End-to-end testbench of the 2DLNS processor at its default sizes, running
// an 8-band filterbank: four symmetric 75th-order filters, each computed
// together with its dual (the same coefficients with every odd tap negated),
// over a circular data buffer at words 4..511 of data memory, coefficients
// from word 64 of instruction memory.
//
// The program written here first fills the buffer with 2DLNS zeros, then per
// sample: reads the input (inpt), converts it (btc), stores it (sw), runs the
// four filter pairs, and writes each result shifted left by 4 with its band
// number in the low 4 bits (oupt); it then advances the buffer pointer with
// wrap-around and stops (halt) after NSAMP samples.
//
// Checks: every stored sample is within 0.1 % of the input; every band
// output matches the filter computed here in real arithmetic from the stored
// 2DLNS words and the coefficients; every filter instruction takes 82 cycles;
// the other instructions of one sample loop take the count this design
// gives (reported beside the source's 95). Each mechanism (clear loop,
// conversion, filter, dual, symmetric coefficients, pointer wrap, tap wrap
// in the buffer, taken and untaken branch, output, halt) must occur.
module tb_tlns_system;
  import tlns_tb_pkg::*;
  localparam int DSTART = 4, DEND = 511, COEF = 64, ORDER = 75, NC = 38;
  localparam int NSAMP = 520, START_PTR = DEND - 9;

  logic clk = 0, reset = 1;
  logic [23:0] Input_data, Output_data, prog_data;
  logic Output_enable, halt, ifetch, prog_we;
  logic [9:0] prog_addr;
  int checks = 0, failures = 0, cycles = 0;

  tlns_system dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000000); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  logic [23:0] prog [1024];
  int pc = 0;
  function automatic void emit(input logic [23:0] w);
    prog[pc] = w; pc++;
  endfunction

  int loop_start, loop_end;
  task automatic build_program();
    int clr, nxt, br;
    emit(enc_i(6'h08, 0, 5, DSTART));          // r5 = buffer start
    emit(enc_i(6'h09, 0, 10, DEND));           // r10 = buffer end
    emit(enc_i(6'h0F, 0, 4, DEND));            // r4 = end << 14
    emit(enc_r(6'h25, 4, 5, 3));               // r3 = {end, start}
    emit(enc_i(6'h09, 0, 14, NSAMP));          // r14 = samples to run (addui)
    emit(enc_i(6'h06, 0, 7, 0));               // r7 = 2DLNS zero
    emit(enc_i(6'h08, 5, 1, 0));               // r1 = start
    clr = pc;
    emit(enc_i(6'h2B, 1, 7, 0));               // clear: M[r1] = 0
    emit(enc_i(6'h08, 1, 1, 1));
    emit(enc_r(6'h2B, 1, 10, 6));              // r6 = r1 > end
    emit(enc_i(6'h04, 6, 0, clr - (pc + 1)));  // beqz r6, clear
    emit(enc_i(6'h08, 0, 1, START_PTR));       // r1 = first sample address
    nxt = pc; loop_start = pc;
    emit(enc_i(6'h08, 0, 2, COEF));            // r2 = coefficient start
    emit(enc_i(6'h14, 1, 8, 14));              // r8 = r1 << 14
    emit(enc_r(6'h25, 8, 2, 2));               // r2 = {pointer, coef}
    emit(enc_i(6'h10, 0, 6, 0));               // inpt r6
    emit(enc_i(6'h06, 6, 7, 0));               // btc r7 = r6
    emit(enc_i(6'h2B, 1, 7, 0));               // sw M[r1] = r7
    for (int k = 0; k < 4; k++) begin
      emit(enc_filter(2, 3, 2'b01, 1'b1, ORDER));
      emit(enc_i(6'h08, 0, 9, k));             // band tag
      emit(enc_i(6'h14, 12, 12, 4));
      emit(enc_r(6'h25, 9, 12, 12));
      emit(enc_i(6'h11, 0, 12, 0));            // oupt band k
      emit(enc_i(6'h08, 0, 11, 7 - k));        // dual band tag
      emit(enc_i(6'h14, 13, 13, 4));
      emit(enc_r(6'h25, 11, 13, 13));
      emit(enc_i(6'h11, 0, 13, 0));            // oupt band 7-k
      if (k < 3) emit(enc_i(6'h08, 2, 2, NC)); // next coefficient set
    end
    emit(enc_i(6'h08, 1, 1, 1));               // pointer + 1
    emit(enc_r(6'h2B, 1, 10, 6));              // r6 = r1 > end
    emit(enc_i(6'h04, 6, 0, 1));               // beqz r6, cont
    emit(enc_i(6'h08, 5, 1, 0));               // r1 = start
    emit(enc_i(6'h0A, 14, 14, 1));             // cont: r14 -= 1
    loop_end = pc;
    emit(enc_i(6'h05, 14, 0, nxt - (pc + 1))); // bnez r14, next
    emit(enc_j(6'h3F, 0));                     // halt
  endtask

  // ---------------- reference ----------------
  logic [23:0] coef [4][NC];
  real         samp [NSAMP];
  logic [23:0] shadow [1024];
  int n_writes = 0, n_samples = 0, last_ptr = -1;
  int n_out = 0, n_wrap_ptr = 0, n_tap_wrap = 0, n_dual = 0, n_filter = 0;
  int n_taken = 0, n_untaken = 0, n_btc = 0, n_clear = 0;
  real worst = 0;

  // snoop the data-memory writes
  always @(posedge clk) if (!reset && dut.u_cpu.Data_mem_en && dut.u_cpu.Data_mem_write_en) begin
    int a;
    real v, err;
    a = int'(dut.u_cpu.Data_mem_address);
    shadow[a] = dut.u_cpu.Data_mem_write_data;
    n_writes++;
    if (n_writes <= DEND - DSTART + 1) begin
      n_clear++;
      check("clear word", dut.u_cpu.Data_mem_write_data == 24'h400400);
    end else begin
      v = word_real(dut.u_cpu.Data_mem_write_data);
      err = v - samp[n_samples];
      if (err < 0) err = -err;
      check($sformatf("btc of sample %0d", n_samples),
            err <= 0.001 * ((samp[n_samples] < 0) ? -samp[n_samples] : samp[n_samples]) + 0.0625);
      n_btc++;
      if (last_ptr == DEND && a == DSTART) n_wrap_ptr++;
      last_ptr = a;
      n_samples++;
      Input_data <= 24'(int'(samp[n_samples < NSAMP ? n_samples : 0]));
    end
  end

  function automatic real filt(input int band, input logic dual, output real sabs);
    real s, p;
    int a, ci;
    s = 0; sabs = 0; a = last_ptr;
    for (int i = 0; i <= ORDER; i++) begin
      ci = (i > ORDER - i) ? ORDER - i : i;
      p = word_real(shadow[a]) * word_real(coef[band][ci]);
      if (dual && (i % 2 == 1)) p = -p;
      s += p; sabs += (p < 0) ? -p : p;
      a = (a == DSTART) ? DEND : a - 1;
    end
    return s;
  endfunction

  always @(posedge clk) if (!reset && Output_enable) begin
    int tag, got, k, expi;
    real e, sabs, tol;
    logic dual;
    tag = int'(Output_data[3:0]);
    got = int'($signed(Output_data[23:4]));
    dual = (tag >= 4);
    k = dual ? 7 - tag : tag;
    e = filt(k, dual, sabs);
    expi = int'($floor(e));
    tol = 1.0 + 4.0 * (ORDER + 1) / 256.0 + sabs * 4.0e-5;
    check($sformatf("sample %0d band %0d: got %0d exp %f", n_samples - 1, tag, got, e),
          real'(got) - e <= tol && e - real'(got) <= tol + 1.0);
    check("band order", tag == ((n_out % 2 == 0) ? (n_out % 8) / 2 : 7 - (n_out % 8) / 2));
    if (dual) n_dual++;
    n_out++;
  end

  // tap wraps: consecutive data reads that step from the buffer start to its end
  int prev_rd = -1;
  always @(posedge clk) if (!reset) begin
    if (dut.u_cpu.Data_mem_en && !dut.u_cpu.Data_mem_write_en) begin
      if (prev_rd == DSTART && int'(dut.u_cpu.Data_mem_address) == DEND) n_tap_wrap++;
      prev_rd = int'(dut.u_cpu.Data_mem_address);
    end else prev_rd = -1;
  end

  // instruction trace: cycles per instruction from the fetch strobes
  int last_fetch = -1, loop_cycles = 0, filt_cycles = 0, loops_seen = 0;
  logic [23:0] cur_ir;
  logic in_loop = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_cpu.u_ctrl.state == 4'd1) begin   // decode: instruction word arrives
      cur_ir = dut.u_cpu.Ir_mem_read_data;
    end
    if (ifetch) begin
      int n, addr;
      addr = int'(dut.u_cpu.Ir_mem_address);
      if (last_fetch >= 0) begin
        n = cycles - last_fetch;
        if (cur_ir[23:18] == 6'h15) begin
          n_filter++;
          check($sformatf("filter cycles %0d", n), n == 82);
          filt_cycles += n;
        end else if (in_loop) loop_cycles += n;
        if (cur_ir[23:18] == 6'h04 || cur_ir[23:18] == 6'h05) begin
          if (addr == int'(dut.u_cpu.pc_q)) n_untaken++; else n_taken++;
        end
      end
      last_fetch = cycles;
      if (addr == loop_start) begin
        if (in_loop && loops_seen == 1) begin
          $display("one sample: filters %0d cycles, other instructions %0d cycles (source design: 4 x 82 and 95)",
                   filt_cycles, loop_cycles);
          check("loop cycles", loop_cycles == 94);
        end
        if (in_loop) loops_seen++;
        in_loop = 1; loop_cycles = 0; filt_cycles = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = 0;
    build_program();
    check("program below coefficients", pc <= COEF);
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < NC; j++) begin
        coef[k][j] = rand_word(-13, -6);
        prog[COEF + k * NC + j] = coef[k][j];
      end
    for (int n = 0; n < NSAMP; n++) samp[n] = real'(int'($urandom_range(0, 65535)) - 32768);
    Input_data = 24'(int'(samp[0]));
    prog_we = 0; prog_addr = 0; prog_data = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); reset = 0;
    wait (halt);
    repeat (5) @(posedge clk);
    check("all outputs", n_out == 8 * NSAMP);
    check("all samples", n_samples == NSAMP);
    $display("mechanisms: clear=%0d btc=%0d filter=%0d dual_out=%0d ptr_wrap=%0d tap_wrap=%0d taken=%0d untaken=%0d out=%0d halt=%0d",
             n_clear, n_btc, n_filter, n_dual, n_wrap_ptr, n_tap_wrap, n_taken, n_untaken, n_out, halt);
    check("mech clear", n_clear > 0);
    check("mech btc", n_btc > 0);
    check("mech filter", n_filter == 4 * NSAMP);
    check("mech dual", n_dual > 0);
    check("mech pointer wrap", n_wrap_ptr > 0);
    check("mech tap wrap", n_tap_wrap > 0);
    check("mech branch taken", n_taken > 0);
    check("mech branch untaken", n_untaken > 0);
    check("mech halt", halt);
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
