// tb_cpu_core: instruction-by-instruction test of the processor core.
//
// The core runs on a behavioural word memory with one cycle of read
// latency. A program touching every opcode group is assembled into it;
// results are stored to a result area that the testbench then compares with
// values worked out by hand from the instruction set. A console model
// accepts output words with random stalls and supplies input. Further short
// programs check each way of stopping (HALT, BAD, an unused opcode,
// division by zero, RET with SP = 0, LDFLS with RUN = 0), the INTR flag and
// condition, and the cycle counts of a register instruction (4), an indirect
// one (5) and a division (38).
module tb_cpu_core;
  import isa_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, intr = 0, run;
  logic [31:0] flags_word;
  logic mem_en, mem_we;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic out_valid, out_ready, in_ready, in_valid;
  out_kind_e out_kind;
  in_kind_e in_kind;
  logic [31:0] out_data, in_data;

  cpu_core dut (.*);
  always #5 clk = ~clk;

  // behavioural memory
  logic [31:0] mem [65536];
  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr[15:0]] <= mem_wdata;
      else        mem_rdata <= mem[mem_addr[15:0]];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // console model
  logic [31:0] outs[$];
  out_kind_e   kinds[$];
  always_ff @(posedge clk) begin
    out_ready <= ($urandom % 3) != 0;
    in_valid  <= ($urandom % 4) == 0;
    in_data   <= (in_kind == IN_NUM) ? 32'hFFFF_FF85 : 32'h0000_1F7A;  // -123 / 'z' with junk above
    if (out_valid && out_ready) begin
      outs.push_back(out_data);
      kinds.push_back(out_kind);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pc;
  task automatic emit(logic [31:0] w);
    mem[pc] = w;
    pc++;
  endtask

  task automatic clear_mem();
    for (int i = 0; i < 65536; i++) mem[i] = 0;
  endtask

  task automatic reset_core();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  // Run from PC 0 until RUN drops; returns the cycle count.
  task automatic run_prog(output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (run) begin @(negedge clk); cycles++; end
  endtask

  localparam int R   = 16'h200;   // result area
  localparam int D0  = 16'h1E0;
  localparam int ARR = 16'h180;
  localparam int STR = 16'h1C0;
  localparam int PTR = 16'h1F0;

  int cyc;

  initial begin
    int l1, sub, tail, outpc;
    clear_mem();
    reset_core();

    // ---------------- main program ----------------
    pc = 0;
    emit(ins(OP_LOAD, 3, 16'h5678));
    emit(ins(OP_LOADH, 3, 16'h1234));
    emit(ins(OP_STORE, 3, R + 0));
    emit(ins(OP_LOAD, 1, 100));
    emit(ins(OP_LOAD, 2, -7));
    emit(ins(OP_ADD, 1, 23));
    emit(ins(OP_STORE, 1, R + 1));              // 123
    emit(ins(OP_SUB, 1, 0, 2));                 // 123 - (-7)
    emit(ins(OP_STORE, 1, R + 2));              // 130
    emit(ins(OP_RSUB, 1, 1000));
    emit(ins(OP_STORE, 1, R + 3));              // 870
    emit(ins(OP_MUL, 1, 0, 2));
    emit(ins(OP_STORE, 1, R + 4));              // -6090
    emit(ins(OP_DIV, 1, 100));
    emit(ins(OP_STORE, 1, R + 5));              // -60
    emit(ins(OP_LOAD, 4, -6090));
    emit(ins(OP_MOD, 4, 100));
    emit(ins(OP_STORE, 4, R + 6));              // -90
    emit(ins(OP_LOAD, 5, 7));
    emit(ins(OP_RDIV, 5, 100));
    emit(ins(OP_STORE, 5, R + 7));              // 14
    emit(ins(OP_LOAD, 5, 7));
    emit(ins(OP_RMOD, 5, 100));
    emit(ins(OP_STORE, 5, R + 8));              // 2
    emit(ins(OP_NEG, 6, 5));
    emit(ins(OP_STORE, 6, R + 9));              // -5
    emit(ins(OP_NOT, 6, 0));
    emit(ins(OP_STORE, 6, R + 10));             // -1
    emit(ins(OP_LOAD, 6, 16'h0F0));
    emit(ins(OP_AND, 6, 16'h03C));
    emit(ins(OP_STORE, 6, R + 11));             // 0x30
    emit(ins(OP_OR, 6, 16'h300));
    emit(ins(OP_STORE, 6, R + 12));             // 0x330
    emit(ins(OP_XOR, 6, 16'h0FF));
    emit(ins(OP_STORE, 6, R + 13));             // 0x3CF
    emit(ins(OP_LOAD, 7, -3));
    emit(ins(OP_MIN, 7, 4));
    emit(ins(OP_STORE, 7, R + 14));             // -3
    emit(ins(OP_MAX, 7, 4));
    emit(ins(OP_STORE, 7, R + 15));             // 4
    emit(ins(OP_INCR, 7));
    emit(ins(OP_STORE, 7, R + 16));             // 5
    emit(ins(OP_DECR, 7));
    emit(ins(OP_DECR, 7));
    emit(ins(OP_STORE, 7, R + 17));             // 3
    emit(ins(OP_LOAD, 0, 77));
    emit(ins(OP_LDVRZ, 8));
    emit(ins(OP_STORE, 8, R + 18));             // 77
    emit(ins(OP_STOREH, 3, R + 19));            // 0x1234
    emit(ins(OP_ZERO, 0, R + 20));              // 0
    emit(ins(OP_INC, 0, R + 21));               // 42
    emit(ins(OP_DEC, 0, R + 22));               // 9
    emit(ins(OP_LOAD, 9, PTR, 0, 1));           // r9 = mem[PTR] = 0x300
    emit(ins(OP_STORE, 9, R + 23));
    emit(ins(OP_STORE, 1, PTR, 0, 1));          // mem[0x300] = -60
    emit(ins(OP_LOAD, 10, 5));
    emit(ins(OP_LOAD, 11, 16'h100, 10));        // 0x105
    emit(ins(OP_STORE, 11, R + 24));
    emit(ins(OP_LOAD, 12, 1));
    emit(ins(OP_LOADH, 12, 16'h8000));          // 0x80000001
    emit(ins(OP_SHL, 12, 1));                   // lost 1 -> ZERO=0
    emit(ins(OP_STFLS, 0, R + 25));             // RUN
    emit(ins(OP_SHL, 12, 1));                   // lost 0 -> ZERO=1
    emit(ins(OP_STFLS, 0, R + 26));             // RUN|ZERO
    emit(ins(OP_STORE, 12, R + 27));            // 4
    emit(ins(OP_CMP, 2, 5));                    // -7 < 5
    emit(ins(OP_STFLS, 0, R + 28));             // RUN|NEG
    emit(ins(OP_RCMP, 2, 5));                   // 5 < -7 ? no
    emit(ins(OP_STFLS, 0, R + 29));             // RUN
    emit(ins(OP_CMPZ, 0, 0));
    emit(ins(OP_STFLS, 0, R + 30));             // RUN|ZERO
    emit(ins(OP_ANDTF, 6, 16'h400));
    emit(ins(OP_STFLS, 0, R + 31));             // RUN|ZERO
    emit(ins(OP_CMP, 2, -7));                   // ZERO=1
    l1 = pc + 2;
    emit(ins(OP_JCOND, COND_EQ_CODE(), l1));    // taken
    emit(ins(OP_STORE, 2, R + 32));             // skipped
    emit(ins(OP_JCNDF, 0, 0));                  // condition Z true: not taken
    emit(ins(OP_LOAD, 8, 1));
    emit(ins(OP_STORE, 8, R + 33));             // 1
    emit(ins(OP_LOAD, 14, 16'h800));            // SP
    sub = 16'h0F0;
    emit(ins(OP_CALL, 0, sub));
    emit(ins(OP_STORE, 8, R + 34));             // 99
    emit(ins(OP_STORE, 14, R + 35));            // 0x800
    emit(ins(OP_PUSH, 0, 55));
    emit(ins(OP_PUSH, 0, 66));
    emit(ins(OP_POP, 9));
    emit(ins(OP_POP, 10));
    emit(ins(OP_STORE, 9, R + 36));             // 66
    emit(ins(OP_STORE, 10, R + 37));            // 55
    for (int k = 1; k <= 12; k++) emit(ins(OP_LOAD, k, 1000 + k));
    emit(ins(OP_CMP, 1, 2000));                 // NEG
    emit(ins(OP_PUSHA));
    for (int k = 1; k <= 12; k++) emit(ins(OP_LOAD, k, 0));
    emit(ins(OP_LDFLS, 0, 1));                  // RUN only
    emit(ins(OP_POPA));
    for (int k = 1; k <= 12; k++) emit(ins(OP_STORE, k, R + 39 + k));
    emit(ins(OP_STFLS, 0, R + 52));             // RUN|NEG
    emit(ins(OP_STORE, 14, R + 53));            // 0x800
    // bytes and selectors, the worked example
    emit(ins(OP_LOAD, 7, 16'h5678));
    emit(ins(OP_LOADH, 7, 16'h1234));
    emit(ins(OP_LOAD, 2, 12));
    emit(ins(OP_MKSEL, 2, 19));
    emit(ins(OP_STORE, 2, R + 54));             // 0x0800000C
    emit(ins(OP_LOAD, 0, 0, 2));                // r0 = selector
    emit(ins(OP_GTBOF, 1, 0, 7));
    emit(ins(OP_STORE, 1, R + 55));             // 0x45
    emit(ins(OP_LOAD, 1, 0));
    emit(ins(OP_PTBOF, 1, D0));                 // 0xFFF00FFF
    emit(ins(OP_LOAD, 0, 92));
    emit(ins(OP_MKSEL, 0, 99));                 // start 92, length 8
    emit(ins(OP_GTBFR, 3, ARR));
    emit(ins(OP_STORE, 3, R + 56));             // 0xAB
    emit(ins(OP_LOAD, 4, 16'h5C));
    emit(ins(OP_PTBFR, 4, ARR));
    // console
    emit(ins(OP_OUTN, 0, 1234));
    emit(ins(OP_OUTCH, 0, 65));
    outpc = pc;
    emit(ins(OP_OUT, 0, 7));
    emit(ins(OP_OUTS, 0, STR));
    emit(ins(OP_INN, 0, R + 57));
    emit(ins(OP_INCH, 0, R + 58));
    // rotate / arithmetic shifts
    emit(ins(OP_LOAD, 5, -8));
    emit(ins(OP_ASHR, 5, 2));
    emit(ins(OP_STORE, 5, R + 59));             // -2
    emit(ins(OP_LOAD, 5, 1));
    emit(ins(OP_ROTR, 5, 1));
    emit(ins(OP_STORE, 5, R + 60));             // 0x80000000
    emit(ins(OP_ROTL, 5, 4));
    emit(ins(OP_STORE, 5, R + 61));             // 0x8
    emit(ins(OP_LOAD, 5, 3));
    emit(ins(OP_LOADH, 5, 16'h8000));
    emit(ins(OP_ASHL, 5, 1));
    emit(ins(OP_STORE, 5, R + 62));             // 0x80000006
    emit(ins(OP_SHR, 5, 1));
    emit(ins(OP_STORE, 5, R + 63));             // 0x40000003
    tail = pc;
    emit(ins(OP_HALT));

    pc = sub;
    emit(ins(OP_LOAD, 8, 99));
    emit(ins(OP_RET));

    mem[PTR] = 32'h300;
    mem[R + 20] = 32'h1111;
    mem[R + 21] = 41;
    mem[R + 22] = 10;
    mem[R + 32] = 32'hDEAD;
    mem[D0] = 32'hFFFF_FFFF;
    mem[ARR + 2] = 32'h0000_000A;
    mem[ARR + 3] = 32'hB000_0000;
    for (int k = 0; k < str_words("Hi!"); k++) mem[STR + k] = str_word("Hi!", k);

    run_prog(cyc);

    check("LOADH", mem[R + 0], 32'h1234_5678);
    check("ADD", mem[R + 1], 123);
    check("SUB", mem[R + 2], 130);
    check("RSUB", mem[R + 3], 870);
    check("MUL", mem[R + 4], -6090);
    check("DIV", mem[R + 5], -60);
    check("MOD", mem[R + 6], -90);
    check("RDIV", mem[R + 7], 14);
    check("RMOD", mem[R + 8], 2);
    check("NEG", mem[R + 9], -5);
    check("NOT", mem[R + 10], -1);
    check("AND", mem[R + 11], 32'h30);
    check("OR", mem[R + 12], 32'h330);
    check("XOR", mem[R + 13], 32'h3CF);
    check("MIN", mem[R + 14], -3);
    check("MAX", mem[R + 15], 4);
    check("INCR", mem[R + 16], 5);
    check("DECR", mem[R + 17], 3);
    check("LDVRZ", mem[R + 18], 77);
    check("STOREH", mem[R + 19], 32'h1234);
    check("ZERO", mem[R + 20], 0);
    check("INC", mem[R + 21], 42);
    check("DEC", mem[R + 22], 9);
    check("indirect load", mem[R + 23], 32'h300);
    check("indirect store", mem[32'h300], -60);
    check("A register", mem[R + 24], 32'h105);
    check("SHL lost 1", mem[R + 25], 32'h1);
    check("SHL lost 0", mem[R + 26], 32'h3);
    check("SHL result", mem[R + 27], 4);
    check("CMP", mem[R + 28], 32'h5);
    check("RCMP", mem[R + 29], 32'h1);
    check("CMPZ", mem[R + 30], 32'h3);
    check("ANDTF", mem[R + 31], 32'h3);
    check("JCOND taken", mem[R + 32], 32'hDEAD);
    check("JCNDF not taken", mem[R + 33], 1);
    check("CALL/RET", mem[R + 34], 99);
    check("SP after RET", mem[R + 35], 32'h800);
    check("POP 1", mem[R + 36], 66);
    check("POP 2", mem[R + 37], 55);
    for (int k = 1; k <= 12; k++) check("POPA reg", mem[R + 39 + k], 1000 + k);
    check("POPA flags", mem[R + 52], 32'h5);
    check("SP after POPA", mem[R + 53], 32'h800);
    check("MKSEL", mem[R + 54], 32'h0800_000C);
    check("GTBOF", mem[R + 55], 32'h45);
    check("PTBOF", mem[D0], 32'hFFF0_0FFF);
    check("GTBFR", mem[R + 56], 32'hAB);
    check("PTBFR w0", mem[ARR + 2], 32'h0000_0005);
    check("PTBFR w1", mem[ARR + 3], 32'hC000_0000);
    check("INN", mem[R + 57], 32'hFFFF_FF85);
    check("INCH", mem[R + 58], 32'h7A);
    check("ASHR", mem[R + 59], -2);
    check("ROTR", mem[R + 60], 32'h8000_0000);
    check("ROTL", mem[R + 61], 32'h8);
    check("ASHL", mem[R + 62], 32'h8000_0006);
    check("SHR", mem[R + 63], 32'h4000_0003);
    check("output count", outs.size(), 7);
    if (outs.size() == 7) begin
      check("OUTN", outs[0], 1234);  check("OUTN kind", kinds[0], OUT_NUM);
      check("OUTCH", outs[1], 65);   check("OUTCH kind", kinds[1], OUT_CHAR);
      check("OUT pc", outs[2], outpc + 1);  check("OUT pc kind", kinds[2], OUT_DBG_PC);
      check("OUT ov", outs[3], 7);   check("OUT ov kind", kinds[3], OUT_DBG_OV);
      check("OUTS H", outs[4], "H");
      check("OUTS i", outs[5], "i");
      check("OUTS !", outs[6], "!");
    end
    check("stopped at HALT", dut.u_rf.regs[15], tail + 1);

    // ---------------- ways of stopping ----------------
    begin
      logic [31:0] progs [6][3];
      progs[0] = '{ins(OP_LOAD, 1, 0), ins(OP_DIV, 2, 0, 1), ins(OP_HALT)};
      progs[1] = '{ins(OP_LOAD, 1, 0), ins(OP_RMOD, 1, 5), ins(OP_HALT)};
      progs[2] = '{ins(OP_LOAD, 1, 0), ins(OP_RET), ins(OP_HALT)};
      progs[3] = '{ins(OP_LOAD, 1, 0), ins(OP_BAD), ins(OP_HALT)};
      progs[4] = '{ins(OP_LOAD, 1, 0), 32'h5E00_0000, ins(OP_HALT)};   // opcode 47
      progs[5] = '{ins(OP_LOAD, 1, 0), ins(OP_LDFLS, 0, 4), ins(OP_HALT)};
      for (int p = 0; p < 6; p++) begin
        clear_mem();
        reset_core();
        for (int i = 0; i < 3; i++) mem[i] = progs[p][i];
        run_prog(cyc);
        check($sformatf("stop %0d at second instruction", p), dut.u_rf.regs[15], 2);
      end
    end

    // ---------------- INTR ----------------
    clear_mem();
    reset_core();
    mem[0] = ins(OP_JCOND, COND_INTR, 3);
    mem[1] = ins(OP_STORE, 0, 16'h100);   // r0 = 0
    mem[2] = ins(OP_JUMP, 0, 0);
    mem[3] = ins(OP_LOAD, 1, 5);
    mem[4] = ins(OP_STORE, 1, 16'h101);
    mem[5] = ins(OP_HALT);
    mem[16'h100] = 32'h77;
    fork
      run_prog(cyc);
      begin repeat (60) @(posedge clk); intr = 1; @(posedge clk); intr = 0; end
    join
    check("loop ran before INTR", mem[16'h100], 0);
    check("INTR jump", mem[16'h101], 5);
    check("INTR flag", flags_word, 32'h8);

    // ---------------- cycle counts ----------------
    clear_mem();
    reset_core();
    mem[0] = ins(OP_HALT);
    run_prog(cyc);
    begin
      int base;
      base = cyc;
      clear_mem(); reset_core();
      mem[0] = ins(OP_ADD, 1, 1); mem[1] = ins(OP_HALT);
      run_prog(cyc);
      check("register instruction cycles", cyc - base, 4);
      clear_mem(); reset_core();
      mem[0] = ins(OP_ADD, 1, 0, 0, 1); mem[1] = ins(OP_HALT);
      run_prog(cyc);
      check("indirect instruction cycles", cyc - base, 5);
      clear_mem(); reset_core();
      mem[0] = ins(OP_DIV, 1, 3); mem[1] = ins(OP_HALT);
      run_prog(cyc);
      check("division cycles", cyc - base, 38);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int COND_EQ_CODE();
    return COND_Z;
  endfunction
endmodule
