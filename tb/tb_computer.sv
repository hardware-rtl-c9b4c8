// tb_computer: end-to-end test of the whole machine at its default size.
//
// A host loads a program through the host port and starts the core. The
// program reads n from the keyboard, computes n! by a recursive subroutine
// (CALL / RET, PUSH / POP), prints it with OUTN and again digit by digit
// through a subroutine that saves all registers with PUSHA / POPA and
// produces the digits with MOD and DIV, prints a string with OUTS, packs
// twenty 5-bit fields into a bit array with PTBFR (fields cross word
// boundaries) and sums them back with GTBFR, follows a pointer through an
// indirect operand, and spins until the intr input raises INTR, then HALTs.
// A second program stops on a division by zero, and a third reads and
// writes the last bits that a selector's 24-bit start can reach. Results are read back
// through the host port and compared with values the testbench computes
// itself. Each mechanism (indirection, call, return, push-all, pop-all,
// division, word-crossing field, console output stall, keyboard wait, INTR
// jump, normal stop, error stop) is counted, and one that never happened is
// a failure.
module tb_computer;
  import isa_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, intr = 0, run;
  logic [31:0] flags_word;
  logic host_en = 0, host_we = 0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata;
  logic out_valid, out_ready, in_ready, in_valid;
  out_kind_e out_kind;
  in_kind_e in_kind;
  logic [31:0] out_data, in_data;

  computer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- console model ----------------
  localparam int NIN = 10;
  logic [31:0] outs[$];
  out_kind_e   kinds[$];
  int in_delay = 0;
  always_ff @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (in_ready && !in_valid) in_delay <= in_delay + 1;
    in_valid <= in_ready && (in_delay > 5);
    in_data  <= NIN;
    if (in_valid && in_ready) in_delay <= 0;
    if (out_valid && out_ready) begin
      outs.push_back(out_data);
      kinds.push_back(out_kind);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_indirect = 0, n_call = 0, n_ret = 0, n_pusha = 0, n_popa = 0, n_div = 0;
  int n_cross = 0, n_out_stall = 0, n_in_wait = 0, n_intr_jump = 0, n_halt = 0, n_error = 0;
  always @(posedge clk) if (rst_n) begin
    string st;
    st = dut.u_core.state.name();
    if (st == "S_IND_W") n_indirect++;
    if (st == "S_EXEC" && dut.u_core.op == OP_CALL) n_call++;
    if (st == "S_RET_W") n_ret++;
    if (st == "S_EXEC" && dut.u_core.op == OP_PUSHA) n_pusha++;
    if (st == "S_POPA_F") n_popa++;
    if (st == "S_DIV_W" && dut.u_core.div_done) n_div++;
    if (st == "S_BF_R1" && (dut.u_core.rd_0[4:0] + dut.u_core.rd_0[31:24] > 32)) n_cross++;
    if (out_valid && !out_ready) n_out_stall++;
    if (in_ready && !in_valid) n_in_wait++;
    if (st == "S_EXEC" && dut.u_core.op == OP_JCOND && dut.u_core.ir.r == COND_INTR
        && dut.u_core.flags.intr) n_intr_jump++;
    if (st == "S_EXEC" && dut.u_core.op == OP_HALT) n_halt++;
    if (st == "S_EXEC" && dut.u_core.halt && dut.u_core.op != OP_HALT) n_error++;
  end

  // ---------------- host port ----------------
  task automatic host_write(int addr, logic [31:0] data);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(int addr, output logic [31:0] data);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = addr;
    @(negedge clk);
    host_en = 0;
    data = host_rdata;
  endtask

  // ---------------- assembler with labels ----------------
  logic [31:0] prog [int];
  int lbl [string];
  string fix [int];
  int pc;
  task automatic emit(logic [31:0] w);
    prog[pc] = w;
    pc++;
  endtask
  task automatic emitl(opcode_e op, int r, string target);   // N = label
    fix[pc] = target;
    emit(ins(op, r, 0));
  endtask
  task automatic label(string s);
    lbl[s] = pc;
  endtask

  localparam int NVAL = 'h400, RES = 'h401, SUM = 'h402, CHK = 'h403;
  localparam int WAITS = 'h404, PTRT = 'h410, MSG = 'h420, BITS = 'h440;
  localparam int NF = 20;
  localparam int BIG = 'h4000;   // base of the largest-structure test

  function automatic int fact(int n);
    return (n <= 1) ? 1 : n * fact(n - 1);
  endfunction

  initial begin
    logic [31:0] w;
    logic [31:0] bits_model [5];
    int sum_model, f;
    string msg, digits;
    int k;

    // ---------------- program 1 ----------------
    pc = 0;
    emit(ins(OP_LOAD, REG_SP, 16'h4000));
    emit(ins(OP_OUTS, 0, MSG));
    emit(ins(OP_INN, 0, NVAL));
    emit(ins(OP_LOAD, 1, NVAL, 0, 1));          // r1 = memory[NVAL]
    emitl(OP_CALL, 0, "fact");
    emit(ins(OP_STORE, 2, RES));
    emit(ins(OP_OUTN, 0, 0, 2));
    emitl(OP_CALL, 0, "prdec");
    // pack NF fields of 5 bits: field i = (7 i) & 31
    emit(ins(OP_LOAD, 3, 0));
    label("pack");
    emit(ins(OP_LOAD, 5, 0, 3));
    emit(ins(OP_MUL, 5, 5));
    emit(ins(OP_ADD, 5, 4));                    // end = 5 i + 4
    emit(ins(OP_LOAD, 0, 0, 3));
    emit(ins(OP_MUL, 0, 5));                    // start = 5 i
    emit(ins(OP_MKSEL, 0, 0, 5));
    emit(ins(OP_LOAD, 6, 0, 3));
    emit(ins(OP_MUL, 6, 7));
    emit(ins(OP_AND, 6, 31));
    emit(ins(OP_PTBFR, 6, BITS));
    emit(ins(OP_INCR, 3));
    emit(ins(OP_CMP, 3, NF));
    emitl(OP_JCOND, COND_LT, "pack");
    // sum them back
    emit(ins(OP_LOAD, 3, 0));
    emit(ins(OP_LOAD, 7, 0));
    label("sum");
    emit(ins(OP_LOAD, 5, 0, 3));
    emit(ins(OP_MUL, 5, 5));
    emit(ins(OP_ADD, 5, 4));
    emit(ins(OP_LOAD, 0, 0, 3));
    emit(ins(OP_MUL, 0, 5));
    emit(ins(OP_MKSEL, 0, 0, 5));
    emit(ins(OP_GTBFR, 6, BITS));
    emit(ins(OP_ADD, 7, 0, 6));
    emit(ins(OP_INCR, 3));
    emit(ins(OP_CMP, 3, NF));
    emitl(OP_JCOND, COND_LT, "sum");
    emit(ins(OP_STORE, 7, SUM));
    emit(ins(OP_OUTN, 0, 0, 7));
    // double indirection: memory[PTRT] holds RES
    emit(ins(OP_LOAD, 8, PTRT, 0, 1));          // r8 = RES
    emit(ins(OP_LOAD, 9, 0, 8, 1));             // r9 = memory[RES]
    emit(ins(OP_STORE, 9, CHK));
    // wait for INTR
    emit(ins(OP_LOAD, 10, 0));
    label("wait");
    emitl(OP_JCOND, COND_INTR, "got");
    emit(ins(OP_INCR, 10));
    emitl(OP_JUMP, 0, "wait");
    label("got");
    emit(ins(OP_LDFLS, 0, 1));                  // clear INTR, keep RUN
    emit(ins(OP_STORE, 10, WAITS));
    emit(ins(OP_HALT));

    // r2 = fact(r1)
    label("fact");
    emit(ins(OP_CMP, 1, 1));
    emitl(OP_JCOND, COND_GT, "rec");
    emit(ins(OP_LOAD, 2, 1));
    emit(ins(OP_RET));
    label("rec");
    emit(ins(OP_PUSH, 0, 0, 1));
    emit(ins(OP_DECR, 1));
    emitl(OP_CALL, 0, "fact");
    emit(ins(OP_POP, 1));
    emit(ins(OP_MUL, 2, 0, 1));
    emit(ins(OP_RET));

    // print r2 in decimal, then a newline
    label("prdec");
    emit(ins(OP_PUSHA));
    emit(ins(OP_LOAD, 3, 0, 2));
    emit(ins(OP_LOAD, 4, 0));
    label("d1");
    emit(ins(OP_LOAD, 5, 0, 3));
    emit(ins(OP_MOD, 5, 10));
    emit(ins(OP_ADD, 5, 48));
    emit(ins(OP_PUSH, 0, 0, 5));
    emit(ins(OP_INCR, 4));
    emit(ins(OP_DIV, 3, 10));
    emit(ins(OP_CMPZ, 0, 0, 3));
    emitl(OP_JCNDF, COND_Z, "d1");
    label("d2");
    emit(ins(OP_POP, 5));
    emit(ins(OP_OUTCH, 0, 0, 5));
    emit(ins(OP_DECR, 4));
    emit(ins(OP_CMPZ, 0, 0, 4));
    emitl(OP_JCNDF, COND_Z, "d2");
    emit(ins(OP_OUTCH, 0, 10));
    emit(ins(OP_POPA));
    emit(ins(OP_RET));

    foreach (fix[a]) prog[a][15:0] = 16'(lbl[fix[a]]);

    msg = "n! =";
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (prog[a]) host_write(a, prog[a]);
    host_write(PTRT, RES);
    for (int i = 0; i < str_words(msg); i++) host_write(MSG + i, str_word(msg, i));
    for (int i = 0; i < 5; i++) host_write(BITS + i, 0);

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin
        // raise intr once the program is spinning in its wait loop
        wait (dut.u_core.pc == lbl["wait"] + 1);
        repeat (40) @(posedge clk);
        @(negedge clk) intr = 1;
        @(negedge clk) intr = 0;
      end
      wait (!run);
    join

    // ---------------- expected values ----------------
    f = fact(NIN);
    sum_model = 0;
    for (int i = 0; i < 5; i++) bits_model[i] = 0;
    for (int i = 0; i < NF; i++) begin
      int v;
      v = (7 * i) & 31;
      sum_model += v;
      for (int b = 0; b < 5; b++) begin
        int p;
        p = 5 * i + b;                          // bit position from the MSB of BITS
        bits_model[p / 32][31 - p % 32] = v[4 - b];
      end
    end

    host_read(NVAL, w);  check("INN value", w, NIN);
    host_read(RES, w);   check("factorial", w, f);
    host_read(SUM, w);   check("field sum", w, sum_model);
    host_read(CHK, w);   check("double indirection", w, f);
    for (int i = 0; i < 4; i++) begin
      host_read(BITS + i, w);
      check($sformatf("bit array word %0d", i), w, bits_model[i]);
    end
    host_read(WAITS, w);
    checks++;
    if (w == 0) begin failures++; $display("FAIL wait loop never ran"); end
    check("INTR cleared", flags_word, 0);

    // console output: message, number, digits and newline, sum
    digits = $sformatf("%0d", f);
    check("output count", outs.size(), msg.len() + 1 + digits.len() + 1 + 1);
    if (outs.size() == msg.len() + digits.len() + 3) begin
      k = 0;
      for (int i = 0; i < msg.len(); i++) begin
        check("OUTS char", outs[k], msg[i]); check("OUTS kind", kinds[k], OUT_CHAR); k++;
      end
      check("OUTN", outs[k], f); check("OUTN kind", kinds[k], OUT_NUM); k++;
      for (int i = 0; i < digits.len(); i++) begin
        check("digit", outs[k], digits[i]); k++;
      end
      check("newline", outs[k], 10); k++;
      check("sum out", outs[k], sum_model);
    end

    // ---------------- program 2: division by zero ----------------
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    host_write(0, ins(OP_LOAD, 1, 5));
    host_write(1, ins(OP_DIV, 1, 0));
    host_write(2, ins(OP_STORE, 1, RES));
    host_write(3, ins(OP_HALT));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (!run);
    check("stopped at the division", dut.u_core.pc, 2);
    host_read(RES, w);   check("nothing stored after the stop", w, f);

    // ---------------- program 3: the largest selector start ----------------
    // Selector start 2^24 - 32 (length 32) names the last word a selector can
    // reach, 2^19 - 1 words past the base; a length-8 PTBFR then replaces the
    // last 8 bits it can reach. The word after that must stay as it was.
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    host_write(0, ins(OP_LOAD,  0, 'hFFE0));        // $0 = 0xFFFFFFE0
    host_write(1, ins(OP_LOADH, 0, 'h20FF));        // $0 = 0x20FFFFE0: 32 bits at 2^24 - 32
    host_write(2, ins(OP_GTBFR, 1, BIG));
    host_write(3, ins(OP_STORE, 1, BIG - 1));
    host_write(4, ins(OP_LOAD,  0, 'hFFF8));
    host_write(5, ins(OP_LOADH, 0, 'h08FF));        // $0 = 0x08FFFFF8: last 8 bits
    host_write(6, ins(OP_LOAD,  2, 'h5A));
    host_write(7, ins(OP_PTBFR, 2, BIG));
    host_write(8, ins(OP_HALT));
    host_write(BIG + 'h7FFFF, 32'h1357_9BDF);
    host_write(BIG + 'h80000, 32'hA5A5_A5A5);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (!run);
    host_read(BIG - 1, w);         check("GTBFR at the largest start", w, 32'h1357_9BDF);
    host_read(BIG + 'h7FFFF, w);   check("PTBFR at the last 8 bits", w, 32'h1357_9B5A);
    host_read(BIG + 'h80000, w);   check("word after the structure", w, 32'hA5A5_A5A5);

    $display("mechanisms: indirect=%0d call=%0d ret=%0d pusha=%0d popa=%0d div=%0d cross=%0d",
             n_indirect, n_call, n_ret, n_pusha, n_popa, n_div, n_cross);
    $display("            out_stall=%0d in_wait=%0d intr_jump=%0d halt=%0d error_stop=%0d",
             n_out_stall, n_in_wait, n_intr_jump, n_halt, n_error);
    check_seen("indirection", n_indirect);
    check_seen("call", n_call);
    check_seen("return", n_ret);
    check_seen("push all", n_pusha);
    check_seen("pop all", n_popa);
    check_seen("division", n_div);
    check_seen("word-crossing field", n_cross);
    check_seen("output stall", n_out_stall);
    check_seen("keyboard wait", n_in_wait);
    check_seen("INTR jump", n_intr_jump);
    check_seen("HALT", n_halt);
    check_seen("error stop", n_error);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask
endmodule
