// tb_isa_random: random programs run on the whole machine and on an
// instruction-set model written inside this testbench, with the final
// state compared.
//
// Each program is a random mix of the arithmetic, logic, shift, compare,
// flag, data-transfer, stack (PUSH, POP, PUSHA, POPA), byte-field and
// console-output instructions, with random registers, auxiliary registers
// and indirection, and forward-only jumps so that every program ends. It
// finishes with HALT, unless it stops earlier (division by zero, a loaded
// RUN = 0). Instructions that write memory use a fixed data area so the
// program never overwrites itself. The model executes the instruction set
// one instruction at a time with plain behavioural code: bit loops for
// shifts and fields, the language's / and % for division. After both stop,
// all sixteen registers, the four flags, the whole memory and the console
// output are compared.
module tb_isa_random;
  import isa_pkg::*;
  import tb_asm_pkg::*;

  localparam int NPROG = 200;    // programs
  localparam int PLEN  = 80;     // instructions per program
  localparam int DATA  = 'h2000; // data area for stores (256 words)
  localparam int PTRS  = 'h2100; // 16 pointers into the data area
  localparam int STK   = 'h3000; // initial stack pointer
  localparam int AW    = 20;     // memory address bits of the machine's default size
  localparam int MW    = 2**AW;

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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // console: always ready, keyboard answers at once
  logic [31:0] outs[$];
  assign out_ready = 1'b1;
  assign in_valid  = in_ready;
  assign in_data   = 32'h0000_0123;
  always @(posedge clk) if (out_valid) outs.push_back(out_data);

  // ---------------- instruction-set model ----------------
  logic [31:0] m [MW];
  logic [31:0] rg [16];
  logic f_run, f_zero, f_neg, f_intr;
  logic [31:0] mouts[$];

  function automatic logic [31:0] rd(logic [31:0] addr);
    return m[addr[AW-1:0]];
  endfunction
  task automatic wr(logic [31:0] addr, logic [31:0] d);
    m[addr[AW-1:0]] = d;
  endtask
  function automatic logic [31:0] flags_of();
    return {28'd0, f_intr, f_neg, f_zero, f_run};
  endfunction
  task automatic set_flags(logic [31:0] v);
    {f_intr, f_neg, f_zero, f_run} = v[3:0];
  endtask
  task automatic push(logic [31:0] v);
    rg[14] = rg[14] - 1;
    wr(rg[14], v);
  endtask
  task automatic pop(output logic [31:0] v);
    v = rd(rg[14]);
    rg[14] = rg[14] + 1;
  endtask

  // read bit p (0 = MSB of base word) of the bit string starting at word base
  function automatic logic getbit(logic [31:0] base, int p);
    logic [31:0] w;
    w = rd(base + 32'(p / 32));
    return w[31 - p % 32];
  endfunction
  task automatic putbit(logic [31:0] base, int p, logic b);
    logic [31:0] w;
    w = rd(base + 32'(p / 32));
    w[31 - p % 32] = b;
    wr(base + 32'(p / 32), w);
  endtask

  task automatic model_run();
    f_run = 1;
    while (f_run) begin
      logic [31:0] w, ov, x, v;
      logic [6:0] op;
      logic s;
      int r, a, len, st;
      logic lost;
      w = rd(rg[15]);
      rg[15] = rg[15] + 1;
      op = w[31:25]; s = w[24]; r = int'(w[23:20]); a = int'(w[19:16]);
      ov = {{16{w[15]}}, w[15:0]};
      if (a != 0) ov = ov + rg[a];
      if (s) ov = rd(ov);
      x = rg[r];
      len = int'(rg[0][31:24]); if (len > 32) len = 32;
      st  = int'(rg[0][23:0]);
      case (op)
        1:  rg[r] = ov;
        2:  rg[r] = {ov[15:0], x[15:0]};
        3:  wr(ov, x);
        4:  wr(ov, 0);
        5:  rg[r] = x + ov;
        6:  rg[r] = x - ov;
        7:  rg[r] = x * ov;
        8:  if (ov == 0) f_run = 0; else rg[r] = 32'($signed(x) / $signed(ov));
        9:  if (ov == 0) f_run = 0; else rg[r] = 32'($signed(x) % $signed(ov));
        10: rg[r] = ov - x;
        11: if (x == 0) f_run = 0; else rg[r] = 32'($signed(ov) / $signed(x));
        12: if (x == 0) f_run = 0; else rg[r] = 32'($signed(ov) % $signed(x));
        13: wr(ov, rd(ov) + 1);
        14: wr(ov, rd(ov) - 1);
        15: begin f_zero = (x == ov); f_neg = $signed(x) < $signed(ov); end
        16: begin f_zero = (x == ov); f_neg = $signed(ov) < $signed(x); end
        17: begin f_zero = (ov == 0); f_neg = $signed(ov) < 0; end
        18: rg[15] = ov;
        19, 20: begin
          logic c;
          case (r)
            0: c = f_zero;
            1: c = !f_zero;
            2: c = f_neg && !f_zero;
            3: c = f_neg || f_zero;
            4: c = !f_neg && !f_zero;
            5: c = !f_neg;
            6: c = f_intr;
            default: c = 0;
          endcase
          if (c == (op == 19)) rg[15] = ov;
        end
        21: push(ov);
        22: begin pop(v); rg[r] = v; end
        23: begin push(flags_of()); for (int k = 1; k <= 12; k++) push(rg[k]); end
        24: begin
          for (int k = 12; k >= 1; k--) begin pop(v); rg[k] = v; end
          pop(v); set_flags(v);
        end
        25: begin push(rg[15]); rg[15] = ov; end
        26: if (rg[14] == 0) f_run = 0; else begin pop(v); rg[15] = v; end
        27: rg[r] = x & ov;
        28: rg[r] = x | ov;
        29: rg[r] = x ^ ov;
        30: rg[r] = ~ov;
        31: rg[r] = -ov;
        32: set_flags(ov);
        33: wr(ov, flags_of());
        34: begin f_neg = 0; f_zero = ((x & ov) == 0); end
        35: wr(ov, x >> 16);
        36: begin  // GTBOF
          v = 0;
          for (int i = 0; i < len; i++) if (st + i < 32) v[len - 1 - i] = ov[31 - st - i];
          rg[r] = v;
        end
        37: begin  // GTBFR
          v = 0;
          for (int i = 0; i < len; i++) v[len - 1 - i] = getbit(ov, st + i);
          rg[r] = v;
        end
        38: begin  // PTBOF
          v = rd(ov);
          for (int i = 0; i < len; i++) if (st + i < 32) v[31 - st - i] = x[len - 1 - i];
          wr(ov, v);
        end
        39: for (int i = 0; i < len; i++) putbit(ov, st + i, x[len - 1 - i]);
        40, 41, 42, 43, 44, 45: begin
          int n;
          lost = 0;
          v = x;
          n = (ov > 64) ? 64 : int'(ov);
          for (int i = 0; i < n; i++) begin
            case (op)
              40: begin lost |= v[31]; v = v << 1; end
              41: begin if (i < 31) lost |= v[30]; v = {v[31], v[29:0], 1'b0}; end
              42: begin if (i < 32) lost |= v[31]; v = {v[30:0], v[31]}; end
              43: begin lost |= v[0]; v = v >> 1; end
              44: begin lost |= v[0]; v = {v[31], v[31:1]}; end
              default: begin if (i < 32) lost |= v[0]; v = {v[0], v[31:1]}; end
            endcase
          end
          if ((op == 42 || op == 45) && ov > 64) begin
            v = x;
            for (int i = 0; i < int'(ov % 32); i++) v = (op == 42) ? {v[30:0], v[31]} : {v[0], v[31:1]};
          end
          rg[r] = v;
          f_zero = !lost;
        end
        46: rg[r] = {8'(ov - x + 1), x[23:0]};
        48: rg[r] = ($signed(x) < $signed(ov)) ? x : ov;
        49: rg[r] = ($signed(x) > $signed(ov)) ? x : ov;
        50: rg[r] = rg[0];
        51: rg[r] = x + 1;
        52: rg[r] = x - 1;
        120, 121: mouts.push_back(ov);
        123: wr(ov, 32'h123);
        124: wr(ov, 32'h23);
        default: f_run = 0;
      endcase
    end
  endtask

  // ---------------- program generator ----------------
  logic [31:0] prog [PLEN + 16];   // a group of up to 4 may pass PLEN, then 8 HALTs
  int plen;

  function automatic int rreg();   // a register that may be written: 1..12
    return 1 + $urandom % 12;
  endfunction
  function automatic int raux();   // any auxiliary register or none
    return ($urandom % 3 == 0) ? 0 : $urandom % 16;
  endfunction

  task automatic gen();
    opcode_e alu_ops [] = '{OP_LOAD, OP_LOADH, OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_MOD, OP_RSUB,
                            OP_RDIV, OP_RMOD, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_NEG, OP_MIN,
                            OP_MAX, OP_INCR, OP_DECR, OP_LDVRZ, OP_SHL, OP_ASHL, OP_ROTL,
                            OP_SHR, OP_ASHR, OP_ROTR, OP_CMP, OP_RCMP, OP_CMPZ, OP_ANDTF,
                            OP_MKSEL, OP_GTBOF};
    opcode_e mem_ops [] = '{OP_STORE, OP_STOREH, OP_ZERO, OP_INC, OP_DEC, OP_STFLS, OP_PTBOF, OP_INN, OP_INCH};
    plen = 0;
    prog[plen++] = ins(OP_LOAD, REG_SP, STK);
    while (plen < PLEN) begin
      int kind;
      kind = $urandom % 20;
      if (kind < 10) begin
        // value instruction: any operand form
        int n, r;
        opcode_e o;
        n = ($urandom % 4 == 0) ? int'($urandom % 65536) : int'($urandom % 40);
        o = alu_ops[$urandom % alu_ops.size()];
        if (o inside {OP_DIV, OP_MOD} && n == 0) n = 1 + $urandom % 40;   // keep most programs running
        r = rreg();
        if (o inside {OP_RDIV, OP_RMOD}) prog[plen++] = ins(OP_OR, r, 1);
        if ($urandom % 5 == 0) prog[plen++] = ins(o, r, PTRS + $urandom % 16, 0, 1);
        else prog[plen++] = ins(o, r, n, raux());
      end else if (kind < 13) begin
        // memory-writing instruction: direct into the data area or through a pointer
        if ($urandom % 2) prog[plen++] = ins(mem_ops[$urandom % mem_ops.size()], $urandom % 16, DATA + $urandom % 256);
        else prog[plen++] = ins(mem_ops[$urandom % mem_ops.size()], $urandom % 16, PTRS + $urandom % 16, 0, 1);
      end else if (kind < 14) begin
        // bit-field access across words in the data area
        int st;
        st = $urandom % 4000;
        prog[plen++] = ins(OP_LOAD, 0, st);
        prog[plen++] = ins(OP_MKSEL, 0, st + $urandom % 34 - 1);
        prog[plen++] = ins(($urandom % 2) ? OP_GTBFR : OP_PTBFR, rreg(), DATA);
      end else if (kind < 16) begin
        // forward jump
        opcode_e j [] = '{OP_JUMP, OP_JCOND, OP_JCNDF};
        prog[plen] = ins(j[$urandom % 3], $urandom % 8, plen + 2 + $urandom % 3);
        plen++;
      end else if (kind < 18) begin
        // PUSH / POP, or PUSHA ... POPA around two value instructions
        case ($urandom % 3)
          0: prog[plen++] = ins(OP_PUSH, 0, $urandom % 100, raux());
          1: prog[plen++] = ins(OP_POP, rreg());
          default: begin
            prog[plen++] = ins(OP_PUSHA);
            prog[plen++] = ins(OP_LOAD, rreg(), $urandom % 100);
            prog[plen++] = ins(OP_CMP, rreg(), $urandom % 100);
            prog[plen++] = ins(OP_POPA);
          end
        endcase
      end else if (kind < 19) begin
        prog[plen++] = ins(($urandom % 2) ? OP_OUTN : OP_OUTCH, 0, $urandom % 100, raux());
      end else begin
        prog[plen++] = ins(OP_LDFLS, 0, ($urandom % 40 == 0) ? 0 : 1 + 2 * ($urandom % 8));
      end
    end
    for (int k = 0; k < 8; k++) prog[plen++] = ins(OP_HALT);
  endtask

  task automatic host_write(int addr, logic [31:0] data);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  int n_halt_early = 0;

  initial begin
    checks++;
    if ($size(dut.u_mem.mem) != MW) begin
      failures++;
      $display("FAIL the model's memory size differs from the machine's");
    end
    for (int p = 0; p < NPROG; p++) begin
      logic [31:0] init_data [272];
      int bad;
      gen();
      for (int k = 0; k < 256; k++) init_data[k] = $urandom;
      for (int k = 0; k < 16; k++) init_data[256 + k] = DATA + $urandom % 256;

      // machine
      rst_n = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int k = 0; k < plen; k++) host_write(k, prog[k]);
      for (int k = 0; k < 272; k++) host_write(DATA + k, init_data[k]);
      outs.delete();
      // the model starts from the same memory image
      for (int k = 0; k < MW; k++) m[k] = dut.u_mem.mem[k];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (!run);
      @(negedge clk);

      // model
      for (int k = 0; k < 16; k++) rg[k] = 0;
      {f_intr, f_neg, f_zero} = 3'b000;
      mouts.delete();
      model_run();
      if (rg[15] < 32'(plen - 8)) n_halt_early++;

      bad = 0;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (dut.u_core.u_rf.regs[k] !== rg[k]) begin
          bad++;
          $display("FAIL prog %0d reg %0d: %h model %h", p, k, dut.u_core.u_rf.regs[k], rg[k]);
        end
      end
      checks++;
      if (flags_word !== {28'd0, f_intr, f_neg, f_zero, f_run}) begin
        bad++;
        $display("FAIL prog %0d flags: %h model %h", p, flags_word, {f_intr, f_neg, f_zero, f_run});
      end
      checks++;
      begin
        int nd = 0;
        for (int k = 0; k < MW; k++)
          if (dut.u_mem.mem[k] !== m[k]) begin
            if (nd < 4) $display("FAIL prog %0d mem[%h]: %h model %h", p, k, dut.u_mem.mem[k], m[k]);
            nd++;
          end
        if (nd != 0) bad++;
      end
      checks++;
      if (outs.size() != mouts.size()) begin
        bad++;
        $display("FAIL prog %0d console: %0d words, model %0d", p, outs.size(), mouts.size());
      end else
        foreach (outs[i]) if (outs[i] !== mouts[i]) begin
          bad++;
          $display("FAIL prog %0d console word %0d", p, i);
        end
      if (bad != 0) failures++;
    end
    $display("programs: %0d, stopped before the final HALT: %0d", NPROG, n_halt_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
