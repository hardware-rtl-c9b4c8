// cpu_core: the processor. It fetches 32-bit instructions from memory,
// forms the operand value OV and executes every opcode of the instruction
// set, one instruction at a time.
//
// Sequence of one instruction (one state per clock):
//   FETCH    read memory[PC]
//   FETCH_W  latch the instruction, PC = PC + 1
//   EA       OV = sign-extended N (+ register[A] if A != 0); if S = 1 read
//            memory[OV] ...
//   IND_W    ... and OV = that word
//   EXEC     carry out the opcode; most finish here, the rest continue in
//            the states below (memory read-modify-write, stack, divider,
//            two-word bit fields, console transfers)
// So a register instruction takes 4 cycles, 5 with indirection; a memory
// read-modify-write (INC, DEC, PTBOF) 5/6; DIV-type 4 + 34; PUSHA 16 and
// POPA 17 (plus indirection cycle where S = 1). PC is advanced before the
// operand is formed, so $PC as A register addresses relative to the next
// instruction and CALL pushes the return address.
//
// The flags register holds RUN (bit 0), ZERO (1), NEG (2) and INTR (3).
// Only CMP, RCMP, CMPZ, ANDTF, the shifts (ZERO only), LDFLS and POPA
// change ZERO / NEG. RUN = 0 stops the core in IDLE; BAD, HALT, the unused
// opcodes, division by zero, RET with SP = 0, and a LDFLS / POPA that
// loads RUN = 0 all stop it. A pulse on start sets RUN and resumes at the
// current PC (0 after reset). The intr input sets INTR; only LDFLS or POPA
// clears it (the instruction set names INTR and its condition but no
// interrupt mechanism, so none is built).
//
// Memory port: single request per cycle (mem_en, mem_we, mem_addr,
// mem_wdata), read data on mem_rdata one cycle later.
// Console: output words leave on a valid/ready channel (out_kind tells
// number, character or the two debug words of OUT); INN and INCH raise
// in_ready with in_kind and take in_data when in_valid is high. OUTS sends
// the characters of a string, most significant byte of each word first,
// stopping before the first zero byte.
//
// What the instructions do follows the instruction set. The state
// sequence, latencies, the console handshakes, the reset state (all
// registers and flags 0, RUN = 0) and the treatment of undefined condition
// codes (false) are this design's.
module cpu_core
  import isa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,       // synchronous, active low
  input  logic        start,       // set RUN
  input  logic        intr,        // sets the INTR flag
  output logic        run,         // RUN flag
  output logic [31:0] flags_word,
  // memory
  output logic        mem_en,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // console output
  output logic        out_valid,
  input  logic        out_ready,
  output out_kind_e   out_kind,
  output logic [31:0] out_data,
  // console input
  output logic        in_ready,
  output in_kind_e    in_kind,
  input  logic        in_valid,
  input  logic [31:0] in_data
);

  typedef enum logic [4:0] {
    S_IDLE, S_FETCH, S_FETCH_W, S_EA, S_IND_W, S_EXEC,
    S_RMW_W,          // INC / DEC / PTBOF: memory word arrives
    S_DIV_W,          // waiting for the divider
    S_POP_W, S_RET_W, // stack word arrives
    S_PUSHA, S_POPA_W, S_POPA_F,
    S_BF_R1, S_BF_R2, S_BF_W2,  // GTBFR / PTBFR two-word window
    S_OUT2,           // OUT: second word
    S_OUTS_W, S_OUTS_B
  } state_e;

  state_e      state, state_n;
  instr_t      ir, ir_n;
  logic [31:0] ov, ov_n;
  flags_t      flags, flags_n;
  logic [3:0]  cnt, cnt_n;          // PUSHA / POPA register index
  logic [31:0] addr0, addr0_n;      // GTBFR / PTBFR first word / OUTS pointer
  logic [31:0] win_hi, win_hi_n;    // first window word / OUTS word
  logic [31:0] win_lo, win_lo_n;    // second window word to write back
  logic [1:0]  bidx, bidx_n;        // OUTS byte index

  opcode_e     op;
  assign op = opcode_e'(ir.op);

  // ---------------- register file ----------------
  logic [3:0]  rf_ra_r;
  logic [31:0] rd_r, rd_a, rd_0, pc, sp;
  logic        rf_we, pc_we, sp_we;
  logic [3:0]  rf_wa;
  logic [31:0] rf_wd, pc_wd, sp_wd;

  regfile u_rf (
    .clk, .rst_n,
    .ra_r(rf_ra_r), .rd_r,
    .ra_a(ir.a),    .rd_a,
    .rd_0, .pc, .sp,
    .we(rf_we), .wa(rf_wa), .wd(rf_wd),
    .pc_we, .pc_wd, .sp_we, .sp_wd
  );

  // ---------------- operand ----------------
  logic [31:0] ov_pre;
  operand_unit u_opnd (.n(ir.n), .a(ir.a), .reg_a(rd_a), .ov(ov_pre));

  // ---------------- ALU ----------------
  alu_op_e     alu_op;
  logic [31:0] alu_y;
  logic        eq_ab, lt_ab, lt_ba, zero_b, neg_b, zero_and;
  alu u_alu (.op(alu_op), .a(rd_r), .b(ov), .y(alu_y),
             .eq_ab, .lt_ab, .lt_ba, .zero_b, .neg_b, .zero_and);

  always_comb begin
    unique case (op)
      OP_ADD:  alu_op = ALU_ADD;
      OP_SUB:  alu_op = ALU_SUB;
      OP_RSUB: alu_op = ALU_RSUB;
      OP_MUL:  alu_op = ALU_MUL;
      OP_NEG:  alu_op = ALU_NEG;
      OP_AND:  alu_op = ALU_AND;
      OP_OR:   alu_op = ALU_OR;
      OP_XOR:  alu_op = ALU_XOR;
      OP_NOT:  alu_op = ALU_NOT;
      OP_MIN:  alu_op = ALU_MIN;
      OP_MAX:  alu_op = ALU_MAX;
      OP_INCR: alu_op = ALU_INC;
      OP_DECR: alu_op = ALU_DEC;
      default: alu_op = ALU_PASS_B;
    endcase
  end

  // ---------------- shifter ----------------
  shift_op_e   sh_op;
  logic [31:0] sh_y;
  logic        sh_zero;
  shifter u_sh (.op(sh_op), .a(rd_r), .amt(ov), .y(sh_y), .zero(sh_zero));

  always_comb begin
    unique case (op)
      OP_ASHL: sh_op = SH_ASHL;
      OP_ROTL: sh_op = SH_ROTL;
      OP_SHR:  sh_op = SH_SHR;
      OP_ASHR: sh_op = SH_ASHR;
      OP_ROTR: sh_op = SH_ROTR;
      default: sh_op = SH_SHL;
    endcase
  end

  // ---------------- condition ----------------
  logic cond_true;
  cond_unit u_cond (.cond(ir.r), .flags(flags), .holds(cond_true));

  // ---------------- divider ----------------
  logic        div_start, div_busy, div_done;
  logic [31:0] div_q, div_r;
  logic        rev_div;     // RDIV / RMOD: OV is the dividend
  assign rev_div = (op == OP_RDIV) || (op == OP_RMOD);
  divider u_div (
    .clk, .rst_n, .start(div_start),
    .dividend(rev_div ? ov : rd_r), .divisor(rev_div ? rd_r : ov),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  // ---------------- byte unit ----------------
  logic        bu_single;
  logic [63:0] bu_win, bu_new;
  logic [31:0] bu_mksel, bu_off, bu_field;
  assign bu_single = (op == OP_GTBOF) || (op == OP_PTBOF);
  byte_unit u_bu (
    .sel(selector_t'(rd_0)), .single(bu_single), .win(bu_win), .v(rd_r),
    .mk_start(rd_r), .mk_end(ov), .mksel(bu_mksel),
    .word_off(bu_off), .field(bu_field), .new_win(bu_new)
  );

  always_comb begin
    unique case (state)
      S_RMW_W: bu_win = {mem_rdata, 32'd0};
      S_BF_R2: bu_win = {win_hi, mem_rdata};
      default: bu_win = {ov, 32'd0};
    endcase
  end

  // ---------------- OUTS byte ----------------
  logic [7:0] outs_byte;
  assign outs_byte = win_hi[{~bidx, 3'b000} +: 8];   // byte 0 is the MSB

  // ---------------- control ----------------
  // halt: stop after this cycle; done: instruction complete.
  logic halt, done;

  always_comb begin
    state_n  = state;
    ir_n     = ir;
    ov_n     = ov;
    flags_n  = flags;
    cnt_n    = cnt;
    addr0_n  = addr0;
    win_hi_n = win_hi;
    win_lo_n = win_lo;
    bidx_n   = bidx;

    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = ov;
    mem_wdata = '0;
    rf_ra_r   = ir.r;
    rf_we     = 1'b0;
    rf_wa     = ir.r;
    rf_wd     = '0;
    pc_we     = 1'b0;
    pc_wd     = pc;
    sp_we     = 1'b0;
    sp_wd     = sp;
    div_start = 1'b0;
    out_valid = 1'b0;
    out_kind  = OUT_NUM;
    out_data  = ov;
    in_ready  = 1'b0;
    in_kind   = IN_NUM;
    halt      = 1'b0;
    done      = 1'b0;

    unique case (state)
      S_IDLE: if (start) begin
        flags_n.run = 1'b1;
        state_n     = S_FETCH;
      end

      S_FETCH: begin
        mem_en   = 1'b1;
        mem_addr = pc;
        state_n  = S_FETCH_W;
      end

      S_FETCH_W: begin
        ir_n    = instr_t'(mem_rdata);
        pc_we   = 1'b1;
        pc_wd   = pc + 32'd1;
        state_n = S_EA;
      end

      S_EA: begin
        ov_n = ov_pre;
        if (ir.star) begin
          mem_en   = 1'b1;
          mem_addr = ov_pre;
          state_n  = S_IND_W;
        end else begin
          state_n  = S_EXEC;
        end
      end

      S_IND_W: begin
        ov_n    = mem_rdata;
        state_n = S_EXEC;
      end

      S_EXEC: begin
        unique case (op)
          OP_LOAD:   begin rf_we = 1'b1; rf_wd = ov; done = 1'b1; end
          OP_LOADH:  begin rf_we = 1'b1; rf_wd = {ov[15:0], rd_r[15:0]}; done = 1'b1; end
          OP_LDVRZ:  begin rf_we = 1'b1; rf_wd = rd_0; done = 1'b1; end
          OP_STORE:  begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = rd_r; done = 1'b1; end
          OP_STOREH: begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = rd_r >> 16; done = 1'b1; end
          OP_ZERO:   begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = '0; done = 1'b1; end
          OP_STFLS:  begin mem_en = 1'b1; mem_we = 1'b1; mem_wdata = flags; done = 1'b1; end

          OP_ADD, OP_SUB, OP_RSUB, OP_MUL, OP_NEG, OP_NOT, OP_AND, OP_OR,
          OP_XOR, OP_MIN, OP_MAX, OP_INCR, OP_DECR: begin
            rf_we = 1'b1; rf_wd = alu_y; done = 1'b1;
          end

          OP_CMP:   begin flags_n.zero = eq_ab;    flags_n.neg = lt_ab; done = 1'b1; end
          OP_RCMP:  begin flags_n.zero = eq_ab;    flags_n.neg = lt_ba; done = 1'b1; end
          OP_CMPZ:  begin flags_n.zero = zero_b;   flags_n.neg = neg_b; done = 1'b1; end
          OP_ANDTF: begin flags_n.zero = zero_and; flags_n.neg = 1'b0;  done = 1'b1; end
          OP_LDFLS: begin
            flags_n = flags_t'({28'd0, ov[3:0]});
            halt    = !ov[0];
            done    = 1'b1;
          end

          OP_SHL, OP_ASHL, OP_ROTL, OP_SHR, OP_ASHR, OP_ROTR: begin
            rf_we = 1'b1; rf_wd = sh_y; flags_n.zero = sh_zero; done = 1'b1;
          end

          OP_DIV, OP_MOD: begin
            if (ov == '0) halt = 1'b1;
            else begin div_start = 1'b1; state_n = S_DIV_W; end
          end
          OP_RDIV, OP_RMOD: begin
            if (rd_r == '0) halt = 1'b1;
            else begin div_start = 1'b1; state_n = S_DIV_W; end
          end

          OP_INC, OP_DEC, OP_PTBOF: begin
            mem_en = 1'b1; state_n = S_RMW_W;
          end

          OP_MKSEL: begin rf_we = 1'b1; rf_wd = bu_mksel; done = 1'b1; end
          OP_GTBOF: begin rf_we = 1'b1; rf_wd = bu_field; done = 1'b1; end
          OP_GTBFR, OP_PTBFR: begin
            addr0_n  = ov + bu_off;
            mem_en   = 1'b1;
            mem_addr = ov + bu_off;
            state_n  = S_BF_R1;
          end

          OP_JUMP:  begin pc_we = 1'b1; pc_wd = ov; done = 1'b1; end
          OP_JCOND: begin pc_we = cond_true;  pc_wd = ov; done = 1'b1; end
          OP_JCNDF: begin pc_we = !cond_true; pc_wd = ov; done = 1'b1; end

          OP_PUSH: begin
            sp_we = 1'b1; sp_wd = sp - 32'd1;
            mem_en = 1'b1; mem_we = 1'b1; mem_addr = sp - 32'd1; mem_wdata = ov;
            done = 1'b1;
          end
          OP_CALL: begin
            sp_we = 1'b1; sp_wd = sp - 32'd1;
            mem_en = 1'b1; mem_we = 1'b1; mem_addr = sp - 32'd1; mem_wdata = pc;
            pc_we = 1'b1; pc_wd = ov;
            done = 1'b1;
          end
          OP_POP: begin
            mem_en = 1'b1; mem_addr = sp; state_n = S_POP_W;
          end
          OP_RET: begin
            if (sp == '0) halt = 1'b1;
            else begin mem_en = 1'b1; mem_addr = sp; state_n = S_RET_W; end
          end
          OP_PUSHA: begin
            sp_we = 1'b1; sp_wd = sp - 32'd1;
            mem_en = 1'b1; mem_we = 1'b1; mem_addr = sp - 32'd1; mem_wdata = flags;
            cnt_n = 4'd1;
            state_n = S_PUSHA;
          end
          OP_POPA: begin
            mem_en = 1'b1; mem_addr = sp;
            cnt_n = 4'd12;
            state_n = S_POPA_W;
          end

          OP_OUTN: begin
            out_valid = 1'b1; out_kind = OUT_NUM; out_data = ov;
            done = out_ready;
          end
          OP_OUTCH: begin
            out_valid = 1'b1; out_kind = OUT_CHAR; out_data = ov;
            done = out_ready;
          end
          OP_OUT: begin
            out_valid = 1'b1; out_kind = OUT_DBG_PC; out_data = pc;
            if (out_ready) state_n = S_OUT2;
          end
          OP_OUTS: begin
            mem_en = 1'b1; addr0_n = ov; state_n = S_OUTS_W;
          end
          OP_INN: begin
            in_ready = 1'b1; in_kind = IN_NUM;
            if (in_valid) begin
              mem_en = 1'b1; mem_we = 1'b1; mem_wdata = in_data; done = 1'b1;
            end
          end
          OP_INCH: begin
            in_ready = 1'b1; in_kind = IN_CHAR;
            if (in_valid) begin
              mem_en = 1'b1; mem_we = 1'b1; mem_wdata = {24'd0, in_data[7:0]}; done = 1'b1;
            end
          end

          // BAD, HALT and every unused opcode stop the machine.
          default: halt = 1'b1;
        endcase
      end

      S_RMW_W: begin
        mem_en = 1'b1; mem_we = 1'b1;
        unique case (op)
          OP_INC:  mem_wdata = mem_rdata + 32'd1;
          OP_DEC:  mem_wdata = mem_rdata - 32'd1;
          default: mem_wdata = bu_new[63:32];   // PTBOF
        endcase
        done = 1'b1;
      end

      S_DIV_W: if (div_done) begin
        rf_we = 1'b1;
        rf_wd = (op == OP_DIV || op == OP_RDIV) ? div_q : div_r;
        done  = 1'b1;
      end

      S_POP_W: begin
        rf_we = 1'b1; rf_wd = mem_rdata;
        sp_we = 1'b1; sp_wd = sp + 32'd1;
        done  = 1'b1;
      end

      S_RET_W: begin
        pc_we = 1'b1; pc_wd = mem_rdata;
        sp_we = 1'b1; sp_wd = sp + 32'd1;
        done  = 1'b1;
      end

      S_PUSHA: begin
        rf_ra_r = cnt;
        sp_we = 1'b1; sp_wd = sp - 32'd1;
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = sp - 32'd1; mem_wdata = rd_r;
        cnt_n = cnt + 4'd1;
        if (cnt == 4'd12) done = 1'b1;
      end

      S_POPA_W: begin
        rf_we = 1'b1; rf_wa = cnt; rf_wd = mem_rdata;
        sp_we = 1'b1; sp_wd = sp + 32'd1;
        mem_en = 1'b1; mem_addr = sp + 32'd1;
        cnt_n = cnt - 4'd1;
        if (cnt == 4'd1) state_n = S_POPA_F;
      end

      S_POPA_F: begin
        flags_n = flags_t'({28'd0, mem_rdata[3:0]});
        sp_we = 1'b1; sp_wd = sp + 32'd1;
        halt  = !mem_rdata[0];
        done  = 1'b1;
      end

      S_BF_R1: begin
        win_hi_n = mem_rdata;
        mem_en   = 1'b1;
        mem_addr = addr0 + 32'd1;
        state_n  = S_BF_R2;
      end

      S_BF_R2: begin
        if (op == OP_GTBFR) begin
          rf_we = 1'b1; rf_wd = bu_field;
          done  = 1'b1;
        end else begin
          mem_en = 1'b1; mem_we = 1'b1; mem_addr = addr0; mem_wdata = bu_new[63:32];
          win_lo_n = bu_new[31:0];
          state_n  = S_BF_W2;
        end
      end

      S_BF_W2: begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = addr0 + 32'd1; mem_wdata = win_lo;
        done = 1'b1;
      end

      S_OUT2: begin
        out_valid = 1'b1; out_kind = OUT_DBG_OV; out_data = ov;
        done = out_ready;
      end

      S_OUTS_W: begin
        win_hi_n = mem_rdata;
        bidx_n   = 2'd0;
        state_n  = S_OUTS_B;
      end

      S_OUTS_B: begin
        if (outs_byte == 8'd0) done = 1'b1;
        else begin
          out_valid = 1'b1; out_kind = OUT_CHAR; out_data = {24'd0, outs_byte};
          if (out_ready) begin
            if (bidx == 2'd3) begin
              addr0_n  = addr0 + 32'd1;
              mem_en   = 1'b1;
              mem_addr = addr0 + 32'd1;
              state_n  = S_OUTS_W;
            end else begin
              bidx_n = bidx + 2'd1;
            end
          end
        end
      end

      default: state_n = S_IDLE;
    endcase

    if (halt) begin
      flags_n.run = 1'b0;
      state_n     = S_IDLE;
    end else if (done) begin
      state_n = S_FETCH;
    end
    if (intr) flags_n.intr = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ir     <= '0;
      ov     <= '0;
      flags  <= '0;
      cnt    <= '0;
      addr0  <= '0;
      win_hi <= '0;
      win_lo <= '0;
      bidx   <= '0;
    end else begin
      state  <= state_n;
      ir     <= ir_n;
      ov     <= ov_n;
      flags  <= flags_n;
      cnt    <= cnt_n;
      addr0  <= addr0_n;
      win_hi <= win_hi_n;
      win_lo <= win_lo_n;
      bidx   <= bidx_n;
    end
  end

  assign run        = flags.run;
  assign flags_word = flags;

  // Console output handshake: once offered, a word stays until taken.
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data) && $stable(out_kind));
  endproperty
  a_out_stable: assert property (p_out_stable);

  // The divider is only started with a non-zero divisor.
  a_div_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> ((rev_div ? rd_r : ov) != '0));

  // ... and never while it is still busy with an earlier division.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);

endmodule
