// exec_engine: execution stage of the Java co-processor.
//
// Executes the hardware subset of Java bytecode (int constants, local loads
// and stores, stack manipulation, int arithmetic, shifts and logic, narrowing
// casts, compares and branches, goto/jsr/ret, quick constant-pool and field
// access, int array access) on an operand-stack cache. Everything else makes
// the engine stop before the instruction and hand the machine state back to
// software, which executes it.
//
// Operand stack: the top STACK_ENTRIES words are held in a circular register
// array; the rest of the stack lives in on-board RAM from `stack_base` up.
// Nothing is preloaded when a run starts: before each instruction the engine
// checks that the cache holds all the words it pops (else it fills one word
// from RAM, repeating as needed) and that its pushes fit (else it spills the
// bottom word to RAM). When the run ends the cached words are written back,
// so software finds the whole stack in RAM with depth `exit_depth`.
//
// Instruction flow: an instruction is taken from the instruction buffer when
// it completes (`in_ready`), so a multi-cycle instruction simply holds the
// buffer's output register. Simple instructions complete in one cycle, giving
// one instruction per clock. Taken branches assert `redirect`, which makes the
// buffer drop the sequential instruction it had already decoded.
//
// Memory: local variables go through the data cache (`dc_*`, one request held
// until `dc_ack`); constant pool, object fields and arrays go to host memory
// (`hm_req`/`hm_rsp`); spills and fills go to on-board RAM (`stk_req`). Host
// memory layout (own choice): a reference is a word address, 0 is null; an
// object's field at byte-1 offset n is word ref+n; an array keeps its length
// at ref and element i at ref+1+i.
//
// Exits (`done` pulse after the write-back): ST_RETURN at a return
// instruction, ST_UNSUPPORTED at an opcode left to software, ST_EXCEPTION at
// a null reference, array index out of bounds, division by zero or a pop
// below the bottom of the stack. `exit_pc` is the PC of the instruction that
// was not executed, and the stack is as it was before it.
//
// From the document: the 64-entry stack cache, on-demand spill and fill
// through the host interface, local variables through the data cache,
// constant pool directly from the host, quick instructions, no instruction
// folding. The subset, the exit protocol, the iterative divider (32 cycles)
// and the memory layout are this design's own.
module exec_engine
  import jvm_pkg::*;
#(
  parameter int unsigned STACK_ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      stack_base,
  input  word_t      stack_depth,
  input  word_t      cpool_base,
  // from the instruction buffer
  input  logic       in_valid,
  input  instr_t     in,
  output logic       in_ready,
  output logic       redirect,
  output jpc_t       redirect_pc,
  // data cache (local variables)
  output logic       dc_req,
  output logic       dc_we,
  output logic [7:0] dc_index,
  output word_t      dc_wdata,
  input  logic       dc_ack,
  input  word_t      dc_rdata,
  // stack spill / fill (on-board RAM) and host memory
  output mem_req_t   stk_req,
  input  mem_rsp_t   stk_rsp,
  output mem_req_t   hm_req,
  input  mem_rsp_t   hm_rsp,
  // end of run
  output logic       done,
  output jpc_t       exit_pc,
  output word_t      exit_depth,
  output exit_t      exit_code,
  output logic [7:0] exit_op,
  // events, one pulse each
  output logic       ev_retire,
  output logic       ev_spill,
  output logic       ev_fill,
  output logic       ev_branch
);

  localparam int unsigned SW = $clog2(STACK_ENTRIES);
  typedef logic [SW-1:0] sidx_t;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_SPILL, S_FILL, S_DIV, S_FLUSH, S_DONE} state_t;
  state_t state;

  word_t      sc [STACK_ENTRIES];
  sidx_t      top;                 // next free slot
  logic [SW:0] cnt;                // words in the cache
  word_t      mdepth;              // words in RAM
  logic [1:0] step;                // step of a multi-cycle instruction
  word_t      tmp;                 // value carried between steps

  // divider
  logic [5:0]  div_n;
  logic [32:0] div_rem;
  word_t       div_q, div_dvs;

  // ---------------- operands ----------------
  word_t t0, t1, t2;
  sidx_t bottom;
  always_comb begin
    t0 = sc[top - sidx_t'(1)];
    t1 = sc[top - sidx_t'(2)];
    t2 = sc[top - sidx_t'(3)];
    bottom = top - sidx_t'(cnt);
  end

  logic [7:0] op;
  stack_use_t su;
  word_t  imm8, imm16, off16, off32, bpc;
  logic [7:0] lv_idx;
  always_comb begin
    op     = in.op;
    su     = op_stack(op);
    imm8   = {{24{in.operand[31]}}, in.operand[31:24]};
    imm16  = {{16{in.operand[31]}}, in.operand[31:16]};
    off16  = imm16;
    off32  = in.operand;
    bpc    = {16'd0, in.pc};
    if (op >= OP_ILOAD_0 && op <= OP_ILOAD_3)        lv_idx = 8'(op - OP_ILOAD_0);
    else if (op >= OP_ALOAD_0 && op <= OP_ALOAD_3)   lv_idx = 8'(op - OP_ALOAD_0);
    else if (op >= OP_ISTORE_0 && op <= OP_ISTORE_3) lv_idx = 8'(op - OP_ISTORE_0);
    else if (op >= OP_ASTORE_0 && op <= OP_ASTORE_3) lv_idx = 8'(op - OP_ASTORE_0);
    else                                             lv_idx = in.operand[31:24];
  end

  // instruction classes
  logic c_lvload, c_lvstore, c_iinc, c_ret, c_ldc, c_getf, c_putf, c_alen, c_aload,
        c_astore, c_div, c_exit_ret;
  always_comb begin
    c_lvload  = op == OP_ILOAD || op == OP_ALOAD ||
                (op >= OP_ILOAD_0 && op <= OP_ILOAD_3) || (op >= OP_ALOAD_0 && op <= OP_ALOAD_3);
    c_lvstore = op == OP_ISTORE || op == OP_ASTORE ||
                (op >= OP_ISTORE_0 && op <= OP_ISTORE_3) || (op >= OP_ASTORE_0 && op <= OP_ASTORE_3);
    c_iinc    = op == OP_IINC;
    c_ret     = op == OP_RET;
    c_ldc     = op == OP_LDC_QUICK || op == OP_LDC_W_QUICK;
    c_getf    = op == OP_GETFIELD_QUICK;
    c_putf    = op == OP_PUTFIELD_QUICK;
    c_alen    = op == OP_ARRAYLENGTH;
    c_aload   = op == OP_IALOAD || op == OP_AALOAD;
    c_astore  = op == OP_IASTORE;
    c_div     = op == OP_IDIV || op == OP_IREM;
    c_exit_ret = op == OP_IRETURN || op == OP_ARETURN || op == OP_RETURN;
  end

  // ---------------- single-cycle results ----------------
  word_t pv [4];          // values pushed, pv[0] becomes the top
  logic  taken;
  word_t target;
  always_comb begin
    pv[0] = '0; pv[1] = '0; pv[2] = '0; pv[3] = '0;
    taken = 1'b0;
    target = bpc + off16;
    if (op >= OP_ACONST_NULL && op <= OP_ICONST_5) pv[0] = 32'(op) - 32'd3;
    if (op >= OP_IFEQ && op <= OP_IFLE) begin
      unique case (op)
        OP_IFEQ: taken = t0 == 0;
        OP_IFNE: taken = t0 != 0;
        OP_IFLT: taken = $signed(t0) < 0;
        OP_IFGE: taken = $signed(t0) >= 0;
        OP_IFGT: taken = $signed(t0) > 0;
        default: taken = $signed(t0) <= 0;
      endcase
    end
    if (op >= OP_IF_ICMPEQ && op <= OP_IF_ACMPNE) begin
      unique case (op)
        OP_IF_ICMPEQ, OP_IF_ACMPEQ: taken = t1 == t0;
        OP_IF_ICMPNE, OP_IF_ACMPNE: taken = t1 != t0;
        OP_IF_ICMPLT: taken = $signed(t1) <  $signed(t0);
        OP_IF_ICMPGE: taken = $signed(t1) >= $signed(t0);
        OP_IF_ICMPGT: taken = $signed(t1) >  $signed(t0);
        default:      taken = $signed(t1) <= $signed(t0);
      endcase
    end
    unique case (op)
      OP_ACONST_NULL: pv[0] = '0;
      OP_BIPUSH: pv[0] = imm8;
      OP_SIPUSH: pv[0] = imm16;
      OP_DUP:    begin pv[0] = t0; pv[1] = t0; end
      OP_DUP_X1: begin pv[0] = t0; pv[1] = t1; pv[2] = t0; end
      OP_DUP_X2: begin pv[0] = t0; pv[1] = t1; pv[2] = t2; pv[3] = t0; end
      OP_DUP2:   begin pv[0] = t0; pv[1] = t1; pv[2] = t0; pv[3] = t1; end
      OP_SWAP:   begin pv[0] = t1; pv[1] = t0; end
      OP_IADD:   pv[0] = t1 + t0;
      OP_ISUB:   pv[0] = t1 - t0;
      OP_IMUL:   pv[0] = t1 * t0;
      OP_INEG:   pv[0] = -t0;
      OP_ISHL:   pv[0] = t1 << t0[4:0];
      OP_ISHR:   pv[0] = word_t'($signed(t1) >>> t0[4:0]);
      OP_IUSHR:  pv[0] = t1 >> t0[4:0];
      OP_IAND:   pv[0] = t1 & t0;
      OP_IOR:    pv[0] = t1 | t0;
      OP_IXOR:   pv[0] = t1 ^ t0;
      OP_I2B:    pv[0] = {{24{t0[7]}}, t0[7:0]};
      OP_I2C:    pv[0] = {16'd0, t0[15:0]};
      OP_I2S:    pv[0] = {{16{t0[15]}}, t0[15:0]};
      OP_IFNULL:    taken = t0 == 0;
      OP_IFNONNULL: taken = t0 != 0;
      OP_GOTO:   taken = 1'b1;
      OP_GOTO_W: begin taken = 1'b1; target = bpc + off32; end
      OP_JSR:    begin taken = 1'b1; pv[0] = bpc + 32'd3; end
      OP_JSR_W:  begin taken = 1'b1; target = bpc + off32; pv[0] = bpc + 32'd5; end
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------
  logic  go;              // an instruction is present and the stack is ready
  logic  need_fill, need_spill, underflow;
  logic  commit;          // instruction completes this cycle
  word_t cval;            // value pushed by a multi-cycle instruction
  logic  exc, ex_unsup, ex_ret;
  logic  [SW+1:0] after;

  always_comb begin
    after      = {1'b0, cnt} - (SW+2)'(su.pops) + (SW+2)'(su.pushes);
    ex_unsup   = in_valid && !su.supported;
    ex_ret     = in_valid && c_exit_ret;
    need_fill  = in_valid && su.supported && !c_exit_ret && (cnt < (SW+1)'(su.pops));
    underflow  = need_fill && (mdepth == 0);
    need_spill = in_valid && su.supported && !c_exit_ret && !need_fill &&
                 (after > (SW+2)'(STACK_ENTRIES));
    go         = (state == S_RUN) && in_valid && su.supported && !c_exit_ret &&
                 !need_fill && !need_spill;
  end

  // memory requests and completion of the current instruction
  word_t aref, aidx;
  always_comb begin
    dc_req = 1'b0; dc_we = 1'b0; dc_index = lv_idx; dc_wdata = t0;
    hm_req = '0;
    commit = 1'b0; cval = '0; exc = 1'b0;
    aref = c_astore ? t2 : t1;
    aidx = c_astore ? t1 : t0;
    if (go) begin
      if (c_lvload) begin
        dc_req = 1'b1;
        commit = dc_ack; cval = dc_rdata;
      end else if (c_lvstore) begin
        dc_req = 1'b1; dc_we = 1'b1;
        commit = dc_ack;
      end else if (c_iinc) begin
        dc_req = 1'b1; dc_we = (step == 2'd1); dc_wdata = tmp;
        commit = dc_ack && step == 2'd1;
      end else if (c_ret) begin
        dc_req = 1'b1;
        commit = dc_ack;
      end else if (c_ldc) begin
        hm_req.req  = 1'b1;
        hm_req.addr = cpool_base + (op == OP_LDC_QUICK ? {24'd0, in.operand[31:24]}
                                                       : {16'd0, in.operand[31:16]});
        commit = hm_rsp.ack; cval = hm_rsp.rdata;
      end else if (c_getf || c_alen) begin
        if (t0 == 0) exc = 1'b1;
        else begin
          hm_req.req  = 1'b1;
          hm_req.addr = t0 + (c_getf ? {24'd0, in.operand[31:24]} : 32'd0);
          commit = hm_rsp.ack; cval = hm_rsp.rdata;
        end
      end else if (c_putf) begin
        if (t1 == 0) exc = 1'b1;
        else begin
          hm_req = '{req: 1'b1, we: 1'b1, addr: t1 + {24'd0, in.operand[31:24]}, wdata: t0};
          commit = hm_rsp.ack;
        end
      end else if (c_aload || c_astore) begin
        if (aref == 0) exc = 1'b1;
        else if (step == 2'd0) begin
          hm_req.req  = 1'b1;
          hm_req.addr = aref;            // length word
        end else if (aidx >= tmp) begin
          exc = 1'b1;                    // index out of bounds (negative ones too)
        end else begin
          hm_req = '{req: 1'b1, we: c_astore, addr: aref + 32'd1 + aidx, wdata: t0};
          commit = hm_rsp.ack; cval = hm_rsp.rdata;
        end
      end else if (c_div) begin
        if (t0 == 0) exc = 1'b1;
        // otherwise the divider runs in S_DIV and commits there
      end else begin
        commit = 1'b1;                   // single-cycle instruction
      end
    end
  end

  always_comb begin
    in_ready    = commit || (state == S_DIV && div_n == 6'd32);
    redirect    = 1'b0;
    redirect_pc = target[15:0];
    if (commit && taken) redirect = 1'b1;
    if (commit && c_ret) begin
      redirect = 1'b1; redirect_pc = dc_rdata[15:0];
    end
    stk_req = '0;
    if (state == S_SPILL || state == S_FLUSH) begin
      stk_req = '{req: cnt != 0, we: 1'b1, addr: stack_base + mdepth, wdata: sc[bottom]};
    end else if (state == S_FILL) begin
      stk_req = '{req: 1'b1, we: 1'b0, addr: stack_base + mdepth - 32'd1, wdata: '0};
    end
  end

  // divider result
  word_t div_a_mag, div_b_mag, div_res;
  logic [32:0] div_r;
  always_comb begin
    div_r     = {div_rem[31:0], div_q[31]};
    div_a_mag = t1[31] ? -t1 : t1;
    div_b_mag = t0[31] ? -t0 : t0;
    if (op == OP_IDIV) div_res = (t1[31] ^ t0[31]) ? -div_q : div_q;
    else               div_res = t1[31] ? -div_rem[31:0] : div_rem[31:0];
  end

  // ---------------- state ----------------
  logic [SW+1:0] push_base;
  assign push_base = {2'b0, top} - (SW+2)'(su.pops);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; top <= '0; cnt <= '0; mdepth <= '0; step <= '0; tmp <= '0;
      div_n <= '0; div_rem <= '0; div_q <= '0; div_dvs <= '0;
      done <= 1'b0; exit_pc <= '0; exit_depth <= '0; exit_code <= ST_RETURN; exit_op <= '0;
      ev_retire <= 1'b0; ev_spill <= 1'b0; ev_fill <= 1'b0; ev_branch <= 1'b0;
      for (int i = 0; i < STACK_ENTRIES; i++) sc[i] <= '0;
    end else begin
      done <= 1'b0;
      ev_retire <= 1'b0; ev_spill <= 1'b0; ev_fill <= 1'b0; ev_branch <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          top <= '0; cnt <= '0; mdepth <= stack_depth; step <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (ex_unsup || ex_ret || underflow || exc) begin
            exit_pc   <= in.pc;
            exit_op   <= op;
            exit_code <= ex_unsup ? ST_UNSUPPORTED : (ex_ret ? ST_RETURN : ST_EXCEPTION);
            step      <= '0;
            state     <= S_FLUSH;
          end else if (need_fill) state <= S_FILL;
          else if (need_spill)    state <= S_SPILL;
          else if (go && c_div) begin
            div_n <= '0; div_rem <= '0; div_q <= div_a_mag; div_dvs <= div_b_mag;
            state <= S_DIV;
          end else if (go) begin
            // multi-cycle steps
            if (c_iinc && dc_ack && step == 2'd0) begin
              tmp  <= dc_rdata + {{24{in.operand[23]}}, in.operand[23:16]};
              step <= 2'd1;
            end
            if ((c_aload || c_astore) && step == 2'd0 && hm_rsp.ack) begin
              tmp  <= hm_rsp.rdata;
              step <= 2'd1;
            end
            if (commit) begin
              step <= '0;
              ev_retire <= 1'b1;
              ev_branch <= taken || c_ret;
              for (int k = 0; k < 4; k++)
                if (k < int'(su.pushes))
                  sc[sidx_t'(push_base + (SW+2)'(su.pushes) - (SW+2)'(1) - (SW+2)'(k))] <=
                    (c_lvload || c_ldc || c_getf || c_alen || c_aload) ? cval : pv[k];
              top <= sidx_t'(push_base + (SW+2)'(su.pushes));
              cnt <= (SW+1)'(after);
            end
          end
        end
        S_SPILL: if (stk_rsp.ack) begin
          mdepth <= mdepth + 1; cnt <= cnt - 1; ev_spill <= 1'b1; state <= S_RUN;
        end
        S_FILL: if (stk_rsp.ack) begin
          sc[bottom - sidx_t'(1)] <= stk_rsp.rdata;
          mdepth <= mdepth - 1; cnt <= cnt + 1; ev_fill <= 1'b1; state <= S_RUN;
        end
        S_DIV: begin
          if (div_n != 6'd32) begin
            if (div_r >= {1'b0, div_dvs}) begin
              div_rem <= div_r - {1'b0, div_dvs};
              div_q   <= {div_q[30:0], 1'b1};
            end else begin
              div_rem <= div_r;
              div_q   <= {div_q[30:0], 1'b0};
            end
            div_n <= div_n + 1;
          end else begin
            sc[top - sidx_t'(2)] <= div_res;
            top <= top - sidx_t'(1);
            cnt <= cnt - 1;
            ev_retire <= 1'b1;
            state <= S_RUN;
          end
        end
        S_FLUSH: if (cnt == 0) state <= S_DONE;
                 else if (stk_rsp.ack) begin
                   mdepth <= mdepth + 1; cnt <= cnt - 1; ev_spill <= 1'b1;
                 end
        S_DONE: begin
          done       <= 1'b1;
          exit_depth <= mdepth;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
