// tb_exec_engine: self-checking test of the execution engine.
// The engine runs small bytecode programs fed by an ideal instruction source
// that follows its redirects. Local variables are a one-cycle model of the
// data cache; the operand stack in on-board RAM and the host memory are RAM
// models. A stack cache of 8 words is used so that spills and fills happen.
// Programs: a loop counter; every arithmetic, shift, logic and cast
// instruction on random operands (results checked against SystemVerilog
// arithmetic); stack manipulation across spills and fills with words already
// in RAM at start; quick constant-pool, field and array accesses; every
// conditional branch on random operands; jsr/ret; and the exits to software
// (unsupported opcode, null reference, array bound, division by zero, stack
// underflow). Also checks one instruction per clock on straight-line code.
module tb_exec_engine;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t STK = 32'h200, CP = 32'h10, ARR = 32'h300, OBJ = 32'h400;

  logic start, in_valid, in_ready, redirect, dc_req, dc_we, dc_ack, done;
  logic ev_retire, ev_spill, ev_fill, ev_branch;
  word_t stack_depth, dc_wdata, dc_rdata, exit_depth;
  jpc_t redirect_pc, exit_pc;
  instr_t in;
  logic [7:0] dc_index, exit_op;
  exit_t exit_code;
  mem_req_t stk_req, hm_req;
  mem_rsp_t stk_rsp, hm_rsp;

  exec_engine #(.STACK_ENTRIES(8)) dut (
    .clk, .rst_n, .start, .stack_base(STK), .stack_depth, .cpool_base(CP),
    .in_valid, .in, .in_ready, .redirect, .redirect_pc,
    .dc_req, .dc_we, .dc_index, .dc_wdata, .dc_ack, .dc_rdata,
    .stk_req, .stk_rsp, .hm_req, .hm_rsp,
    .done, .exit_pc, .exit_depth, .exit_code, .exit_op,
    .ev_retire, .ev_spill, .ev_fill, .ev_branch);
  mem_model #(.WORDS(1024), .LATENCY(2)) sram (.clk, .req(stk_req), .rsp(stk_rsp));
  mem_model #(.WORDS(2048), .LATENCY(4)) hmem (.clk, .req(hm_req), .rsp(hm_rsp));

  // local variables (one-cycle model of the data cache)
  word_t loc [256];
  initial dc_ack = 0;
  always @(posedge clk) begin
    dc_ack <= 0;
    if (dc_req && !dc_ack) begin
      dc_ack <= 1;
      if (dc_we) loc[dc_index] <= dc_wdata;
      dc_rdata <= loc[dc_index];
    end
  end

  // ideal instruction source
  logic [7:0] code [1024];
  int pc;
  logic feeding;
  always_comb begin
    in.op      = code[pc];
    in.operand = {code[pc+1], code[pc+2], code[pc+3], code[pc+4]};
    in.pc      = jpc_t'(pc);
    in.len     = op_len(code[pc]);
    in_valid   = feeding;
  end
  always @(posedge clk)
    if (feeding && in_ready) pc <= redirect ? int'(redirect_pc) : pc + int'(op_len(code[pc]));

  int nspill = 0, nfill = 0, nbranch = 0, nretire = 0;
  always @(posedge clk) begin
    if (ev_spill) nspill++;
    if (ev_fill) nfill++;
    if (ev_branch) nbranch++;
    if (ev_retire) nretire++;
  end

  // assembler
  int ap;
  task automatic e(input logic [7:0] b); code[ap] = b; ap++; endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); e(a); e(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] b); e(a); e(b[15:8]); e(b[7:0]); endtask
  task automatic clear_code(); for (int i = 0; i < 1024; i++) code[i] = OP_NOP; ap = 0; endtask

  task automatic run(input word_t depth0);
    int n;
    @(negedge clk);
    pc = 0; stack_depth = depth0; start = 1; feeding = 1;
    @(negedge clk); start = 0;
    n = 0;
    while (!done && n < 20000) begin @(posedge clk); #1; n++; end
    feeding = 0;
    check(done, "run finished");
    @(negedge clk);
  endtask

  function automatic word_t alu(logic [7:0] op, word_t a, word_t b);
    case (op)
      OP_IADD: return a + b;
      OP_ISUB: return a - b;
      OP_IMUL: return a * b;
      OP_IDIV: return word_t'($signed(a) / $signed(b));
      OP_IREM: return word_t'($signed(a) % $signed(b));
      OP_IAND: return a & b;
      OP_IOR:  return a | b;
      OP_IXOR: return a ^ b;
      OP_ISHL: return a << b[4:0];
      OP_ISHR: return word_t'($signed(a) >>> b[4:0]);
      OP_IUSHR: return a >> b[4:0];
      OP_INEG: return -a;
      OP_I2B:  return word_t'(signed'(a[7:0]));
      OP_I2C:  return {16'd0, a[15:0]};
      default: return word_t'(signed'(a[15:0]));
    endcase
  endfunction

  function automatic bit cond(logic [7:0] op, int x, int y);
    case (op)
      OP_IFEQ: return x == 0;      OP_IFNE: return x != 0;
      OP_IFLT: return x < 0;       OP_IFGE: return x >= 0;
      OP_IFGT: return x > 0;       OP_IFLE: return x <= 0;
      OP_IF_ICMPEQ: return x == y; OP_IF_ICMPNE: return x != y;
      OP_IF_ICMPLT: return x < y;  OP_IF_ICMPGE: return x >= y;
      OP_IF_ICMPGT: return x > y;  default: return x <= y;
    endcase
  endfunction

  logic [7:0] bin_ops [11] = '{OP_IADD, OP_ISUB, OP_IMUL, OP_IDIV, OP_IREM, OP_IAND, OP_IOR,
                               OP_IXOR, OP_ISHL, OP_ISHR, OP_IUSHR};
  logic [7:0] un_ops [4] = '{OP_INEG, OP_I2B, OP_I2C, OP_I2S};

  initial begin
    int t0cyc, t1cyc;
    start = 0; feeding = 0; pc = 0; stack_depth = 0;
    for (int i = 0; i < 256; i++) loc[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // ---- loop counter: sum of 0..49 ----
    clear_code();
    e(OP_ICONST_5 - 5); e(8'h3c); e(OP_ICONST_5 - 5); e(8'h3d);   // 0: i=0, s=0
    e(8'h1c); e2(OP_BIPUSH, 50); e3(OP_IF_ICMPGE, 16'd13);         // 4: if i>=50 goto 20
    e(8'h1b); e(8'h1c); e(OP_IADD); e(8'h3c);                      // 10: s+=i
    e(OP_IINC); e(2); e(1);                                        // 14: i++
    e3(OP_GOTO, -16'sd13);                                         // 17: goto 4
    e(8'h1b); e(OP_IRETURN);                                       // 20
    run(0);
    check(loc[1] == 1225 && loc[2] == 50, $sformatf("loop sum %0d", loc[1]));
    check(exit_code == ST_RETURN && exit_pc == 21 && exit_op == OP_IRETURN, "loop exit");
    check(exit_depth == 1 && sram.mem[STK] == 1225, "returned value on the stack");

    // ---- arithmetic on random operands ----
    for (int r = 0; r < 12; r++) begin
      word_t a, b;
      a = $urandom; b = $urandom;
      if (r % 3 == 0) b = b % 64;
      if (b == 0) b = 7;
      if (r % 4 == 1) a = -a;
      hmem.mem[CP] = a; hmem.mem[CP + 1] = b;
      clear_code();
      for (int k = 0; k < 11; k++) begin
        e2(OP_LDC_QUICK, 0); e2(OP_LDC_QUICK, 1); e(bin_ops[k]); e2(OP_ISTORE, 8'(10 + k));
      end
      for (int k = 0; k < 4; k++) begin
        e2(OP_LDC_QUICK, 0); e(un_ops[k]); e2(OP_ISTORE, 8'(30 + k));
      end
      e(OP_RETURN);
      run(0);
      check(exit_code == ST_RETURN && exit_depth == 0, "alu program exit");
      for (int k = 0; k < 11; k++)
        check(loc[10 + k] == alu(bin_ops[k], a, b),
              $sformatf("op %h a=%h b=%h got %h", bin_ops[k], a, b, loc[10 + k]));
      for (int k = 0; k < 4; k++)
        check(loc[30 + k] == alu(un_ops[k], a, 0), $sformatf("op %h", un_ops[k]));
    end

    // ---- stack manipulation across spills and fills ----
    sram.mem[STK] = 100; sram.mem[STK + 1] = 101; sram.mem[STK + 2] = 102;
    clear_code();
    for (int k = 1; k <= 20; k++) e2(OP_BIPUSH, 8'(k));
    for (int k = 1; k < 20; k++) e(OP_IADD);
    e2(OP_BIPUSH, 7); e(OP_SWAP); e(OP_DUP_X1); e(OP_DUP_X2); e(OP_POP);
    e(OP_DUP2); e(OP_POP2); e(OP_ISUB); e(OP_IADD); e(OP_DUP); e(OP_IADD); e(OP_RETURN);
    run(3);
    // [100,101,102] + [210,210,7] -> isub [..,210,203] -> iadd [..,413] -> dup,iadd [..,826]
    check(exit_depth == 4, $sformatf("stack depth %0d", exit_depth));
    check(sram.mem[STK] == 100 && sram.mem[STK + 1] == 101 && sram.mem[STK + 2] == 102 &&
          sram.mem[STK + 3] == 826, $sformatf("stack result %0d", sram.mem[STK + 3]));
    check(nspill > 10, $sformatf("spills %0d", nspill));
    // pops below the cached words fill from RAM
    clear_code(); e(OP_IADD); e(OP_IADD); e(OP_RETURN);
    run(4);
    check(exit_depth == 2 && sram.mem[STK + 1] == 101 + 102 + 826, "fill from RAM");
    check(nfill >= 3, $sformatf("fills %0d", nfill));
    clear_code(); e(OP_POP2); e(OP_POP); e(OP_RETURN);
    run(2);
    check(exit_code == ST_EXCEPTION && exit_pc == 1 && exit_depth == 0, "stack underflow exit");

    // ---- objects and arrays in host memory ----
    hmem.mem[CP + 2] = ARR; hmem.mem[CP + 3] = OBJ;
    hmem.mem[ARR] = 5;
    for (int k = 0; k < 5; k++) hmem.mem[ARR + 1 + k] = 1000 + k;
    hmem.mem[OBJ + 2] = 4242;
    clear_code();
    e2(OP_LDC_QUICK, 2); e(OP_ICONST_5 - 2); e(OP_IALOAD);                   // a[3]
    e2(OP_LDC_QUICK, 2); e(OP_ARRAYLENGTH);                                 // 5
    e2(OP_LDC_QUICK, 2); e(OP_ICONST_5 - 4); e2(OP_BIPUSH, 77); e(OP_IASTORE);  // a[1]=77
    e2(OP_LDC_QUICK, 3); e3(OP_GETFIELD_QUICK, 16'h0200);                   // o.f2
    e2(OP_LDC_QUICK, 3); e2(OP_BIPUSH, 55); e3(OP_PUTFIELD_QUICK, 16'h0400); // o.f4=55
    e(OP_RETURN);
    run(0);
    check(exit_code == ST_RETURN && exit_depth == 3, "object program exit");
    check(sram.mem[STK] == 1003 && sram.mem[STK + 1] == 5 && sram.mem[STK + 2] == 4242,
          "iaload, arraylength, getfield_quick");
    check(hmem.mem[ARR + 2] == 77 && hmem.mem[OBJ + 4] == 55, "iastore, putfield_quick");
    clear_code(); e2(OP_LDC_QUICK, 2); e(OP_ICONST_5); e(OP_IALOAD); e(OP_RETURN);
    run(0);
    check(exit_code == ST_EXCEPTION && exit_pc == 3 && exit_depth == 2, "array bound exit");
    clear_code(); e(OP_ACONST_NULL); e(OP_ARRAYLENGTH); e(OP_RETURN);
    run(0);
    check(exit_code == ST_EXCEPTION && exit_pc == 1, "null reference exit");
    clear_code(); e(OP_ICONST_5 - 4); e(OP_ICONST_5 - 5); e(OP_IDIV); e(OP_RETURN);
    run(0);
    check(exit_code == ST_EXCEPTION && exit_pc == 2 && exit_depth == 2, "divide by zero exit");
    clear_code(); e(OP_ICONST_5 - 3); e3(8'hbb, 16'h0001); e(OP_RETURN);
    run(0);
    check(exit_code == ST_UNSUPPORTED && exit_pc == 1 && exit_op == 8'hbb && exit_depth == 1,
          "unsupported opcode exit");

    // ---- conditional branches ----
    begin
      logic [7:0] cops [12] = '{OP_IFEQ, OP_IFNE, OP_IFLT, OP_IFGE, OP_IFGT, OP_IFLE,
                                OP_IF_ICMPEQ, OP_IF_ICMPNE, OP_IF_ICMPLT, OP_IF_ICMPGE,
                                OP_IF_ICMPGT, OP_IF_ICMPLE};
      int xs [12], ys [12];
      for (int r = 0; r < 4; r++) begin
        clear_code();
        for (int k = 0; k < 12; k++) begin
          xs[k] = int'($urandom % 5) - 2; ys[k] = int'($urandom % 5) - 2;
          e2(OP_BIPUSH, 8'(xs[k]));
          if (k >= 6) e2(OP_BIPUSH, 8'(ys[k]));
          e3(cops[k], 16'd9); e(OP_ICONST_5 - 5); e2(OP_ISTORE, 8'(40 + k));
          e3(OP_GOTO, 16'd6); e(OP_ICONST_5 - 4); e2(OP_ISTORE, 8'(40 + k));
        end
        e(OP_RETURN);
        run(0);
        for (int k = 0; k < 12; k++)
          check(loc[40 + k] == word_t'(cond(cops[k], xs[k], ys[k])),
                $sformatf("branch %h x=%0d y=%0d", cops[k], xs[k], ys[k]));
      end
    end

    // ---- jsr / ret ----
    loc[8] = 10;
    clear_code();
    e3(OP_JSR, 16'd5); e(OP_RETURN); e(OP_NOP);
    e2(OP_ASTORE, 9); e(OP_IINC); e(8); e(8'hfb); e2(OP_RET, 9);
    run(0);
    check(exit_code == ST_RETURN && exit_pc == 3, "jsr/ret returns");
    check(loc[8] == 5 && loc[9] == 3, "subroutine ran");

    // ---- one instruction per clock ----
    clear_code();
    for (int k = 0; k < 40; k++) e(OP_NOP);
    e(OP_RETURN);
    @(negedge clk);
    pc = 0; stack_depth = 0; start = 1; feeding = 1;
    @(negedge clk); start = 0;
    t0cyc = nretire;
    repeat (40) @(posedge clk);
    #1 t1cyc = nretire;
    check(t1cyc - t0cyc >= 39, $sformatf("straight-line throughput %0d in 40 cycles", t1cyc - t0cyc));
    while (!done) @(posedge clk);
    feeding = 0;
    check(nbranch > 20, "taken branches seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
