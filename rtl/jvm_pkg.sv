// jvm_pkg: types, opcodes and decode tables shared by the Java co-processor.
//
// The co-processor executes a subset of Java bytecode in hardware next to a
// host CPU that runs the rest of the virtual machine. This package holds what
// every unit needs to agree on: the 32-bit word type, the memory request and
// response bundles used between the units and the host interface, the opcode
// values (from the Java virtual machine specification, including the resolved
// "quick" forms), and two decode functions: the length of each instruction in
// bytes (used by the instruction buffer to align instructions) and the number
// of stack words each instruction pops and pushes (used by the execution
// engine to decide on stack-cache spills and fills before it executes).
//
// The subset, the status codes returned to software and the memory layout of
// objects and arrays are this design's own choices; the document names the
// instruction classes (constants, stack manipulation, arithmetic, shift and
// logic, type casts, compare and branch, jump and return, loads and stores,
// quick instructions) but not a list.
package jvm_pkg;

  typedef logic [31:0] word_t;
  typedef logic [15:0] jpc_t;      // Java program counter, byte offset in the method

  // Memory request from a unit: held stable with req=1 until ack.
  typedef struct packed {
    logic  req;
    logic  we;
    word_t addr;    // word address
    word_t wdata;
  } mem_req_t;

  // Memory response: ack is a one-cycle pulse; rdata is valid with it.
  typedef struct packed {
    logic  ack;
    word_t rdata;
  } mem_rsp_t;

  // Aligned instruction handed from the instruction buffer to the engine.
  typedef struct packed {
    logic [7:0]  op;
    logic [31:0] operand;   // bytes 1..4 after the opcode, byte 1 in [31:24]
    jpc_t        pc;
    logic [2:0]  len;
  } instr_t;

  // Why the hardware handed execution back to software.
  typedef enum logic [1:0] {
    ST_RETURN      = 2'd0,  // a return instruction was reached
    ST_UNSUPPORTED = 2'd1,  // opcode not in the hardware subset: software executes it
    ST_EXCEPTION   = 2'd2   // null reference, array bound, divide by zero or stack underflow
  } exit_t;

  // Opcodes (JVM specification values).
  localparam logic [7:0]
    OP_NOP = 8'h00, OP_ACONST_NULL = 8'h01, OP_ICONST_M1 = 8'h02, OP_ICONST_5 = 8'h08,
    OP_BIPUSH = 8'h10, OP_SIPUSH = 8'h11,
    OP_ILOAD = 8'h15, OP_ALOAD = 8'h19, OP_ILOAD_0 = 8'h1a, OP_ILOAD_3 = 8'h1d,
    OP_ALOAD_0 = 8'h2a, OP_ALOAD_3 = 8'h2d, OP_IALOAD = 8'h2e, OP_AALOAD = 8'h32,
    OP_ISTORE = 8'h36, OP_ASTORE = 8'h3a, OP_ISTORE_0 = 8'h3b, OP_ISTORE_3 = 8'h3e,
    OP_ASTORE_0 = 8'h4b, OP_ASTORE_3 = 8'h4e, OP_IASTORE = 8'h4f,
    OP_POP = 8'h57, OP_POP2 = 8'h58, OP_DUP = 8'h59, OP_DUP_X1 = 8'h5a, OP_DUP_X2 = 8'h5b,
    OP_DUP2 = 8'h5c, OP_SWAP = 8'h5f,
    OP_IADD = 8'h60, OP_ISUB = 8'h64, OP_IMUL = 8'h68, OP_IDIV = 8'h6c, OP_IREM = 8'h70,
    OP_INEG = 8'h74, OP_ISHL = 8'h78, OP_ISHR = 8'h7a, OP_IUSHR = 8'h7c,
    OP_IAND = 8'h7e, OP_IOR = 8'h80, OP_IXOR = 8'h82, OP_IINC = 8'h84,
    OP_I2B = 8'h91, OP_I2C = 8'h92, OP_I2S = 8'h93,
    OP_IFEQ = 8'h99, OP_IFNE = 8'h9a, OP_IFLT = 8'h9b, OP_IFGE = 8'h9c, OP_IFGT = 8'h9d,
    OP_IFLE = 8'h9e, OP_IF_ICMPEQ = 8'h9f, OP_IF_ICMPNE = 8'ha0, OP_IF_ICMPLT = 8'ha1,
    OP_IF_ICMPGE = 8'ha2, OP_IF_ICMPGT = 8'ha3, OP_IF_ICMPLE = 8'ha4,
    OP_IF_ACMPEQ = 8'ha5, OP_IF_ACMPNE = 8'ha6,
    OP_GOTO = 8'ha7, OP_JSR = 8'ha8, OP_RET = 8'ha9,
    OP_IRETURN = 8'hac, OP_ARETURN = 8'hb0, OP_RETURN = 8'hb1,
    OP_ARRAYLENGTH = 8'hbe, OP_IFNULL = 8'hc6, OP_IFNONNULL = 8'hc7,
    OP_GOTO_W = 8'hc8, OP_JSR_W = 8'hc9,
    OP_LDC_QUICK = 8'hcb, OP_LDC_W_QUICK = 8'hcc,
    OP_GETFIELD_QUICK = 8'hce, OP_PUTFIELD_QUICK = 8'hcf;

  // Instruction length in bytes (opcode included). Opcodes outside the
  // hardware subset report 1: the engine traps on them before using the length.
  function automatic logic [2:0] op_len(logic [7:0] op);
    unique case (op)
      OP_BIPUSH, OP_ILOAD, OP_ALOAD, OP_ISTORE, OP_ASTORE, OP_RET, OP_LDC_QUICK:
        return 3'd2;
      OP_SIPUSH, OP_IINC, OP_GOTO, OP_JSR, OP_LDC_W_QUICK, OP_GETFIELD_QUICK,
      OP_PUTFIELD_QUICK, OP_IFNULL, OP_IFNONNULL:
        return 3'd3;
      OP_GOTO_W, OP_JSR_W:
        return 3'd5;
      default:
        if (op >= OP_IFEQ && op <= OP_IF_ACMPNE) return 3'd3;
        else return 3'd1;
    endcase
  endfunction

  // Stack words popped and pushed. supported=0 marks opcodes left to software.
  typedef struct packed {
    logic       supported;
    logic [2:0] pops;
    logic [2:0] pushes;
  } stack_use_t;

  function automatic stack_use_t op_stack(logic [7:0] op);
    stack_use_t s;
    s = '{supported: 1'b1, pops: 3'd0, pushes: 3'd0};
    if (op >= OP_ACONST_NULL && op <= OP_ICONST_5) s.pushes = 3'd1;
    else if ((op >= OP_ILOAD_0 && op <= OP_ILOAD_3) || (op >= OP_ALOAD_0 && op <= OP_ALOAD_3))
      s.pushes = 3'd1;
    else if ((op >= OP_ISTORE_0 && op <= OP_ISTORE_3) || (op >= OP_ASTORE_0 && op <= OP_ASTORE_3))
      s.pops = 3'd1;
    else if (op >= OP_IFEQ && op <= OP_IFLE) s.pops = 3'd1;
    else if (op >= OP_IF_ICMPEQ && op <= OP_IF_ACMPNE) s.pops = 3'd2;
    else begin
      unique case (op)
        OP_NOP, OP_GOTO, OP_GOTO_W, OP_IINC, OP_RET, OP_RETURN: ;
        OP_BIPUSH, OP_SIPUSH, OP_ILOAD, OP_ALOAD, OP_JSR, OP_JSR_W,
        OP_LDC_QUICK, OP_LDC_W_QUICK:                       s.pushes = 3'd1;
        OP_ISTORE, OP_ASTORE, OP_POP, OP_IFNULL, OP_IFNONNULL,
        OP_IRETURN, OP_ARETURN:                             s.pops = 3'd1;
        OP_POP2:                                            s.pops = 3'd2;
        OP_DUP:      begin s.pops = 3'd1; s.pushes = 3'd2; end
        OP_DUP_X1:   begin s.pops = 3'd2; s.pushes = 3'd3; end
        OP_DUP_X2:   begin s.pops = 3'd3; s.pushes = 3'd4; end
        OP_DUP2:     begin s.pops = 3'd2; s.pushes = 3'd4; end
        OP_SWAP:     begin s.pops = 3'd2; s.pushes = 3'd2; end
        OP_IADD, OP_ISUB, OP_IMUL, OP_IDIV, OP_IREM, OP_ISHL, OP_ISHR, OP_IUSHR,
        OP_IAND, OP_IOR, OP_IXOR, OP_IALOAD, OP_AALOAD:
                     begin s.pops = 3'd2; s.pushes = 3'd1; end
        OP_INEG, OP_I2B, OP_I2C, OP_I2S, OP_ARRAYLENGTH, OP_GETFIELD_QUICK:
                     begin s.pops = 3'd1; s.pushes = 3'd1; end
        OP_PUTFIELD_QUICK:                                  s.pops = 3'd2;
        OP_IASTORE:                                         s.pops = 3'd3;
        default:                                            s.supported = 1'b0;
      endcase
    end
    return s;
  endfunction

endpackage
