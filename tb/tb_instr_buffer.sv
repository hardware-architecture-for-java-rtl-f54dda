// tb_instr_buffer: self-checking test of the instruction buffer.
// A random program of 1-, 2-, 3- and 5-byte instructions is placed at an
// unaligned byte address of a RAM model. A model of the execution engine
// takes instructions with random back-pressure and now and then redirects to
// a random instruction boundary, as a taken branch would. Every instruction
// received is checked (opcode, operand bytes, PC, length) against the
// program. A 64-byte cache is used so that both redirect hits (near targets)
// and misses (far targets, cache cleared and refilled) occur, and bytes are
// evicted as the window slides.
module tb_instr_buffer;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t CODE = 32'h0000_0403;   // byte address of PC 0
  localparam int    NINS = 400;

  logic start, stop, out_valid, out_ready, redirect, hit, miss;
  jpc_t start_pc, redirect_pc;
  instr_t out;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  instr_buffer #(.CACHE_BYTES(64)) dut (
    .clk, .rst_n, .start, .start_pc, .stop, .code_base(CODE),
    .out_valid, .out, .out_ready, .redirect, .redirect_pc,
    .mreq, .mrsp, .hit, .miss);
  mem_model #(.WORDS(2048), .LATENCY(2)) ram (.clk, .req(mreq), .rsp(mrsp));

  logic [7:0] code [4096];
  int         ipc [NINS];
  logic [7:0] ops [5] = '{OP_NOP, OP_BIPUSH, OP_SIPUSH, OP_GOTO_W, OP_IINC};

  int nhit = 0, nmiss = 0, nrecv = 0;
  always @(posedge clk) begin
    if (hit) nhit++;
    if (miss) nmiss++;
  end

  initial begin
    int pc, cur, k;
    for (int i = 0; i < 4096; i++) code[i] = 8'($urandom);
    pc = 0;
    for (int i = 0; i < NINS; i++) begin
      logic [7:0] o;
      o = ops[$urandom % 5];
      ipc[i] = pc;
      code[pc] = o;
      pc += int'(op_len(o));
    end
    for (int a = 0; a < 4096; a++)
      ram.mem[(int'(CODE) + a) / 4][8*((int'(CODE) + a) % 4) +: 8] = code[a];
    start = 0; stop = 0; start_pc = 0; out_ready = 0; redirect = 0; redirect_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; start_pc = 0; @(negedge clk); start = 0;
    cur = 0;
    while (nrecv < 3000) begin
      out_ready = ($urandom % 4) != 0;
      redirect  = 0;
      #1;
      if (out_valid && out_ready) begin
        int p;
        p = ipc[cur];
        check(out.pc == jpc_t'(p), $sformatf("pc %0d vs %0d", out.pc, p));
        check(out.op == code[p], "opcode");
        check(out.len == op_len(code[p]), "length");
        for (k = 1; k < int'(out.len); k++)
          check(out.operand[32 - 8*k +: 8] == code[p + k], "operand byte");
        nrecv++;
        cur++;
        if (($urandom % 6) == 0 || cur >= NINS - 1) begin
          // taken branch: near (likely in cache) or far
          if ($urandom % 2) cur = (cur > 6) ? cur - 1 - int'($urandom % 6) : 0;
          else cur = int'($urandom % (NINS - 1));
          redirect = 1; redirect_pc = jpc_t'(ipc[cur]);
        end
      end
      @(negedge clk);
    end
    out_ready = 0; redirect = 0;
    check(nhit > 20, $sformatf("redirect hits %0d", nhit));
    check(nmiss > 20, $sformatf("redirect misses %0d", nmiss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
