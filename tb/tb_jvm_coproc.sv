// tb_jvm_coproc: end-to-end test of the co-processor at its default sizes
// (1 Kbyte instruction cache, 64-entry data cache, 64-word stack cache).
// A software driver writes the method addresses through the register bus,
// starts the hardware, waits for the interrupt and reads back the exit state.
// Bytecode, local variables and the operand stack live in an on-board RAM
// model; the constant pool and an int array live in a slower host-memory
// model. Workloads, each checked against a result computed here:
//   loop counter (sum 0..999), Fibonacci (fib 40), Ackermann(3,5) evaluated
//   with an explicit operand stack (deep stack: spills and fills), bubble sort
//   of 64 local variables in descending order with the pass over the pairs
//   unrolled, insertion sort of an int array in host memory, and a method
//   that branches far ahead and meets an instruction left to software.
// Every mechanism is counted and must occur: stack spill and fill, data cache
// hit and miss, instruction cache redirect hit and miss, a fetch held back by
// a data or stack access, host-memory access, an exit to software.
module tb_jvm_coproc;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t CODE = 32'h0000_1000;   // byte address in on-board RAM
  localparam word_t LOCS = 32'h0000_2000;   // word addresses in on-board RAM
  localparam word_t STK  = 32'h0000_3000;
  localparam word_t CP   = 32'h0000_0100;   // word addresses in host memory
  localparam word_t ARR  = 32'h0000_0800;

  logic sw_we, irq;
  logic [3:0] sw_addr;
  word_t sw_wdata, sw_rdata;
  mem_req_t ob_req, hm_req;
  mem_rsp_t ob_rsp, hm_rsp;
  logic ev_retire, ev_spill, ev_fill, ev_branch, ev_ib_hit, ev_ib_miss, ev_dc_hit, ev_dc_miss;

  jvm_coproc dut (.*);
  mem_model #(.WORDS(131072), .LATENCY(2)) ob (.clk, .req(ob_req), .rsp(ob_rsp));
  mem_model #(.WORDS(8192),   .LATENCY(8)) hm (.clk, .req(hm_req), .rsp(hm_rsp));

  // ---- mechanism counters ----
  int n_spill, n_fill, n_ib_hit, n_ib_miss, n_dc_hit, n_dc_miss, n_retire, n_fetch_wait, n_host;
  initial begin
    n_spill = 0; n_fill = 0; n_ib_hit = 0; n_ib_miss = 0; n_dc_hit = 0; n_dc_miss = 0;
    n_retire = 0; n_fetch_wait = 0; n_host = 0;
  end
  always @(posedge clk) begin
    if (ev_spill)   n_spill++;
    if (ev_fill)    n_fill++;
    if (ev_ib_hit)  n_ib_hit++;
    if (ev_ib_miss) n_ib_miss++;
    if (ev_dc_hit)  n_dc_hit++;
    if (ev_dc_miss) n_dc_miss++;
    if (ev_retire)  n_retire++;
    if (hm_rsp.ack) n_host++;
    // a fetch request loses arbitration to a data-cache or stack request
    if (dut.ib_req.req && (dut.dc_mreq.req || dut.stk_req.req) &&
        dut.u_host.grant == dut.u_host.G_NONE) n_fetch_wait++;
  end

  // ---- software driver ----
  task automatic wr(input logic [3:0] a, input word_t d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask
  task automatic rd(input logic [3:0] a, output word_t d);
    @(negedge clk); sw_addr = a; #1 d = sw_rdata;
  endtask

  word_t r_pc, r_depth, r_status, r_cycles;
  task automatic run_method(input word_t depth0, input int max_cycles);
    int n;
    wr(1, 0); wr(2, CODE); wr(3, LOCS); wr(4, STK); wr(5, depth0); wr(6, CP);
    wr(0, 1);
    n = 0;
    while (!irq && n < max_cycles) begin @(posedge clk); n++; end
    check(irq, "interrupt at the end of the run");
    rd(1, r_pc); rd(5, r_depth); rd(7, r_status); rd(8, r_cycles);
    wr(0, 0);
  endtask

  // ---- assembler into on-board RAM ----
  int ap;
  task automatic e(input logic [7:0] b);
    ob.mem[(int'(CODE) + ap) / 4][8*((int'(CODE) + ap) % 4) +: 8] = b;
    ap++;
  endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); e(a); e(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] b); e(a); e(b[15:8]); e(b[7:0]); endtask
  task automatic org(input int a); ap = a; endtask

  function automatic int fib(int n);
    int a, b, t;
    a = 0; b = 1;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction
  function automatic int ack(int m, int n);
    // iterative with an explicit stack, as an independent reference
    int st [$];
    st.push_back(m); st.push_back(n);
    while (st.size() > 1) begin
      n = st.pop_back(); m = st.pop_back();
      if (m == 0) st.push_back(n + 1);
      else if (n == 0) begin st.push_back(m - 1); st.push_back(1); end
      else begin st.push_back(m - 1); st.push_back(m); st.push_back(n - 1); end
    end
    return st[0];
  endfunction

  initial begin
    int vals [64];
    int arr [40];
    sw_we = 0; sw_addr = 0; sw_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---------- loop counter ----------
    org(0);
    e(OP_ICONST_5 - 5); e(8'h3c); e(OP_ICONST_5 - 5); e(8'h3d);
    e(8'h1c); e3(OP_SIPUSH, 16'd1000); e3(OP_IF_ICMPGE, 16'd13);
    e(8'h1b); e(8'h1c); e(OP_IADD); e(8'h3c);
    e(OP_IINC); e(2); e(1); e3(OP_GOTO, -16'sd14);
    e(8'h1b); e(OP_IRETURN);
    run_method(0, 100000);
    check(r_status[1:0] == ST_RETURN && r_pc == 22, "loop counter exit");
    check(r_depth == 1 && ob.mem[STK] == 499500, $sformatf("loop counter %0d", ob.mem[STK]));
    $display("loop counter: %0d cycles, %0d instructions", r_cycles, n_retire);

    // ---------- Fibonacci ----------
    org(0);
    e(OP_ICONST_5 - 5); e(8'h3c); e(OP_ICONST_5 - 4); e(8'h3d); e(OP_ICONST_5 - 5); e(8'h3e);
    e(8'h1d); e2(OP_BIPUSH, 40); e3(OP_IF_ICMPGE, 16'd15);
    e(8'h1b); e(8'h1c); e(OP_IADD); e(8'h1c); e(8'h3c); e(8'h3d);
    e(OP_IINC); e(3); e(1); e3(OP_GOTO, -16'sd15);
    e(8'h1b); e(OP_IRETURN);
    run_method(0, 100000);
    check(r_status[1:0] == ST_RETURN && r_depth == 1 && ob.mem[STK] == word_t'(fib(40)),
          $sformatf("fib(40) %0d", ob.mem[STK]));
    $display("fibonacci: %0d cycles", r_cycles);

    // ---------- Ackermann(3,5) on the operand stack ----------
    org(0);
    e2(OP_BIPUSH, 3); e2(OP_BIPUSH, 5); e(OP_ICONST_5 - 3); e(8'h3b);    // 0..5: m n, count=2
    e(8'h1a); e(OP_ICONST_5 - 4); e3(OP_IF_ICMPLE, 16'd48);               // 6: if count<=1 -> 56
    e(8'h3d); e(8'h3c); e(OP_IINC); e(0); e(8'hfe);                       // 11: n=pop m=pop count-=2
    e(8'h1b); e3(OP_IFNE, 16'd12);                                        // 16: m!=0 -> 29
    e(8'h1c); e(OP_ICONST_5 - 4); e(OP_IADD); e(OP_IINC); e(0); e(1);     // 20: push n+1
    e3(OP_GOTO, -16'sd20);                                                // 26 -> 6
    e(8'h1c); e3(OP_IFNE, 16'd13);                                        // 29: n!=0 -> 43
    e(8'h1b); e(OP_ICONST_5 - 4); e(OP_ISUB); e(OP_ICONST_5 - 4);         // 33: push m-1, 1
    e(OP_IINC); e(0); e(2); e3(OP_GOTO, -16'sd34);                        // 37, 40 -> 6
    e(8'h1b); e(OP_ICONST_5 - 4); e(OP_ISUB); e(8'h1b); e(8'h1c);         // 43: m-1, m, n-1
    e(OP_ICONST_5 - 4); e(OP_ISUB); e(OP_IINC); e(0); e(3);
    e3(OP_GOTO, -16'sd47);                                                // 53 -> 6
    e(OP_IRETURN);                                                        // 56
    begin
      int s0, f0;
      s0 = n_spill; f0 = n_fill;
      run_method(0, 5000000);
      check(r_status[1:0] == ST_RETURN && r_pc == 56, "ackermann exit");
      check(r_depth == 1 && ob.mem[STK] == word_t'(ack(3, 5)),
            $sformatf("ackermann(3,5) %0d vs %0d", ob.mem[STK], ack(3, 5)));
      $display("ackermann(3,5): %0d cycles, %0d stack spills+fills", r_cycles,
               n_spill - s0 + n_fill - f0);
    end

    // ---------- bubble sort of 64 local variables ----------
    org(0);
    e2(OP_BIPUSH, 63); e2(OP_ISTORE, 64);                                 // passes left
    for (int i = 0; i < 63; i++) begin                                    // 4: one pass, unrolled
      e2(OP_ILOAD, 8'(i)); e2(OP_ILOAD, 8'(i + 1)); e3(OP_IF_ICMPLE, 16'd11);
      e2(OP_ILOAD, 8'(i)); e2(OP_ILOAD, 8'(i + 1)); e2(OP_ISTORE, 8'(i)); e2(OP_ISTORE, 8'(i + 1));
    end
    e(OP_IINC); e(64); e(8'hff);                                          // 949
    e2(OP_ILOAD, 64); e3(OP_IFGT, 16'(4 - 954));                          // 952, 954 -> 4
    e(OP_RETURN);                                                         // 957
    for (int i = 0; i < 64; i++) begin
      vals[i] = 1000 - 7 * i + int'($urandom % 3);
      ob.mem[LOCS + i] = vals[i];
    end
    vals.sort();
    begin
      int h0, m0;
      h0 = n_dc_hit; m0 = n_dc_miss;
      run_method(0, 2000000);
      check(r_status[1:0] == ST_RETURN && r_pc == 957, "bubble sort exit");
      for (int i = 0; i < 64; i++)
        check(ob.mem[LOCS + i] == vals[i], $sformatf("sorted local %0d", i));
      $display("bubble sort: %0d cycles, data cache hits %0d misses %0d", r_cycles,
               n_dc_hit - h0, n_dc_miss - m0);
    end

    // ---------- insertion sort of an array in host memory ----------
    org(0);
    e(8'h2a); e(OP_ARRAYLENGTH); e2(OP_ISTORE, 4);                        // 0
    e(OP_ICONST_5 - 4); e(8'h3c);                                         // 4
    e(8'h1b); e2(OP_ILOAD, 4); e3(OP_IF_ICMPGE, 16'd48);                  // 6 -> 57
    e(8'h2a); e(8'h1b); e(OP_IALOAD); e(8'h3e);                           // 12
    e(8'h1b); e(OP_ICONST_5 - 4); e(OP_ISUB); e(8'h3d);                   // 16
    e(8'h1c); e3(OP_IFLT, 16'd24);                                        // 20 -> 45
    e(8'h2a); e(8'h1c); e(OP_IALOAD); e(8'h1d); e3(OP_IF_ICMPLE, 16'd17); // 24 -> 45
    e(8'h2a); e(8'h1c); e(OP_ICONST_5 - 4); e(OP_IADD);                   // 31
    e(8'h2a); e(8'h1c); e(OP_IALOAD); e(OP_IASTORE);
    e(OP_IINC); e(2); e(8'hff); e3(OP_GOTO, -16'sd22);                    // 39, 42 -> 20
    e(8'h2a); e(8'h1c); e(OP_ICONST_5 - 4); e(OP_IADD); e(8'h1d); e(OP_IASTORE); // 45
    e(OP_IINC); e(1); e(1); e3(OP_GOTO, -16'sd48);                        // 51, 54 -> 6
    e(OP_RETURN);                                                         // 57
    hm.mem[ARR] = 40;
    for (int i = 0; i < 40; i++) begin
      arr[i] = int'($urandom % 2000) - 1000;
      hm.mem[ARR + 1 + i] = arr[i];
    end
    for (int i = 1; i < 40; i++)          // reference: plain exchange sort
      for (int j = i; j > 0 && arr[j-1] > arr[j]; j--) begin
        int t; t = arr[j]; arr[j] = arr[j-1]; arr[j-1] = t;
      end
    ob.mem[LOCS] = ARR;
    begin
      int h0;
      h0 = n_host;
      run_method(0, 2000000);
      check(r_status[1:0] == ST_RETURN && r_pc == 57, "insertion sort exit");
      for (int i = 0; i < 40; i++)
        check(hm.mem[ARR + 1 + i] == word_t'(arr[i]), $sformatf("sorted element %0d: %0d vs %0d", i, $signed(hm.mem[ARR + 1 + i]), arr[i]));
      $display("insertion sort: %0d cycles, %0d host memory accesses", r_cycles, n_host - h0);
    end

    // ---------- far branch, then an instruction left to software ----------
    org(0);
    e(OP_ICONST_5); e(OP_GOTO_W); e(0); e(0); e(8'h0b); e(8'hb7);         // 1: goto_w -> 3000
    org(3000);
    e(OP_ICONST_5 - 1); e(OP_IADD); e3(8'hb6, 16'h0001);                  // 3002: getfield (unresolved)
    run_method(0, 100000);
    check(r_status[1:0] == ST_UNSUPPORTED && r_status[15:8] == 8'hb6 && r_pc == 3002,
          "exit to software at an unresolved instruction");
    check(r_depth == 1 && ob.mem[STK] == 9, "state handed back to software");

    // ---------- every mechanism happened ----------
    $display("spills %0d fills %0d ic-hits %0d ic-misses %0d dc-hits %0d dc-misses %0d fetch-waits %0d host %0d",
             n_spill, n_fill, n_ib_hit, n_ib_miss, n_dc_hit, n_dc_miss, n_fetch_wait, n_host);
    check(n_spill > 0, "stack spill happened");
    check(n_fill > 0, "stack fill happened");
    check(n_ib_hit > 0, "instruction cache redirect hit happened");
    check(n_ib_miss > 0, "instruction cache redirect miss happened");
    check(n_dc_hit > 0, "data cache hit happened");
    check(n_dc_miss > 0, "data cache miss happened");
    check(n_fetch_wait > 0, "fetch held back by a data or stack access");
    check(n_host > 0, "host memory accessed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
