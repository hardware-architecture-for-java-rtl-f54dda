// tb_host_interface: self-checking test of the host interface.
// Checks the software register file (write, read back, start pulse, busy,
// interrupt and exit-state capture, cycle count), the on-board RAM
// arbitration (data cache before stack before instruction fetch when they
// request together, each client served with its own data) and the
// host-memory pass-through.
module tb_host_interface;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic sw_we; logic [3:0] sw_addr; word_t sw_wdata, sw_rdata; logic irq;
  logic start; jpc_t start_pc; word_t code_base, locals_base, stack_base, stack_depth, cpool_base;
  logic done; jpc_t exit_pc; word_t exit_depth; exit_t exit_code; logic [7:0] exit_op;
  mem_req_t dc_req, stk_req, ib_req, hm_creq, ob_req, hm_req;
  mem_rsp_t dc_rsp, stk_rsp, ib_rsp, hm_crsp, ob_rsp, hm_rsp;

  host_interface dut (.*);
  mem_model #(.WORDS(256), .LATENCY(2)) ob (.clk, .req(ob_req), .rsp(ob_rsp));
  mem_model #(.WORDS(256), .LATENCY(5)) hm (.clk, .req(hm_req), .rsp(hm_rsp));

  task automatic wr(logic [3:0] a, word_t d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask
  word_t rv [16];
  // sample every readable register (sw_rdata is combinational on sw_addr)
  task automatic rd_all();
    for (int a = 0; a < 9; a++) begin sw_addr = 4'(a); #1; rv[a] = sw_rdata; end
  endtask

  // random phase: check each acknowledge against the address asked for, and
  // that a fetch is only granted when no data or stack request is waiting
  bit rand_ok = 1;
  int rand_served [3] = '{0, 0, 0};
  bit rand_phase = 0;
  always @(posedge clk) if (rand_phase) begin
    if (dc_rsp.ack) begin
      rand_served[0]++;
      if (dc_rsp.rdata != 32'h5000 + dc_req.addr - 100) begin rand_ok = 0; $display("dc data %h at %0t", dc_rsp.rdata, $time); end
      dc_req.req <= 0;
    end
    if (stk_rsp.ack) begin
      rand_served[1]++;
      if (stk_rsp.rdata != 32'h5000 + stk_req.addr - 100) begin rand_ok = 0; $display("stack data %h at %0t", stk_rsp.rdata, $time); end
      stk_req.req <= 0;
    end
    if (ib_rsp.ack) begin
      rand_served[2]++;
      if (ib_rsp.rdata != 32'h5000 + ib_req.addr - 100) begin rand_ok = 0; $display("fetch data %h at %0t", ib_rsp.rdata, $time); end
      ib_req.req <= 0;
    end
    if (dut.grant == dut.G_NONE && dut.owner == dut.G_IB && (dc_req.req || stk_req.req)) begin
      rand_ok = 0;
      $display("fetch granted ahead of a data or stack request at %0t", $time);
    end
  end

  // order in which acks arrive
  int order [$];
  always @(posedge clk) if (!rand_phase) begin
    if (dc_rsp.ack)  begin order.push_back(1); dc_req.req  <= 0; check(dc_rsp.rdata == 32'hD0, "dc data"); end
    if (stk_rsp.ack) begin order.push_back(2); stk_req.req <= 0; if (!stk_req.we) check(stk_rsp.rdata == 32'h50, "stack data"); end
    if (ib_rsp.ack)  begin order.push_back(3); ib_req.req  <= 0; check(ib_rsp.rdata == 32'h1B, "fetch data"); end
    if (hm_crsp.ack) begin hm_creq.req <= 0; check(hm_crsp.rdata == 32'h4D, "host data"); end
  end

  initial begin
    sw_we = 0; sw_addr = 0; sw_wdata = 0; done = 0;
    exit_pc = 0; exit_depth = 0; exit_code = ST_RETURN; exit_op = 0;
    dc_req = '0; stk_req = '0; ib_req = '0; hm_creq = '0;
    ob.mem[10] = 32'hD0; ob.mem[20] = 32'h50; ob.mem[30] = 32'h1B; hm.mem[40] = 32'h4D;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(1, 32'h12); wr(2, 32'h400); wr(3, 32'h800); wr(4, 32'hC00); wr(5, 3); wr(6, 32'h40);
    rd_all();
    check(rv[1] == 32'h12 && start_pc == 16'h12, "pc register");
    rd_all();
    check(rv[2] == 32'h400 && code_base == 32'h400, "code base");
    rd_all();
    check(rv[3] == 32'h800 && locals_base == 32'h800, "locals base");
    rd_all();
    check(rv[4] == 32'hC00 && stack_base == 32'hC00, "stack base");
    rd_all();
    check(rv[5] == 3 && stack_depth == 3, "stack depth");
    rd_all();
    check(rv[6] == 32'h40 && cpool_base == 32'h40, "constant pool base");
    rd_all();
    check(!irq && rv[0] == 0, "idle before start");
    wr(0, 1);
    check(start, "start pulse raised");
    @(negedge clk);
    check(!start, "start pulse lasts one cycle");
    rd_all();
    check(rv[0] == 2, "busy");
    // all three RAM clients and the host client request in the same cycle
    @(negedge clk);
    dc_req  = '{req: 1, we: 0, addr: 10, wdata: 0};
    stk_req = '{req: 1, we: 0, addr: 20, wdata: 0};
    ib_req  = '{req: 1, we: 0, addr: 30, wdata: 0};
    hm_creq = '{req: 1, we: 0, addr: 40, wdata: 0};
    repeat (20) @(posedge clk);
    check(order.size() == 3, "all served");
    if (order.size() == 3) begin
      check(order[0] == 1 && order[1] == 2 && order[2] == 3, "priority dc > stack > fetch");
    end
    // a write from the stack client
    @(negedge clk); stk_req = '{req: 1, we: 1, addr: 21, wdata: 32'h77};
    wait (stk_rsp.ack); @(posedge clk); @(negedge clk); stk_req.req = 0;
    check(ob.mem[21] == 32'h77, "stack write reaches RAM");
    // random traffic from all three RAM clients: every client gets its own
    // data, and fetch is never served while a data or stack request waits
    begin
      int served [3];
      int n;
      served = '{0, 0, 0};
      order.delete();
      rand_phase = 1;
      for (int i = 0; i < 64; i++) ob.mem[100 + i] = 32'h5000 + i;
      n = 0;
      while (n < 600) begin
        @(negedge clk);
        if (!dc_req.req && ($urandom % 3) == 0)
          dc_req = '{req: 1, we: 0, addr: 100 + ($urandom % 64), wdata: 0};
        if (!stk_req.req && ($urandom % 3) == 0)
          stk_req = '{req: 1, we: 0, addr: 100 + ($urandom % 64), wdata: 0};
        if (!ib_req.req && ($urandom % 2) == 0)
          ib_req = '{req: 1, we: 0, addr: 100 + ($urandom % 64), wdata: 0};
        n++;
      end
      dc_req.req = 0; stk_req.req = 0; ib_req.req = 0;
      repeat (10) @(posedge clk);
      rand_phase = 0;
      check(rand_ok, "random traffic: data and priority");
      check(rand_served[0] > 20 && rand_served[1] > 20 && rand_served[2] > 20,
            $sformatf("random traffic served %0d %0d %0d", rand_served[0], rand_served[1], rand_served[2]));
    end
    // finish
    @(negedge clk); done = 1; exit_pc = 16'h34; exit_depth = 9; exit_code = ST_UNSUPPORTED; exit_op = 8'hbb;
    @(negedge clk); done = 0;
    check(irq, "interrupt raised");
    rd_all();
    check(rv[0] == 1, "done, not busy");
    rd_all();
    check(rv[1] == 32'h34 && rv[5] == 9, "exit pc and depth");
    rd_all();
    check(rv[7] == {16'd0, 8'hbb, 6'd0, 2'd1}, "exit status");
    rd_all();
    check(rv[8] > 600 && rv[8] < 800, $sformatf("cycle count %0d", rv[8]));
    wr(0, 0);
    check(!irq, "interrupt cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
