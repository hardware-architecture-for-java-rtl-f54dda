// tb_jvm_cache_sizes: the bubble-sort workload on co-processors with
// different cache sizes, run side by side from one software driver.
//   A: 1024-byte instruction cache, 64-entry data cache (default sizes)
//   B:   64-byte instruction cache, 64-entry data cache
//   C: 1088-byte instruction cache, 62-entry data cache (neither a power of two)
//   D: 1024-byte instruction cache, no data cache
// The method sorts 64 local variables held in descending order, with the pass
// over neighbouring pairs unrolled. Each machine must sort correctly; the
// cycle counts read from the CYCLES register must not drop when a cache
// shrinks, and removing the data cache must cost more than shrinking the
// instruction cache to 64 bytes.
module tb_jvm_cache_sizes;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t CODE = 32'h0000_1000, LOCS = 32'h0000_2000, STK = 32'h0000_3000;

  logic sw_we;
  logic [3:0] sw_addr;
  word_t sw_wdata;
  word_t sw_rdata [4];
  logic irq [4];
  mem_req_t ob_req [4], hm_req [4];
  mem_rsp_t ob_rsp [4], hm_rsp [4];
  logic [7:0] ev [4];

  jvm_coproc #(.IC_BYTES(1024), .DC_ENTRIES(64)) dut_a (
    .clk, .rst_n, .sw_we, .sw_addr, .sw_wdata, .sw_rdata(sw_rdata[0]), .irq(irq[0]),
    .ob_req(ob_req[0]), .ob_rsp(ob_rsp[0]), .hm_req(hm_req[0]), .hm_rsp(hm_rsp[0]),
    .ev_retire(ev[0][0]), .ev_spill(ev[0][1]), .ev_fill(ev[0][2]), .ev_branch(ev[0][3]),
    .ev_ib_hit(ev[0][4]), .ev_ib_miss(ev[0][5]), .ev_dc_hit(ev[0][6]), .ev_dc_miss(ev[0][7]));
  jvm_coproc #(.IC_BYTES(64), .DC_ENTRIES(64)) dut_b (
    .clk, .rst_n, .sw_we, .sw_addr, .sw_wdata, .sw_rdata(sw_rdata[1]), .irq(irq[1]),
    .ob_req(ob_req[1]), .ob_rsp(ob_rsp[1]), .hm_req(hm_req[1]), .hm_rsp(hm_rsp[1]),
    .ev_retire(ev[1][0]), .ev_spill(ev[1][1]), .ev_fill(ev[1][2]), .ev_branch(ev[1][3]),
    .ev_ib_hit(ev[1][4]), .ev_ib_miss(ev[1][5]), .ev_dc_hit(ev[1][6]), .ev_dc_miss(ev[1][7]));
  jvm_coproc #(.IC_BYTES(1088), .DC_ENTRIES(62)) dut_c (
    .clk, .rst_n, .sw_we, .sw_addr, .sw_wdata, .sw_rdata(sw_rdata[2]), .irq(irq[2]),
    .ob_req(ob_req[2]), .ob_rsp(ob_rsp[2]), .hm_req(hm_req[2]), .hm_rsp(hm_rsp[2]),
    .ev_retire(ev[2][0]), .ev_spill(ev[2][1]), .ev_fill(ev[2][2]), .ev_branch(ev[2][3]),
    .ev_ib_hit(ev[2][4]), .ev_ib_miss(ev[2][5]), .ev_dc_hit(ev[2][6]), .ev_dc_miss(ev[2][7]));
  jvm_coproc #(.IC_BYTES(1024), .DC_ENTRIES(0)) dut_d (
    .clk, .rst_n, .sw_we, .sw_addr, .sw_wdata, .sw_rdata(sw_rdata[3]), .irq(irq[3]),
    .ob_req(ob_req[3]), .ob_rsp(ob_rsp[3]), .hm_req(hm_req[3]), .hm_rsp(hm_rsp[3]),
    .ev_retire(ev[3][0]), .ev_spill(ev[3][1]), .ev_fill(ev[3][2]), .ev_branch(ev[3][3]),
    .ev_ib_hit(ev[3][4]), .ev_ib_miss(ev[3][5]), .ev_dc_hit(ev[3][6]), .ev_dc_miss(ev[3][7]));

  mem_model #(.WORDS(16384), .LATENCY(2)) ob0 (.clk, .req(ob_req[0]), .rsp(ob_rsp[0]));
  mem_model #(.WORDS(16384), .LATENCY(2)) ob1 (.clk, .req(ob_req[1]), .rsp(ob_rsp[1]));
  mem_model #(.WORDS(16384), .LATENCY(2)) ob2 (.clk, .req(ob_req[2]), .rsp(ob_rsp[2]));
  mem_model #(.WORDS(16384), .LATENCY(2)) ob3 (.clk, .req(ob_req[3]), .rsp(ob_rsp[3]));
  mem_model #(.WORDS(256), .LATENCY(8)) hm0 (.clk, .req(hm_req[0]), .rsp(hm_rsp[0]));
  mem_model #(.WORDS(256), .LATENCY(8)) hm1 (.clk, .req(hm_req[1]), .rsp(hm_rsp[1]));
  mem_model #(.WORDS(256), .LATENCY(8)) hm2 (.clk, .req(hm_req[2]), .rsp(hm_rsp[2]));
  mem_model #(.WORDS(256), .LATENCY(8)) hm3 (.clk, .req(hm_req[3]), .rsp(hm_rsp[3]));

  task automatic poke(input int a, input word_t d);
    ob0.mem[a] = d; ob1.mem[a] = d; ob2.mem[a] = d; ob3.mem[a] = d;
  endtask
  function automatic word_t peek(input int u, input int a);
    case (u)
      0: return ob0.mem[a];
      1: return ob1.mem[a];
      2: return ob2.mem[a];
      default: return ob3.mem[a];
    endcase
  endfunction

  logic [7:0] code [1024];
  int ap;
  task automatic e(input logic [7:0] b); code[ap] = b; ap++; endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); e(a); e(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] b); e(a); e(b[15:8]); e(b[7:0]); endtask

  task automatic wr(input logic [3:0] a, input word_t d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask

  initial begin
    word_t cyc [4];
    int vals [64];
    int n;
    sw_we = 0; sw_addr = 0; sw_wdata = 0;
    for (int i = 0; i < 1024; i++) code[i] = OP_NOP;
    ap = 0;
    e2(OP_BIPUSH, 63); e2(OP_ISTORE, 64);
    for (int i = 0; i < 63; i++) begin
      e2(OP_ILOAD, 8'(i)); e2(OP_ILOAD, 8'(i + 1)); e3(OP_IF_ICMPLE, 16'd11);
      e2(OP_ILOAD, 8'(i)); e2(OP_ILOAD, 8'(i + 1)); e2(OP_ISTORE, 8'(i)); e2(OP_ISTORE, 8'(i + 1));
    end
    e(OP_IINC); e(64); e(8'hff);
    e2(OP_ILOAD, 64); e3(OP_IFGT, 16'(4 - 954));
    e(OP_RETURN);
    for (int w = 0; w < 256; w++)
      poke(int'(CODE / 4) + w, {code[4*w+3], code[4*w+2], code[4*w+1], code[4*w]});
    for (int i = 0; i < 64; i++) begin
      vals[i] = 5000 - 13 * i;
      poke(int'(LOCS) + i, vals[i]);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    wr(1, 0); wr(2, CODE); wr(3, LOCS); wr(4, STK); wr(5, 0); wr(6, 0);
    wr(0, 1);
    n = 0;
    while (!(irq[0] && irq[1] && irq[2] && irq[3]) && n < 3000000) begin @(posedge clk); n++; end
    check(irq[0] && irq[1] && irq[2] && irq[3], "all four finished");
    @(negedge clk); sw_addr = 8; #1;
    for (int u = 0; u < 4; u++) cyc[u] = sw_rdata[u];
    for (int u = 0; u < 4; u++)
      for (int i = 0; i < 64; i++)
        check(peek(u, int'(LOCS) + i) == word_t'(5000 - 13 * 63 + 13 * i),
              $sformatf("machine %0d local %0d", u, i));
    $display("bubble sort cycles: IC1024/DC64 %0d  IC64/DC64 %0d  IC1088/DC62 %0d  IC1024/DC0 %0d",
             cyc[0], cyc[1], cyc[2], cyc[3]);
    check(cyc[1] >= cyc[0], "smaller instruction cache is not faster");
    check(cyc[2] >= cyc[0], "smaller data cache is not faster (instruction cache already holds the method)");
    check(cyc[3] > cyc[2], "no data cache is slowest");
    check(cyc[3] - cyc[0] > cyc[1] - cyc[0], "data cache matters more than instruction cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
