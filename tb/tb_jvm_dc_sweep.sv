// tb_jvm_dc_sweep: the bubble-sort workload with the data cache shrunk step
// by step, from the default 64 entries down to none, on seven co-processors
// run side by side from one software driver (instruction cache at its
// default 1024 bytes, which holds the whole method).
// The method sorts 64 local variables held in descending order, with the pass
// over neighbouring pairs unrolled, and keeps its loop counter in local 64.
// Each machine must sort correctly. Going down the sizes, the number of
// data-cache misses and the cycle count read from the CYCLES register must
// never fall, and the machine with no cache must count no hits.
module tb_jvm_dc_sweep;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int N = 7;
  localparam int unsigned SIZES [N] = '{64, 48, 32, 16, 8, 2, 0};
  localparam word_t CODE = 32'h0000_1000, LOCS = 32'h0000_2000, STK = 32'h0000_3000;

  logic sw_we;
  logic [3:0] sw_addr;
  word_t sw_wdata;
  word_t sw_rdata [N];
  logic irq [N];
  int dc_hits [N], dc_misses [N];

  // image loaded into every machine's on-board RAM, and the locals read back
  word_t code_w [256];
  word_t loc_in [65];
  word_t loc_out [N][64];
  bit loaded = 0, finished = 0;

  for (genvar g = 0; g < N; g++) begin : m
    mem_req_t ob_req, hm_req;
    mem_rsp_t ob_rsp, hm_rsp;
    logic ev_dc_hit, ev_dc_miss;

    jvm_coproc #(.DC_ENTRIES(SIZES[g])) dut (
      .clk, .rst_n, .sw_we, .sw_addr, .sw_wdata, .sw_rdata(sw_rdata[g]), .irq(irq[g]),
      .ob_req, .ob_rsp, .hm_req, .hm_rsp,
      .ev_retire(), .ev_spill(), .ev_fill(), .ev_branch(), .ev_ib_hit(), .ev_ib_miss(),
      .ev_dc_hit, .ev_dc_miss);
    mem_model #(.WORDS(16384), .LATENCY(2)) ob (.clk, .req(ob_req), .rsp(ob_rsp));
    mem_model #(.WORDS(256), .LATENCY(8)) hm (.clk, .req(hm_req), .rsp(hm_rsp));

    always @(posedge clk) begin
      if (ev_dc_hit)  dc_hits[g]++;
      if (ev_dc_miss) dc_misses[g]++;
    end

    initial begin
      wait (loaded);
      for (int w = 0; w < 256; w++) ob.mem[int'(CODE / 4) + w] = code_w[w];
      for (int i = 0; i < 65; i++) ob.mem[int'(LOCS) + i] = loc_in[i];
      wait (finished);
      for (int i = 0; i < 64; i++) loc_out[g][i] = ob.mem[int'(LOCS) + i];
    end
  end

  logic [7:0] code [1024];
  int ap;
  task automatic e(input logic [7:0] b); code[ap] = b; ap++; endtask
  task automatic e2(input logic [7:0] a, input logic [7:0] b); e(a); e(b); endtask
  task automatic e3(input logic [7:0] a, input logic [15:0] b); e(a); e(b[15:8]); e(b[7:0]); endtask

  task automatic wr(input logic [3:0] a, input word_t d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask

  function automatic bit all_done();
    for (int g = 0; g < N; g++) if (!irq[g]) return 0;
    return 1;
  endfunction

  initial begin
    word_t cyc [N];
    int n;
    sw_we = 0; sw_addr = 0; sw_wdata = 0;
    for (int g = 0; g < N; g++) begin dc_hits[g] = 0; dc_misses[g] = 0; end
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
    for (int w = 0; w < 256; w++) code_w[w] = {code[4*w+3], code[4*w+2], code[4*w+1], code[4*w]};
    for (int i = 0; i < 64; i++) loc_in[i] = word_t'(5000 - 13 * i);
    loc_in[64] = 0;
    #1 loaded = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(1, 0); wr(2, CODE); wr(3, LOCS); wr(4, STK); wr(5, 0); wr(6, 0);
    wr(0, 1);
    n = 0;
    while (!all_done() && n < 3000000) begin @(posedge clk); n++; end
    check(all_done(), "all machines finished");
    @(negedge clk); sw_addr = 8; #1;
    for (int g = 0; g < N; g++) cyc[g] = sw_rdata[g];
    finished = 1;
    #1;
    for (int g = 0; g < N; g++)
      for (int i = 0; i < 64; i++)
        check(loc_out[g][i] == word_t'(5000 - 13 * 63 + 13 * i),
              $sformatf("data cache %0d: local %0d", SIZES[g], i));
    for (int g = 0; g < N; g++)
      $display("data cache %2d entries: %0d cycles, %0d hits, %0d misses",
               SIZES[g], cyc[g], dc_hits[g], dc_misses[g]);
    for (int g = 1; g < N; g++) begin
      check(dc_misses[g] >= dc_misses[g-1],
            $sformatf("misses do not fall from %0d to %0d entries", SIZES[g-1], SIZES[g]));
      check(cyc[g] >= cyc[g-1],
            $sformatf("cycles do not fall from %0d to %0d entries", SIZES[g-1], SIZES[g]));
    end
    check(dc_hits[N-1] == 0, "no hits without a data cache");
    check(cyc[N-1] > cyc[0], "removing the data cache costs cycles");
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
