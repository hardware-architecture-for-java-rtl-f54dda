// tb_data_cache: self-checking test of the local-variable cache.
// Two caches (64 lines and zero lines) run the same random sequence of local
// variable reads and writes against a reference array. Checks: read data,
// that every write reaches RAM at once (write-through), that a repeated read
// of a cached local hits and is acknowledged one cycle after the request,
// and that the zero-line cache never hits.
module tb_data_cache;
  import jvm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam word_t BASE = 32'h100;

  logic req, we, inv;
  logic [7:0] index;
  word_t wdata;
  logic ack [2];
  word_t rdata [2];
  logic hit [2], miss [2];
  mem_req_t mreq [2];
  mem_rsp_t mrsp [2];

  data_cache #(.ENTRIES(64)) dut (
    .clk, .rst_n, .invalidate(inv), .locals_base(BASE),
    .req, .we, .index, .wdata, .ack(ack[0]), .rdata(rdata[0]),
    .mreq(mreq[0]), .mrsp(mrsp[0]), .hit(hit[0]), .miss(miss[0]));
  data_cache #(.ENTRIES(0)) dut0 (
    .clk, .rst_n, .invalidate(inv), .locals_base(BASE),
    .req, .we, .index, .wdata, .ack(ack[1]), .rdata(rdata[1]),
    .mreq(mreq[1]), .mrsp(mrsp[1]), .hit(hit[1]), .miss(miss[1]));
  mem_model #(.WORDS(1024), .LATENCY(3)) ram0 (.clk, .req(mreq[0]), .rsp(mrsp[0]));
  mem_model #(.WORDS(1024), .LATENCY(3)) ram1 (.clk, .req(mreq[1]), .rsp(mrsp[1]));

  word_t refv [256];
  int hits [2];
  always @(posedge clk) for (int u = 0; u < 2; u++) if (hit[u]) hits[u]++;

  // one access on both caches; returns cycles until ack of cache 0
  task automatic access(bit w, logic [7:0] idx, word_t d, output word_t r0, output word_t r1,
                        output int lat0);
    bit got0, got1;
    int n;
    got0 = 0; got1 = 0; n = 0; lat0 = -1;
    @(negedge clk);
    req = 1; we = w; index = idx; wdata = d;
    while (!(got0 && got1)) begin
      @(posedge clk); #1;
      n++;
      if (ack[0] && !got0) begin got0 = 1; r0 = rdata[0]; lat0 = n; end
      if (ack[1] && !got1) begin got1 = 1; r1 = rdata[1]; end
      if (got0 && got1) break;
      if (got0 || got1) begin
        // keep the finished one quiet: both see the same req, so hold until both done
      end
    end
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    word_t r0, r1;
    int lat;
    req = 0; we = 0; index = 0; wdata = 0; inv = 0;
    hits[0] = 0; hits[1] = 0;
    for (int i = 0; i < 256; i++) begin
      refv[i] = $urandom;
      ram0.mem[BASE + i] = refv[i];
      ram1.mem[BASE + i] = refv[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      bit w;
      logic [7:0] idx;
      word_t d;
      w   = ($urandom % 3) == 0;
      idx = ($urandom % 2) ? 8'($urandom % 16) : 8'($urandom);
      d   = $urandom;
      access(w, idx, d, r0, r1, lat);
      if (w) begin
        refv[idx] = d;
        check(ram0.mem[BASE + idx] == d && ram1.mem[BASE + idx] == d, "write-through");
      end else begin
        check(r0 == refv[idx], $sformatf("read local %0d: %h vs %h", idx, r0, refv[idx]));
        check(r1 == refv[idx], "read local through zero-size cache");
      end
    end
    // repeated read: hit with one-cycle latency
    access(0, 8'd5, 0, r0, r1, lat);
    access(0, 8'd5, 0, r0, r1, lat);
    check(lat == 1, $sformatf("hit latency %0d", lat));
    check(r0 == refv[5], "hit data");
    // invalidate, then the same read must miss
    @(negedge clk); inv = 1; @(negedge clk); inv = 0;
    access(0, 8'd5, 0, r0, r1, lat);
    check(lat > 1, "miss after invalidate");
    check(hits[0] > 50, $sformatf("cache hits %0d", hits[0]));
    check(hits[1] == 0, "zero-size cache never hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
