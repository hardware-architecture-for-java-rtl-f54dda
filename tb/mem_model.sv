// mem_model: behavioural model of a word-addressed memory with a fixed
// latency, used by the testbenches for the board's on-board RAM and for the
// host memory reached over the bus. A request (held until ack) is
// acknowledged LATENCY cycles after it is first seen; a write takes effect
// with the ack, read data is returned with it. Addresses are taken modulo
// WORDS. The array `mem` is read and written directly by testbenches.
module mem_model
  import jvm_pkg::*;
#(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 2
) (
  input  logic     clk,
  input  mem_req_t req,
  output mem_rsp_t rsp
);
  word_t mem [WORDS];
  int unsigned wait_n;
  int unsigned accesses;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    wait_n = 0;
    accesses = 0;
    rsp = '0;
  end

  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.req && !rsp.ack) begin
      if (wait_n + 1 >= LATENCY) begin
        wait_n  <= 0;
        rsp.ack <= 1'b1;
        accesses <= accesses + 1;
        if (req.we) mem[req.addr % WORDS] <= req.wdata;
        rsp.rdata <= mem[req.addr % WORDS];
      end else wait_n <= wait_n + 1;
    end
  end
endmodule
