// data_cache: local-variable cache of the Java co-processor (data cache controller).
//
// The execution engine reads and writes the local variables of the current
// method frame through this unit. The frame lives in on-board RAM as one word
// per local, starting at word address `locals_base`. The cache is direct
// mapped: local n uses line n % ENTRIES and keeps n as its tag. Writes are
// write-through ("write on demand"): the line is updated and the word is
// written to RAM at once, so nothing has to be flushed when execution returns
// to software. With ENTRIES = 0 there is no storage and every request becomes
// a RAM transaction.
//
// Interface: the engine holds `req` (with we, index, wdata) until `ack`, a
// one-cycle pulse that carries read data in `rdata`. The RAM side uses the same
// hold-until-ack protocol towards the host interface. `invalidate` clears every
// line (pulsed when software starts the hardware, since software may have
// changed the frame).
//
// Timing: a read hit is acknowledged one cycle after the request; a read miss
// or any write waits for the RAM acknowledge and is acknowledged in the cycle
// after it. `hit`/`miss` pulse once per read for statistics.
//
// From the document: write-through policy, configurable size down to zero,
// 64 entries in the main evaluation. Own choices: direct mapping, the word-per-
// local layout, write-allocate, and the handshake.
module data_cache
  import jvm_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       invalidate,
  input  word_t      locals_base,
  // engine side
  input  logic       req,
  input  logic       we,
  input  logic [7:0] index,
  input  word_t      wdata,
  output logic       ack,
  output word_t      rdata,
  // RAM side (through the host interface)
  output mem_req_t   mreq,
  input  mem_rsp_t   mrsp,
  // statistics
  output logic       hit,
  output logic       miss
);

  localparam int unsigned LINES = (ENTRIES == 0) ? 1 : ENTRIES;
  localparam int unsigned LW    = (LINES > 1) ? $clog2(LINES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_MEM, S_DONE} state_t;
  state_t state;

  word_t      data_q  [LINES];
  logic [7:0] tag_q   [LINES];
  logic       valid_q [LINES];

  logic [LW-1:0] line;
  logic          lookup_hit;

  always_comb begin
    line       = LW'(32'(index) % LINES);
    lookup_hit = (ENTRIES != 0) && valid_q[line] && (tag_q[line] == index);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ack   <= 1'b0;
      rdata <= '0;
      hit   <= 1'b0;
      miss  <= 1'b0;
      for (int i = 0; i < LINES; i++) begin
        valid_q[i] <= 1'b0;
        tag_q[i]   <= '0;
        data_q[i]  <= '0;
      end
    end else begin
      ack  <= 1'b0;
      hit  <= 1'b0;
      miss <= 1'b0;
      unique case (state)
        S_IDLE: if (req && !ack) begin
          if (!we && lookup_hit) begin
            rdata <= data_q[line];
            ack   <= 1'b1;
            hit   <= 1'b1;
          end else begin
            miss  <= !we;
            state <= S_MEM;
          end
        end
        S_MEM: if (mrsp.ack) begin
          if (ENTRIES != 0) begin
            valid_q[line] <= 1'b1;
            tag_q[line]   <= index;
            data_q[line]  <= we ? wdata : mrsp.rdata;
          end
          rdata <= we ? wdata : mrsp.rdata;
          ack   <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (invalidate)
        for (int i = 0; i < LINES; i++) valid_q[i] <= 1'b0;
    end
  end

  always_comb begin
    mreq.req   = (state == S_MEM);
    mreq.we    = we;
    mreq.addr  = locals_base + 32'(index);
    mreq.wdata = wdata;
  end

endmodule
