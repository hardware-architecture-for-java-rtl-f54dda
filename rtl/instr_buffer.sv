// instr_buffer: bytecode cache and instruction aligner (fetch and decode stages).
//
// Java bytecode is packed: instructions are 1 to 5 bytes long and start at
// any byte. This unit fetches 32-bit words of bytecode from on-board RAM,
// keeps the bytes in a cache, and hands the execution engine one aligned
// instruction at a time (opcode, up to four operand bytes, its PC and length)
// through an output register, so fetch/decode overlaps execution.
//
// The cache holds one contiguous range of Java PCs [lo, hi) in a circular
// byte array of CACHE_BYTES entries (byte at PC p sits at p % CACHE_BYTES).
// While there is room for a word, the next word at `hi` is fetched. When the
// cache is full and the decoder runs short of bytes (fewer than five ahead of
// the decode PC), bytes below the decode PC are dropped from the bottom to
// make room. Prefetching alone never evicts, so a loop that fits in the cache
// stays there and its backward branches hit.
// The buffer predicts no branch: it always decodes the next sequential
// instruction. A redirect from the engine (taken branch, jump, ret) whose
// target lies in [lo, hi) is a hit and decoding resumes there at once; any
// other target is a miss: the cache is cleared and refilled from the target,
// and a fetch already in flight is discarded when it returns.
//
// Interface: `start` (with `start_pc`) begins a run; `stop` ends it. The
// engine takes the instruction in `out` when `out_valid && out_ready`.
// `redirect` drops the instruction in the output register. RAM requests use
// the hold-until-ack protocol of jvm_pkg. `hit`/`miss` pulse per redirect.
//
// From the document: a variable-size cache, alignment of packed instructions
// in hardware, predict-not-taken, clearing and refilling on a miss at a branch,
// 1 Kbyte as the largest size. The circular-window organisation, the
// eviction rule and the word-wide fetch are this design's own.
module instr_buffer
  import jvm_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  jpc_t     start_pc,
  input  logic     stop,
  input  word_t    code_base,     // byte address of the method's bytecode
  // to the execution engine
  output logic     out_valid,
  output instr_t   out,
  input  logic     out_ready,
  input  logic     redirect,
  input  jpc_t     redirect_pc,
  // RAM (through the host interface)
  output mem_req_t mreq,
  input  mem_rsp_t mrsp,
  // statistics
  output logic     hit,
  output logic     miss
);

  localparam int unsigned IW = (CACHE_BYTES > 1) ? $clog2(CACHE_BYTES) : 1;
  typedef logic [16:0] ptr_t;   // PCs with one spare bit so hi can pass 0xFFFF

  // slot of the byte at PC p; any CACHE_BYTES consecutive PCs use distinct slots
  function automatic logic [IW-1:0] slot(ptr_t p);
    return IW'(32'(p) % CACHE_BYTES);
  endfunction

  logic [7:0] buf_q [CACHE_BYTES];
  ptr_t lo, hi, dec_pc;
  logic running, pending, discard;

  // ---------- occupancy ----------
  ptr_t used, free, avail, evict_n, below;
  word_t fetch_abs;
  logic [2:0] fetch_n;
  always_comb begin
    used    = hi - lo;
    free    = ptr_t'(CACHE_BYTES) - used;
    avail   = hi - dec_pc;
    below   = dec_pc - lo;
    evict_n = '0;
    // evict only when the decoder is short of bytes, never just to prefetch
    if (free < 4 && avail < 5) evict_n = ((4 - free) < below) ? (4 - free) : below;
    fetch_abs = code_base + 32'(hi);
    fetch_n   = 3'd4 - {1'b0, fetch_abs[1:0]};
  end

  // ---------- decode ----------
  logic [7:0] b [5];
  logic [2:0] len;
  logic       can_issue;
  always_comb begin
    for (int k = 0; k < 5; k++) b[k] = buf_q[slot(dec_pc + ptr_t'(k))];
    len       = op_len(b[0]);
    can_issue = running && (avail >= ptr_t'(len)) && (!out_valid || out_ready);
  end

  logic redirect_hit;
  ptr_t new_pc;
  assign new_pc = start ? ptr_t'(start_pc) : ptr_t'(redirect_pc);
  assign redirect_hit = (ptr_t'(redirect_pc) >= lo) && (ptr_t'(redirect_pc) < hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo <= '0; hi <= '0; dec_pc <= '0;
      running <= 1'b0; pending <= 1'b0; discard <= 1'b0;
      out_valid <= 1'b0; out <= '0;
      hit <= 1'b0; miss <= 1'b0;
      for (int i = 0; i < CACHE_BYTES; i++) buf_q[i] <= '0;
    end else begin
      hit  <= 1'b0;
      miss <= 1'b0;
      if (start || stop || (redirect && !redirect_hit)) begin
        // clear the cache and refill from the new PC
        lo <= new_pc; hi <= new_pc; dec_pc <= new_pc;
        out_valid <= 1'b0;
        if (start) running <= 1'b1;
        if (stop)  running <= 1'b0;
        if (mrsp.ack) begin
          pending <= 1'b0;
          discard <= 1'b0;
        end else if (pending) discard <= 1'b1;
        if (redirect && !start && !stop) miss <= 1'b1;
      end else begin
        // fetch return
        if (mrsp.ack) begin
          // keep fetching back to back while there is room for another word
          pending <= running && !discard && (free >= ptr_t'(fetch_n) + 4);
          if (discard) discard <= 1'b0;
          else begin
            for (int k = 0; k < 4; k++)
              if (k >= int'(fetch_abs[1:0]))
                buf_q[slot(hi + ptr_t'(k) - ptr_t'(fetch_abs[1:0]))] <= mrsp.rdata[8*k +: 8];
            hi <= hi + ptr_t'(fetch_n);
          end
        end else if (!pending && running && free >= 4) begin
          pending <= 1'b1;
        end
        // drop old bytes when full
        if (!redirect) lo <= lo + evict_n;
        // decode / redirect
        if (redirect) begin
          dec_pc    <= ptr_t'(redirect_pc);
          out_valid <= 1'b0;
          hit       <= 1'b1;
        end else if (can_issue) begin
          out_valid      <= 1'b1;
          out.op         <= b[0];
          out.operand    <= {b[1], b[2], b[3], b[4]};
          out.pc         <= jpc_t'(dec_pc);
          out.len        <= len;
          dec_pc         <= dec_pc + ptr_t'(len);
        end else if (out_ready) begin
          out_valid <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    mreq.req   = pending;   // kept up until the ack even when the data will be dropped
    mreq.we    = 1'b0;
    mreq.addr  = {2'b00, fetch_abs[31:2]};
    mreq.wdata = '0;
  end

endmodule
