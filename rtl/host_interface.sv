// host_interface: the co-processor's link to the software partition and to memory.
//
// Software side: a small register file written and read over one data bus,
// plus an interrupt line. Software writes where the method's bytecode, local
// variables, operand stack and constant pool are, the starting PC and the
// number of stack words already in RAM, then writes 1 to CTRL. The hardware
// runs until it returns, meets an instruction it does not implement, or
// raises an exception; it then raises `irq`, and software reads back PC,
// stack depth and exit status and continues in software. Writing CTRL also
// clears the interrupt.
//
//   reg 0 CTRL   W: bit0 start          R: {busy, done}
//   reg 1 PC     Java PC (start / exit)
//   reg 2 CODE   byte address of the bytecode in on-board RAM
//   reg 3 LOCALS word address of local variable 0 in on-board RAM
//   reg 4 STACK  word address of the bottom of the operand stack in on-board RAM
//   reg 5 DEPTH  operand stack depth in words (start / exit)
//   reg 6 CPOOL  word address of the constant pool in host memory
//   reg 7 STATUS R: {16'b0, exit opcode[15:8], 6'b0, exit code[1:0]}
//   reg 8 CYCLES R: clock cycles of the last run
//
// Memory side: one on-board RAM port shared by three clients. The data cache
// and stack spill/fill requests win over instruction fetch, because the
// engine is waiting for them; fetch only uses idle memory. A grant is held
// until the RAM acknowledges; in an idle cycle the winner is passed to the
// RAM at once, without a cycle of arbitration. Host-memory (constant pool, object store)
// requests from the engine are passed to the host-memory port.
//
// Timing: registers write on the clock edge; `start` is a one-cycle pulse in
// the cycle after CTRL is written. A memory request that finds the RAM idle is
// presented to it in the cycle it is raised, and its acknowledge reaches the
// client in the same cycle the RAM gives it.
//
// From the document: the hand-over by addresses, the interrupt at the end,
// read-back of the machine state, and the priority of data and stack
// requests over instruction fetch. The register map, the arbitration
// mechanism and the cycle counter are this design's own.
module host_interface
  import jvm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // software partition
  input  logic       sw_we,
  input  logic [3:0] sw_addr,
  input  word_t      sw_wdata,
  output word_t      sw_rdata,
  output logic       irq,
  // control to / status from the pipeline
  output logic       start,
  output jpc_t       start_pc,
  output word_t      code_base,
  output word_t      locals_base,
  output word_t      stack_base,
  output word_t      stack_depth,
  output word_t      cpool_base,
  input  logic       done,
  input  jpc_t       exit_pc,
  input  word_t      exit_depth,
  input  exit_t      exit_code,
  input  logic [7:0] exit_op,
  // on-board RAM clients
  input  mem_req_t   dc_req,
  output mem_rsp_t   dc_rsp,
  input  mem_req_t   stk_req,
  output mem_rsp_t   stk_rsp,
  input  mem_req_t   ib_req,
  output mem_rsp_t   ib_rsp,
  // host-memory client (engine)
  input  mem_req_t   hm_creq,
  output mem_rsp_t   hm_crsp,
  // on-board RAM port
  output mem_req_t   ob_req,
  input  mem_rsp_t   ob_rsp,
  // host-memory port
  output mem_req_t   hm_req,
  input  mem_rsp_t   hm_rsp
);

  // ---------------- software registers ----------------
  logic  busy, done_q;
  jpc_t  pc_q;
  word_t depth_q, cycles_q;
  exit_t code_q;
  logic [7:0] op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done_q <= 1'b0; start <= 1'b0;
      pc_q <= '0; code_base <= '0; locals_base <= '0; stack_base <= '0;
      depth_q <= '0; cpool_base <= '0; cycles_q <= '0;
      code_q <= ST_RETURN; op_q <= '0;
    end else begin
      start <= 1'b0;
      if (busy) cycles_q <= cycles_q + 1;
      if (sw_we && !busy) begin
        unique case (sw_addr)
          4'd0: if (sw_wdata[0]) begin
                  start <= 1'b1; busy <= 1'b1; done_q <= 1'b0; cycles_q <= '0;
                end else done_q <= 1'b0;
          4'd1: pc_q        <= sw_wdata[15:0];
          4'd2: code_base   <= sw_wdata;
          4'd3: locals_base <= sw_wdata;
          4'd4: stack_base  <= sw_wdata;
          4'd5: depth_q     <= sw_wdata;
          4'd6: cpool_base  <= sw_wdata;
          default: ;
        endcase
      end
      if (done && busy) begin
        busy   <= 1'b0;
        done_q <= 1'b1;
        pc_q   <= exit_pc;
        depth_q <= exit_depth;
        code_q <= exit_code;
        op_q   <= exit_op;
      end
    end
  end

  assign irq         = done_q;
  assign start_pc    = pc_q;
  assign stack_depth = depth_q;

  always_comb begin
    unique case (sw_addr)
      4'd0:    sw_rdata = {30'd0, busy, done_q};
      4'd1:    sw_rdata = {16'd0, pc_q};
      4'd2:    sw_rdata = code_base;
      4'd3:    sw_rdata = locals_base;
      4'd4:    sw_rdata = stack_base;
      4'd5:    sw_rdata = depth_q;
      4'd6:    sw_rdata = cpool_base;
      4'd7:    sw_rdata = {16'd0, op_q, 6'd0, code_q};
      4'd8:    sw_rdata = cycles_q;
      default: sw_rdata = '0;
    endcase
  end

  // ---------------- on-board RAM arbitration ----------------
  typedef enum logic [1:0] {G_NONE, G_DC, G_STK, G_IB} grant_t;
  grant_t grant, owner;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= G_NONE;
    else if (ob_rsp.ack) grant <= G_NONE;
    else                 grant <= owner;
  end

  // The owner is the held grant, or in an idle cycle the highest-priority
  // requester, so a request reaches the RAM in the cycle it is raised.
  always_comb begin
    owner = grant;
    if (grant == G_NONE) begin
      if      (dc_req.req)  owner = G_DC;
      else if (stk_req.req) owner = G_STK;
      else if (ib_req.req)  owner = G_IB;
    end
    unique case (owner)
      G_DC:    ob_req = dc_req;
      G_STK:   ob_req = stk_req;
      G_IB:    ob_req = ib_req;
      default: ob_req = '0;
    endcase
    dc_rsp  = '{ack: ob_rsp.ack && owner == G_DC,  rdata: ob_rsp.rdata};
    stk_rsp = '{ack: ob_rsp.ack && owner == G_STK, rdata: ob_rsp.rdata};
    ib_rsp  = '{ack: ob_rsp.ack && owner == G_IB,  rdata: ob_rsp.rdata};
  end

  // ---------------- host memory ----------------
  assign hm_req  = hm_creq;
  assign hm_crsp = hm_rsp;

  // A granted client keeps its request up until the acknowledge.
  property p_hold_req;
    @(posedge clk) disable iff (!rst_n)
      (grant != G_NONE && !ob_rsp.ack) |-> ob_req.req;
  endproperty
  a_hold_req: assert property (p_hold_req);

endmodule
