// jvm_coproc: hardware partition of a hardware/software co-designed Java
// virtual machine.
//
// A host CPU runs the virtual machine in software (class loading,
// verification, garbage collection, object creation, exceptions, threads).
// When it hands a method to this co-processor, the hardware executes the
// method's bytecode until it returns, meets an instruction left to software,
// or raises an exception, and then interrupts the host.
//
// Four units form a three-stage pipeline (fetch, decode, execute):
//   host_interface  software registers, interrupt, and the on-board RAM
//                   arbiter (data cache > stack spill/fill > instruction fetch)
//   instr_buffer    bytecode cache, fetch, alignment of packed instructions
//   exec_engine     stack machine with a 64-entry operand-stack cache
//   data_cache      write-through cache of the local variables
// Instructions flow host_interface -> instr_buffer -> exec_engine; each stage
// tells the one feeding it when it is ready for the next instruction. The
// data cache and the stack spill/fill use the on-board RAM through the host
// interface; the engine reaches the constant pool and object store in host
// memory through the host interface as well.
//
// Ports: the software register bus and interrupt (see host_interface), the
// on-board RAM port and the host-memory port (hold-until-ack protocol of
// jvm_pkg), and one-cycle event pulses for performance monitoring.
//
// Parameters: IC_BYTES instruction cache bytes (8 or more, 1024 default),
// DC_ENTRIES local-variable cache lines (0 to 256, 64 default), STACK_ENTRIES
// operand-stack cache words (power of two, 64 default).
module jvm_coproc
  import jvm_pkg::*;
#(
  parameter int unsigned IC_BYTES      = 1024,
  parameter int unsigned DC_ENTRIES    = 64,
  parameter int unsigned STACK_ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  // software partition
  input  logic       sw_we,
  input  logic [3:0] sw_addr,
  input  word_t      sw_wdata,
  output word_t      sw_rdata,
  output logic       irq,
  // on-board RAM and host memory
  output mem_req_t   ob_req,
  input  mem_rsp_t   ob_rsp,
  output mem_req_t   hm_req,
  input  mem_rsp_t   hm_rsp,
  // events
  output logic       ev_retire,
  output logic       ev_spill,
  output logic       ev_fill,
  output logic       ev_branch,
  output logic       ev_ib_hit,
  output logic       ev_ib_miss,
  output logic       ev_dc_hit,
  output logic       ev_dc_miss
);

  logic  start, done;
  jpc_t  start_pc, exit_pc;
  word_t code_base, locals_base, stack_base, stack_depth, cpool_base, exit_depth;
  exit_t exit_code;
  logic [7:0] exit_op;

  mem_req_t dc_mreq, stk_req, ib_req, hm_creq;
  mem_rsp_t dc_mrsp, stk_rsp, ib_rsp, hm_crsp;

  logic   ib_valid, ib_ready, redirect;
  instr_t ib_instr;
  jpc_t   redirect_pc;

  logic       dc_req, dc_we, dc_ack;
  logic [7:0] dc_index;
  word_t      dc_wdata, dc_rdata;

  host_interface u_host (
    .clk, .rst_n,
    .sw_we, .sw_addr, .sw_wdata, .sw_rdata, .irq,
    .start, .start_pc, .code_base, .locals_base, .stack_base, .stack_depth, .cpool_base,
    .done, .exit_pc, .exit_depth, .exit_code, .exit_op,
    .dc_req(dc_mreq), .dc_rsp(dc_mrsp), .stk_req, .stk_rsp, .ib_req, .ib_rsp,
    .hm_creq, .hm_crsp, .ob_req, .ob_rsp, .hm_req, .hm_rsp
  );

  instr_buffer #(.CACHE_BYTES(IC_BYTES)) u_ib (
    .clk, .rst_n, .start, .start_pc, .stop(done), .code_base,
    .out_valid(ib_valid), .out(ib_instr), .out_ready(ib_ready),
    .redirect, .redirect_pc,
    .mreq(ib_req), .mrsp(ib_rsp),
    .hit(ev_ib_hit), .miss(ev_ib_miss)
  );

  exec_engine #(.STACK_ENTRIES(STACK_ENTRIES)) u_ee (
    .clk, .rst_n, .start, .stack_base, .stack_depth, .cpool_base,
    .in_valid(ib_valid), .in(ib_instr), .in_ready(ib_ready),
    .redirect, .redirect_pc,
    .dc_req, .dc_we, .dc_index, .dc_wdata, .dc_ack, .dc_rdata,
    .stk_req, .stk_rsp, .hm_req(hm_creq), .hm_rsp(hm_crsp),
    .done, .exit_pc, .exit_depth, .exit_code, .exit_op,
    .ev_retire, .ev_spill, .ev_fill, .ev_branch
  );

  data_cache #(.ENTRIES(DC_ENTRIES)) u_dc (
    .clk, .rst_n, .invalidate(start), .locals_base,
    .req(dc_req), .we(dc_we), .index(dc_index), .wdata(dc_wdata),
    .ack(dc_ack), .rdata(dc_rdata),
    .mreq(dc_mreq), .mrsp(dc_mrsp),
    .hit(ev_dc_hit), .miss(ev_dc_miss)
  );

endmodule
