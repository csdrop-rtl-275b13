// csdrop_top -- CSDrop: a shadow stack built into instruction decoding.
//
// A plug-in for an x86-64 core that defeats return-oriented programming.
// Every call and ret is decoded through a context-sensitive micro-op store:
// with protection on, a call also pushes (return address, caller stack
// pointer) onto a shadow stack in memory, and a ret is checked before its
// target is taken. The check is first made cheaply against the return address
// stack (RAS); only if the RAS prediction disagrees with the return address
// on the user stack is the ret squashed and decoded again with a full shadow
// stack check, which pops entries until one matches both the return address
// and the stack pointer (tolerating setjmp/longjmp) or the shadow stack is
// empty (attack: rop_fault). A range check in the data TLB path refuses any
// unprivileged access to the live shadow stack.
//
// Blocks: csd_dispatcher (MSR, context choice, RAS update) -> csd_decoder
// (+ csd_uop_rom) -> back-end micro-ops out / plug-in micro-ops to
// csd_commit_ctrl -> ss_engine (+ ss_ptr_regs) -> memory port;
// ras; two ss_access_ctrl instances (core accesses, plug-in accesses).
//
// Interface:
//   msr_we/msr_wdata     OS write of the MSR: bit 0 enable, bit 1 use RAS.
//   ss_init/ss_base      OS maps a new shadow stack (process start); base is
//                        its highest address + 1, the stack grows down.
//   ss_load/ss_load_top/ss_load_bottom
//                        OS context switch: restore the pointer pair saved
//                        from ss_top/ss_bottom when the process was switched
//                        out. The shadow stack itself stays in memory.
//   mop_*                macro-ops from the core, valid/ready.
//   uop_*                micro-ops for the core's back end, valid/ready;
//                        uop_squash: drop this ret's earlier micro-ops.
//   acc_*                the core's data accesses for the shadow stack range
//                        check; acc_fault answers in the same cycle.
//   mem_*                privileged memory port of the shadow stack engine.
//   rop_*                attack detected: pulse, address of the ret, sticky.
//   cnt_*                statistics.
// The core itself (fetch, regular decoder, rename, execution, caches, the
// TLB's translation) is outside this design and connects to these ports.
module csdrop_top
  import csdrop_pkg::*;
#(
  parameter int unsigned RAS_DEPTH = 16,
  parameter int unsigned CW        = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          msr_we,
  input  logic [1:0]    msr_wdata,
  input  logic          ss_init,
  input  addr_t         ss_base,
  input  logic          ss_load,
  input  addr_t         ss_load_top,
  input  addr_t         ss_load_bottom,
  input  logic          mop_valid,
  input  mop_t          mop,
  output logic          mop_ready,
  output logic          uop_valid,
  output uop_t          uop,
  input  logic          uop_ready,
  output logic          uop_squash,
  input  logic          acc_valid,
  input  addr_t         acc_addr,
  input  logic [3:0]    acc_size,
  input  logic          acc_priv,
  output logic          acc_fault,
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_we,
  output addr_t         mem_addr,
  output addr_t         mem_wdata,
  input  logic          mem_rvalid,
  input  addr_t         mem_rdata,
  output logic          rop_fault,
  output addr_t         rop_fault_pc,
  output logic          rop_detected,
  output logic          ss_priv_fault,
  output addr_t         ss_top,
  output addr_t         ss_bottom,
  output logic [CW-1:0] cnt_used_ras,
  output logic [CW-1:0] cnt_ras_incorrect,
  output logic [CW-1:0] cnt_ss_checks,
  output logic [CW-1:0] cnt_ss_pops
);
  logic    msr_en;
  logic    d_valid, d_ready;
  dmop_t   d_mop;
  logic    ras_push, ras_pop, ras_top_valid;
  addr_t   ras_push_addr, ras_top;

  logic    exec_valid, exec_done, redecode, kill;
  uop_op_e exec_op;
  dmop_t   exec_mop;
  ctx_e    redecode_ctx;

  logic    ss_start, ss_busy, ss_done, ss_pass, ss_popped;
  ss_cmd_e ss_cmd;
  addr_t   ss_ra, ss_sp;

  logic    e_req_valid, e_we, e_priv;
  addr_t   e_addr, e_wdata;

  csd_dispatcher u_disp (
    .clk, .rst_n, .msr_we, .msr_wdata, .msr_en, .msr_ras (),
    .in_valid (mop_valid), .in_mop (mop), .in_ready (mop_ready),
    .out_valid (d_valid), .out (d_mop), .out_ready (d_ready),
    .ras_push, .ras_push_addr, .ras_pop, .ras_top_valid, .ras_top
  );

  ras #(.DEPTH (RAS_DEPTH), .AW (XLEN)) u_ras (
    .clk, .rst_n, .push (ras_push), .push_addr (ras_push_addr), .pop (ras_pop),
    .top_valid (ras_top_valid), .top_addr (ras_top), .count ()
  );

  csd_decoder u_dec (
    .clk, .rst_n,
    .in_valid (d_valid), .in (d_mop), .in_ready (d_ready),
    .uop_valid, .uop, .uop_ready,
    .exec_valid, .exec_op, .exec_mop, .exec_done, .redecode, .redecode_ctx, .kill
  );

  csd_commit_ctrl #(.CW (CW)) u_commit (
    .clk, .rst_n,
    .exec_valid, .exec_op, .exec_mop, .exec_done, .redecode, .redecode_ctx, .kill,
    .squash (uop_squash),
    .ss_start, .ss_cmd, .ss_ra, .ss_sp, .ss_busy, .ss_done, .ss_pass,
    .ss_entry_popped (ss_popped),
    .rop_fault, .rop_fault_pc, .rop_detected,
    .cnt_used_ras, .cnt_ras_incorrect, .cnt_ss_checks, .cnt_ss_pops
  );

  ss_engine u_ss (
    .clk, .rst_n, .init (ss_init), .base (ss_base),
    .load (ss_load), .load_top (ss_load_top), .load_bottom (ss_load_bottom),
    .start (ss_start), .cmd (ss_cmd), .ra (ss_ra), .sp (ss_sp),
    .busy (ss_busy), .done (ss_done), .pass (ss_pass),
    .mem_req_valid (e_req_valid), .mem_req_ready (mem_req_ready), .mem_we (e_we),
    .mem_addr (e_addr), .mem_wdata (e_wdata), .mem_priv (e_priv),
    .mem_rvalid, .mem_rdata,
    .ss_top, .ss_bottom, .ss_empty (), .entry_popped (ss_popped)
  );

  // Range check of the core's own data accesses.
  ss_access_ctrl u_acc_core (
    .en (msr_en), .ss_top, .ss_bottom,
    .acc_valid, .acc_addr, .acc_size, .acc_priv,
    .in_range (), .fault (acc_fault)
  );

  // The same check on the engine's requests; they carry the privilege, so a
  // fault here would mean the engine itself misbehaved. Such a request is
  // not issued.
  ss_access_ctrl u_acc_ss (
    .en (msr_en), .ss_top, .ss_bottom,
    .acc_valid (e_req_valid), .acc_addr (e_addr), .acc_size (4'd8), .acc_priv (e_priv),
    .in_range (), .fault (ss_priv_fault)
  );

  assign mem_req_valid = e_req_valid && !ss_priv_fault;
  assign mem_we        = e_we;
  assign mem_addr      = e_addr;
  assign mem_wdata     = e_wdata;

endmodule
