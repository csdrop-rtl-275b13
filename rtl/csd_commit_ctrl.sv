// csd_commit_ctrl -- executes the plug-in micro-ops and decides the outcome
// of every protected return.
//
//   SS_PUSH  : start a shadow stack push of (return address, caller rsp).
//   RAS_CMP  : compare the RAS prediction carried by the ret with the return
//              address loaded from the user stack.
//              hit  -> no shadow stack access; start a conceptual pop so the
//                      shadow stack stays in step with the user stack.
//              miss -> (RAS overflow, non-local return or attack) squash the
//                      micro-ops already issued for this ret and have the
//                      decoder decode it again under CTX_SS_CHECK.
//   SS_CHECK : start the enhanced repetitive check; if it fails, squash the
//              ret, drop its remaining micro-ops and raise `rop_fault`
//              with the address of the ret.
//
// It also keeps the statistics a processor model reports for the RAS
// (returns predicted with the RAS, of which mispredicted) plus the number of
// shadow stack checks and of entries they popped.
//
// Interface: exec_valid/exec_op/exec_mop come from the decoder and stay
// stable until exec_done; exec_done, redecode, kill and squash are
// combinational and valid for that one cycle. A RAS miss is answered in the
// cycle it is presented; the other micro-ops take as long as the shadow stack
// engine. rop_fault pulses one cycle after the failed check; rop_detected
// stays set until reset.
//
// The hit/miss policy follows the document; the counter widths are this
// design's choice.
module csd_commit_ctrl
  import csdrop_pkg::*;
#(
  parameter int unsigned CW = 32     // statistics counter width
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the decoder
  input  logic    exec_valid,
  input  uop_op_e exec_op,
  input  dmop_t   exec_mop,
  output logic    exec_done,
  output logic    redecode,
  output ctx_e    redecode_ctx,
  output logic    kill,
  // to the core's commit stage
  output logic    squash,
  // shadow stack engine
  output logic    ss_start,
  output ss_cmd_e ss_cmd,
  output addr_t   ss_ra,
  output addr_t   ss_sp,
  input  logic    ss_busy,
  input  logic    ss_done,
  input  logic    ss_pass,
  input  logic    ss_entry_popped,
  // outcome
  output logic    rop_fault,
  output addr_t   rop_fault_pc,
  output logic    rop_detected,
  // statistics
  output logic [CW-1:0] cnt_used_ras,
  output logic [CW-1:0] cnt_ras_incorrect,
  output logic [CW-1:0] cnt_ss_checks,
  output logic [CW-1:0] cnt_ss_pops
);
  typedef enum logic {C_IDLE, C_WAIT} cstate_e;
  cstate_e state;

  logic ras_hit, miss_now, check_fail;

  assign ras_hit      = exec_mop.pred_valid && (exec_mop.pred == exec_mop.mop.ret_ra);
  assign miss_now     = (state == C_IDLE) && exec_valid && (exec_op == UOP_RAS_CMP) && !ras_hit;
  assign check_fail   = (state == C_WAIT) && ss_done && (exec_op == UOP_SS_CHECK) && !ss_pass;
  assign redecode_ctx = CTX_SS_CHECK;

  always_comb begin
    ss_start = 1'b0;
    ss_cmd   = SS_CMD_PUSH;
    ss_ra    = exec_mop.mop.next_pc;
    ss_sp    = exec_mop.mop.sp;
    if (state == C_IDLE && exec_valid && !ss_busy) begin
      unique case (exec_op)
        UOP_SS_PUSH:  begin ss_start = 1'b1; ss_cmd = SS_CMD_PUSH; end
        UOP_RAS_CMP:  if (ras_hit) begin ss_start = 1'b1; ss_cmd = SS_CMD_CPOP; end
        UOP_SS_CHECK: begin ss_start = 1'b1; ss_cmd = SS_CMD_CHECK;
                            ss_ra = exec_mop.mop.ret_ra; end
        default: ;
      endcase
    end
  end

  assign exec_done = miss_now || ((state == C_WAIT) && ss_done);
  assign redecode  = miss_now;
  assign kill     = check_fail;
  assign squash    = miss_now || check_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= C_IDLE;
      rop_fault         <= 1'b0;
      rop_fault_pc      <= '0;
      rop_detected      <= 1'b0;
      cnt_used_ras      <= '0;
      cnt_ras_incorrect <= '0;
      cnt_ss_checks     <= '0;
      cnt_ss_pops       <= '0;
    end else begin
      rop_fault <= check_fail;
      if (check_fail) begin
        rop_fault_pc <= exec_mop.mop.pc;
        rop_detected <= 1'b1;
      end
      if (state == C_IDLE && exec_valid && exec_op == UOP_RAS_CMP) begin
        cnt_used_ras <= cnt_used_ras + 1'b1;
        if (!ras_hit) cnt_ras_incorrect <= cnt_ras_incorrect + 1'b1;
      end
      if (ss_start && ss_cmd == SS_CMD_CHECK) cnt_ss_checks <= cnt_ss_checks + 1'b1;
      if (ss_entry_popped) cnt_ss_pops <= cnt_ss_pops + 1'b1;
      unique case (state)
        C_IDLE: if (ss_start) state <= C_WAIT;
        C_WAIT: if (ss_done)  state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
