// csd_dispatcher -- context selection for incoming macro-ops.
//
// Holds the CSDrop model-specific register (MSR) that the operating system
// writes to switch protection on, and chooses the decoding context of every
// macro-op it passes to the CSD decoder:
//   MSR.en = 0               -> ctx 0 (stock decoding)
//   MSR.en = 1, MSR.ras = 1  -> ctx 1 (shadow stack with RAS assistance)
//   MSR.en = 1, MSR.ras = 0  -> ctx 3 (shadow stack checked on every ret)
// It also drives the return address stack: a call pushes its return address
// and a ret pops the prediction, which travels with the macro-op.
//
// Interface: valid/ready on both sides, passed straight through (no storage);
// the RAS is updated in the cycle the macro-op is accepted downstream.
// msr_we writes {ras, en} = msr_wdata[1:0] on the clock edge. Reset value of
// the MSR is 0 (protection off).
//
// Switching contexts through an MSR follows the document; the MSR layout and
// the fact that the RAS is updated at dispatch rather than at fetch are this
// design's choices.
module csd_dispatcher
  import csdrop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // MSR write
  input  logic       msr_we,
  input  logic [1:0] msr_wdata,
  output logic       msr_en,
  output logic       msr_ras,
  // macro-ops from the core
  input  logic       in_valid,
  input  mop_t       in_mop,
  output logic       in_ready,
  // to the CSD decoder
  output logic       out_valid,
  output dmop_t      out,
  input  logic       out_ready,
  // RAS
  output logic       ras_push,
  output addr_t      ras_push_addr,
  output logic       ras_pop,
  input  logic       ras_top_valid,
  input  addr_t      ras_top
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msr_en  <= 1'b0;
      msr_ras <= 1'b0;
    end else if (msr_we) begin
      msr_en  <= msr_wdata[0];
      msr_ras <= msr_wdata[1];
    end
  end

  logic accept;
  assign accept    = in_valid && out_ready;
  assign in_ready  = out_ready;
  assign out_valid = in_valid;

  always_comb begin
    out.mop        = in_mop;
    out.ctx        = !msr_en ? CTX_NATIVE : (msr_ras ? CTX_RAS_ASSIST : CTX_SS_ONLY);
    out.pred_valid = (in_mop.kind == MOP_RET) && ras_top_valid;
    out.pred       = ras_top;
  end

  assign ras_push      = accept && (in_mop.kind == MOP_CALL);
  assign ras_push_addr = in_mop.next_pc;
  assign ras_pop       = accept && (in_mop.kind == MOP_RET);

endmodule
