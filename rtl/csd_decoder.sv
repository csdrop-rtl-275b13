// csd_decoder -- context-sensitive decoder / micro-op sequencer.
//
// Takes one dispatched macro-op at a time and walks its micro-op sequence in
// the micro-op ROM, addressed by (kind, ctx, microPC), one micro-op per
// cycle. Micro-ops for the core's back end leave on the uop port. Micro-ops
// the plug-in executes itself (SS_PUSH, RAS_CMP, SS_CHECK) are held on the
// exec port until the commit control answers with exec_done; the sequence
// then
//   - continues with the next microPC, or
//   - restarts at microPC 0 under a new context (`redecode`, used when a
//     return missed in the RAS and must be decoded again with the shadow
//     stack check), or
//   - is dropped (`kill`, used when an attack was detected).
// The macro-op ends after the ROM word marked `last`.
//
// Interface: in_valid/in_ready (accepted only while idle, so one idle cycle
// separates macro-ops), uop_valid/uop_ready, exec_valid/exec_done.
// Timing: one micro-op per cycle when uop_ready is high.
//
// Decoding by (ctx, microPC) and the restart of a ret under a new context
// follow the document; the stall-until-executed rule for plug-in micro-ops is
// this design's in-order simplification.
module csd_decoder
  import csdrop_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // dispatched macro-ops
  input  logic    in_valid,
  input  dmop_t   in,
  output logic    in_ready,
  // micro-ops to the back end
  output logic    uop_valid,
  output uop_t    uop,
  input  logic    uop_ready,
  // plug-in micro-ops
  output logic    exec_valid,
  output uop_op_e exec_op,
  output dmop_t   exec_mop,
  input  logic    exec_done,
  input  logic    redecode,
  input  ctx_e    redecode_ctx,
  input  logic    kill
);
  logic             busy;
  dmop_t            cur;
  ctx_e             ctx;
  logic [UPC_W-1:0] upc;
  rom_uop_t         rw;
  logic             plugin;
  logic             step;     // current ROM word is finished

  csd_uop_rom u_rom (.kind (cur.mop.kind), .ctx (ctx), .upc (upc), .uop (rw));

  assign plugin   = is_plugin_op(rw.op);
  assign in_ready = !busy;

  assign uop_valid = busy && !plugin;
  assign uop.op    = rw.op;
  assign uop.last  = rw.last;
  assign uop.ctx   = ctx;
  assign uop.upc   = upc;
  assign uop.pc    = cur.mop.pc;

  assign exec_valid = busy && plugin;
  assign exec_op    = rw.op;
  assign exec_mop   = cur;

  assign step = busy && (plugin ? exec_done : uop_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      ctx  <= CTX_NATIVE;
      upc  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy <= 1'b1;
        cur  <= in;
        ctx  <= in.ctx;
        upc  <= '0;
      end
    end else if (step) begin
      if (plugin && kill) begin
        busy <= 1'b0;
      end else if (plugin && redecode) begin
        ctx <= redecode_ctx;
        upc <= '0;
      end else if (rw.last) begin
        busy <= 1'b0;
      end else begin
        upc <= upc + 1'b1;
      end
    end
  end

endmodule
