// csdrop_pkg -- types and constants shared by the CSDrop return-address
// protection plug-in.
//
// The plug-in watches the macro-ops (native x86-64 instructions) of a core.
// For call and ret it produces micro-op sequences that depend on a decoding
// context (ctx) and a micro-op program counter (microPC), keeps a shadow
// stack of (return address, stack pointer) pairs in ordinary memory, and
// checks every return against it.
//
// Addresses are 64 bits wide (x86-64). Four contexts and up to six micro-ops
// per macro-op follow the context-sensitive decoding picture (ctx 0..3,
// microPC 0..5). The context numbering, the micro-op names and the macro-op
// record are this design's own choices.
package csdrop_pkg;

  localparam int unsigned XLEN     = 64;  // x86-64 virtual addresses
  localparam int unsigned NUM_CTX  = 4;   // decoding contexts
  localparam int unsigned MAX_UOPS = 6;   // micro-op slots per (macro-op, ctx)
  localparam int unsigned CTX_W    = $clog2(NUM_CTX);
  localparam int unsigned UPC_W    = $clog2(MAX_UOPS);

  // One shadow stack entry is a return address and a stack pointer, 8 bytes each.
  localparam int unsigned SS_ENTRY_BYTES = 16;

  typedef logic [XLEN-1:0] addr_t;

  // Macro-op classes the plug-in cares about.
  typedef enum logic [1:0] {
    MOP_OTHER = 2'd0,   // any other instruction: regular decoder
    MOP_CALL  = 2'd1,
    MOP_RET   = 2'd2
  } mop_kind_e;

  // Decoding contexts.
  typedef enum logic [CTX_W-1:0] {
    CTX_NATIVE     = 2'd0,  // protection off: stock translation
    CTX_RAS_ASSIST = 2'd1,  // call pushes to the shadow stack, ret is checked against the RAS
    CTX_SS_CHECK   = 2'd2,  // re-decode of a ret after a RAS miss: full shadow stack check
    CTX_SS_ONLY    = 2'd3   // protection without RAS assistance: every ret checks the shadow stack
  } ctx_e;

  // Micro-op opcodes.
  typedef enum logic [3:0] {
    UOP_NOP      = 4'd0,
    UOP_REGULAR  = 4'd1,   // macro-op handed to the regular decoder
    UOP_SUBI_SP  = 4'd2,   // rsp -= 8
    UOP_ST_RA    = 4'd3,   // store return address at [rsp]
    UOP_WRIP_TGT = 4'd4,   // rip <- call target
    UOP_LD_RA    = 4'd5,   // t1 <- [rsp]
    UOP_ADDI_SP  = 4'd6,   // rsp += 8
    UOP_WRIP_RA  = 4'd7,   // rip <- t1
    UOP_SS_PUSH  = 4'd8,   // plug-in: push (return address, rsp) on the shadow stack
    UOP_RAS_CMP  = 4'd9,   // plug-in: compare RAS prediction with t1
    UOP_SS_CHECK = 4'd10   // plug-in: enhanced repetitive check against the shadow stack
  } uop_op_e;

  // One macro-op as presented by the core.
  //   next_pc : address after the instruction (the return address of a call)
  //   target  : call target
  //   sp      : caller-visible stack pointer, i.e. rsp before a call and
  //             rsp after a ret has popped its return address
  //   ret_ra  : for a ret, the return address found on the user stack
  typedef struct packed {
    mop_kind_e kind;
    addr_t     pc;
    addr_t     next_pc;
    addr_t     target;
    addr_t     sp;
    addr_t     ret_ra;
  } mop_t;

  // Macro-op after dispatch: its context and, for a ret, the RAS prediction.
  typedef struct packed {
    mop_t  mop;
    ctx_e  ctx;
    logic  pred_valid;
    addr_t pred;
  } dmop_t;

  // ROM word.
  typedef struct packed {
    uop_op_e op;
    logic    last;
  } rom_uop_t;

  // Micro-op handed to the core's back end.
  typedef struct packed {
    uop_op_e           op;
    logic              last;
    ctx_e              ctx;
    logic [UPC_W-1:0]  upc;
    addr_t             pc;
  } uop_t;

  // Commands of the shadow stack engine.
  typedef enum logic [1:0] {
    SS_CMD_PUSH  = 2'd0,
    SS_CMD_CPOP  = 2'd1,   // conceptual pop: pointer only, no memory access
    SS_CMD_CHECK = 2'd2
  } ss_cmd_e;

  // Micro-ops the plug-in executes itself rather than the core.
  function automatic logic is_plugin_op(uop_op_e op);
    return (op == UOP_SS_PUSH) || (op == UOP_RAS_CMP) || (op == UOP_SS_CHECK);
  endfunction

endpackage
