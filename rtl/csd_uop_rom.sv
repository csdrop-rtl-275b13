// csd_uop_rom -- context-sensitive micro-op store.
//
// Translates (macro-op kind, decoding context ctx, microPC) into one
// micro-op, combinationally. Context 0 holds the stock translation of call
// (rsp -= 8, store return address, jump) and ret (load return address,
// rsp += 8, jump). The protecting contexts add plug-in micro-ops:
//   call, ctx 1/2/3 : SS_PUSH first, so the shadow copy exists before the
//                     user-stack copy is written;
//   ret,  ctx 1     : RAS_CMP after the return address is loaded, the fast
//                     path that trusts a matching RAS prediction;
//   ret,  ctx 2/3   : SS_CHECK after the load, the full shadow stack check
//                     (ctx 2 is the re-decode after a RAS miss, ctx 3 the
//                     mode without RAS assistance).
// Other macro-ops give one REGULAR micro-op (handled by the regular decoder).
// Slots past the end of a sequence read as NOP with last set.
//
// The stock ret sequence (load, add, write rip) follows the document; the
// order of the added micro-ops and the context numbering are this design's.
module csd_uop_rom
  import csdrop_pkg::*;
(
  input  mop_kind_e        kind,
  input  ctx_e             ctx,
  input  logic [UPC_W-1:0] upc,
  output rom_uop_t         uop
);
  always_comb begin
    uop = '{op: UOP_NOP, last: 1'b1};
    unique case (kind)
      MOP_CALL: begin
        if (ctx == CTX_NATIVE) begin
          case (upc)
            3'd0: uop = '{op: UOP_SUBI_SP,  last: 1'b0};
            3'd1: uop = '{op: UOP_ST_RA,    last: 1'b0};
            3'd2: uop = '{op: UOP_WRIP_TGT, last: 1'b1};
            default: ;
          endcase
        end else begin
          case (upc)
            3'd0: uop = '{op: UOP_SS_PUSH,  last: 1'b0};
            3'd1: uop = '{op: UOP_SUBI_SP,  last: 1'b0};
            3'd2: uop = '{op: UOP_ST_RA,    last: 1'b0};
            3'd3: uop = '{op: UOP_WRIP_TGT, last: 1'b1};
            default: ;
          endcase
        end
      end
      MOP_RET: begin
        unique case (ctx)
          CTX_NATIVE: begin
            case (upc)
              3'd0: uop = '{op: UOP_LD_RA,   last: 1'b0};
              3'd1: uop = '{op: UOP_ADDI_SP, last: 1'b0};
              3'd2: uop = '{op: UOP_WRIP_RA, last: 1'b1};
              default: ;
            endcase
          end
          CTX_RAS_ASSIST: begin
            case (upc)
              3'd0: uop = '{op: UOP_LD_RA,   last: 1'b0};
              3'd1: uop = '{op: UOP_ADDI_SP, last: 1'b0};
              3'd2: uop = '{op: UOP_RAS_CMP, last: 1'b0};
              3'd3: uop = '{op: UOP_WRIP_RA, last: 1'b1};
              default: ;
            endcase
          end
          default: begin   // CTX_SS_CHECK, CTX_SS_ONLY
            case (upc)
              3'd0: uop = '{op: UOP_LD_RA,    last: 1'b0};
              3'd1: uop = '{op: UOP_ADDI_SP,  last: 1'b0};
              3'd2: uop = '{op: UOP_SS_CHECK, last: 1'b0};
              3'd3: uop = '{op: UOP_WRIP_RA,  last: 1'b1};
              default: ;
            endcase
          end
        endcase
      end
      default: begin
        if (upc == '0) uop = '{op: UOP_REGULAR, last: 1'b1};
      end
    endcase
  end
endmodule
