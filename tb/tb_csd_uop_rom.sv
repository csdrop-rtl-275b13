// tb_csd_uop_rom -- exhaustive check of the micro-op store against the
// translation table written out independently below.
module tb_csd_uop_rom;
  import csdrop_pkg::*;
  mop_kind_e        kind;
  ctx_e             ctx;
  logic [UPC_W-1:0] upc;
  rom_uop_t         uop;

  csd_uop_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expected(mop_kind_e k, ctx_e c, output uop_op_e seq [$]);
    seq = {};
    if (k == MOP_CALL) begin
      if (c != CTX_NATIVE) seq.push_back(UOP_SS_PUSH);
      seq.push_back(UOP_SUBI_SP); seq.push_back(UOP_ST_RA); seq.push_back(UOP_WRIP_TGT);
    end else if (k == MOP_RET) begin
      seq.push_back(UOP_LD_RA); seq.push_back(UOP_ADDI_SP);
      if (c == CTX_RAS_ASSIST) seq.push_back(UOP_RAS_CMP);
      if (c == CTX_SS_CHECK || c == CTX_SS_ONLY) seq.push_back(UOP_SS_CHECK);
      seq.push_back(UOP_WRIP_RA);
    end else begin
      seq.push_back(UOP_REGULAR);
    end
  endfunction

  initial begin
    uop_op_e seq [$];
    for (int k = 0; k < 3; k++) begin
      for (int c = 0; c < NUM_CTX; c++) begin
        expected(mop_kind_e'(k), ctx_e'(c), seq);
        for (int u = 0; u < 8; u++) begin
          uop_op_e eop;
          logic    elast;
          kind = mop_kind_e'(k); ctx = ctx_e'(c); upc = UPC_W'(u);
          #1;
          eop   = (u < seq.size()) ? seq[u] : UOP_NOP;
          elast = (u >= seq.size() - 1);
          checks++;
          if (uop.op != eop || uop.last != elast) begin
            failures++;
            $display("FAIL: kind %0d ctx %0d upc %0d: got %s/%0d want %s/%0d",
                     k, c, u, uop.op.name(), uop.last, eop.name(), elast);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
