// tb_csd_dispatcher -- MSR writes, context choice and RAS requests of the
// dispatcher, with random downstream back-pressure.
module tb_csd_dispatcher;
  import csdrop_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       msr_we = 1'b0, msr_en, msr_ras;
  logic [1:0] msr_wdata = '0;
  logic       in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  mop_t       in_mop = '0;
  dmop_t      out;
  logic       ras_push, ras_pop, ras_top_valid = 1'b0;
  addr_t      ras_push_addr, ras_top = '0;
  always #5 clk = ~clk;

  csd_dispatcher dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] m;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(!msr_en && !msr_ras, "MSR resets to protection off");
    m = 2'b00;
    for (int i = 0; i < 1000; i++) begin
      ctx_e exp_ctx;
      @(negedge clk);
      if ($urandom % 10 == 0) begin
        msr_we = 1'b1; msr_wdata = 2'($urandom);
        @(negedge clk);
        msr_we = 1'b0; m = msr_wdata;
      end
      in_valid      = ($urandom % 4) != 0;
      in_mop        = '0;
      in_mop.kind   = mop_kind_e'($urandom % 3);
      in_mop.pc     = {$urandom, $urandom};
      in_mop.next_pc = in_mop.pc + 5;
      out_ready     = ($urandom % 3) != 0;
      ras_top_valid = ($urandom % 4) != 0;
      ras_top       = {$urandom, $urandom};
      #1;
      exp_ctx = !m[0] ? CTX_NATIVE : (m[1] ? CTX_RAS_ASSIST : CTX_SS_ONLY);
      check(msr_en == m[0] && msr_ras == m[1], "MSR value");
      check(out_valid == in_valid && in_ready == out_ready, "handshake");
      check(out.ctx == exp_ctx, "context choice");
      check(out.mop == in_mop, "macro-op forwarded");
      check(out.pred_valid == (in_mop.kind == MOP_RET && ras_top_valid) &&
            out.pred == ras_top, "RAS prediction attached to ret");
      check(ras_push == (in_valid && out_ready && in_mop.kind == MOP_CALL) &&
            ras_push_addr == in_mop.next_pc, "RAS push on accepted call");
      check(ras_pop == (in_valid && out_ready && in_mop.kind == MOP_RET), "RAS pop on accepted ret");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
