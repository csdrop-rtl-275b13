// tb_csd_decoder -- random macro-ops through the decoder. The testbench
// plays the back end (random uop_ready) and the plug-in executor (random
// latency; RAS misses answered with a re-decode, failed checks with kill)
// and compares the micro-op stream with sequences written out below.
module tb_csd_decoder;
  import csdrop_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, in_ready, uop_valid, uop_ready = 1'b0;
  dmop_t   in = '0;
  uop_t    uop;
  logic    exec_valid, exec_done = 1'b0, redecode = 1'b0, kill = 1'b0;
  uop_op_e exec_op;
  dmop_t   exec_mop;
  ctx_e    redecode_ctx = CTX_SS_CHECK;
  always #5 clk = ~clk;

  csd_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Back-end stream as (ctx, op) pairs.
  typedef struct { ctx_e ctx; uop_op_e op; logic [UPC_W-1:0] upc; } obs_t;
  obs_t got [$];
  always @(negedge clk) uop_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (uop_valid && uop_ready) begin
    obs_t o;
    o.ctx = uop.ctx; o.op = uop.op; o.upc = uop.upc;
    got.push_back(o);
    if (uop.pc != in.mop.pc) begin failures++; $display("FAIL: uop pc"); end
  end

  // Plug-in executor: decisions are drawn per macro-op.
  bit miss_ras, fail_check;
  int n_exec, n_redecode, n_kill;
  initial begin
    forever begin
      @(negedge clk);
      exec_done = 1'b0; redecode = 1'b0; kill = 1'b0;
      if (exec_valid) begin
        if (exec_mop != in) begin failures++; $display("FAIL: exec_mop"); end
        repeat ($urandom % 3) @(negedge clk);
        n_exec++;
        exec_done = 1'b1;
        if (exec_op == UOP_RAS_CMP && miss_ras) begin redecode = 1'b1; n_redecode++; end
        if (exec_op == UOP_SS_CHECK && fail_check) begin kill = 1'b1; n_kill++; end
        @(negedge clk);
        exec_done = 1'b0; redecode = 1'b0; kill = 1'b0;
      end
    end
  end

  function automatic void add(ref obs_t q [$], input ctx_e c, input uop_op_e ops [$]);
    for (int i = 0; i < ops.size(); i++) begin
      obs_t o;
      o.ctx = c; o.op = ops[i]; o.upc = UPC_W'(i);
      q.push_back(o);
    end
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      obs_t exp [$];
      int   guard;
      in            = '0;
      in.mop.kind   = mop_kind_e'($urandom % 3);
      in.mop.pc     = {$urandom, $urandom};
      in.ctx        = ctx_e'(($urandom % 4 == 2) ? 3 : $urandom % 4);
      miss_ras      = ($urandom % 2) == 0;
      fail_check    = ($urandom % 3) == 0;
      exp = {};
      case (in.mop.kind)
        MOP_CALL:
          if (in.ctx == CTX_NATIVE) add(exp, in.ctx, '{UOP_SUBI_SP, UOP_ST_RA, UOP_WRIP_TGT});
          else begin
            exp.push_back('{in.ctx, UOP_SUBI_SP, 3'd1});
            exp.push_back('{in.ctx, UOP_ST_RA, 3'd2});
            exp.push_back('{in.ctx, UOP_WRIP_TGT, 3'd3});
          end
        MOP_RET: begin
          if (in.ctx == CTX_NATIVE) add(exp, in.ctx, '{UOP_LD_RA, UOP_ADDI_SP, UOP_WRIP_RA});
          else if (in.ctx == CTX_RAS_ASSIST && !miss_ras) begin
            add(exp, in.ctx, '{UOP_LD_RA, UOP_ADDI_SP});
            exp.push_back('{in.ctx, UOP_WRIP_RA, 3'd3});
          end else begin
            if (in.ctx == CTX_RAS_ASSIST) add(exp, in.ctx, '{UOP_LD_RA, UOP_ADDI_SP});
            add(exp, (in.ctx == CTX_RAS_ASSIST) ? CTX_SS_CHECK : in.ctx, '{UOP_LD_RA, UOP_ADDI_SP});
            if (!fail_check)
              exp.push_back('{(in.ctx == CTX_RAS_ASSIST) ? CTX_SS_CHECK : in.ctx, UOP_WRIP_RA, 3'd3});
          end
        end
        default: add(exp, in.ctx, '{UOP_REGULAR});
      endcase
      got = {};
      @(negedge clk);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      guard = 0;
      while (!in_ready && guard < 500) begin @(negedge clk); guard++; end
      check(got.size() == exp.size(), $sformatf("stream length %0d want %0d (kind %0d ctx %0d)",
            got.size(), exp.size(), in.mop.kind, in.ctx));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i].op == exp[i].op && got[i].ctx == exp[i].ctx && got[i].upc == exp[i].upc,
              $sformatf("uop %0d: %s ctx %0d upc %0d, want %s ctx %0d upc %0d", i,
                        got[i].op.name(), got[i].ctx, got[i].upc, exp[i].op.name(), exp[i].ctx, exp[i].upc));
    end
    check(n_redecode > 0 && n_kill > 0 && n_exec > n_redecode + n_kill, "executor outcomes covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
