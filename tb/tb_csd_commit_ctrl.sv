// tb_csd_commit_ctrl -- random plug-in micro-ops into the commit control.
// The testbench plays the decoder and a shadow stack engine with random
// latency and outcome, and checks the commands issued, the answers to the
// decoder, the fault output and the statistics counters against its own
// bookkeeping.
module tb_csd_commit_ctrl;
  import csdrop_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    exec_valid = 1'b0, exec_done, redecode, kill, squash;
  uop_op_e exec_op = UOP_SS_PUSH;
  dmop_t   exec_mop = '0;
  ctx_e    redecode_ctx;
  logic    ss_start, ss_busy = 1'b0, ss_done = 1'b0, ss_pass = 1'b0, ss_entry_popped = 1'b0;
  ss_cmd_e ss_cmd;
  addr_t   ss_ra, ss_sp, rop_fault_pc;
  logic    rop_fault, rop_detected;
  logic [31:0] cnt_used_ras, cnt_ras_incorrect, cnt_ss_checks, cnt_ss_pops;
  always #5 clk = ~clk;

  csd_commit_ctrl dut (.*);

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

  initial begin
    int m_used = 0, m_incorrect = 0, m_checks = 0, m_pops = 0, n_fault = 0, n_hit = 0, n_miss = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      bit      hit, pass_v, expect_ss;
      ss_cmd_e exp_cmd;
      addr_t   exp_ra;
      int      lat, pops;
      @(negedge clk);
      exec_mop = '0;
      exec_mop.mop.pc      = {$urandom, $urandom};
      exec_mop.mop.next_pc = exec_mop.mop.pc + 5;
      exec_mop.mop.sp      = {32'h7fff, $urandom};
      exec_mop.mop.ret_ra  = {32'h40, $urandom};
      exec_mop.pred_valid  = ($urandom % 8) != 0;
      hit = ($urandom % 2) == 0;
      exec_mop.pred = hit ? exec_mop.mop.ret_ra : exec_mop.mop.ret_ra ^ 64'h10;
      hit = hit && exec_mop.pred_valid;
      exec_op  = uop_op_e'(UOP_SS_PUSH + ($urandom % 3));
      exec_valid = 1'b1;
      #1;
      expect_ss = 1'b1;
      exp_ra    = exec_mop.mop.next_pc;
      exp_cmd   = SS_CMD_PUSH;
      if (exec_op == UOP_RAS_CMP) begin
        m_used++;
        if (!hit) begin m_incorrect++; expect_ss = 1'b0; n_miss++; end
        else begin exp_cmd = SS_CMD_CPOP; n_hit++; end
      end else if (exec_op == UOP_SS_CHECK) begin
        exp_cmd = SS_CMD_CHECK; exp_ra = exec_mop.mop.ret_ra; m_checks++;
      end
      if (!expect_ss) begin
        check(!ss_start && exec_done && redecode && squash && !kill &&
              redecode_ctx == CTX_SS_CHECK, "RAS miss: immediate re-decode and squash");
        @(negedge clk);
        exec_valid = 1'b0;
      end else begin
        check(ss_start && ss_cmd == exp_cmd && ss_ra == exp_ra && ss_sp == exec_mop.mop.sp &&
              !exec_done, $sformatf("engine command for %s", exec_op.name()));
        // engine model
        @(negedge clk);
        ss_busy = 1'b1;
        lat = $urandom % 5;
        pops = (exp_cmd == SS_CMD_CHECK) ? $urandom % 4 : 0;
        pass_v = (exp_cmd != SS_CMD_CHECK) || ($urandom % 3 != 0);
        for (int i = 0; i < lat + pops; i++) begin
          ss_entry_popped = (i < pops);
          m_pops += (i < pops);
          #1 check(!exec_done && !ss_start, "waits for the engine");
          @(negedge clk);
        end
        ss_entry_popped = 1'b0;
        ss_busy = 1'b0; ss_done = 1'b1; ss_pass = pass_v;
        #1;
        check(exec_done && !redecode, "answer when the engine is done");
        check(kill == !pass_v && squash == !pass_v, "failed check kills and squashes");
        @(negedge clk);
        ss_done = 1'b0;
        exec_valid = 1'b0;
        check(rop_fault == !pass_v, "fault pulse");
        if (!pass_v) begin
          check(rop_fault_pc == exec_mop.mop.pc && rop_detected, "fault address");
          n_fault++;
        end
      end
      #1;
      check(cnt_used_ras == 32'(m_used) && cnt_ras_incorrect == 32'(m_incorrect) &&
            cnt_ss_checks == 32'(m_checks) && cnt_ss_pops == 32'(m_pops), "statistics");
    end
    check(n_fault > 0 && n_hit > 0 && n_miss > 0, "outcomes covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
