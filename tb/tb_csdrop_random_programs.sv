// tb_csdrop_random_programs -- randomized whole-program test of the plug-in.
//
// A program model generates random call trees with local-variable frames of
// varying size, setjmp/longjmp pairs (non-local returns that leave stale
// shadow stack entries) and two kinds of attack: an overwritten return slot
// (ROP) and a return with a displaced stack pointer (a function entered
// part-way). Each "process" runs in one of the three modes (protection off,
// RAS assisted, checked on every ret). The model knows which returns are
// legitimate, so it expects no fault on them and a fault on every attack
// while protection is on; with protection off attacks must go through.
// The RAS hit rate over the legitimate returns is printed.
module tb_csdrop_random_programs;
  import csdrop_pkg::*;

  localparam addr_t SS_BASE  = 64'h0000_8000_0080_0000;
  localparam addr_t USP_INIT = 64'h0000_7fff_ffff_f000;
  localparam int    NPROC    = 12;
  localparam int    NOPS     = 1200;
  localparam int    MAXDEPTH = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       msr_we = 1'b0;
  logic [1:0] msr_wdata = '0;
  logic       ss_init = 1'b0;
  addr_t      ss_base = SS_BASE;
  logic       ss_load = 1'b0;
  addr_t      ss_load_top = '0, ss_load_bottom = '0;
  logic       mop_valid = 1'b0, mop_ready;
  mop_t       mop = '0;
  logic       uop_valid, uop_ready, uop_squash;
  uop_t       uop;
  logic       acc_valid = 1'b0, acc_priv = 1'b0, acc_fault;
  addr_t      acc_addr = '0;
  logic [3:0] acc_size = 4'd8;
  logic       mem_req_valid, mem_req_ready, mem_we, mem_rvalid;
  addr_t      mem_addr, mem_wdata, mem_rdata;
  logic       rop_fault, rop_detected, ss_priv_fault;
  addr_t      rop_fault_pc, ss_top, ss_bottom;
  logic [31:0] cnt_used_ras, cnt_ras_incorrect, cnt_ss_checks, cnt_ss_pops;

  csdrop_top dut (.*);

  phys_mem_model #(.LAT (3), .STALL_PCT (10)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_ready (mem_req_ready),
    .we (mem_we), .addr (mem_addr), .wdata (mem_wdata),
    .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) uop_ready <= ($urandom % 100) >= 10;

  logic last_seen;
  always @(posedge clk) if (uop_valid && uop_ready && uop.last) last_seen = 1'b1;

  task automatic send(input mop_t m, output bit faulted);
    int guard = 0;
    @(negedge clk);
    last_seen = 1'b0;
    mop_valid = 1'b1;
    mop       = m;
    @(posedge clk);
    while (!mop_ready) @(posedge clk);
    @(negedge clk);
    mop_valid = 1'b0;
    faulted   = 1'b0;
    while (!last_seen && !faulted) begin
      @(posedge clk);
      #1;
      if (rop_fault) faulted = 1'b1;
      guard++;
      if (guard > 20000) begin
        check(0, "macro-op never completed");
        break;
      end
    end
  endtask

  // ---------------- program model ----------------
  typedef struct { addr_t slot; } frame_t;
  frame_t frames [$];
  addr_t  ustack [addr_t];
  addr_t  rsp;
  bit     jb_valid;
  addr_t  jb_rsp, jb_ra;
  int     jb_depth;

  function automatic addr_t call_site(int i);
    return 64'h40_1000 + 64'(i) * 64'h40;
  endfunction

  task automatic do_call(input addr_t pc);
    mop_t m;
    bit   f;
    m = '0;
    m.kind = MOP_CALL; m.pc = pc; m.next_pc = pc + 5; m.target = 64'h40_8000; m.sp = rsp;
    send(m, f);
    check(!f, "call faulted");
    rsp = rsp - 8;
    ustack[rsp] = pc + 5;
    frames.push_back('{slot: rsp});
    rsp = rsp - 64'(16 * ($urandom % 4));       // callee's locals
  endtask

  // legitimate return of the innermost frame
  task automatic do_ret(output bit f);
    mop_t   m;
    frame_t fr;
    fr  = frames.pop_back();
    rsp = fr.slot + 8;
    m = '0;
    m.kind = MOP_RET; m.pc = 64'h40_9000; m.ret_ra = ustack[fr.slot]; m.sp = rsp;
    send(m, f);
  endtask

  int n_legit_ret, n_false_alarm, n_longjmp, n_rop, n_rop_caught, n_sp_att, n_sp_caught,
      n_unprot_att, n_unprot_through, n_multi_pop;

  initial begin
    bit f;
    int mode;
    int used0, inc0, pops0;
    int legit_used = 0, legit_inc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPROC; p++) begin
      mode = p % 3;                                  // 0 off, 1 RAS assisted, 2 every ret
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
      @(negedge clk); ss_init = 1'b1;
      @(negedge clk); ss_init = 1'b0;
      @(negedge clk); msr_we = 1'b1; msr_wdata = (mode == 0) ? 2'b00 : (mode == 1) ? 2'b11 : 2'b01;
      @(negedge clk); msr_we = 1'b0;
      frames.delete(); ustack.delete();
      rsp = USP_INIT; jb_valid = 1'b0;
      for (int op = 0; op < NOPS; op++) begin
        int r;
        r = $urandom % 100;
        if (op == NOPS - 1) r = 99;                  // end each process with an attack
        else if (r >= 97) r = 0;
        if (r < 45 && frames.size() < MAXDEPTH || frames.size() == 0 && r < 90) begin
          do_call(call_site($urandom % 24));
        end else if (r < 88) begin
          used0 = cnt_used_ras; inc0 = cnt_ras_incorrect; pops0 = cnt_ss_pops;
          do_ret(f);
          n_legit_ret++;
          check(!f, "legitimate return reported as an attack");
          if (f) n_false_alarm++;
          legit_used += cnt_used_ras - used0;
          legit_inc  += cnt_ras_incorrect - inc0;
          if (cnt_ss_pops - pops0 > 1) n_multi_pop++;
          if (jb_valid && frames.size() < jb_depth) jb_valid = 1'b0;
        end else if (r < 93) begin
          // setjmp: a call that returns at once; remembers where it returned to
          do_call(64'h40_5000);
          do_ret(f);
          check(!f, "setjmp return faulted");
          jb_valid = 1'b1; jb_rsp = rsp; jb_ra = ustack[rsp - 8]; jb_depth = frames.size();
        end else if (r < 97 && op != NOPS - 1) begin
          // longjmp, possibly from deeper calls: no ret is executed
          if (jb_valid) begin
            int extra;
            extra = $urandom % 4;
            for (int k = 0; k < extra && frames.size() < MAXDEPTH; k++) do_call(call_site(24 + k));
            do_call(64'h40_6000);
            while (frames.size() > jb_depth) void'(frames.pop_back());
            rsp = jb_rsp;
            n_longjmp++;
          end
        end else if (op == NOPS - 1) begin
          // final attack on the innermost frame's return
          mop_t   m;
          frame_t fr;
          bit     rop;
          rop = ((p / 3) % 2) == 0;             // alternate attack kinds per 3 processes
          if (frames.size() == 0) do_call(call_site(0));
          if (!rop) begin
            // a tampered setjmp buffer: longjmp resumes part-way into a
            // function, and its caller later returns with rsp displaced
            do_call(64'h40_5000);
            do_ret(f);
            jb_rsp = rsp; jb_depth = frames.size();
            do_call(call_site(30));
            do_call(64'h40_6000);
            while (frames.size() > jb_depth) void'(frames.pop_back());
            rsp = jb_rsp;
          end
          fr  = frames[$];
          m = '0;
          m.kind = MOP_RET; m.pc = 64'h40_9abc;
          m.ret_ra = rop ? 64'h45_0000 + 64'($urandom % 4096) * 8 : ustack[fr.slot];
          m.sp = fr.slot + 8 + (rop ? 64'd0 : 64'h10_0000);
          send(m, f);
          if (mode == 0) begin
            n_unprot_att++;
            check(!f, "attack faulted with protection off");
            if (!f) n_unprot_through++;
          end else if (rop) begin
            n_rop++;
            check(f && rop_fault_pc == 64'h40_9abc, "ROP return not caught");
            if (f) n_rop_caught++;
          end else begin
            n_sp_att++;
            check(f, "displaced stack pointer not caught");
            if (f) n_sp_caught++;
          end
        end else begin
          do_call(call_site($urandom % 24));
        end
      end
      check(!ss_priv_fault, "plug-in request refused");
    end
    check(n_legit_ret > 1000 && n_false_alarm == 0, "legitimate returns");
    check(n_longjmp > 0 && n_multi_pop > 0, "non-local returns exercised");
    check(n_rop > 0 && n_rop_caught == n_rop, "ROP returns caught");
    check(n_sp_att > 0 && n_sp_caught == n_sp_att, "stack pointer attacks caught");
    check(n_unprot_att > 0 && n_unprot_through == n_unprot_att, "attacks pass unprotected");
    check(legit_inc > 0, "RAS misses occurred");
    $display("legit returns %0d, longjmps %0d, multi-entry pops %0d, RAS-checked returns %0d, RAS misses %0d (hit rate %0.4f)",
             n_legit_ret, n_longjmp, n_multi_pop, legit_used, legit_inc,
             legit_used ? 1.0 - real'(legit_inc) / real'(legit_used) : 0.0);
    $display("attacks: rop %0d/%0d caught, sp %0d/%0d caught, unprotected %0d/%0d through",
             n_rop_caught, n_rop, n_sp_caught, n_sp_att, n_unprot_through, n_unprot_att);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
