// tb_csdrop_top -- end-to-end test of the CSDrop plug-in.
//
// A small program model plays the core: it keeps a user stack (rsp and the
// words on it), turns calls and rets into macro-ops, and follows the
// returned micro-ops. Scenarios:
//   1. nested calls within the RAS depth: every ret hits in the RAS;
//   2. recursion deeper than the RAS: overflowed rets miss, are squashed,
//      re-decoded and pass the shadow stack check;
//   3. the setjmp/longjmp program (main/first/setjmp/second/third/longjmp/
//      auxiliary): the non-local return is tolerated by popping stale entries;
//   4. a corrupted setjmp buffer that leaves the stack pointer off: caught by
//      the stack pointer comparison although the return address matches;
//   5. the 3-, 4- and 5-gadget return-oriented payloads: the first hijacked
//      ret faults with protection on; with protection off every gadget runs;
//   6. protection without RAS assistance: every ret checks the shadow stack;
//   7. data accesses into the shadow stack: refused unless privileged;
//   8. a context switch: a second process gets its own shadow stack, and
//      the first resumes with its saved pointers and returns correctly;
//   9. a new process start re-initialises the shadow stack.
// Each mechanism is counted and must occur at least once. Expected results
// come from the program model, not from the design.
module tb_csdrop_top;
  import csdrop_pkg::*;

  localparam addr_t SS_BASE  = 64'h0000_8000_0080_0000;  // between user and kernel space
  localparam addr_t USP_INIT = 64'h0000_7fff_ffff_f000;

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

  phys_mem_model #(.LAT (2), .STALL_PCT (20)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_ready (mem_req_ready),
    .we (mem_we), .addr (mem_addr), .wdata (mem_wdata),
    .rvalid (mem_rvalid), .rdata (mem_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- back-end model: micro-op sink ----------------
  always @(negedge clk) uop_ready <= ($urandom % 100) >= 15;

  uop_op_e seen [$];
  int      squashes;
  logic    last_seen;
  ctx_e    last_ctx;
  always @(posedge clk) begin
    if (uop_squash) begin
      seen.delete();
      squashes++;
    end
    if (uop_valid && uop_ready) begin
      seen.push_back(uop.op);
      last_ctx = uop.ctx;
      if (uop.last) last_seen = 1'b1;
    end
  end

  // ---------------- program model ----------------
  addr_t  rsp;
  addr_t  ustack [addr_t];
  addr_t  pc_model;

  // mechanism counters
  int n_ras_hit, n_ras_miss_pass, n_multi_pop, n_rop_caught, n_sp_caught,
      n_gadgets_run, n_acc_fault, n_acc_ok, n_ss_only_check, n_init, n_stall, n_ctx_switch;

  always @(posedge clk) if (uop_valid && !uop_ready) n_stall++;

  // Send one macro-op and wait until its last micro-op leaves or it faults.
  task automatic send(input mop_t m, output bit faulted);
    int guard = 0;
    @(negedge clk);
    seen.delete();
    squashes  = 0;
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
      if (guard > 2000) begin
        check(0, "macro-op never completed");
        break;
      end
    end
  endtask

  task automatic do_call(input addr_t pc, input addr_t target, input bit protected_ctx);
    mop_t m;
    bit   f;
    m        = '0;
    m.kind   = MOP_CALL;
    m.pc     = pc;
    m.next_pc = pc + 5;
    m.target = target;
    m.sp     = rsp;
    send(m, f);
    rsp = rsp - 8;
    ustack[rsp] = pc + 5;
    pc_model = target;
    check(!f, "call raised a fault");
    check(seen.size() == 3 && seen[0] == UOP_SUBI_SP && seen[1] == UOP_ST_RA &&
          seen[2] == UOP_WRIP_TGT, "call micro-op sequence");
    check(squashes == 0, "call squashed");
  endtask

  // Returns 1 if the ret faulted. `sp_skew` models a stack pointer that is
  // off by that many bytes when the ret executes.
  task automatic do_ret(input addr_t pc, output bit faulted, output int nsq,
                        input addr_t sp_skew = 0);
    mop_t  m;
    addr_t ra;
    ra       = ustack.exists(rsp) ? ustack[rsp] : 64'd0;
    rsp      = rsp + 8;
    m        = '0;
    m.kind   = MOP_RET;
    m.pc     = pc;
    m.ret_ra = ra;
    m.sp     = rsp + sp_skew;
    send(m, faulted);
    nsq = squashes;
    if (!faulted) begin
      check(seen.size() == 3 && seen[0] == UOP_LD_RA && seen[1] == UOP_ADDI_SP &&
            seen[2] == UOP_WRIP_RA, "ret micro-op sequence");
      pc_model = ra;
    end
  endtask

  task automatic set_msr(input logic [1:0] v);
    @(negedge clk);
    msr_we = 1'b1; msr_wdata = v;
    @(negedge clk);
    msr_we = 1'b0;
  endtask

  task automatic new_process();
    @(negedge clk);
    ss_init = 1'b1;
    @(negedge clk);
    ss_init = 1'b0;
    rsp = USP_INIT;
    ustack.delete();
    check(ss_top == ss_base && ss_bottom == ss_base, "shadow stack initialised empty");
    n_init++;
  endtask

  // ---------------- scenarios ----------------
  addr_t ret_pcs [$];
  addr_t call_sites [$];

  initial begin
    bit f;
    int nsq;
    int u0, i0, c0, p0;
    addr_t jb_rsp, jb_ra, ss_top_before;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    new_process();
    set_msr(2'b11);   // protection on, RAS assisted

    // 1. nested calls inside the RAS depth
    u0 = cnt_used_ras; i0 = cnt_ras_incorrect; c0 = cnt_ss_checks;
    for (int d = 0; d < 5; d++) begin
      do_call(64'h40_1000 + 64'(d) * 64'h100, 64'h40_1000 + 64'(d + 1) * 64'h100, 1);
      check(ss_top == SS_BASE - 64'(16 * (d + 1)), "shadow push moves top");
      check(u_mem.peek(ss_top) == 64'h40_1000 + 64'(d) * 64'h100 + 5, "shadow entry holds return address");
      check(u_mem.peek(ss_top + 8) == rsp + 8, "shadow entry holds caller stack pointer");
    end
    for (int d = 4; d >= 0; d--) begin
      do_ret(64'h40_1000 + 64'(d + 1) * 64'h100 + 64'h80, f, nsq);
      check(!f && nsq == 0, "in-depth ret passes without re-decode");
      check(pc_model == 64'h40_1000 + 64'(d) * 64'h100 + 5, "ret reaches caller");
      if (!f && nsq == 0) n_ras_hit++;
    end
    check(cnt_used_ras - u0 == 5 && cnt_ras_incorrect == i0, "RAS statistics, nested calls");
    check(cnt_ss_checks == c0, "no shadow stack read on RAS hits");
    check(ss_top == SS_BASE, "conceptual pops restore the shadow stack");

    // 2. recursion deeper than the RAS (16 entries)
    u0 = cnt_used_ras; i0 = cnt_ras_incorrect; c0 = cnt_ss_checks;
    for (int d = 0; d < 20; d++) do_call(64'h40_2000, 64'h40_2000 - 64'h10, 1);
    for (int d = 0; d < 20; d++) begin
      do_ret(64'h40_2040, f, nsq);
      check(!f, "deep recursion ret passes");
      check(pc_model == 64'h40_2005, "deep recursion ret target");
      if (d < 16) begin
        check(nsq == 0, "ret within RAS depth hits");
      end else begin
        check(nsq == 1 && last_ctx == CTX_SS_CHECK, "overflowed ret re-decoded under the check context");
        if (nsq == 1) n_ras_miss_pass++;
      end
    end
    check(cnt_used_ras - u0 == 20 && cnt_ras_incorrect - i0 == 4, "RAS statistics, overflow");
    check(cnt_ss_checks - c0 == 4, "one shadow check per RAS miss");
    check(ss_top == SS_BASE, "shadow stack empty after recursion");

    // 3. setjmp/longjmp program
    p0 = cnt_ss_pops;
    do_call(64'h40_0100, 64'h40_0200, 1);            // main -> first
    do_call(64'h40_0210, 64'h40_5000, 1);            // first -> setjmp
    jb_rsp = rsp + 8;  jb_ra = ustack[rsp];          // setjmp saves its context
    do_ret(64'h40_5040, f, nsq);                      // setjmp returns 0
    check(!f && pc_model == 64'h40_0215, "setjmp returns to first");
    do_call(64'h40_0220, 64'h40_0300, 1);            // first -> second
    do_call(64'h40_0310, 64'h40_0400, 1);            // second -> third
    do_call(64'h40_0410, 64'h40_6000, 1);            // third -> longjmp
    ss_top_before = ss_top;
    // longjmp: restores rsp and jumps (no ret) to setjmp's return address
    rsp = jb_rsp;  pc_model = jb_ra;
    check(ss_top == ss_top_before, "longjmp does not touch the shadow stack");
    do_call(64'h40_0230, 64'h40_0700, 1);            // first -> auxiliary
    do_ret(64'h40_0740, f, nsq);                      // auxiliary returns
    check(!f && nsq == 0 && pc_model == 64'h40_0235, "auxiliary returns to first");
    do_ret(64'h40_0250, f, nsq);                      // first returns to main
    check(!f, "non-local return is not reported as an attack");
    check(nsq == 1, "first's return misses in the RAS");
    check(pc_model == 64'h40_0105, "back to main");
    check(cnt_ss_pops - p0 == 4, "stale longjmp/third/second entries popped before first's");
    check(ss_top == SS_BASE, "shadow stack consistent after longjmp");
    if (!f && cnt_ss_pops - p0 == 4) n_multi_pop++;

    // 4. corrupted setjmp buffer: control resumes part-way into a function,
    //    so the caller later returns with the right address but a wrong rsp
    do_call(64'h40_0100, 64'h40_0200, 1);            // main -> first
    do_call(64'h40_0210, 64'h40_5000, 1);            // first -> setjmp
    do_ret(64'h40_5040, f, nsq);
    do_call(64'h40_0220, 64'h40_0300, 1);            // first -> second
    do_call(64'h40_0410, 64'h40_6000, 1);            // second -> longjmp
    rsp = jb_rsp;                                     // longjmp into auxiliary's middle
    do_ret(64'h40_0250, f, nsq, 64'd32);              // first returns, rsp 32 bytes off
    check(f, "stack pointer mismatch is reported");
    check(rop_detected && rop_fault_pc == 64'h40_0250, "fault names the offending ret");
    if (f) n_sp_caught++;

    // 5. return-oriented payloads (3, 4 and 5 gadgets), protection on and off
    for (int prot = 1; prot >= 0; prot--) begin
      for (int g = 3; g <= 5; g++) begin
        addr_t chain [$];
        case (g)
          3: chain = '{64'h404e16, 64'h453709, 64'h44e140};
          4: chain = '{64'h491176, 64'h404e16, 64'h453709, 64'h40044a};
          default: chain = '{64'h491176, 64'h404e16, 64'h4536e6, 64'h404f37, 64'h40044a};
        endcase
        rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
        new_process();
        set_msr(prot ? 2'b11 : 2'b00);
        do_call(64'h40_0100, 64'h40_2500, prot);     // main -> victim (memcpy overflow)
        // overflow: return slot and the words above it become the payload;
        // every gadget ends in ret, so each gadget address is returned to
        for (int k = 0; k < chain.size(); k++) ustack[rsp + 64'(8 * k)] = chain[k];
        do_ret(64'h40_2580, f, nsq);                  // victim's ret
        if (prot) begin
          check(f, $sformatf("%0d-gadget attack detected", g));
          check(rop_fault_pc == 64'h40_2580, "fault at the victim's ret");
          if (f) n_rop_caught++;
        end else begin
          int ran;
          ran = 0;
          check(!f && pc_model == chain[0], "unprotected: first gadget reached");
          if (!f) ran++;
          for (int k = 1; k < chain.size(); k++) begin
            do_ret(chain[k-1] + 64'h8, f, nsq);       // each gadget's ret
            if (!f && pc_model == chain[k]) ran++;
          end
          check(ran == chain.size(), $sformatf("unprotected: all %0d gadgets run", g));
          check(!rop_detected, "unprotected: no fault");
          n_gadgets_run += ran;
        end
      end
    end

    // 6. protection without RAS assistance
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    new_process();
    set_msr(2'b01);
    c0 = cnt_ss_checks; u0 = cnt_used_ras;
    for (int d = 0; d < 3; d++) do_call(64'h40_3000 + 64'(d) * 64'h40, 64'h40_3800, 1);
    for (int d = 2; d >= 0; d--) begin
      do_ret(64'h40_3900, f, nsq);
      check(!f && nsq == 0 && pc_model == 64'h40_3005 + 64'(d) * 64'h40, "check-every-ret mode");
      check(last_ctx == CTX_SS_ONLY, "ret decoded in the check-every-ret context");
    end
    check(cnt_ss_checks - c0 == 3, "every ret read the shadow stack");
    check(cnt_used_ras == u0, "RAS not consulted");
    n_ss_only_check += cnt_ss_checks - c0;
    ustack[rsp] = 64'h404e16;
    do_call(64'h40_3000, 64'h40_3800, 1);
    ustack[rsp] = 64'h404e16;                         // overwrite the return slot
    do_ret(64'h40_3900, f, nsq);
    check(f, "attack detected without RAS assistance");

    // 7. shadow stack access control
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    new_process();
    set_msr(2'b11);
    do_call(64'h40_0100, 64'h40_0200, 1);
    do_call(64'h40_0210, 64'h40_0300, 1);
    for (int k = 0; k < 40; k++) begin
      addr_t a;
      bit    pv, exp_f;
      a  = SS_BASE - 64'd48 + 64'($urandom % 64);
      pv = ($urandom % 4) == 0;
      @(negedge clk);
      acc_valid = 1'b1; acc_addr = a; acc_priv = pv; acc_size = 4'd8;
      #1;
      exp_f = !pv && (a < SS_BASE) && (a + 8 > SS_BASE - 32);
      check(acc_fault == exp_f, $sformatf("access check at %h priv %0d", a, pv));
      if (acc_fault) n_acc_fault++; else n_acc_ok++;
    end
    @(negedge clk);
    acc_valid = 1'b1; acc_addr = ss_top; acc_priv = 1'b0;
    set_msr(2'b00);
    #1 check(!acc_fault, "no access check with protection off");
    @(negedge clk) acc_valid = 1'b0;
    check(!ss_priv_fault, "plug-in accesses never refused");

    // 8. context switch between two processes with separate shadow stacks
    begin
      addr_t a_top, a_bottom, a_rsp;
      addr_t a_ustack [addr_t];
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
      new_process();                                   // process A
      set_msr(2'b11);
      do_call(64'h40_0100, 64'h40_0200, 1);
      do_call(64'h40_0210, 64'h40_0300, 1);
      do_call(64'h40_0310, 64'h40_0400, 1);
      a_top = ss_top; a_bottom = ss_bottom; a_rsp = rsp; a_ustack = ustack;   // OS saves A
      ss_base = SS_BASE + 64'h0100_0000;               // B's shadow stack elsewhere
      new_process();                                   // process B
      for (int d = 0; d < 18; d++) do_call(64'h40_7000, 64'h40_7000 - 64'h10, 1);
      for (int d = 0; d < 18; d++) begin
        do_ret(64'h40_7040, f, nsq);
        check(!f, "process B returns");
      end
      @(negedge clk);                                  // OS restores A
      ss_load = 1'b1; ss_load_top = a_top; ss_load_bottom = a_bottom;
      @(negedge clk);
      ss_load = 1'b0;
      check(ss_top == a_top && ss_bottom == a_bottom, "pointers restored");
      rsp = a_rsp; ustack = a_ustack;
      p0 = cnt_ss_pops;
      for (int d = 2; d >= 0; d--) begin
        do_ret(64'h40_0480, f, nsq);
        check(!f && pc_model == ((d == 2) ? 64'h40_0315 : (d == 1) ? 64'h40_0215 : 64'h40_0105),
              "process A resumes and returns");
        check(nsq == 1, "A's returns miss in the RAS that B overwrote");
      end
      check(cnt_ss_pops - p0 == 3 && ss_top == a_bottom, "A's own shadow entries matched");
      if (cnt_ss_pops - p0 == 3) n_ctx_switch++;
      ss_base = SS_BASE;
    end

    // 9. second process start
    new_process();

    // mechanism coverage
    check(n_ras_hit > 0,        "mechanism: RAS hit with conceptual pop");
    check(n_ras_miss_pass > 0,  "mechanism: RAS overflow miss, squash and re-decode");
    check(n_multi_pop > 0,      "mechanism: repetitive check over stale entries");
    check(n_sp_caught > 0,      "mechanism: stack pointer mismatch detection");
    check(n_rop_caught == 3,    "mechanism: ROP payloads detected");
    check(n_gadgets_run == 12,  "mechanism: gadgets run with protection off");
    check(n_ss_only_check > 0,  "mechanism: check without RAS assistance");
    check(n_acc_fault > 0 && n_acc_ok > 0, "mechanism: access control");
    check(n_init > 1,           "mechanism: process start");
    check(n_stall > 0,          "mechanism: back-end stall");
    check(n_ctx_switch > 0,     "mechanism: context switch");
    $display("mechanisms: ras_hit=%0d ras_miss_redecode=%0d multi_pop=%0d sp_caught=%0d rop_caught=%0d gadgets_run=%0d ss_only_checks=%0d acc_fault=%0d acc_ok=%0d inits=%0d stalls=%0d ctx_switches=%0d",
             n_ras_hit, n_ras_miss_pass, n_multi_pop, n_sp_caught, n_rop_caught, n_gadgets_run,
             n_ss_only_check, n_acc_fault, n_acc_ok, n_init, n_stall, n_ctx_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
