// tb_ss_engine -- random push / conceptual pop / check commands on the
// shadow stack engine with a memory model, compared with a queue model of
// the shadow stack. Check expectations are chosen so that matches at various
// depths, stack-pointer-only mismatches and complete misses all occur.
module tb_ss_engine;
  import csdrop_pkg::*;
  localparam addr_t BASE = 64'h0000_8000_0080_0000;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    init = 1'b0, load = 1'b0, start = 1'b0, busy, done, pass, entry_popped, ss_empty;
  addr_t   load_top = '0, load_bottom = '0;
  addr_t   base = BASE, ra = '0, sp = '0, ss_top, ss_bottom;
  ss_cmd_e cmd = SS_CMD_PUSH;
  logic    mem_req_valid, mem_req_ready, mem_we, mem_priv, mem_rvalid;
  addr_t   mem_addr, mem_wdata, mem_rdata;
  always #5 clk = ~clk;

  ss_engine dut (.*);
  phys_mem_model #(.LAT (2), .STALL_PCT (30)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_ready (mem_req_ready), .we (mem_we),
    .addr (mem_addr), .wdata (mem_wdata), .rvalid (mem_rvalid), .rdata (mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pops_seen;
  always @(posedge clk) if (entry_popped) pops_seen++;
  always @(posedge clk) if (mem_req_valid) assert (mem_priv) else begin
    failures++; $display("FAIL: unprivileged shadow stack request");
  end

  // returns pass and the number of cycles from start to done
  task automatic run(input ss_cmd_e c, input addr_t r, input addr_t s, output bit p, output int cyc);
    @(negedge clk);
    cmd = c; ra = r; sp = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    p = pass;
  endtask

  typedef struct { addr_t ra; addr_t sp; } ent_t;
  ent_t model [$];

  initial begin
    bit p;
    int cyc, n_pass_deep = 0, n_fail = 0, n_sp_only = 0, exp_pops;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    check(ss_top == BASE && ss_bottom == BASE && ss_empty, "init");
    for (int i = 0; i < 600; i++) begin
      int r;
      r = $urandom % 100;
      if (r < 50 || model.size() == 0 && r < 70) begin
        ent_t e;
        e.ra = 64'h40_0000 + 64'($urandom % 8) * 64'h10;
        e.sp = 64'h7fff_f000 - 64'($urandom % 4) * 64'h40;
        run(SS_CMD_PUSH, e.ra, e.sp, p, cyc);
        model.push_back(e);
        check(p, "push passes");
        check(u_mem.peek(ss_top) == e.ra && u_mem.peek(ss_top + 8) == e.sp, "pushed entry in memory");
      end else if (r < 70) begin
        run(SS_CMD_CPOP, 64'h0, 64'h0, p, cyc);
        if (model.size() != 0) void'(model.pop_back());
        check(p && cyc == 2, "conceptual pop takes two cycles");
      end else begin
        // choose the expectation
        ent_t  e;
        int    k, kind;
        bit    exp_pass;
        kind = $urandom % 3;
        if (kind == 0 && model.size() != 0) begin          // a real entry
          k = $urandom % model.size();
          e = model[k];
        end else if (kind == 1 && model.size() != 0) begin // right address, wrong sp
          k = $urandom % model.size();
          e = model[k];
          e.sp = e.sp + 64'h8;
        end else begin                                     // address never pushed
          e.ra = 64'h44e140; e.sp = 64'h7fff_f000;
        end
        // model: pop from the top until both match
        exp_pass = 1'b0; exp_pops = 0;
        while (model.size() != 0) begin
          ent_t t;
          t = model.pop_back();
          exp_pops++;
          if (t.ra == e.ra && t.sp == e.sp) begin exp_pass = 1'b1; break; end
        end
        pops_seen = 0;
        run(SS_CMD_CHECK, e.ra, e.sp, p, cyc);
        check(p == exp_pass, $sformatf("check result (kind %0d)", kind));
        check(pops_seen == exp_pops, $sformatf("entries popped %0d want %0d", pops_seen, exp_pops));
        if (p && exp_pops > 1) n_pass_deep++;
        if (!p) n_fail++;
        if (kind == 1 && !p) n_sp_only++;
      end
      check(ss_top == BASE - addr_t'(16 * model.size()) && ss_empty == (model.size() == 0),
            "shadow stack pointer");
    end
    check(n_pass_deep > 0 && n_fail > 0 && n_sp_only > 0, "check outcomes covered");
    $display("deep passes %0d fails %0d sp-only fails %0d", n_pass_deep, n_fail, n_sp_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
