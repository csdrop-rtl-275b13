// tb_ss_ptr_regs -- random init/load/push/pop sequence on the shadow stack
// pointers against an integer model.
module tb_ss_ptr_regs;
  import csdrop_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  init = 1'b0, load = 1'b0, push = 1'b0, pop = 1'b0, empty;
  addr_t base = '0, load_top = '0, load_bottom = '0, top, bottom;
  always #5 clk = ~clk;

  ss_ptr_regs dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t m_top, m_bottom;
    int    empty_pops = 0, loads = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m_top = '0; m_bottom = '0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      @(negedge clk);
      r = $urandom % 100;
      init = (r < 3); load = (r >= 3 && r < 6); push = (r >= 6 && r < 55); pop = (r >= 55);
      base = {16'h0000, 16'h8000, $urandom} & ~64'hf;
      load_bottom = {16'h0000, 16'h8001, $urandom} & ~64'hf;
      load_top    = load_bottom - 64'(16 * ($urandom % 8));
      @(negedge clk);
      if (init) begin m_top = base; m_bottom = base; end
      else if (load) begin m_top = load_top; m_bottom = load_bottom; loads++; end
      else if (push) m_top -= 16;
      else if (pop) begin if (m_top != m_bottom) m_top += 16; else empty_pops++; end
      init = 1'b0; load = 1'b0; push = 1'b0; pop = 1'b0;
      #1;
      checks++;
      if (bottom != m_bottom || top != m_top || empty != (m_top == m_bottom)) begin
        failures++;
        $display("FAIL: step %0d top %h bottom %h empty %0d, want %h %h", i, top, bottom, empty, m_top, m_bottom);
      end
    end
    checks++;
    if (empty_pops == 0 || loads == 0) begin failures++; $display("FAIL: no pop on empty stack"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
