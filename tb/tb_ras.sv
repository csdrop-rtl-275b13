// tb_ras -- random push/pop test of the return address stack against a
// queue model that keeps at most DEPTH entries and drops the oldest on
// overflow.
module tb_ras;
  localparam int unsigned DEPTH = 16;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        push = 1'b0, pop = 1'b0, top_valid;
  logic [63:0] push_addr = '0, top_addr;
  logic [4:0]  count;
  always #5 clk = ~clk;

  ras dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (top_valid != (model.size() != 0) || count != 5'(model.size()) ||
        (model.size() != 0 && top_addr != model[$])) begin
      failures++;
      $display("FAIL: valid %0d count %0d top %h, model size %0d top %h", top_valid, count,
               top_addr, model.size(), model.size() ? model[$] : 64'd0);
    end
  endtask

  initial begin
    int overflows = 0, underflows = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int r;
      @(negedge clk);
      compare();
      r = $urandom % 100;
      // phases: mostly pushes, then mostly pops
      if (((i / 200) % 2 == 0) ? r < 65 : r < 30) begin
        push = 1'b1; pop = 1'b0; push_addr = {$urandom, $urandom};
        model.push_back(push_addr);
        if (model.size() > DEPTH) begin
          void'(model.pop_front());
          overflows++;
        end
      end else if (r < 95 || i % 50 == 0) begin
        push = 1'b0; pop = 1'b1;
        if (model.size() != 0) void'(model.pop_back()); else underflows++;
      end else begin
        push = 1'b1; pop = 1'b1; push_addr = {$urandom, $urandom};
        if (model.size() != 0) void'(model.pop_back());
        model.push_back(push_addr);
      end
      @(negedge clk);
      push = 1'b0; pop = 1'b0;
      compare();
    end
    checks++;
    if (overflows == 0 || underflows == 0) begin
      failures++;
      $display("FAIL: overflow %0d underflow %0d not both exercised", overflows, underflows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
