// tb_ss_access_ctrl -- random accesses around a shadow stack range, checked
// against a byte-by-byte overlap model.
module tb_ss_access_ctrl;
  import csdrop_pkg::*;
  logic       en, acc_valid, acc_priv, in_range, fault;
  addr_t      ss_top, ss_bottom, acc_addr;
  logic [3:0] acc_size;

  ss_access_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fault = 0, n_ok = 0;
    for (int i = 0; i < 4000; i++) begin
      bit exp_in;
      ss_bottom = 64'h0000_8000_0080_0000 - 64'(16 * ($urandom % 4));
      ss_top    = ss_bottom - 64'(16 * ($urandom % 6));
      acc_addr  = ss_top - 64'd40 + 64'($urandom % 160);
      acc_size  = 4'(1 << ($urandom % 4));
      acc_valid = ($urandom % 8) != 0;
      acc_priv  = ($urandom % 4) == 0;
      en        = ($urandom % 8) != 0;
      #1;
      exp_in = 1'b0;
      for (int b = 0; b < acc_size; b++)
        if (acc_addr + 64'(b) >= ss_top && acc_addr + 64'(b) < ss_bottom) exp_in = 1'b1;
      checks++;
      if (in_range != exp_in || fault != (exp_in && en && acc_valid && !acc_priv)) begin
        failures++;
        $display("FAIL: addr %h size %0d range [%h,%h) priv %0d en %0d: in %0d fault %0d",
                 acc_addr, acc_size, ss_top, ss_bottom, acc_priv, en, in_range, fault);
      end
      if (fault) n_fault++; else n_ok++;
      #1;
    end
    checks++;
    if (n_fault == 0 || n_ok == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
