// phys_mem_model -- behavioural model of main memory for simulation only.
//
// Stands in for the physical memory that holds the shadow stack. Sparse
// 64-bit words addressed by byte address (8-byte aligned), unwritten words
// read as 0. Requests use valid/ready; `req_ready` is withheld on a
// pseudo-random fraction of cycles (STALL_PCT) to exercise back-pressure.
// A read is answered LAT cycles after it was accepted; one read may be
// outstanding at a time. Writes need no answer. Not synthesizable.
module phys_mem_model #(
  parameter int unsigned LAT       = 2,
  parameter int unsigned STALL_PCT = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        we,
  input  logic [63:0] addr,
  input  logic [63:0] wdata,
  output logic        rvalid,
  output logic [63:0] rdata
);
  logic [63:0] mem [logic [63:0]];
  int unsigned wait_cnt;
  logic        pending;
  logic [63:0] pend_addr;
  int unsigned writes, reads;

  function automatic logic [63:0] peek(logic [63:0] a);
    return mem.exists(a) ? mem[a] : 64'd0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready && we) mem[addr] = wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      pending   <= 1'b0;
      wait_cnt  <= 0;
      pend_addr <= '0;
      writes    <= 0;
      reads     <= 0;
    end else begin
      rvalid <= 1'b0;
      if (req_valid && req_ready) begin
        if (we) begin
          writes    <= writes + 1;
        end else begin
          pending   <= 1'b1;
          pend_addr <= addr;
          wait_cnt  <= (LAT > 0) ? LAT - 1 : 0;
          reads     <= reads + 1;
        end
      end
      if (pending) begin
        if (wait_cnt == 0) begin
          pending <= 1'b0;
          rvalid  <= 1'b1;
          rdata   <= peek(pend_addr);
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
      req_ready <= !pending && !(req_valid && req_ready && !we) &&
                   (($urandom % 100) >= STALL_PCT);
    end
  end
endmodule
