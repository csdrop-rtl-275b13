// ras -- return address stack.
//
// A small LIFO of predicted return targets. A call pushes the address of the
// instruction after it; a ret pops the youngest entry and uses it as the
// predicted return target. The storage is circular: when more than DEPTH
// calls are outstanding the oldest entry is overwritten, so deep call chains
// lose their oldest predictions (the "RAS overflow" that makes a later return
// mispredict even without an attack).
//
// Interface: push/push_addr and pop are sampled on the rising clock edge;
// top_valid/top_addr show the current prediction combinationally, so a pop
// reads the value it removes in the same cycle. A push and a pop in the same
// cycle replace the top entry. Reset empties the stack.
//
// The LIFO behaviour and the overflow loss follow the description of the RAS;
// the depth of 16 entries and the overwrite-oldest policy are this design's
// choices (the RAS is only described as holding tens to hundreds of slots).
module ras #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic          pop,
  output logic          top_valid,
  output logic [AW-1:0] top_addr,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] tos;                      // index of the youngest entry
  logic [CNT_W-1:0] cnt;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] dec(logic [PW-1:0] p);
    return (p == '0) ? PW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign top_valid = (cnt != '0);
  assign top_addr  = mem[tos];
  assign count     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos <= '0;
      cnt <= '0;
    end else if (push && pop) begin
      if (cnt == '0) cnt <= CNT_W'(1);
    end else if (push) begin
      tos <= inc(tos);
      if (cnt != CNT_W'(DEPTH)) cnt <= cnt + 1'b1;
    end else if (pop && cnt != '0) begin
      tos <= dec(tos);
      cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && pop) mem[tos] <= push_addr;
    else if (push)   mem[inc(tos)] <= push_addr;
  end

endmodule
