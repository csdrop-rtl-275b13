// ss_ptr_regs -- shadow stack pointer and frame pointer.
//
// Two registers that only plug-in micro-ops can change: `top` (the shadow
// stack pointer, logical register t10) and `bottom` (the shadow frame
// pointer, t11). The shadow stack grows downward, like the x86-64 user stack:
// the live entries occupy [top, bottom), and the stack is empty when
// top == bottom. The frame pointer exists so that the repetitive check can
// tell when it has run out of entries.
//
// Interface: `init` (from the operating system when a process starts) loads
// both registers with `base`; `load` restores a saved pair (`load_top`,
// `load_bottom`) when the operating system switches back to a process, the
// pair having been read from `top`/`bottom` when it was switched out;
// `push` moves top down by one 16-byte entry and `pop` moves it up by one
// entry, never past bottom. One action per clock edge, in the order init,
// load, push, pop. Reset clears both to 0 (an empty stack).
//
// The two pointers and their roles follow the document, which keeps them
// like other logical registers, so they are saved and restored with a
// process; the downward growth, the 16-byte entry and the separate
// save/restore port are this design's choices.
module ss_ptr_regs
  import csdrop_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  addr_t base,
  input  logic  load,
  input  addr_t load_top,
  input  addr_t load_bottom,
  input  logic  push,
  input  logic  pop,
  output addr_t top,
  output addr_t bottom,
  output logic  empty
);
  assign empty = (top == bottom);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top    <= '0;
      bottom <= '0;
    end else if (init) begin
      top    <= base;
      bottom <= base;
    end else if (load) begin
      top    <= load_top;
      bottom <= load_bottom;
    end else if (push) begin
      top <= top - addr_t'(SS_ENTRY_BYTES);
    end else if (pop && !empty) begin
      top <= top + addr_t'(SS_ENTRY_BYTES);
    end
  end
endmodule
