// ss_engine -- executes the shadow stack micro-ops.
//
// The shadow stack lives in ordinary memory and holds one 16-byte entry per
// outstanding call: the return address at [top] and the caller's stack
// pointer at [top+8]. Three commands:
//   PUSH  : write ra at top-16 and sp at top-8, then top -= 16.
//   CPOP  : "conceptual" pop after a correct RAS prediction: top += 16 with
//           no memory access (nothing is popped from an empty stack).
//   CHECK : enhanced repetitive check. While the stack is not empty, read
//           the entry at top, pop it, and compare both words with the
//           expected return address and stack pointer. A match of both ends
//           the check with pass = 1; running out of entries ends it with
//           pass = 0 (a return-oriented-programming attack). Entries above a
//           matching one were left behind by non-local returns
//           (setjmp/longjmp) and are discarded on the way.
//
// Interface: `start` with `cmd`, `ra`, `sp` is accepted when `busy` is low;
// `done` pulses for one cycle with `pass`. Memory requests use a valid/ready
// handshake, are marked privileged (`mem_priv`), carry 64-bit data and are
// issued one at a time; a read is answered by `mem_rvalid`/`mem_rdata` one or
// more cycles after its request was accepted. `init`/`base` (process start)
// and `load`/`load_top`/`load_bottom` (context switch) reach the pointer
// registers directly and are meant for cycles in which the engine is idle.
//
// Timing: PUSH takes two accepted writes plus one cycle; CPOP two cycles;
// CHECK two reads (each request + response) per examined entry plus one
// cycle per step.
//
// The entry contents, the check that stack pointers match as well as return
// addresses, and the pop-until-match-or-empty loop follow the document; the
// entry layout, the command encoding and the memory handshake are this
// design's choices.
module ss_engine
  import csdrop_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // process start
  input  logic    init,
  input  addr_t   base,
  // context switch: restore saved pointers
  input  logic    load,
  input  addr_t   load_top,
  input  addr_t   load_bottom,
  // command
  input  logic    start,
  input  ss_cmd_e cmd,
  input  addr_t   ra,
  input  addr_t   sp,
  output logic    busy,
  output logic    done,
  output logic    pass,
  // memory
  output logic    mem_req_valid,
  input  logic    mem_req_ready,
  output logic    mem_we,
  output addr_t   mem_addr,
  output addr_t   mem_wdata,
  output logic    mem_priv,
  input  logic    mem_rvalid,
  input  addr_t   mem_rdata,
  // pointers
  output addr_t   ss_top,
  output addr_t   ss_bottom,
  output logic    ss_empty,
  // statistics
  output logic    entry_popped        // pulses for every entry a CHECK discards or matches
);
  typedef enum logic [3:0] {
    S_IDLE, S_PUSH_RA, S_PUSH_SP, S_PUSH_DONE, S_CPOP,
    S_CHK_TEST, S_CHK_RD_RA, S_CHK_WT_RA, S_CHK_RD_SP, S_CHK_WT_SP, S_CHK_CMP
  } state_e;

  state_e state;
  addr_t  exp_ra, exp_sp, got_ra, got_sp;
  logic   ptr_push, ptr_pop;

  ss_ptr_regs u_ptr (
    .clk, .rst_n, .init, .base, .load, .load_top, .load_bottom,
    .push (ptr_push), .pop (ptr_pop),
    .top (ss_top), .bottom (ss_bottom), .empty (ss_empty)
  );

  assign busy     = (state != S_IDLE);
  assign mem_priv = 1'b1;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_we        = 1'b0;
    mem_addr      = ss_top;
    mem_wdata     = exp_ra;
    unique case (state)
      S_PUSH_RA:   begin mem_req_valid = 1'b1; mem_we = 1'b1;
                         mem_addr = ss_top - 64'd16; mem_wdata = exp_ra; end
      S_PUSH_SP:   begin mem_req_valid = 1'b1; mem_we = 1'b1;
                         mem_addr = ss_top - 64'd8;  mem_wdata = exp_sp; end
      S_CHK_RD_RA: begin mem_req_valid = 1'b1; mem_addr = ss_top; end
      S_CHK_RD_SP: begin mem_req_valid = 1'b1; mem_addr = ss_top + 64'd8; end
      default: ;
    endcase
  end

  assign ptr_push     = (state == S_PUSH_DONE);
  assign ptr_pop      = (state == S_CPOP) || (state == S_CHK_CMP);
  assign entry_popped = (state == S_CHK_CMP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      pass   <= 1'b0;
      exp_ra <= '0;
      exp_sp <= '0;
      got_ra <= '0;
      got_sp <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && !init && !load) begin
          exp_ra <= ra;
          exp_sp <= sp;
          unique case (cmd)
            SS_CMD_PUSH:  state <= S_PUSH_RA;
            SS_CMD_CPOP:  state <= S_CPOP;
            default:      state <= S_CHK_TEST;
          endcase
        end
        S_PUSH_RA:   if (mem_req_ready) state <= S_PUSH_SP;
        S_PUSH_SP:   if (mem_req_ready) state <= S_PUSH_DONE;
        S_PUSH_DONE: begin done <= 1'b1; pass <= 1'b1; state <= S_IDLE; end
        S_CPOP:      begin done <= 1'b1; pass <= 1'b1; state <= S_IDLE; end
        S_CHK_TEST: begin
          if (ss_empty) begin
            done  <= 1'b1;
            pass  <= 1'b0;
            state <= S_IDLE;
          end else begin
            state <= S_CHK_RD_RA;
          end
        end
        S_CHK_RD_RA: if (mem_req_ready) state <= S_CHK_WT_RA;
        S_CHK_WT_RA: if (mem_rvalid) begin got_ra <= mem_rdata; state <= S_CHK_RD_SP; end
        S_CHK_RD_SP: if (mem_req_ready) state <= S_CHK_WT_SP;
        S_CHK_WT_SP: if (mem_rvalid) begin got_sp <= mem_rdata; state <= S_CHK_CMP; end
        S_CHK_CMP: begin
          if (got_ra == exp_ra && got_sp == exp_sp) begin
            done  <= 1'b1;
            pass  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_CHK_TEST;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A read response only arrives while a read is awaited.
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (state == S_CHK_WT_RA || state == S_CHK_WT_SP));

endmodule
