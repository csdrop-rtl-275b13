// ss_access_ctrl -- shadow stack range check added to the data TLB.
//
// Every data access is compared with the live shadow stack range
// [ss_top, ss_bottom). An access that touches the range without the
// shadow-stack privilege (which only the plug-in's own micro-ops carry)
// is refused and raises `fault`. An access is `size` bytes long starting at
// `addr`; it is refused if any of its bytes falls inside the range.
// The check is off while protection is disabled (`en` = 0).
//
// Purely combinational: `fault` is valid in the same cycle as `acc_valid`.
//
// The range given by the two shadow stack pointers and the privilege rule
// follow the document; the byte-overlap test is this design's choice.
module ss_access_ctrl
  import csdrop_pkg::*;
(
  input  logic       en,
  input  addr_t      ss_top,
  input  addr_t      ss_bottom,
  input  logic       acc_valid,
  input  addr_t      acc_addr,
  input  logic [3:0] acc_size,   // bytes, 1..8
  input  logic       acc_priv,
  output logic       in_range,
  output logic       fault
);
  addr_t acc_end;   // one past the last byte
  assign acc_end  = acc_addr + addr_t'(acc_size);
  assign in_range = (ss_top < ss_bottom) && (acc_addr < ss_bottom) && (acc_end > ss_top);
  assign fault    = en && acc_valid && !acc_priv && in_range;
endmodule
