// Global-stride detector of the GHB-LDB prefetcher.
//
// A global stride exists when a second instruction keeps accessing a constant
// distance d away from the address of the first one (load A: X Y Z, load B:
// X+d Y+d Z+d, interleaved in the global stream). Two earlier GHB entries of
// the triggering PC (its two most recent ones, found on its linked list) are
// each subtracted from their global successor, the entry written right after
// them. If both global deltas are equal and not zero, the next access of the
// other instruction is expected at the current address plus that delta.
// The two subtractors and the comparison follow the original design; ignoring a zero
// delta is this implementation's choice.
//
// Interface and timing: purely combinational. base*/succ* with their ok bits
// in; match and delta out.
module global_stride_detect
  import pf_pkg::*;
(
  input  logic   ok0,
  input  addr_t  base0,
  input  addr_t  succ0,
  input  logic   ok1,
  input  addr_t  base1,
  input  addr_t  succ1,
  output logic   match,
  output delta_t delta
);
  delta_t d0, d1;
  always_comb begin
    d0    = delta_t'(succ0 - base0);
    d1    = delta_t'(succ1 - base1);
    match = ok0 && ok1 && (d0 == d1) && (d0 != '0);
    delta = d0;
  end
endmodule
