// seg_xlate: direct-segment virtual-to-physical translation of one address.
//
// Three registers describe the segment: base, limit and offset.  A virtual
// address V with base <= V < limit is translated, without any TLB, to the
// physical address V + offset (kept to PA_W bits); any other V is reported
// as outside the segment (ok = 0).  This is the translation rule the design
// specifies; it is purely combinational (one ALU cycle of the PCE).
module seg_xlate
  import pce_pkg::*;
(
  input  logic [VA_W-1:0] va,
  input  logic [VA_W-1:0] seg_base,
  input  logic [VA_W-1:0] seg_limit,
  input  logic [VA_W-1:0] seg_offset,
  output logic [PA_W-1:0] pa,
  output logic            ok
);
  always_comb begin
    pa = PA_W'(va + seg_offset);
    ok = (va >= seg_base) && (va < seg_limit);
  end
endmodule
