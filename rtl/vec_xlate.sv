// vec_xlate: translates every 64-bit lane of a vector register at once.
//
// After a node window is in a vector register, all virtual "next address"
// fields in it are translated in parallel as a vector operation, one
// seg_xlate per lane.  Each lane gives its physical address and a flag that
// the lane lies inside the direct segment.  The PCE then picks the lane it
// needs.  Combinational; LANES = register bytes / 8 (32 for a 256-byte
// register).  Translating every lane, not only those known to hold
// pointers, is this implementation's choice: the lane positions of pointers
// depend on the node layout, and lanes that hold keys are simply not used.
module vec_xlate
  import pce_pkg::*;
#(
  parameter int unsigned LANES = 32
) (
  input  logic [LANES-1:0][VA_W-1:0] vin,
  input  logic [VA_W-1:0]            seg_base,
  input  logic [VA_W-1:0]            seg_limit,
  input  logic [VA_W-1:0]            seg_offset,
  output logic [LANES-1:0][PA_W-1:0] pa,
  output logic [LANES-1:0]           ok
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    seg_xlate u_x (
      .va(vin[l]), .seg_base, .seg_limit, .seg_offset,
      .pa(pa[l]), .ok(ok[l])
    );
  end
endmodule
