// ifind_net: the inter-vault path that carries Internal Find requests.
//
// When a search reaches an address owned by another vault, the PCE hands
// its whole search context to this network, which delivers it to the PCE
// of the destination vault LAT cycles later (5 cycles by default, the
// inter-vault latency of the design).  Its structure is this
// implementation's choice: a round-robin arbiter admits one request per
// cycle into a LAT-stage pipeline; the last stage presents the context to
// its destination.  If the destination is not ready the whole pipeline
// holds.  A request offered in cycle t with in_ready high appears on
// out_valid in cycle t+LAT.
module ifind_net
  import pce_pkg::*;
#(
  parameter int unsigned NV  = 32,
  parameter int unsigned LAT = 5,
  localparam int unsigned VW = (NV > 1) ? $clog2(NV) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NV-1:0]         in_valid,
  output logic [NV-1:0]         in_ready,
  input  logic [NV-1:0][VW-1:0] in_dest,
  input  ctx_t [NV-1:0]         in_ctx,
  output logic [NV-1:0]         out_valid,
  input  logic [NV-1:0]         out_ready,
  output ctx_t [NV-1:0]         out_ctx,
  output logic                  empty
);
  logic [LAT-1:0]         sv;
  logic [LAT-1:0][VW-1:0] sd;
  ctx_t [LAT-1:0]         sx;
  logic                   adv;
  logic [VW-1:0]          ptr;     // round-robin start
  logic                   gv;
  logic [VW-1:0]          gi;

  assign adv = !(sv[LAT-1] && !out_ready[sd[LAT-1]]);

  always_comb begin
    gv = 1'b0;
    gi = '0;
    for (int k = 0; k < int'(NV); k++) begin
      logic [VW-1:0] i;
      i = VW'((32'(ptr) + 32'(k)) % NV);
      if (!gv && in_valid[i]) begin
        gv = 1'b1;
        gi = i;
      end
    end
  end

  always_comb begin
    in_ready = '0;
    if (adv && gv) in_ready[gi] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv  <= '0;
      sd  <= '0;
      sx  <= '0;
      ptr <= '0;
    end else if (adv) begin
      sv[0] <= gv;
      sd[0] <= in_dest[gi];
      sx[0] <= in_ctx[gi];
      for (int s = 1; s < int'(LAT); s++) begin
        sv[s] <= sv[s-1];
        sd[s] <= sd[s-1];
        sx[s] <= sx[s-1];
      end
      if (gv) ptr <= (32'(gi) == NV - 1) ? '0 : gi + VW'(1);
    end
  end

  always_comb begin
    out_valid = '0;
    for (int j = 0; j < int'(NV); j++) out_ctx[j] = sx[LAT-1];
    if (sv[LAT-1]) out_valid[sd[LAT-1]] = 1'b1;
  end

  assign empty = (sv == '0);
endmodule
