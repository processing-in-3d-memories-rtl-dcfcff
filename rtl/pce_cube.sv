// pce_cube: Pointer-Chasing Engines in the logic layer of a memory cube.
//
// Pointer chasing (walking a linked list, a hash-bucket chain or a b+tree)
// spends its time waiting for one dependent DRAM access after another.
// This block moves the walk into the memory cube: the host sends a single
// FIND instruction and polls for the result, while one PCE per vault walks
// the structure next to its DRAM.  Each load brings a whole window of
// memory (the FIND's operand size, 64 B .. 8 KB) into a vector register, so
// nodes that lie close together are found in a register without another
// DRAM access (speculative loads), and registers keep windows for later
// FINDs.
//
// Structure (all sizes are parameters, defaults as in the design):
//   * NV = 32 vaults, each with a vault_slice (8 x 256 B vector registers,
//     vector address translation, load unit) and a pce_ctrl (the FSM);
//   * addresses are interleaved over the vaults in 256-byte blocks, so an
//     operand of 2^k bytes above 256 B spans 2^(k-8) neighbouring vaults:
//     those vaults are grouped into one logical PCE, run by the group's
//     lowest vault (the leader), whose logical register is the
//     concatenation of the members' registers (16 x 512 B, ..., 1 x 8 KB);
//   * ifind_net carries Internal Finds between leaders (5-cycle latency);
//   * one direct segment (base, limit, offset) translates virtual
//     addresses for all PCEs.
//
// Host side: host_valid/host_ready/host_find take a FIND; it is steered to
// the leader of the vault that the virtual base address maps to.  One
// FIND is in flight at a time (host_ready is low until the previous one
// has reported); the grouping follows the operand size of the FIND being
// accepted, and a change of grouping clears all register tags.
// res_valid is high for one cycle with the result.  These host-side
// rules are this implementation's choice.
//
// Memory side: one port per vault controller.  mem_req_addr is a physical
// byte address and mem_req_lg the log2 of the bytes wanted (at most 256);
// the response returns the whole 256-byte-aligned block that holds the
// address, of which the slice keeps the bytes asked for.  One request per
// vault is outstanding at a time; the latency is that of the controller.
module pce_cube
  import pce_pkg::*;
#(
  parameter int unsigned NV      = 32,
  parameter int unsigned NREG    = 8,
  parameter int unsigned VBYTES  = 256,
  parameter int unsigned NET_LAT = 5,
  localparam int unsigned VW     = (NV > 1) ? $clog2(NV) : 1,
  localparam int unsigned RW     = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned LANES  = VBYTES / 8,
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [VA_W-1:0]           seg_base,
  input  logic [VA_W-1:0]           seg_limit,
  input  logic [VA_W-1:0]           seg_offset,
  input  logic                      host_valid,
  output logic                      host_ready,
  input  find_t                     host_find,
  output logic                      res_valid,
  output result_t                   res,
  output logic                      busy,
  output logic [NV-1:0]             mem_req_valid,
  input  logic [NV-1:0]             mem_req_ready,
  output logic [NV-1:0][PA_W-1:0]   mem_req_addr,
  output logic [NV-1:0][3:0]        mem_req_lg,
  input  logic [NV-1:0]             mem_rsp_valid,
  input  logic [NV-1:0][VBYTES*8-1:0] mem_rsp_data
);
  if (VBYTES != (1 << INTLV_LG)) begin : g_bad_vbytes
    $error("VBYTES must equal the 256-byte vault interleave");
  end

  // ------------------------------------------------------------ grouping
  logic [3:0]    grp_lg, new_lg;
  logic [VW-1:0] host_leader, new_mask;
  logic          idle, accept, flush;

  logic [NV-1:0] c_busy, c_host_ready, c_host_valid;
  logic          net_empty;

  always_comb begin
    if (host_find.op_lg <= 4'(INTLV_LG))           new_lg = 4'd0;
    else if (32'(host_find.op_lg) >= INTLV_LG + VW) new_lg = 4'(VW);
    else                                           new_lg = host_find.op_lg - 4'(INTLV_LG);
    new_mask    = VW'((32'd1 << new_lg) - 32'd1);
    host_leader = host_find.base[INTLV_LG +: VW] & ~new_mask;
  end

  assign idle       = (c_busy == '0) && net_empty;
  assign host_ready = idle && c_host_ready[host_leader];
  assign accept     = host_valid && host_ready;
  assign flush      = accept && (new_lg != grp_lg);
  assign busy       = !idle;

  always_comb begin
    c_host_valid = '0;
    c_host_valid[host_leader] = host_valid && idle;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     grp_lg <= '0;
    else if (accept) grp_lg <= new_lg;
  end

  // ------------------------------------------------------- per-vault units
  logic [NV-1:0]             n_in_valid, n_in_ready, n_out_valid, n_out_ready;
  logic [NV-1:0][VW-1:0]     n_in_dest;
  ctx_t [NV-1:0]             n_in_ctx, n_out_ctx;

  logic [NV-1:0]             c_ld_start, s_ld_busy, c_ld_busy, c_res_valid;
  logic [NV-1:0][PA_W-1:0]   c_ld_base;
  logic [NV-1:0][3:0]        c_ld_lg;
  logic [NV-1:0][RW-1:0]     c_ld_reg;
  logic [NV-1:0][VW-1:0]     c_rd_vault;
  logic [NV-1:0][RW-1:0]     c_rd_reg;
  logic [NV-1:0][LW-1:0]     c_rd_lane;
  logic [NV-1:0][WORD_W-1:0] s_rd_raw;
  logic [NV-1:0][PA_W-1:0]   s_rd_pa;
  logic [NV-1:0]             s_rd_ok;
  result_t [NV-1:0]          c_res;

  logic [VW-1:0] gmask;
  assign gmask = VW'((32'd1 << grp_lg) - 32'd1);

  for (genvar v = 0; v < NV; v++) begin : g_vault
    logic [VW-1:0]   lead, mem_i;
    logic [PA_W-1:0] sl_addr;
    logic [3:0]      sl_lg;

    assign lead  = VW'(v) & ~gmask;          // leader of this vault's group
    assign mem_i = VW'(v) & gmask;           // position inside the group

    // this slice's part of the leader's window
    always_comb begin
      if (c_ld_lg[lead] > 4'(INTLV_LG)) begin
        sl_addr = c_ld_base[lead] + (PA_W'(mem_i) << INTLV_LG);
        sl_lg   = 4'(INTLV_LG);
      end else begin
        sl_addr = c_ld_base[lead];
        sl_lg   = c_ld_lg[lead];
      end
    end

    // a leader waits for every member of its group
    always_comb begin
      c_ld_busy[v] = 1'b0;
      for (int m = 0; m < int'(NV); m++)
        if ((VW'(m) & ~gmask) == VW'(v) && s_ld_busy[m]) c_ld_busy[v] = 1'b1;
    end

    vault_slice #(.NREG(NREG), .VBYTES(VBYTES)) u_slice (
      .clk, .rst_n, .seg_base, .seg_limit, .seg_offset,
      .ld_start      (c_ld_start[lead]),
      .ld_addr       (sl_addr),
      .ld_lg         (sl_lg),
      .ld_reg        (c_ld_reg[lead]),
      .ld_busy       (s_ld_busy[v]),
      .mem_req_valid (mem_req_valid[v]),
      .mem_req_ready (mem_req_ready[v]),
      .mem_req_addr  (mem_req_addr[v]),
      .mem_req_lg    (mem_req_lg[v]),
      .mem_rsp_valid (mem_rsp_valid[v]),
      .mem_rsp_data  (mem_rsp_data[v]),
      .rd_reg        (c_rd_reg[lead]),
      .rd_lane       (c_rd_lane[lead]),
      .rd_raw        (s_rd_raw[v]),
      .rd_pa         (s_rd_pa[v]),
      .rd_ok         (s_rd_ok[v])
    );

    pce_ctrl #(.NV(NV), .NREG(NREG), .VBYTES(VBYTES)) u_ctrl (
      .clk, .rst_n,
      .vault_id   (VW'(v)),
      .grp_lg     (grp_lg),
      .flush      (flush),
      .seg_base, .seg_limit, .seg_offset,
      .host_valid (c_host_valid[v]),
      .host_ready (c_host_ready[v]),
      .host_find  (host_find),
      .in_valid   (n_out_valid[v]),
      .in_ready   (n_out_ready[v]),
      .in_ctx     (n_out_ctx[v]),
      .out_valid  (n_in_valid[v]),
      .out_ready  (n_in_ready[v]),
      .out_dest   (n_in_dest[v]),
      .out_ctx    (n_in_ctx[v]),
      .ld_start   (c_ld_start[v]),
      .ld_base    (c_ld_base[v]),
      .ld_lg      (c_ld_lg[v]),
      .ld_reg     (c_ld_reg[v]),
      .ld_busy    (c_ld_busy[v]),
      .rd_vault   (c_rd_vault[v]),
      .rd_reg     (c_rd_reg[v]),
      .rd_lane    (c_rd_lane[v]),
      .rd_raw     (s_rd_raw[c_rd_vault[v]]),
      .rd_pa      (s_rd_pa[c_rd_vault[v]]),
      .rd_ok      (s_rd_ok[c_rd_vault[v]]),
      .res_valid  (c_res_valid[v]),
      .res        (c_res[v]),
      .busy       (c_busy[v])
    );
  end

  ifind_net #(.NV(NV), .LAT(NET_LAT)) u_net (
    .clk, .rst_n,
    .in_valid  (n_in_valid),
    .in_ready  (n_in_ready),
    .in_dest   (n_in_dest),
    .in_ctx    (n_in_ctx),
    .out_valid (n_out_valid),
    .out_ready (n_out_ready),
    .out_ctx   (n_out_ctx),
    .empty     (net_empty)
  );

  // ------------------------------------------------------------ result
  always_comb begin
    res_valid = |c_res_valid;
    res       = '0;
    for (int v = 0; v < int'(NV); v++)
      if (c_res_valid[v]) res = c_res[v];
  end

  // one FIND in flight: at most one engine reports at a time
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_res_valid));
endmodule
