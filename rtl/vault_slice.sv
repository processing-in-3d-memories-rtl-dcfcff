// vault_slice: the vector datapath a PCE has in one vault.
//
// It holds the vault's vector register bank (vreg_bank), the vector
// address-translation unit (vec_xlate) and a load unit that fills a
// register from the vault controller.  The FSM that decides what to load
// and read lives in pce_ctrl; in a group of vaults that act as one wide
// logical PCE, the group leader's pce_ctrl drives the slices of all member
// vaults.
//
// Load: a one-cycle ld_start with ld_addr (physical byte address of this
// slice's part of the window), ld_lg (log2 of its size in bytes, at most
// log2(VBYTES)) and ld_reg.  ld_busy rises the next cycle, one request goes
// to the vault controller (valid/ready), and when the response arrives the
// bytes [ld_addr mod VBYTES, +2^ld_lg) of the returned VBYTES-aligned block
// are written into the register; ld_busy falls the cycle after.
//
// Read: rd_reg/rd_lane select a 64-bit lane; rd_raw is its stored value,
// rd_pa/rd_ok its direct-segment translation.  All combinational, so the
// controller gets a word and its translation in the cycle it asks.
module vault_slice
  import pce_pkg::*;
#(
  parameter int unsigned NREG   = 8,
  parameter int unsigned VBYTES = 256,
  localparam int unsigned LANES = VBYTES / 8,
  localparam int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned BW    = $clog2(VBYTES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [VA_W-1:0]     seg_base,
  input  logic [VA_W-1:0]     seg_limit,
  input  logic [VA_W-1:0]     seg_offset,
  // load command
  input  logic                ld_start,
  input  logic [PA_W-1:0]     ld_addr,
  input  logic [3:0]          ld_lg,
  input  logic [RW-1:0]       ld_reg,
  output logic                ld_busy,
  // vault controller port
  output logic                mem_req_valid,
  input  logic                mem_req_ready,
  output logic [PA_W-1:0]     mem_req_addr,
  output logic [3:0]          mem_req_lg,
  input  logic                mem_rsp_valid,
  input  logic [VBYTES*8-1:0] mem_rsp_data,
  // lane read
  input  logic [RW-1:0]       rd_reg,
  input  logic [LW-1:0]       rd_lane,
  output logic [WORD_W-1:0]   rd_raw,
  output logic [PA_W-1:0]     rd_pa,
  output logic                rd_ok
);
  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT} lstate_e;
  lstate_e         st;
  logic [PA_W-1:0] a_q;
  logic [3:0]      lg_q;
  logic [RW-1:0]   reg_q;

  logic [VBYTES-1:0]              be;
  logic [VBYTES*8-1:0]            rvec;
  logic [LANES-1:0][WORD_W-1:0]   lanes;
  logic [LANES-1:0][PA_W-1:0]     lpa;
  logic [LANES-1:0]               lok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= L_IDLE;
      a_q   <= '0;
      lg_q  <= '0;
      reg_q <= '0;
    end else begin
      unique case (st)
        L_IDLE: if (ld_start) begin
          st    <= L_REQ;
          a_q   <= ld_addr;
          lg_q  <= ld_lg;
          reg_q <= ld_reg;
        end
        L_REQ:  if (mem_req_ready) st <= L_WAIT;
        L_WAIT: if (mem_rsp_valid) st <= L_IDLE;
        default: st <= L_IDLE;
      endcase
    end
  end

  assign ld_busy       = (st != L_IDLE);
  assign mem_req_valid = (st == L_REQ);
  assign mem_req_addr  = a_q;
  assign mem_req_lg    = lg_q;

  // byte enables of the part of the block that was asked for
  always_comb begin
    logic [BW:0] lo, hi;
    lo = {1'b0, a_q[BW-1:0]};
    hi = lo + ((BW+1)'(1) << lg_q);
    for (int b = 0; b < int'(VBYTES); b++)
      be[b] = ((BW+1)'(b) >= lo) && ((BW+1)'(b) < hi);
  end

  vreg_bank #(.NREG(NREG), .VBYTES(VBYTES)) u_bank (
    .clk,
    .we   (st == L_WAIT && mem_rsp_valid),
    .wreg (reg_q),
    .wbe  (be),
    .wdata(mem_rsp_data),
    .rreg (rd_reg),
    .rdata(rvec)
  );

  assign lanes = rvec;

  vec_xlate #(.LANES(LANES)) u_vx (
    .vin(lanes), .seg_base, .seg_limit, .seg_offset,
    .pa(lpa), .ok(lok)
  );

  assign rd_raw = lanes[rd_lane];
  assign rd_pa  = lpa[rd_lane];
  assign rd_ok  = lok[rd_lane];

  // a new load is only started while the unit is idle
  a_ld_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_start |-> st == L_IDLE);
endmodule
