// pce_ctrl: the finite-state machine of one vault's Pointer-Chasing Engine.
//
// It turns a FIND instruction into the loads, checks, translations and
// forwards that walk a linked list, a hash-bucket chain or a b+tree inside
// the memory cube.  The walk follows the design's algorithm:
//   1 a FIND from the host has its base address translated (seg_xlate);
//   2 the PCE checks that the address is in its own vault range, else it
//     sends the search on as an Internal Find to the vault that owns it;
//   3 a word that is not in a vector register is brought in with a load of
//     one operand-size window, whose address and size are kept as the
//     register's RA/RS tag;
//   4 the data word at the data offset is compared (scalar) with gold;
//   5 the next-address word is translated (vec_xlate lane);
//   6 an address owned by another vault is forwarded as an Internal Find;
//   7 an address inside RA..RA+RS of a register is read from that register
//     without touching DRAM, otherwise a new window is loaded.
// In a group of 2^grp_lg vaults that act as one logical PCE only the
// leader (lowest vault) runs this FSM; it addresses the lanes of all member
// slices through the cube's read network and starts loads in all of them.
//
// This implementation's own choices (the design does not fix them):
//   * the lookup is per 64-bit word: every word the walk needs (data, next
//     pointer, each key, the chosen child pointer) goes through steps 2, 3
//     and 7, so a node that straddles a window or a vault is still handled;
//   * a null pointer (0) ends a list/hash walk as "not found"; a b+tree
//     node whose selected child pointer is null is a leaf;
//   * b+tree nodes hold data_size keys (at most 15) at data_off and
//     data_size+1 child pointers at next_off; the child taken is the number
//     of keys <= gold, and the scan of the sorted keys stops at the first
//     key greater than gold; a leaf reports "found" if a key equals gold;
//   * registers are replaced round-robin; tags are cleared by flush;
//   * an address outside the direct segment or a malformed FIND ends the
//     search with the fault flag;
//   * the result is a one-cycle res_valid with result_t (it stands for the
//     flag the host polls), including counters of the walk.
// Timing: one state per cycle; a word found in a register costs
// ROUTE, LOOK, READ, EVAL = 4 cycles; a miss adds the window load.
module pce_ctrl
  import pce_pkg::*;
#(
  parameter int unsigned NV     = 32,
  parameter int unsigned NREG   = 8,
  parameter int unsigned VBYTES = 256,
  localparam int unsigned VW    = (NV > 1) ? $clog2(NV) : 1,
  localparam int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1,
  localparam int unsigned LANES = VBYTES / 8,
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [VW-1:0]     vault_id,
  input  logic [3:0]        grp_lg,     // log2 of vaults per logical PCE
  input  logic              flush,      // invalidate all RA/RS tags
  input  logic [VA_W-1:0]   seg_base,
  input  logic [VA_W-1:0]   seg_limit,
  input  logic [VA_W-1:0]   seg_offset,
  // FIND from the host
  input  logic              host_valid,
  output logic              host_ready,
  input  find_t             host_find,
  // Internal Find in / out
  input  logic              in_valid,
  output logic              in_ready,
  input  ctx_t              in_ctx,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [VW-1:0]     out_dest,
  output ctx_t              out_ctx,
  // window load to the member slices
  output logic              ld_start,
  output logic [PA_W-1:0]   ld_base,
  output logic [3:0]        ld_lg,
  output logic [RW-1:0]     ld_reg,
  input  logic              ld_busy,    // any member slice still loading
  // lane read from a member slice
  output logic [VW-1:0]     rd_vault,
  output logic [RW-1:0]     rd_reg,
  output logic [LW-1:0]     rd_lane,
  input  logic [WORD_W-1:0] rd_raw,
  input  logic [PA_W-1:0]   rd_pa,
  input  logic              rd_ok,
  // result
  output logic              res_valid,
  output result_t           res,
  output logic              busy
);
  typedef enum logic [3:0] {
    S_IDLE, S_XBASE, S_ROUTE, S_FWD, S_LOOK, S_LOAD, S_LWAIT, S_READ, S_EVAL, S_DONE
  } state_e;

  state_e  st;
  ctx_t    c;
  result_t r_q;

  // RA/RS tags of the vector registers
  logic [NREG-1:0]            tv;
  logic [NREG-1:0][PA_W-1:0]  ra;
  logic [NREG-1:0][3:0]       rs_lg;
  logic [RW-1:0]              rr;      // round-robin victim
  logic [RW-1:0]              hreg;    // register that holds the word

  logic [WORD_W-1:0] w_raw;
  logic [PA_W-1:0]   w_pa;
  logic              w_ok;

  // ---------------------------------------------------------------- decode
  logic [PA_W-1:0] wa;          // byte address of the word needed now
  logic [VW-1:0]   wa_vault, wa_leader, gmask;
  logic            hit;
  logic [RW-1:0]   hit_idx;
  logic [PA_W-1:0] b_pa;
  logic            b_ok;
  logic            ins_bad;
  logic [WORD_W-1:0] dmask;

  seg_xlate u_bx (
    .va(c.ins.base), .seg_base, .seg_limit, .seg_offset, .pa(b_pa), .ok(b_ok)
  );

  always_comb begin
    unique case (c.phase)
      PH_DATA: wa = c.node + PA_W'(c.ins.data_off);
      PH_NEXT: wa = c.node + PA_W'(c.ins.next_off);
      PH_KEY:  wa = c.node + PA_W'(c.ins.data_off) + PA_W'({c.idx, 3'b000});
      default: wa = c.node + PA_W'(c.ins.next_off) + PA_W'({c.cnt, 3'b000});
    endcase
    wa_vault  = wa[INTLV_LG +: VW];
    gmask     = VW'((32'd1 << grp_lg) - 32'd1);
    wa_leader = wa_vault & ~gmask;
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < int'(NREG); i++) begin
      if (!hit && tv[i] &&
          ({1'b0, wa} >= {1'b0, ra[i]}) &&
          ({1'b0, wa} <  ({1'b0, ra[i]} + ((PA_W+1)'(1) << rs_lg[i])))) begin
        hit     = 1'b1;
        hit_idx = RW'(i);
      end
    end
  end

  // malformed FIND: operand size out of range, fields not fitting the node
  always_comb begin
    ins_bad = (c.ins.op_lg < 4'(OPLG_MIN)) || (c.ins.op_lg > 4'(OPLG_MAX)) ||
              (32'(c.ins.op_lg) > INTLV_LG + VW);
    if (c.ins.stype == ST_BTREE) begin
      ins_bad = ins_bad || (c.ins.data_size == 16'd0) || (c.ins.data_size > 16'd15) ||
                (32'(c.ins.data_off) + 32'(c.ins.data_size) * 8 > 32'(c.ins.struct_size)) ||
                (32'(c.ins.next_off) + 32'(c.ins.data_size) * 8 + 8 > 32'(c.ins.struct_size));
    end else begin
      ins_bad = ins_bad || (c.ins.stype != ST_LIST && c.ins.stype != ST_HASH) ||
                (c.ins.data_size == 16'd0) || (c.ins.data_size > 16'd8) ||
                (32'(c.ins.data_off) + 8 > 32'(c.ins.struct_size)) ||
                (32'(c.ins.next_off) + 8 > 32'(c.ins.struct_size));
    end
    ins_bad = ins_bad || (c.ins.data_off[2:0] != 3'd0) || (c.ins.next_off[2:0] != 3'd0);
  end

  always_comb begin
    dmask = '1;
    if (c.ins.data_size < 16'd8) dmask = (WORD_W'(1) << {c.ins.data_size[2:0], 3'b000}) - WORD_W'(1);
  end

  // ------------------------------------------------------------ outputs
  assign busy       = (st != S_IDLE);
  assign in_ready   = (st == S_IDLE);
  assign host_ready = (st == S_IDLE) && !in_valid;
  assign out_valid  = (st == S_FWD);
  assign out_dest   = wa_leader;
  always_comb begin
    out_ctx        = c;
    out_ctx.st.fwds = c.st.fwds + 32'd1;
  end
  assign ld_start   = (st == S_LOAD);
  assign ld_base    = wa & ~((PA_W'(1) << c.ins.op_lg) - PA_W'(1));
  assign ld_lg      = c.ins.op_lg;
  assign ld_reg     = rr;
  assign rd_vault   = wa_vault;
  assign rd_reg     = hreg;
  assign rd_lane    = wa[3 +: LW];
  assign res_valid  = (st == S_DONE);
  assign res        = r_q;

  // ---------------------------------------------------------------- FSM
  task automatic finish(input logic found, input logic fault, input logic [4:0] slot);
    r_q.found <= found;
    r_q.fault <= fault;
    r_q.node  <= c.node;
    r_q.slot  <= slot;
    r_q.st    <= c.st;
    st        <= S_DONE;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      c     <= '0;
      r_q   <= '0;
      tv    <= '0;
      ra    <= '0;
      rs_lg <= '0;
      rr    <= '0;
      hreg  <= '0;
      w_raw <= '0;
      w_pa  <= '0;
      w_ok  <= 1'b0;
    end else begin
      if (flush) tv <= '0;
      unique case (st)
        S_IDLE: begin
          if (in_valid) begin
            c  <= in_ctx;
            st <= S_ROUTE;
          end else if (host_valid) begin
            c          <= '0;
            c.ins      <= host_find;
            c.phase    <= (host_find.stype == ST_BTREE) ? PH_KEY : PH_DATA;
            c.st.nodes <= 32'd1;
            st         <= S_XBASE;
          end
        end
        S_XBASE: begin                                   // step 1
          if (ins_bad || !b_ok || c.ins.base[2:0] != 3'd0) finish(1'b0, 1'b1, 5'd0);
          else begin
            c.node   <= b_pa;
            c.xlated <= 1'b1;
            st       <= S_ROUTE;
          end
        end
        S_ROUTE: st <= (wa_leader != vault_id) ? S_FWD : S_LOOK;   // steps 2, 6
        S_FWD:   if (out_ready) st <= S_IDLE;
        S_LOOK: begin                                    // step 7
          if (hit) begin
            hreg      <= hit_idx;
            c.st.hits <= c.st.hits + 32'd1;
            st        <= S_READ;
          end else begin
            st <= S_LOAD;
          end
        end
        S_LOAD: begin                                    // step 3
          tv[rr]     <= 1'b0;
          c.st.loads <= c.st.loads + 32'd1;
          st         <= S_LWAIT;
        end
        S_LWAIT: if (!ld_busy) begin
          tv[rr]    <= 1'b1;
          ra[rr]    <= ld_base;
          rs_lg[rr] <= c.ins.op_lg;
          hreg      <= rr;
          rr        <= (32'(rr) == NREG - 1) ? '0 : rr + RW'(1);
          st        <= S_READ;
        end
        S_READ: begin
          w_raw <= rd_raw;
          w_pa  <= rd_pa;
          w_ok  <= rd_ok;
          st    <= S_EVAL;
        end
        S_EVAL: begin
          unique case (c.phase)
            PH_DATA: begin                               // step 4
              if ((w_raw & dmask) == (c.ins.gold & dmask)) finish(1'b1, 1'b0, 5'd0);
              else begin
                c.phase <= PH_NEXT;
                st      <= S_ROUTE;
              end
            end
            PH_NEXT: begin                               // step 5
              if (w_raw == '0) finish(1'b0, 1'b0, 5'd0);
              else if (!w_ok) finish(1'b0, 1'b1, 5'd0);
              else begin
                c.node     <= w_pa;
                c.phase    <= PH_DATA;
                c.st.nodes <= c.st.nodes + 32'd1;
                st         <= S_ROUTE;
              end
            end
            PH_KEY: begin                                // step 4, b+tree keys
              if (w_raw == c.ins.gold) begin
                c.eq_seen <= 1'b1;
                c.eq_idx  <= c.idx;
              end
              if (w_raw <= c.ins.gold) c.cnt <= c.cnt + 5'd1;
              c.idx <= c.idx + 5'd1;
              if (w_raw > c.ins.gold || 16'(c.idx) + 16'd1 == c.ins.data_size) c.phase <= PH_PTR;
              st <= S_ROUTE;
            end
            default: begin                               // step 5, child pointer
              if (w_raw == '0) finish(c.eq_seen, 1'b0, c.eq_idx);
              else if (!w_ok) finish(1'b0, 1'b1, 5'd0);
              else begin
                c.node     <= w_pa;
                c.phase    <= PH_KEY;
                c.idx      <= '0;
                c.cnt      <= '0;
                c.eq_seen  <= 1'b0;
                c.eq_idx   <= '0;
                c.st.nodes <= c.st.nodes + 32'd1;
                st         <= S_ROUTE;
              end
            end
          endcase
        end
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // a forwarded search always leaves for another vault
  a_fwd_other: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> out_dest != vault_id);
  // a hit is only read from a valid register
  a_read_valid: assert property (@(posedge clk) disable iff (!rst_n) st == S_READ |-> tv[hreg]);
endmodule
