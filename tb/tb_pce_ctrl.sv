// tb_pce_ctrl: tests one PCE controller as the leader (vault 0) of a
// two-vault system, with two vault slices and the vault memory model around
// it; the testbench plays the grouping logic and the inter-vault network.
// Covered: list walks with one and two vaults per logical PCE, forwarding
// of a search whose next node lies in vault 1 (destination and context
// checked), continuing a search that arrives as an Internal Find, b+tree
// search, reuse of registers by a second FIND, tag flush, malformed FIND
// and the cycle count of a walk that hits in registers (2 + 4 per word).
module tb_pce_ctrl;
  import pce_pkg::*;
  import tb_ds_pkg::*;

  localparam int unsigned NV = 2, NREG = 4, VBYTES = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [3:0] grp_lg;
  logic flush;
  logic host_valid, host_ready, in_valid, in_ready, out_valid, out_ready;
  find_t host_find;
  ctx_t in_ctx, out_ctx;
  logic [0:0] out_dest, rd_vault;
  logic ld_start, ld_busy;
  logic [PA_W-1:0] ld_base;
  logic [3:0] ld_lg;
  logic [1:0] ld_reg, rd_reg;
  logic [4:0] rd_lane;
  logic res_valid, busy;
  result_t res;

  logic [NV-1:0] s_busy, mq_v, mq_r, mr_v, s_ok;
  logic [NV-1:0][PA_W-1:0] mq_a, s_pa, sl_addr;
  logic [NV-1:0][3:0] mq_lg, sl_lg;
  logic [NV-1:0][VBYTES*8-1:0] mr_d;
  logic [NV-1:0][63:0] s_raw;
  logic [NV-1:0] sl_start;

  pce_ctrl #(.NV(NV), .NREG(NREG), .VBYTES(VBYTES)) dut (
    .clk, .rst_n, .vault_id(1'b0), .grp_lg, .flush,
    .seg_base(VA0), .seg_limit(VA0 + SEG_LEN), .seg_offset(PA0 - VA0),
    .host_valid, .host_ready, .host_find,
    .in_valid, .in_ready, .in_ctx, .out_valid, .out_ready, .out_dest, .out_ctx,
    .ld_start, .ld_base, .ld_lg, .ld_reg, .ld_busy,
    .rd_vault, .rd_reg, .rd_lane,
    .rd_raw(s_raw[rd_vault]), .rd_pa(s_pa[rd_vault]), .rd_ok(s_ok[rd_vault]),
    .res_valid, .res, .busy
  );

  // group logic: vault 1 joins the load when two vaults form one PCE
  always_comb begin
    for (int v = 0; v < int'(NV); v++) begin
      sl_start[v] = ld_start && (v == 0 || grp_lg == 4'd1);
      sl_addr[v]  = (ld_lg > 4'd8) ? ld_base + PA_W'(256 * v) : ld_base;
      sl_lg[v]    = (ld_lg > 4'd8) ? 4'd8 : ld_lg;
    end
    ld_busy = s_busy[0] || (grp_lg == 4'd1 && s_busy[1]);
  end

  for (genvar v = 0; v < NV; v++) begin : g_sl
    vault_slice #(.NREG(NREG), .VBYTES(VBYTES)) u_sl (
      .clk, .rst_n, .seg_base(VA0), .seg_limit(VA0 + SEG_LEN), .seg_offset(PA0 - VA0),
      .ld_start(sl_start[v]), .ld_addr(sl_addr[v]), .ld_lg(sl_lg[v]), .ld_reg, .ld_busy(s_busy[v]),
      .mem_req_valid(mq_v[v]), .mem_req_ready(mq_r[v]), .mem_req_addr(mq_a[v]), .mem_req_lg(mq_lg[v]),
      .mem_rsp_valid(mr_v[v]), .mem_rsp_data(mr_d[v]),
      .rd_reg, .rd_lane, .rd_raw(s_raw[v]), .rd_pa(s_pa[v]), .rd_ok(s_ok[v])
    );
  end

  hmc_vault_model #(.NV(NV), .VBYTES(VBYTES), .LATENCY(10), .MEM_LG(20)) mem (
    .clk, .rst_n, .req_valid(mq_v), .req_ready(mq_r), .req_addr(mq_a), .req_lg(mq_lg),
    .rsp_valid(mr_v), .rsp_data(mr_d)
  );

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // network side: capture forwarded searches
  ctx_t fwd_ctx;
  int n_fwd = 0;
  logic fwd_dest;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    n_fwd++;
    fwd_ctx  <= out_ctx;
    fwd_dest <= out_dest;
  end

  task automatic wait_res(output result_t r);
    longint unsigned t0 = cyc;
    while (!res_valid) begin
      @(negedge clk);
      if (cyc - t0 > 20000) begin
        failures++;
        $display("FAIL: FIND did not finish within 20000 cycles");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    r = res;
    @(negedge clk);
  endtask

  task automatic run_find(input find_t f, output result_t r, output int cycles);
    longint unsigned t0;
    @(negedge clk);
    host_find = f; host_valid = 1'b1;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    host_valid = 1'b0;
    wait_res(r);
    cycles = int'(cyc - t0) - 1;
  endtask

  longint unsigned offs[$];
  logic [63:0] keys[$];
  longint unsigned broot;
  int unsigned bdepth;
  result_t r;
  int cy;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grp_lg = 4'd1; flush = 1'b0; host_valid = 1'b0; host_find = '0;
    in_valid = 1'b0; in_ctx = '0; out_ready = 1'b1;
    for (int i = 0; i < 48; i++) begin
      offs.push_back(16 * i);
      keys.push_back(64'(200 + i));
    end
    build_list(offs, keys, 0, 8);
    build_btree(64'h8_0000, 120, broot, bdepth);
    foreach (img[a]) mem.poke64(pa(a), img[a]);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // two vaults as one PCE, 512-byte windows
    run_find(mk_find(ST_LIST, va(0), 0, 8, 8, 64'd230, 16, 9), r, cy);
    check(r.found && r.node == PA_W'(pa(16 * 30)) && r.st.nodes == 16'd31, "list/512B: node 30");
    check(r.st.loads == 16'd1 && r.st.fwds == 16'd0, "list/512B: one load, no forward");
    // same FIND again: registers hold the window
    run_find(mk_find(ST_LIST, va(0), 0, 8, 8, 64'd205, 16, 9), r, cy);
    check(r.found && r.st.loads == 16'd0, "list/512B rerun: no load");
    check(cy == 2 + 4 * (2 * 5 + 1), $sformatf("list/512B rerun: %0d cycles, expected %0d", cy, 2 + 44));
    // after a flush the window has to be loaded again
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    run_find(mk_find(ST_LIST, va(0), 0, 8, 8, 64'd205, 16, 9), r, cy);
    check(r.found && r.st.loads == 16'd1, "flush: window reloaded");

    // one vault per PCE: node 16 (offset 256) is in vault 1
    @(negedge clk); grp_lg = 4'd0; flush = 1'b1; @(negedge clk); flush = 1'b0;
    @(negedge clk);
    host_find = mk_find(ST_LIST, va(0), 0, 8, 8, 64'd240, 16, 8); host_valid = 1'b1;
    @(negedge clk);
    host_valid = 1'b0;
    while (busy) @(negedge clk);
    check(n_fwd == 1 && fwd_dest == 1'b1, "list/256B: search forwarded to vault 1");
    check(fwd_ctx.node == PA_W'(pa(256)) && fwd_ctx.phase == PH_DATA && fwd_ctx.xlated &&
          fwd_ctx.st.nodes == 16'd17 && fwd_ctx.st.fwds == 16'd1, "forwarded context");

    // a search that arrives from vault 1 at node 32 (offset 512, vault 0)
    @(negedge clk);
    in_ctx = fwd_ctx;
    in_ctx.node = PA_W'(pa(512));
    in_ctx.st.nodes = 16'd33;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    wait_res(r);
    check(r.found && r.node == PA_W'(pa(16 * 40)) && r.st.nodes == 16'd41, "Internal Find continued to node 40");

    // b+tree, two vaults per PCE, 512-byte windows
    @(negedge clk); grp_lg = 4'd1; flush = 1'b1; @(negedge clk); flush = 1'b0;
    for (int k = 0; k < 10; k++) begin
      automatic int unsigned j = (k == 0) ? 119 : $urandom_range(119);
      run_find(mk_find(ST_BTREE, va(broot), 0, 15, 128, bt_key(j), 256, 9), r, cy);
      check(r.found && r.node == PA_W'(pa(bt_leaf(64'h8_0000, j))) && r.slot == 5'(j % 15) &&
            r.st.nodes == 16'(bdepth), $sformatf("b+tree: key %0d", j));
    end
    run_find(mk_find(ST_BTREE, va(broot), 0, 15, 128, 64'd2000, 256, 9), r, cy);
    check(!r.found && !r.fault, "b+tree: key above all keys");

    // malformed: 16 keys do not fit, data size 0
    run_find(mk_find(ST_BTREE, va(broot), 0, 16, 128, 64'd10, 256, 9), r, cy);
    check(r.fault, "b+tree with 16 keys rejected");
    run_find(mk_find(ST_LIST, va(0), 0, 0, 8, 64'd10, 16, 9), r, cy);
    check(r.fault, "list with data size 0 rejected");

    check(mem.total_bad() == 0, "requests stayed in their vault and block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
