// tb_pce_cube: end-to-end test of the cube of Pointer-Chasing Engines at
// its default size (32 vaults, 8 x 256-byte registers per vault, 5-cycle
// inter-vault network).
//
// Linked lists (contiguous and scattered), a hash-bucket chain with 4-byte
// keys and a three-level b+tree are built in the vault memory model, and
// FIND instructions with operand sizes from 64 B to 8 KB are sent.  Each
// result (found flag, node address, b+tree slot, nodes visited) is checked
// against what is known from building the structure.  Monitors count the
// mechanisms of the engine - Internal Find forwarding, window loads,
// register hits, register replacement, multi-vault (grouped) loads, tag
// flush on a grouping change, b+tree descent, translation faults - and a
// mechanism that never happened counts as a failure.  The cycle count of a
// walk that hits in registers only is checked against 2 + 4 per word.
module tb_pce_cube;
  import pce_pkg::*;
  import tb_ds_pkg::*;

  localparam int unsigned NV = 32, NREG = 8, VBYTES = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic host_valid, host_ready, res_valid, busy;
  find_t host_find;
  result_t res;
  logic [NV-1:0] mq_v, mq_r, mr_v;
  logic [NV-1:0][PA_W-1:0] mq_a;
  logic [NV-1:0][3:0] mq_lg;
  logic [NV-1:0][VBYTES*8-1:0] mr_d;

  pce_cube dut (
    .clk, .rst_n,
    .seg_base(VA0), .seg_limit(VA0 + SEG_LEN), .seg_offset(PA0 - VA0),
    .host_valid, .host_ready, .host_find, .res_valid, .res, .busy,
    .mem_req_valid(mq_v), .mem_req_ready(mq_r), .mem_req_addr(mq_a), .mem_req_lg(mq_lg),
    .mem_rsp_valid(mr_v), .mem_rsp_data(mr_d)
  );

  hmc_vault_model #(.NV(NV), .VBYTES(VBYTES), .LATENCY(20), .MEM_LG(20)) mem (
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

  // ---------------------------------------------------- mechanism monitors
  int n_fwd = 0, n_replace = 0, n_group_load = 0, n_flush = 0, n_multi_slice = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_net.in_valid & dut.u_net.in_ready) n_fwd++;
    if (dut.flush) n_flush++;
    if ($countones(mq_v & mq_r) > 1) n_multi_slice++;
  end
  for (genvar v = 0; v < NV; v++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_vault[v].u_ctrl.st == dut.g_vault[v].u_ctrl.S_LOAD) begin
        if (dut.g_vault[v].u_ctrl.tv[dut.g_vault[v].u_ctrl.rr]) n_replace++;
        if (dut.g_vault[v].u_ctrl.c.ins.op_lg > 4'd8) n_group_load++;
      end
    end
  end

  // ------------------------------------------------------------- driver
  task automatic run_find(input find_t f, output result_t r, output int cycles);
    longint unsigned t0;
    @(negedge clk);
    host_find  = f;
    host_valid = 1'b1;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    host_valid = 1'b0;
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
    cycles = int'(cyc - t0);
    @(negedge clk);
  endtask

  task automatic load_image();
    mem.clear();
    foreach (img[a]) mem.poke64(pa(a), img[a]);
  endtask

  // ------------------------------------------------------------ stimulus
  localparam int unsigned NL = 64;      // contiguous list nodes (16 B each)
  localparam longint unsigned L_OFF  = 64'h0_0000;
  localparam int unsigned NR = 40;      // scattered list nodes
  localparam longint unsigned R_OFF  = 64'h4_0000;
  localparam longint unsigned H_OFF  = 64'h6_0000;
  localparam longint unsigned B_OFF  = 64'h8_0000;
  localparam int unsigned NBK = 300;    // b+tree keys

  localparam longint unsigned V_OFF  = 64'hC_0000;
  localparam int unsigned NS = 12;      // same-vault list nodes, 8 KB apart

  longint unsigned loffs[$], roffs[$], hoffs[$], soffs[$];
  logic [63:0] lkeys[$], rkeys[$], hkeys[$], skeys[$];
  longint unsigned broot;
  int unsigned bdepth;
  result_t r;
  int cy;
  int n_found = 0, n_notfound = 0, n_fault = 0, n_bt_desc = 0, n_hits = 0, n_loads = 0;

  task automatic tally(input result_t x);
    if (x.found) n_found++;
    else if (x.fault) n_fault++;
    else n_notfound++;
    n_hits  += int'(x.st.hits);
    n_loads += int'(x.st.loads);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 1'b0;
    host_find  = '0;
    // contiguous list: key of node i is 1000+i
    for (int i = 0; i < int'(NL); i++) begin
      loffs.push_back(L_OFF + 16 * i);
      lkeys.push_back(64'(1000 + i));
    end
    build_list(loffs, lkeys, 0, 8);
    // scattered list: distinct 16-byte slots in a 64 KB region
    begin
      bit used [4096];
      for (int i = 0; i < int'(NR); i++) begin
        int unsigned s;
        do s = $urandom_range(4095); while (used[s]);
        used[s] = 1'b1;
        roffs.push_back(R_OFF + 16 * s);
        rkeys.push_back(64'(5000 + 7 * i));
      end
    end
    build_list(roffs, rkeys, 0, 8);
    // hash-bucket chain: 32-byte nodes, next at 0, 4-byte key at 8; the
    // upper half of the key word holds unrelated data
    for (int i = 0; i < 12; i++) begin
      hoffs.push_back(H_OFF + 512 * i + 32 * (i % 4));
      hkeys.push_back({32'hDEAD_0000 + 32'(i), 32'(77 + 3 * i)});
    end
    build_list(hoffs, hkeys, 8, 0);
    build_btree(B_OFF, NBK, broot, bdepth);
    // list whose nodes all live in vault 0, each in its own window
    for (int i = 0; i < int'(NS); i++) begin
      soffs.push_back(V_OFF + 8192 * i);
      skeys.push_back(64'(300 + i));
    end
    build_list(soffs, skeys, 0, 8);
    load_image();

    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. contiguous list, 64-byte operand: forwards between vaults
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd1040, 16, 6), r, cy);
    tally(r);
    check(r.found && !r.fault && r.node == PA_W'(pa(loffs[40])), "list/64B: found node 40");
    check(r.st.nodes == 16'd41, $sformatf("list/64B: 41 nodes visited (%0d)", r.st.nodes));
    check(r.st.fwds > 0, "list/64B: search moved between vaults");
    check(r.st.loads == 16'd11, $sformatf("list/64B: one load per 64-byte window (%0d)", r.st.loads));

    // 2. same list, 8 KB operand: one logical PCE over all 32 vaults
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd1063, 16, 13), r, cy);
    tally(r);
    check(r.found && r.node == PA_W'(pa(loffs[63])), "list/8KB: found last node");
    check(r.st.loads == 16'd1 && r.st.fwds == 16'd0, "list/8KB: one window load, no forward");

    // 3. again: the window is still in a register, every word hits
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd1010, 16, 13), r, cy);
    tally(r);
    check(r.found && r.node == PA_W'(pa(loffs[10])), "list/8KB rerun: found node 10");
    check(r.st.loads == 16'd0, "list/8KB rerun: no DRAM access");
    check(cy == 2 + 4 * (2 * 10 + 1), $sformatf("list/8KB rerun: %0d cycles, expected %0d", cy, 2 + 4 * 21));

    // 4. key absent: walk ends at the null pointer
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd999, 16, 13), r, cy);
    tally(r);
    check(!r.found && !r.fault && r.st.nodes == 16'(NL), "list: absent key walks all nodes");

    // 5. scattered list with 256-byte operand
    for (int k = 0; k < 6; k++) begin
      automatic int unsigned i = (k == 5) ? NR - 1 : $urandom_range(NR - 1);
      run_find(mk_find(ST_LIST, va(roffs[0]), 0, 8, 8, rkeys[i], 16, 8), r, cy);
      tally(r);
      check(r.found && r.node == PA_W'(pa(roffs[i])) && r.st.nodes == 16'(i + 1),
            $sformatf("scattered list/256B: node %0d", i));
    end
    run_find(mk_find(ST_LIST, va(roffs[0]), 0, 8, 8, 64'd4, 16, 9), r, cy);
    tally(r);
    check(!r.found && !r.fault, "scattered list/512B: absent key");

    // 6. hash-bucket chain, 4-byte keys, 128-byte operand
    for (int i = 0; i < 12; i += 5) begin
      run_find(mk_find(ST_HASH, va(hoffs[0]), 8, 4, 0, 64'(77 + 3 * i), 32, 7), r, cy);
      tally(r);
      check(r.found && r.node == PA_W'(pa(hoffs[i])), $sformatf("hash/128B: entry %0d", i));
    end
    run_find(mk_find(ST_HASH, va(hoffs[0]), 8, 4, 0, 64'd78, 32, 7), r, cy);
    tally(r);
    check(!r.found && !r.fault, "hash: absent key");

    // 7. b+tree with 4 KB operand
    for (int k = 0; k < 8; k++) begin
      automatic int unsigned j = (k == 0) ? 0 : (k == 1) ? NBK - 1 : $urandom_range(NBK - 1);
      run_find(mk_find(ST_BTREE, va(broot), 0, 15, 128, bt_key(j), 256, 12), r, cy);
      tally(r);
      if (r.st.nodes > 1) n_bt_desc++;
      check(r.found && r.node == PA_W'(pa(bt_leaf(B_OFF, j))) && r.slot == 5'(j % 15) &&
            r.st.nodes == 16'(bdepth), $sformatf("b+tree/4KB: key %0d", j));
    end
    run_find(mk_find(ST_BTREE, va(broot), 0, 15, 128, 64'd15, 256, 12), r, cy);
    tally(r);
    check(!r.found && !r.fault, "b+tree: absent key");
    // b+tree with 64-byte operand: a node spans four windows
    run_find(mk_find(ST_BTREE, va(broot), 0, 15, 128, bt_key(123), 256, 6), r, cy);
    tally(r);
    check(r.found && r.node == PA_W'(pa(bt_leaf(B_OFF, 123))), "b+tree/64B: key 123");

    // 8. faults: base outside the segment, operand size below 64 B
    run_find(mk_find(ST_LIST, VA0 - 64'h100, 0, 8, 8, 64'd1, 16, 8), r, cy);
    tally(r);
    check(r.fault && !r.found, "fault: base outside the direct segment");
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd1001, 16, 5), r, cy);
    tally(r);
    check(r.fault, "fault: 32-byte operand rejected");

    // 9. long walk with small windows in one vault: registers get replaced
    run_find(mk_find(ST_LIST, va(loffs[0]), 0, 8, 8, 64'd2, 16, 6), r, cy);
    tally(r);
    check(!r.found && r.st.nodes == 16'(NL), "list/64B: full walk");
    run_find(mk_find(ST_LIST, va(roffs[0]), 0, 8, 8, 64'd2, 16, 6), r, cy);
    tally(r);
    check(!r.found && r.st.nodes == 16'(NR), "scattered list/64B: full walk");

    // more windows in one vault than it has registers
    run_find(mk_find(ST_LIST, va(soffs[0]), 0, 8, 8, 64'(300 + NS - 1), 16, 6), r, cy);
    tally(r);
    check(r.found && r.node == PA_W'(pa(soffs[NS-1])) && r.st.fwds == 16'd0 && r.st.loads == 16'(NS),
          "same-vault list/64B: one load per node, no forward");
    run_find(mk_find(ST_LIST, va(soffs[0]), 0, 8, 8, 64'(300), 16, 6), r, cy);
    tally(r);
    check(r.found && r.st.loads == 16'd1, "same-vault list/64B: first window was replaced");

    check(mem.total_bad() == 0, "every DRAM request stayed inside its vault and block");

    // mechanisms
    $display("mechanisms: fwd=%0d loads=%0d hits=%0d replace=%0d group_loads=%0d multi_slice=%0d flush=%0d found=%0d notfound=%0d fault=%0d bt_descent=%0d",
             n_fwd, n_loads, n_hits, n_replace, n_group_load, n_multi_slice, n_flush, n_found, n_notfound, n_fault, n_bt_desc);
    check(n_fwd > 0, "mechanism: Internal Find");
    check(n_loads > 0, "mechanism: window load");
    check(n_hits > 0, "mechanism: register hit");
    check(n_replace > 0, "mechanism: register replacement");
    check(n_group_load > 0, "mechanism: grouped (multi-vault) load");
    check(n_multi_slice > 0, "mechanism: several vaults loading at once");
    check(n_flush > 0, "mechanism: grouping change clears tags");
    check(n_found > 0 && n_notfound > 0 && n_fault > 0, "mechanism: found / not found / fault");
    check(n_bt_desc > 0, "mechanism: b+tree descent");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
