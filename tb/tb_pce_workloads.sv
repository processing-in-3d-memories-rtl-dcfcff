// tb_pce_workloads: scaled-down versions of the evaluated workloads, run on
// the cube at its default size.
//
//   * linked list, contiguous and with 25 %, 50 % and 100 % of the nodes
//     placed at random 16-byte slots (NLIST nodes of 16 bytes);
//   * hash-bucket chains (32-byte nodes, 4-byte keys);
//   * b+tree of 256-byte nodes with 16 children per node;
// each searched with operand sizes from 64 B to 8 KB.  Every result is
// checked against the structure as built, and the cycle count of each run
// is printed as a table.  For the contiguous list the 8 KB operand must be
// faster than the 64 B one (wider speculative windows mean fewer loads).
module tb_pce_workloads;
  import pce_pkg::*;
  import tb_ds_pkg::*;

  localparam int unsigned NV = 32, VBYTES = 256;
  localparam int unsigned NLIST = 1024;
  localparam int unsigned NBK   = 2000;

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
      if (cyc - t0 > 200000) begin
        failures++;
        $display("FAIL: FIND did not finish within 200000 cycles");
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

  int unsigned oplgs [5] = '{6, 8, 10, 12, 13};
  int unsigned pcts [4]  = '{0, 25, 50, 100};

  // list with a fraction pct of its nodes at random slots of a region 4x
  // the list, the others in sequence
  task automatic build_mixed_list(input int unsigned pct, ref longint unsigned offs[$]);
    bit used [];
    int unsigned seq = 0;
    used = new[4 * NLIST];
    offs.delete();
    for (int i = 0; i < int'(NLIST); i++) begin
      int unsigned s;
      if ($urandom_range(99) < pct) begin
        do s = $urandom_range(4 * NLIST - 1); while (used[s]);
      end else begin
        while (used[seq]) seq++;
        s = seq;
      end
      used[s] = 1'b1;
      offs.push_back(16 * s);
    end
  endtask

  longint unsigned offs[$];
  logic [63:0] keys[$];
  result_t r;
  int cy, cy64, cy8k;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 1'b0;
    host_find  = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------------- linked lists
    foreach (pcts[p]) begin
      reset_image();
      build_mixed_list(pcts[p], offs);
      keys.delete();
      for (int i = 0; i < int'(NLIST); i++) keys.push_back(64'(10000 + i));
      build_list(offs, keys, 0, 8);
      load_image();
      foreach (oplgs[o]) begin
        // switch the grouping twice so every run starts with empty registers
        run_find(mk_find(ST_LIST, va(offs[0]), 0, 8, 8, 64'd10000, 16, (oplgs[o] <= 8) ? 13 : 6), r, cy);
        run_find(mk_find(ST_LIST, va(offs[0]), 0, 8, 8, 64'(10000 + NLIST - 1), 16, oplgs[o]), r, cy);
        check(r.found && r.node == PA_W'(pa(offs[NLIST-1])) && r.st.nodes == NLIST,
              $sformatf("list %0d%% random, %0d B", pcts[p], 1 << oplgs[o]));
        $display("list  %3d%% random  operand %4d B: %7d cycles, %5d loads, %5d forwards",
                 pcts[p], 1 << oplgs[o], cy, r.st.loads, r.st.fwds);
        if (p == 0 && oplgs[o] == 6)  cy64 = cy;
        if (p == 0 && oplgs[o] == 13) cy8k = cy;
      end
    end
    check(cy8k < cy64, "contiguous list: 8 KB windows beat 64 B windows");

    // ---------------------------------------------------- hash chains
    reset_image();
    offs.delete();
    keys.delete();
    for (int i = 0; i < 64; i++) begin
      offs.push_back(64'h1_0000 + 64'($urandom_range(2047)) * 256 + 32 * (i % 8));
      keys.push_back({32'hABCD_0000 | 32'(i), 32'(i * 13 + 5)});
    end
    // make the slots distinct
    for (int i = 0; i < 64; i++) offs[i] = 64'h1_0000 + 64'(i) * 4096 + (offs[i] & 64'hFE0);
    build_list(offs, keys, 8, 0);
    load_image();
    foreach (oplgs[o]) begin
      run_find(mk_find(ST_HASH, va(offs[0]), 8, 4, 0, 64'd5, 32, (oplgs[o] <= 8) ? 13 : 6), r, cy);
      run_find(mk_find(ST_HASH, va(offs[0]), 8, 4, 0, 64'(63 * 13 + 5), 32, oplgs[o]), r, cy);
      check(r.found && r.node == PA_W'(pa(offs[63])) && r.st.nodes == 64, $sformatf("hash %0d B", 1 << oplgs[o]));
      $display("hash  chain of 64   operand %4d B: %7d cycles, %5d loads", 1 << oplgs[o], cy, r.st.loads);
    end

    // ---------------------------------------------------- b+tree
    begin
      longint unsigned root;
      int unsigned depth;
      reset_image();
      build_btree(64'h0, NBK, root, depth);
      load_image();
      foreach (oplgs[o]) begin
        int total;
        total = 0;
        for (int k = 0; k < 20; k++) begin
          automatic int unsigned j = $urandom_range(NBK - 1);
          run_find(mk_find(ST_BTREE, va(root), 0, 15, 128, bt_key(j), 256, oplgs[o]), r, cy);
          total += cy;
          check(r.found && r.node == PA_W'(pa(bt_leaf(64'h0, j))) && r.slot == 5'(j % 15) &&
                r.st.nodes == depth, $sformatf("b+tree %0d B key %0d", 1 << oplgs[o], j));
        end
        $display("btree %0d keys depth %0d operand %4d B: %7d cycles for 20 searches", NBK, depth, 1 << oplgs[o], total);
      end
    end

    check(mem.total_bad() == 0, "DRAM requests inside their vault and block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
