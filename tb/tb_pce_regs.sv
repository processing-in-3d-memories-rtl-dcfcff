// tb_pce_regs: register capacity, 64 KB against 8 KB.
//
// Two cubes run side by side on identical memory images: one with the
// default 8 registers per vault (32 x 8 x 256 B = 64 KB), one with a single
// register per vault (8 KB).  The same sequence of b+tree searches, with
// many repeated keys, and hash-chain searches is sent to both.  Both must
// return the right results; the 64 KB cube must reach DRAM less often,
// since more windows stay in registers between searches.
module tb_pce_regs;
  import pce_pkg::*;
  import tb_ds_pkg::*;

  localparam int unsigned NV = 32, VBYTES = 256, NBK = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [1:0] host_valid, host_ready, res_valid, busy;
  find_t host_find;
  result_t res [2];
  logic [1:0][NV-1:0] mq_v, mq_r, mr_v;
  logic [1:0][NV-1:0][PA_W-1:0] mq_a;
  logic [1:0][NV-1:0][3:0] mq_lg;
  logic [1:0][NV-1:0][VBYTES*8-1:0] mr_d;

  pce_cube #(.NREG(8)) dut8 (
    .clk, .rst_n, .seg_base(VA0), .seg_limit(VA0 + SEG_LEN), .seg_offset(PA0 - VA0),
    .host_valid(host_valid[0]), .host_ready(host_ready[0]), .host_find,
    .res_valid(res_valid[0]), .res(res[0]), .busy(busy[0]),
    .mem_req_valid(mq_v[0]), .mem_req_ready(mq_r[0]), .mem_req_addr(mq_a[0]), .mem_req_lg(mq_lg[0]),
    .mem_rsp_valid(mr_v[0]), .mem_rsp_data(mr_d[0])
  );

  pce_cube #(.NREG(1)) dut1 (
    .clk, .rst_n, .seg_base(VA0), .seg_limit(VA0 + SEG_LEN), .seg_offset(PA0 - VA0),
    .host_valid(host_valid[1]), .host_ready(host_ready[1]), .host_find,
    .res_valid(res_valid[1]), .res(res[1]), .busy(busy[1]),
    .mem_req_valid(mq_v[1]), .mem_req_ready(mq_r[1]), .mem_req_addr(mq_a[1]), .mem_req_lg(mq_lg[1]),
    .mem_rsp_valid(mr_v[1]), .mem_rsp_data(mr_d[1])
  );

  for (genvar d = 0; d < 2; d++) begin : g_mem
    hmc_vault_model #(.NV(NV), .VBYTES(VBYTES), .LATENCY(20), .MEM_LG(20)) mem (
      .clk, .rst_n, .req_valid(mq_v[d]), .req_ready(mq_r[d]), .req_addr(mq_a[d]), .req_lg(mq_lg[d]),
      .rsp_valid(mr_v[d]), .rsp_data(mr_d[d])
    );
  end

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

  // send the same FIND to both cubes and wait for both results
  task automatic run_both(input find_t f, output result_t r8, output result_t r1);
    longint unsigned t0;
    bit got8 = 0, got1 = 0;
    logic [1:0] acc;
    @(negedge clk);
    host_find  = f;
    host_valid = 2'b11;
    t0 = cyc;
    while (host_valid != 2'b00 || !(got8 && got1)) begin
      @(posedge clk);
      acc = host_valid & host_ready;
      if (res_valid[0]) begin r8 = res[0]; got8 = 1; end
      if (res_valid[1]) begin r1 = res[1]; got1 = 1; end
      @(negedge clk);
      host_valid = host_valid & ~acc;
      if (cyc - t0 > 50000) begin
        failures++;
        $display("FAIL: FIND did not finish");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned root, hoffs[$];
  logic [63:0] hkeys[$];
  int unsigned depth;
  result_t a, b;
  int loads8 = 0, loads1 = 0;

  initial begin
    host_valid = '0;
    host_find  = '0;
    build_btree(64'h0, NBK, root, depth);
    for (int i = 0; i < 40; i++) begin
      hoffs.push_back(64'h8_0000 + 64'(i) * 2080);
      hkeys.push_back(64'(900 + 11 * i));
    end
    build_list(hoffs, hkeys, 8, 0);
    foreach (img[x]) begin
      g_mem[0].mem.poke64(pa(x), img[x]);
      g_mem[1].mem.poke64(pa(x), img[x]);
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // b+tree, 4 KB windows; keys drawn from a small hot set
    for (int k = 0; k < 60; k++) begin
      automatic int unsigned j = (k % 3 == 0) ? $urandom_range(NBK - 1) : 15 * $urandom_range(7) + 700;
      run_both(mk_find(ST_BTREE, va(root), 0, 15, 128, bt_key(j), 256, 12), a, b);
      check(a.found && a.node == PA_W'(pa(bt_leaf(0, j))) && a.slot == 5'(j % 15), $sformatf("64 KB b+tree key %0d", j));
      check(b.found && b.node == PA_W'(pa(bt_leaf(0, j))) && b.slot == 5'(j % 15), $sformatf("8 KB b+tree key %0d", j));
      loads8 += int'(a.st.loads);
      loads1 += int'(b.st.loads);
    end
    // hash chain, 8 KB windows, repeated
    for (int k = 0; k < 10; k++) begin
      automatic int unsigned i = $urandom_range(39);
      run_both(mk_find(ST_HASH, va(hoffs[0]), 8, 8, 0, hkeys[i], 32, 13), a, b);
      check(a.found && a.node == PA_W'(pa(hoffs[i])), "64 KB hash");
      check(b.found && b.node == PA_W'(pa(hoffs[i])), "8 KB hash");
      loads8 += int'(a.st.loads);
      loads1 += int'(b.st.loads);
    end
    $display("window loads: 64 KB of registers %0d, 8 KB of registers %0d", loads8, loads1);
    check(loads8 < loads1, "more registers, fewer DRAM loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
