// tb_vault_slice: loads 64-, 128- and 256-byte pieces into the registers of
// one vault slice from a responder whose data is a known function of the
// address, then reads every lane back.  Checks that the requested bytes
// arrived, the other bytes of the register kept their value, each lane's
// direct-segment translation, the request the slice sent, and that ld_busy
// spans exactly request + memory latency.
module tb_vault_slice;
  import pce_pkg::*;

  localparam int unsigned NREG = 8, VBYTES = 256, LANES = 32, MLAT = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [VA_W-1:0] sb, sl, so;
  logic ld_start, ld_busy;
  logic [PA_W-1:0] ld_addr;
  logic [3:0] ld_lg;
  logic [2:0] ld_reg, rd_reg;
  logic mq_v, mq_r, mr_v;
  logic [PA_W-1:0] mq_a;
  logic [3:0] mq_lg;
  logic [VBYTES*8-1:0] mr_d;
  logic [4:0] rd_lane;
  logic [WORD_W-1:0] rd_raw;
  logic [PA_W-1:0] rd_pa;
  logic rd_ok;
  int checks = 0, failures = 0;

  vault_slice #(.NREG(NREG), .VBYTES(VBYTES)) dut (
    .clk, .rst_n, .seg_base(sb), .seg_limit(sl), .seg_offset(so),
    .ld_start, .ld_addr, .ld_lg, .ld_reg, .ld_busy,
    .mem_req_valid(mq_v), .mem_req_ready(mq_r), .mem_req_addr(mq_a), .mem_req_lg(mq_lg),
    .mem_rsp_valid(mr_v), .mem_rsp_data(mr_d),
    .rd_reg, .rd_lane, .rd_raw, .rd_pa, .rd_ok
  );

  // memory content: word at byte address a (8-aligned); some words are
  // pointers into the segment
  function automatic logic [63:0] mword(input longint unsigned a, input int unsigned salt);
    logic [63:0] x = (a * 64'h9E37_79B9_7F4A_7C15) ^ 64'(salt);
    return x[0] ? 64'h0000_7f00_0000_0000 + (x & 64'hF_FFF8) : x;
  endfunction

  int unsigned salt = 0;
  logic [63:0] ref_r [NREG][LANES];
  longint unsigned t_start;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // responder: ready always, answers MLAT cycles after the request
  logic [PA_W-1:0] pa_q;
  int unsigned cnt = 0;
  bit pend = 0;
  assign mq_r = !pend;
  always @(posedge clk) begin
    mr_v <= 1'b0;
    if (!rst_n) begin
      pend <= 1'b0;
    end else if (mq_v && mq_r) begin
      pend <= 1'b1; cnt <= MLAT; pa_q <= mq_a;
    end else if (pend) begin
      if (cnt <= 1) begin
        pend <= 1'b0;
        mr_v <= 1'b1;
        for (int w = 0; w < int'(LANES); w++)
          mr_d[w*64 +: 64] <= mword({pa_q[PA_W-1:8], 8'h00} + 8 * w, salt);
      end else cnt <= cnt - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_load(input int unsigned r, input longint unsigned a, input int unsigned lg);
    longint unsigned t0, t1;
    salt = $urandom;
    @(negedge clk);
    ld_start = 1'b1; ld_addr = PA_W'(a); ld_lg = 4'(lg); ld_reg = 3'(r);
    t0 = cyc;
    @(negedge clk);
    ld_start = 1'b0;
    check(ld_busy, "ld_busy rises after ld_start");
    while (!mq_v) @(negedge clk);
    check(mq_a == PA_W'(a) && mq_lg == 4'(lg), "request address and size");
    while (ld_busy) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == MLAT + 3, $sformatf("load took %0d cycles, expected %0d", t1 - t0, MLAT + 3));
    for (int w = 0; w < int'(LANES); w++) begin
      longint unsigned wa = (a & ~64'hFF) + 8 * w;
      if (wa >= a && wa < a + (1 << lg)) ref_r[r][w] = mword(wa, salt);
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < int'(NREG); r++)
      for (int w = 0; w < int'(LANES); w++) begin
        logic [63:0] e;
        rd_reg = 3'(r); rd_lane = 5'(w);
        #1;
        e = ref_r[r][w] + so;
        check(rd_raw == ref_r[r][w], $sformatf("reg %0d lane %0d data", r, w));
        check(rd_ok == (ref_r[r][w] >= sb && ref_r[r][w] < sl), "lane in-segment flag");
        if (rd_ok) check(rd_pa == e[PA_W-1:0], "lane translation");
      end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sb = 64'h0000_7f00_0000_0000; sl = sb + 64'h8_0000; so = 64'h1_0000_0000 - sb;
    ld_start = 0; ld_addr = '0; ld_lg = '0; ld_reg = '0; rd_reg = '0; rd_lane = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill every register completely first
    for (int r = 0; r < int'(NREG); r++) do_load(r, 64'h1_0000_0000 + 64'(r) * 8192, 8);
    read_all();
    // partial loads into random registers
    for (int k = 0; k < 24; k++) begin
      int unsigned lg = 6 + (k % 3);
      longint unsigned a = 64'h1_0000_0000 + 64'($urandom_range(4095)) * 256 +
                           64'($urandom_range((256 >> lg) - 1)) * (64'd1 << lg);
      do_load($urandom_range(NREG - 1), a, lg);
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
