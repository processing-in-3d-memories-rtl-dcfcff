// tb_ifind_net: sends Internal Find contexts between random vaults of the
// 32-port network, with several senders at once and destinations that stall,
// and checks that each context arrives once, unchanged, at its destination,
// and that an unstalled message takes exactly LAT = 5 cycles.
module tb_ifind_net;
  import pce_pkg::*;

  localparam int unsigned NV = 32, LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic [NV-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [NV-1:0][4:0] in_dest;
  ctx_t [NV-1:0] in_ctx, out_ctx;
  logic empty;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  ifind_net #(.NV(NV), .LAT(LAT)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_dest, .in_ctx,
                                       .out_valid, .out_ready, .out_ctx, .empty);

  // outstanding messages, tagged by their node field
  int unsigned exp_dest [int unsigned];
  longint unsigned sent_at [int unsigned];
  int unsigned next_tag = 1, received = 0;
  bit stall_mode = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < int'(NV); j++) begin
      if (out_valid[j] && out_ready[j]) begin
        automatic int unsigned tg = int'(out_ctx[j].node);
        checks++;
        if (!exp_dest.exists(tg) || exp_dest[tg] != j) begin
          failures++;
          $display("FAIL: tag %0d delivered to vault %0d", tg, j);
        end else begin
          if (!stall_mode) begin
            checks++;
            if (cyc - sent_at[tg] != LAT) begin
              failures++;
              $display("FAIL: tag %0d latency %0d", tg, cyc - sent_at[tg]);
            end
          end
          exp_dest.delete(tg);
          received++;
        end
      end
    end
  end

  // senders: record the handshake cycle
  bit acc [NV];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < int'(NV); i++)
      if (in_valid[i] && in_ready[i]) begin
        automatic int unsigned tg = int'(in_ctx[i].node);
        acc[i] = 1'b1;
        sent_at[tg] = cyc;
        exp_dest[tg] = in_dest[i];
      end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(input int n, input bit stall);
    int sent = 0;
    stall_mode = stall;
    while (sent < n) begin
      @(negedge clk);
      // drop the valid of ports whose request was taken at the last edge
      for (int i = 0; i < int'(NV); i++) begin
        if (acc[i]) begin
          acc[i] = 1'b0;
          in_valid[i] = 1'b0;
          sent++;
        end
      end
      for (int i = 0; i < int'(NV); i++) begin
        if (!in_valid[i] && sent + $countones(in_valid) < n && $urandom_range(3) == 0) begin
          in_valid[i] = 1'b1;
          in_dest[i]  = 5'($urandom_range(NV - 1));
          in_ctx[i]   = '0;
          in_ctx[i].node = PA_W'(next_tag);
          in_ctx[i].ins.gold = {$urandom, $urandom};
          next_tag++;
        end
      end
      out_ready = stall ? NV'({$urandom}) : '1;
    end
    @(negedge clk);
    in_valid = '0;
    out_ready = '1;
    repeat (4 * LAT + 40) @(negedge clk);
  endtask

  initial begin
    in_valid = '0; in_dest = '0; in_ctx = '0; out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // one message at a time: exact latency
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      in_valid[k % NV] = 1'b1; in_dest[k % NV] = 5'((k * 7) % NV);
      in_ctx[k % NV] = '0; in_ctx[k % NV].node = PA_W'(next_tag); next_tag++;
      @(negedge clk);
      in_valid = '0;
      acc[k % NV] = 1'b0;
      repeat (LAT + 2) @(negedge clk);
    end
    burst(200, 1'b0);
    burst(200, 1'b1);
    checks++;
    if (exp_dest.size() != 0 || received != next_tag - 1 || !empty) begin
      failures++;
      $display("FAIL: %0d messages lost, received %0d of %0d", exp_dest.size(), received, next_tag - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
