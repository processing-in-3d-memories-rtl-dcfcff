// tb_seg_xlate: checks direct-segment translation against the rule
// "base <= V < limit gives V + offset" on edge cases and random addresses.
module tb_seg_xlate;
  import pce_pkg::*;

  logic [VA_W-1:0] va, b, l, o;
  logic [PA_W-1:0] pa;
  logic            ok;
  int checks = 0, failures = 0;

  seg_xlate dut (.va, .seg_base(b), .seg_limit(l), .seg_offset(o), .pa, .ok);

  task automatic try(input logic [63:0] v);
    logic [63:0] e;
    logic        eok;
    va = v;
    #1;
    eok = (v >= b) && (v < l);
    e   = v + o;
    checks++;
    if (ok !== eok || (eok && pa !== e[PA_W-1:0])) begin
      failures++;
      $display("FAIL va=%h ok=%b pa=%h expected ok=%b pa=%h", v, ok, pa, eok, e[PA_W-1:0]);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 64'h0000_7f00_0000_0000;
    l = 64'h0000_7f00_4000_0000;
    o = 64'h0000_0001_0000_0000 - b;
    try(b); try(b - 1); try(l - 1); try(l); try(64'd0); try('1);
    for (int i = 0; i < 200; i++) try(b + {$urandom, $urandom} % (64'h8000_0000));
    // a second segment
    b = 64'h1000; l = 64'h2000_0000; o = 64'h0_1234_0000;
    for (int i = 0; i < 200; i++) try({32'd0, $urandom} % 64'h4000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
