// tb_vec_xlate: fills all 32 lanes with addresses inside and outside the
// direct segment and checks every lane's translation and in-segment flag.
module tb_vec_xlate;
  import pce_pkg::*;

  localparam int unsigned LANES = 32;
  logic [LANES-1:0][VA_W-1:0] vin;
  logic [LANES-1:0][PA_W-1:0] pa;
  logic [LANES-1:0]           ok;
  logic [VA_W-1:0] b, l, o;
  int checks = 0, failures = 0;

  vec_xlate #(.LANES(LANES)) dut (.vin, .seg_base(b), .seg_limit(l), .seg_offset(o), .pa, .ok);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 64'h0000_5555_0000_0000;
    l = 64'h0000_5555_1000_0000;
    o = 64'h0000_0000_8000_0000 - b;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < int'(LANES); i++)
        vin[i] = ($urandom_range(3) == 0) ? {$urandom, $urandom} : b + 64'($urandom % 32'h2000_0000);
      #1;
      for (int i = 0; i < int'(LANES); i++) begin
        automatic logic [63:0] e = vin[i] + o;
        automatic logic eok = (vin[i] >= b) && (vin[i] < l);
        checks++;
        if (ok[i] !== eok || (eok && pa[i] !== e[PA_W-1:0])) begin
          failures++;
          $display("FAIL lane %0d va=%h", i, vin[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
