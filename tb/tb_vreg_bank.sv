// tb_vreg_bank: writes the 8 x 256-byte register bank with random data and
// random byte enables, keeping a reference copy, and reads every register
// back after each write.
module tb_vreg_bank;
  localparam int unsigned NREG = 8, VBYTES = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [2:0] wreg, rreg;
  logic [VBYTES-1:0] wbe;
  logic [VBYTES*8-1:0] wdata, rdata;
  logic [VBYTES*8-1:0] ref_m [NREG];
  int checks = 0, failures = 0;

  vreg_bank #(.NREG(NREG), .VBYTES(VBYTES)) dut (.clk, .we, .wreg, .wbe, .wdata, .rreg, .rdata);

  function automatic logic [VBYTES*8-1:0] rnd();
    logic [VBYTES*8-1:0] x;
    for (int i = 0; i < int'(VBYTES / 4); i++) x[i*32 +: 32] = $urandom;
    return x;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wreg = '0; rreg = '0; wbe = '0; wdata = '0;
    // full writes first
    for (int r = 0; r < int'(NREG); r++) begin
      @(negedge clk);
      we = 1'b1; wreg = 3'(r); wbe = '1; wdata = rnd(); ref_m[r] = wdata;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1'b1; wreg = 3'($urandom_range(NREG - 1));
      for (int i = 0; i < int'(VBYTES / 32); i++) wbe[i*32 +: 32] = $urandom;
      if (t % 5 == 0) we = 1'b0;
      wdata = rnd();
      if (we)
        for (int b = 0; b < int'(VBYTES); b++) if (wbe[b]) ref_m[wreg][b*8 +: 8] = wdata[b*8 +: 8];
      @(negedge clk);
      we = 1'b0;
      for (int r = 0; r < int'(NREG); r++) begin
        rreg = 3'(r);
        #1;
        checks++;
        if (rdata !== ref_m[r]) begin
          failures++;
          $display("FAIL t=%0d reg %0d", t, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
