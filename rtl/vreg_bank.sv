// vreg_bank: the vector register bank of one vault PCE.
//
// NREG registers of VBYTES bytes each (8 x 256 B by default, as the design
// specifies).  One write port with a byte enable per byte, so a load smaller
// than a register (64 B or 128 B operands) fills only its part of the
// register; one read port that returns a whole register.  Writes take
// effect at the clock edge; the read is combinational from the stored
// value.  Register contents are not reset: the PCE never reads a register
// whose tag is not valid.
module vreg_bank #(
  parameter int unsigned NREG   = 8,
  parameter int unsigned VBYTES = 256,
  localparam int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [RW-1:0]         wreg,
  input  logic [VBYTES-1:0]     wbe,
  input  logic [VBYTES*8-1:0]   wdata,
  input  logic [RW-1:0]         rreg,
  output logic [VBYTES*8-1:0]   rdata
);
  logic [VBYTES*8-1:0] mem [NREG];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < int'(VBYTES); b++)
        if (wbe[b]) mem[wreg][b*8 +: 8] <= wdata[b*8 +: 8];
    end
  end

  assign rdata = mem[rreg];
endmodule
