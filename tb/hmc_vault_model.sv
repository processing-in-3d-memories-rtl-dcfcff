// hmc_vault_model: behavioural model of the DRAM vaults behind the PCEs.
//
// Not synthesizable logic: it stands for the HMC vault controllers and
// their DRAM, which the engine uses but does not contain.  One port per
// vault, each taking one request at a time (valid/ready) and answering
// LATENCY cycles later with the whole 256-byte-aligned block that holds
// the requested address.  All ports share one small backing store of
// 2^MEM_LG bytes (addresses wrap).  The store is filled with poke64().
// It counts requests per vault so a testbench can check which vaults were
// used.
module hmc_vault_model
  import pce_pkg::*;
#(
  parameter int unsigned NV      = 32,
  parameter int unsigned VBYTES  = 256,
  parameter int unsigned LATENCY = 20,
  parameter int unsigned MEM_LG  = 20
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NV-1:0]               req_valid,
  output logic [NV-1:0]               req_ready,
  input  logic [NV-1:0][PA_W-1:0]     req_addr,
  input  logic [NV-1:0][3:0]          req_lg,
  output logic [NV-1:0]               rsp_valid,
  output logic [NV-1:0][VBYTES*8-1:0] rsp_data
);
  localparam int unsigned NWORDS = (1 << MEM_LG) / 8;
  logic [63:0] mem [NWORDS];
  int unsigned reqs [NV];
  int unsigned bad [NV];

  function automatic void poke64(input longint unsigned a, input logic [63:0] d);
    mem[(a >> 3) % NWORDS] = d;
  endfunction

  function automatic logic [63:0] peek64(input longint unsigned a);
    return mem[(a >> 3) % NWORDS];
  endfunction

  function automatic void clear();
    for (int i = 0; i < int'(NWORDS); i++) mem[i] = '0;
  endfunction

  for (genvar v = 0; v < NV; v++) begin : g_port
    int unsigned     cnt;
    logic            pend;
    logic [PA_W-1:0] a;

    assign req_ready[v] = !pend;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pend         <= 1'b0;
        cnt          <= 0;
        a            <= '0;
        rsp_valid[v] <= 1'b0;
        rsp_data[v]  <= '0;
        reqs[v]      <= 0;
        bad[v]       <= 0;
      end else begin
        rsp_valid[v] <= 1'b0;
        if (!pend && req_valid[v]) begin
          pend    <= 1'b1;
          cnt     <= LATENCY;
          a       <= req_addr[v];
          reqs[v] <= reqs[v] + 1;
          // a request must land in this port's vault and not cross a block
          if (req_addr[v][INTLV_LG +: $clog2(NV)] != $clog2(NV)'(v) ||
              (int'(req_addr[v][INTLV_LG-1:0]) + (1 << req_lg[v])) > int'(VBYTES))
            bad[v] <= bad[v] + 1;
        end else if (pend) begin
          if (cnt <= 1) begin
            pend         <= 1'b0;
            rsp_valid[v] <= 1'b1;
            for (int w = 0; w < int'(VBYTES / 8); w++)
              rsp_data[v][w*64 +: 64] <= mem[(((longint'(a) >> INTLV_LG) << (INTLV_LG - 3)) + w) % NWORDS];
          end else begin
            cnt <= cnt - 1;
          end
        end
      end
    end
  end

  function automatic int unsigned total_bad();
    int unsigned t = 0;
    for (int i = 0; i < int'(NV); i++) t += bad[i];
    return t;
  endfunction

  function automatic int unsigned total_reqs();
    int unsigned t = 0;
    for (int i = 0; i < int'(NV); i++) t += reqs[i];
    return t;
  endfunction
endmodule
