// rx_frame_memory: receive-side image memory.
//
// Each lane writes its decompressed sub-image into its own bank of
// BANK_DEPTH pixels (one write port per bank), which places stripe k of the
// image at linear addresses k*BANK_DEPTH ... (k+1)*BANK_DEPTH-1. The vision
// system reads the recombined image through one linear read port with one
// cycle of latency. The document names this memory; the banking is this
// design's own choice so that all lanes can write in the same cycle.
module rx_frame_memory #(
  parameter int unsigned N_LANES    = 8,
  parameter int unsigned BANK_DEPTH = 8192,
  parameter int unsigned PIX_W      = 8,
  localparam int unsigned AW = $clog2(N_LANES * BANK_DEPTH),
  localparam int unsigned BW = $clog2(BANK_DEPTH),
  localparam int unsigned LW = (N_LANES > 1) ? $clog2(N_LANES) : 1
) (
  input  logic                 clk,
  input  logic [N_LANES-1:0]   we,
  input  logic [BW-1:0]        waddr [N_LANES],
  input  logic [PIX_W-1:0]     wdata [N_LANES],
  input  logic [AW-1:0]        raddr,
  output logic [PIX_W-1:0]     rdata
);
  logic [PIX_W-1:0] bank_q [N_LANES];
  logic [LW-1:0]    rbank_q;

  for (genvar k = 0; k < N_LANES; k++) begin : g_bank
    logic [PIX_W-1:0] mem [BANK_DEPTH];
    always_ff @(posedge clk) begin
      if (we[k]) mem[waddr[k]] <= wdata[k];
      bank_q[k] <= mem[BW'(32'(raddr) % BANK_DEPTH)];
    end
  end

  // 32-bit arithmetic: with one bank, BANK_DEPTH does not fit in AW bits
  always_ff @(posedge clk) rbank_q <= LW'(32'(raddr) / BANK_DEPTH);
  assign rdata = bank_q[rbank_q];
endmodule
