// tx_frame_memory: transmit-side image memory.
//
// The camera writes the image one pixel per cycle through a linear address.
// The memory is split into N_LANES banks of BANK_DEPTH pixels, bank k holding
// the k-th horizontal stripe of the image, so that the reader can fetch one
// pixel per lane per cycle. Linear address a lives in bank a / BANK_DEPTH at
// offset a % BANK_DEPTH. Each bank has its own read port with a read enable;
// rdata[k] is registered and changes only on a cycle with re[k] set (one
// cycle read latency). The document names this memory; the banking is this
// design's own choice to feed the parallel compression cores.
module tx_frame_memory #(
  parameter int unsigned N_LANES    = 8,
  parameter int unsigned BANK_DEPTH = 8192,
  parameter int unsigned PIX_W      = 8,
  localparam int unsigned AW = $clog2(N_LANES * BANK_DEPTH),
  localparam int unsigned BW = $clog2(BANK_DEPTH)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [PIX_W-1:0]     wdata,
  input  logic [N_LANES-1:0]   re,
  input  logic [BW-1:0]        raddr [N_LANES],
  output logic [PIX_W-1:0]     rdata [N_LANES]
);
  for (genvar k = 0; k < N_LANES; k++) begin : g_bank
    logic [PIX_W-1:0] mem [BANK_DEPTH];
    // 32-bit arithmetic: with one bank, BANK_DEPTH does not fit in AW bits
    wire              sel = we && (32'(waddr) / BANK_DEPTH == k);

    always_ff @(posedge clk) begin
      if (sel) mem[BW'(32'(waddr) % BANK_DEPTH)] <= wdata;
      if (re[k]) rdata[k] <= mem[raddr[k]];
    end
  end
endmodule
