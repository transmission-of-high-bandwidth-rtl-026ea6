// writer_combiner: writes the decompressed sub-images into the receive
// memory so that they recombine into the whole image.
//
// Lane k's pixel stream goes to bank k of the receive memory at consecutive
// addresses, so stripe k of the image lands where it was taken from on the
// transmit side. A lane is finished when its pix_last arrives; image_done
// rises when every lane has finished and stays high until 'start'. Writes are
// issued in the cycle the pixel arrives (no back-pressure). The document
// gives the function (write into memory and combine); placement by bank is
// this design's own.
module writer_combiner #(
  parameter int unsigned N_LANES    = 8,
  parameter int unsigned BANK_DEPTH = 8192,
  parameter int unsigned PIX_W      = 8,
  localparam int unsigned BW = $clog2(BANK_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N_LANES-1:0] pix_valid,
  input  logic [PIX_W-1:0]   pix_data [N_LANES],
  input  logic [N_LANES-1:0] pix_last,
  output logic [N_LANES-1:0] mem_we,
  output logic [BW-1:0]      mem_waddr [N_LANES],
  output logic [PIX_W-1:0]   mem_wdata [N_LANES],
  output logic [N_LANES-1:0] lane_done,
  output logic               image_done
);
  for (genvar k = 0; k < N_LANES; k++) begin : g_lane
    logic [BW-1:0] addr;
    assign mem_we[k]    = pix_valid[k] && !lane_done[k];
    assign mem_waddr[k] = addr;
    assign mem_wdata[k] = pix_data[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        addr <= '0; lane_done[k] <= 1'b0;
      end else if (start) begin
        addr <= '0; lane_done[k] <= 1'b0;
      end else if (mem_we[k]) begin
        addr <= addr + 1'b1;
        if (pix_last[k]) lane_done[k] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     image_done <= 1'b0;
    else if (start) image_done <= 1'b0;
    else            image_done <= &lane_done;
  end
endmodule
