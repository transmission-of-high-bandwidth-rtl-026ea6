// rle_decompressor: decompression core of one receive lane.
//
// Inverse of the run-length coder: each {count, value} token is expanded to
// 'count' pixels of 'value', one pixel per cycle. A token is taken when the
// previous run has been fully sent, so a run of n pixels occupies the core
// for n cycles. The core counts the pixels of the sub-image and sets
// pix_last on the PIXELS-th; 'start' rewinds the count. A token with count 0
// is not produced by the coder and is skipped. Output has no back-pressure
// (the memory writer takes a pixel every cycle). The document names the
// de-compression core; the algorithm follows the coder chosen here.
module rle_decompressor #(
  parameter int unsigned PIXELS = 8192,
  parameter int unsigned PIX_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             tok_valid,
  output logic             tok_ready,
  input  logic [7:0]       tok_count,
  input  logic [7:0]       tok_value,
  output logic             pix_valid,
  output logic [PIX_W-1:0] pix_data,
  output logic             pix_last
);
  logic [7:0]                  left;     // pixels of the current run still to send
  logic [PIX_W-1:0]            val;
  logic [$clog2(PIXELS+1)-1:0] npix;

  assign tok_ready = (left == 8'd0) || (left == 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; val <= '0; npix <= '0;
      pix_valid <= 1'b0; pix_data <= '0; pix_last <= 1'b0;
    end else if (start) begin
      left <= '0; npix <= '0; pix_valid <= 1'b0; pix_last <= 1'b0;
    end else begin
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      if (left != 8'd0) begin
        pix_valid <= 1'b1;
        pix_data  <= val;
        pix_last  <= (npix == ($bits(npix))'(PIXELS - 1));
        npix      <= npix + 1'b1;
      end
      if (tok_valid && tok_ready) begin
        left <= tok_count;
        val  <= PIX_W'(tok_value);
      end else if (left != 8'd0) begin
        left <= left - 8'd1;
      end
    end
  end
endmodule
