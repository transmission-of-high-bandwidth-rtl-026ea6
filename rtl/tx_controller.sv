// tx_controller: transmit transport-layer controller of one lane.
//
// Regulates the flow between the compression core and the frame generator.
// Tokens enter a DEPTH-entry FIFO (tok_ready is low while it is full, which
// stalls the core). The head token leaves as two bytes on a valid/ready byte
// stream: first the run count, then the pixel value; byte_last is set on the
// value byte of the sub-image's final token. The buffer absorbs the mismatch
// between the bursty token output of the coder and the steady one byte per
// cycle the link takes. The document gives only the controller's role; the
// buffer and byte order are this design's own.
module tx_controller
  import slmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tok_valid,
  output logic       tok_ready,
  input  rle_token_t tok,
  output logic       byte_valid,
  input  logic       byte_ready,
  output logic [7:0] byte_data,
  output logic       byte_last
);
  rle_token_t head;
  logic       empty, full, phase;   // phase 0: count byte, 1: value byte
  logic       pop;

  sync_fifo #(.W($bits(rle_token_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(tok_valid && !full), .wr_data(tok),
    .rd_en(pop), .rd_data(head),
    .empty, .full, .overflow(), .count()
  );

  assign tok_ready  = !full;
  assign byte_valid = !empty;
  assign byte_data  = phase ? head.value : head.count;
  assign byte_last  = phase && head.last;
  assign pop        = byte_valid && byte_ready && phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       phase <= 1'b0;
    else if (byte_valid && byte_ready) phase <= !phase;
  end
endmodule
