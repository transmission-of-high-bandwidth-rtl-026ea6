// rx_controller: receive transport-layer controller of one lane.
//
// Payload bytes from the frame checker arrive at up to one per cycle and
// cannot be held back (the link has no back-pressure), so they enter a
// DEPTH-byte FIFO. Bytes are taken from it in pairs, count then value, and
// offered to the decompression core as one token on a valid/ready stream.
// A byte that finds the FIFO full is lost and sets the sticky 'overflow'
// flag, cleared by 'start'. The document gives only the controller's role;
// the buffer and pairing are this design's own.
module rx_controller #(
  parameter int unsigned DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       tok_valid,
  input  logic       tok_ready,
  output logic [7:0] tok_count,
  output logic [7:0] tok_value,
  output logic       overflow
);
  logic       empty, full, ovf, have_cnt, pop;
  logic [7:0] head;

  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_data),
    .rd_en(pop), .rd_data(head),
    .empty, .full, .overflow(ovf), .count()
  );

  // the count byte is moved into tok_count; the token is valid once the
  // value byte is at the head of the FIFO
  assign tok_valid = have_cnt && !empty;
  assign tok_value = head;
  assign pop       = !empty && (!have_cnt || tok_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cnt <= 1'b0; tok_count <= '0; overflow <= 1'b0;
    end else begin
      if (start) overflow <= 1'b0;
      else if (ovf) overflow <= 1'b1;
      if (pop) begin
        if (!have_cnt) begin
          tok_count <= head;
          have_cnt  <= 1'b1;
        end else begin
          have_cnt  <= 1'b0;
        end
      end
    end
  end
endmodule
