// frame_generator: upper physical sub-layer of one transmit lane.
//
// Turns the controller's byte stream into a continuous character stream for
// the PCS encoder, one character per clock (tx_k = 1 marks a control
// character). Between frames it sends K28.5 idles, at least MIN_GAP of them,
// which also let the receiver find the word boundary. A frame is
//   K27.7 (start) | LANE_ID | seq | payload ... | checksum | K29.7 or K28.0
// The payload holds at most MAX_PAYLOAD bytes; longer sub-images are cut into
// several frames with rising sequence numbers. The frame that carries the
// stream's last byte ends with K28.0 instead of K29.7, after which the
// generator idles until the next start. When the buffer runs dry inside a
// frame a K23.7 fill character is sent and dropped by the receiver. The
// checksum is the 8-bit sum of the payload bytes.
// in_ready is high only in the payload state, so a byte is taken in the same
// cycle it is registered for output. The document names the frame generator
// and its header; the character codes and layout are this design's own.
module frame_generator
  import slmc_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD = 256,
  parameter int unsigned MIN_GAP     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] lane_id,
  input  logic       start,        // new image: clear sequence and end state
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       tx_k,
  output logic [7:0] tx_data,
  output logic       first_byte,   // pulse: first payload byte of the image taken
  output logic       image_sent,   // pulse: end delimiter of the last frame sent
  output logic       fill_sent     // pulse: a fill character was sent
);
  typedef enum logic [2:0] {S_IDLE, S_SOF, S_ID, S_SEQ, S_PAY, S_CSUM, S_END, S_DONE} state_t;
  state_t     state;
  logic [7:0] seq, csum;
  logic [$clog2(MAX_PAYLOAD+1)-1:0] nbytes;
  logic [$clog2(MIN_GAP+1)-1:0]     gap;
  logic       eoi, started;

  assign in_ready = (state == S_PAY);
  wire take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; seq <= '0; csum <= '0; nbytes <= '0; gap <= '0; eoi <= 1'b0;
      started <= 1'b0; tx_k <= 1'b1; tx_data <= K28_5;
      first_byte <= 1'b0; image_sent <= 1'b0; fill_sent <= 1'b0;
    end else begin
      first_byte <= 1'b0; image_sent <= 1'b0; fill_sent <= 1'b0;
      if (start) begin
        state <= S_IDLE; seq <= '0; started <= 1'b0;
        tx_k <= 1'b1; tx_data <= K28_5;
      end else begin
        case (state)
          S_IDLE: begin
            tx_k <= 1'b1; tx_data <= K28_5;
            if (gap < ($bits(gap))'(MIN_GAP)) gap <= gap + 1'b1;
            else if (in_valid) state <= S_SOF;
          end
          S_SOF: begin
            tx_k <= 1'b1; tx_data <= K27_7; state <= S_ID;
          end
          S_ID: begin
            tx_k <= 1'b0; tx_data <= lane_id; state <= S_SEQ;
          end
          S_SEQ: begin
            tx_k <= 1'b0; tx_data <= seq; state <= S_PAY;
            csum <= '0; nbytes <= '0; eoi <= 1'b0;
          end
          S_PAY: begin
            if (take) begin
              tx_k <= 1'b0; tx_data <= in_data;
              csum <= csum + in_data;
              nbytes <= nbytes + 1'b1;
              first_byte <= !started;
              started <= 1'b1;
              if (in_last || nbytes == ($bits(nbytes))'(MAX_PAYLOAD - 1)) begin
                state <= S_CSUM;
                eoi   <= in_last;
              end
            end else begin
              tx_k <= 1'b1; tx_data <= K23_7; fill_sent <= 1'b1;
            end
          end
          S_CSUM: begin
            tx_k <= 1'b0; tx_data <= csum; state <= S_END;
          end
          S_END: begin
            tx_k <= 1'b1; tx_data <= eoi ? K28_0 : K29_7;
            seq <= seq + 1'b1; gap <= '0;
            image_sent <= eoi;
            state <= eoi ? S_DONE : S_IDLE;
          end
          default: begin   // S_DONE: image finished, idle until next start
            tx_k <= 1'b1; tx_data <= K28_5;
          end
        endcase
      end
    end
  end
endmodule
