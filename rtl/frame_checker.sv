// frame_checker: upper physical sub-layer of one receive lane.
//
// Reads the decoded characters using the control flag: rx_k = 1 is control,
// 0 is data. It waits for K27.7, reads the two header bytes (lane id and
// sequence number) and checks them against LANE_ID and the expected
// sequence, then forwards payload bytes to the transport layer. Because the
// checksum is the byte just before the end delimiter, each data byte is held
// for one cycle and forwarded when the next data byte arrives; at K29.7 or
// K28.0 the held byte is compared with the sum of the forwarded ones. K23.7
// fill characters are dropped. K28.0 also raises image_end. Any other
// control character inside a frame aborts it (frame error). Code or
// disparity errors inside a frame are counted. There is no back-pressure:
// pay_valid is a one-cycle strobe per payload byte. The document describes
// reading the control flag and removing the header; the checks and counters
// are this design's own.
module frame_checker
  import slmc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   lane_id,
  input  logic         start,       // new image: clear sequence and counters
  input  logic         aligned,
  input  logic         rx_k,
  input  logic [7:0]   rx_data,
  input  logic         code_err,
  input  logic         disp_err,
  output logic         pay_valid,
  output logic [7:0]   pay_data,
  output logic         frame_end,   // pulse at the end delimiter of a good frame
  output lane_status_t status
);
  typedef enum logic [1:0] {S_HUNT, S_ID, S_SEQ, S_PAY} state_t;
  state_t     state;
  logic [7:0] exp_seq, held, sum;
  logic       have_held;

  function automatic logic [7:0] sat_inc(input logic [7:0] v);
    sat_inc = (v == 8'hFF) ? v : v + 8'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HUNT; exp_seq <= '0; held <= '0; sum <= '0; have_held <= 1'b0;
      pay_valid <= 1'b0; pay_data <= '0; frame_end <= 1'b0;
      status.aligned <= 1'b0; status.overflow <= 1'b0; status.image_end <= 1'b0; status.frames_ok <= '0;
      status.csum_errs <= '0; status.hdr_errs <= '0; status.frame_errs <= '0;
      status.code_errs <= '0;
    end else begin
      status.overflow <= 1'b0;   // reported by the transport controller
      pay_valid      <= 1'b0;
      frame_end      <= 1'b0;
      status.aligned <= aligned;
      if (start) begin
        state <= S_HUNT; exp_seq <= '0; status.image_end <= 1'b0;
        status.frames_ok <= '0; status.csum_errs <= '0; status.hdr_errs <= '0;
        status.frame_errs <= '0; status.code_errs <= '0;
      end else if (aligned) begin
        if (state != S_HUNT && (code_err || disp_err))
          status.code_errs <= sat_inc(status.code_errs);
        case (state)
          S_HUNT: if (rx_k && rx_data == K27_7) state <= S_ID;
          S_ID: begin
            if (rx_k) begin
              state <= S_HUNT; status.frame_errs <= sat_inc(status.frame_errs);
            end else begin
              if (rx_data != lane_id) status.hdr_errs <= sat_inc(status.hdr_errs);
              state <= S_SEQ;
            end
          end
          S_SEQ: begin
            if (rx_k) begin
              state <= S_HUNT; status.frame_errs <= sat_inc(status.frame_errs);
            end else begin
              if (rx_data != exp_seq) status.hdr_errs <= sat_inc(status.hdr_errs);
              exp_seq   <= rx_data + 8'd1;
              sum       <= '0;
              have_held <= 1'b0;
              state     <= S_PAY;
            end
          end
          default: begin   // S_PAY
            if (!rx_k) begin
              if (have_held) begin
                pay_valid <= 1'b1;
                pay_data  <= held;
                sum       <= sum + held;
              end
              held      <= rx_data;
              have_held <= 1'b1;
            end else if (rx_data == K23_7) begin
              // fill: nothing to do
            end else if (rx_data == K29_7 || rx_data == K28_0) begin
              state <= S_HUNT;
              if (!have_held || held != sum) begin
                status.csum_errs <= sat_inc(status.csum_errs);
              end else begin
                status.frames_ok <= status.frames_ok + 16'd1;
                frame_end <= 1'b1;
              end
              if (rx_data == K28_0) status.image_end <= 1'b1;
            end else begin
              state <= S_HUNT;
              status.frame_errs <= sat_inc(status.frame_errs);
            end
          end
        endcase
      end
    end
  end
endmodule
