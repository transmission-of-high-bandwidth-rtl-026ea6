// rle_compressor: lossless compression core, one per lane.
//
// Run-length coding: consecutive equal pixels are replaced by one token
// {count, value}, count 1..RUN_MAX. A run that reaches RUN_MAX is closed and
// a new run of the same value begins. The core accepts one pixel per cycle.
// A run closes when a different pixel arrives (the token is emitted in that
// cycle and the new pixel opens the next run) or when the last pixel of the
// sub-image has been taken, after which the final run is flushed with
// out_token.last set. Input is accepted only while the token register is free
// or being taken, so a full transport buffer stalls the pixel stream.
// Worst case (no two neighbours equal) is one token per pixel, a ratio of
// 0.5; best case is RUN_MAX pixels per two bytes.
// The document asks for a lossless coder and does not name one; run-length
// coding is this design's choice.
module rle_compressor
  import slmc_pkg::*;
#(
  parameter int unsigned PIX_W   = 8,
  parameter int unsigned RUN_MAX = 255
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output rle_token_t       out_token
);
  logic             have_run, flush;
  logic [7:0]       cur_cnt;
  logic [PIX_W-1:0] cur_val;

  wire out_free = !out_valid || out_ready;
  assign in_ready = out_free && !flush;
  wire take = in_valid && in_ready;
  wire brk  = have_run && ((in_data != cur_val) || (cur_cnt == 8'(RUN_MAX)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_run <= 1'b0; flush <= 1'b0; cur_cnt <= '0; cur_val <= '0;
      out_valid <= 1'b0; out_token <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (brk) begin
          out_valid <= 1'b1;
          out_token <= '{last: 1'b0, count: cur_cnt, value: 8'(cur_val)};
        end
        if (brk || !have_run) begin
          cur_val <= in_data;
          cur_cnt <= 8'd1;
        end else begin
          cur_cnt <= cur_cnt + 8'd1;
        end
        have_run <= 1'b1;
        flush    <= in_last;
      end else if (flush && out_free) begin
        out_valid <= 1'b1;
        out_token <= '{last: 1'b1, count: cur_cnt, value: 8'(cur_val)};
        have_run  <= 1'b0;
        flush     <= 1'b0;
      end
    end
  end

  // valid/ready rule: a token offered and not taken stays unchanged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_token))
    else $error("rle_compressor: token changed while stalled");
endmodule
