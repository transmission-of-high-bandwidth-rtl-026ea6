// tb_frame_generator: checks the frame format produced for a byte stream.
//
// Runs with MAX_PAYLOAD = 16 so that one stream spans several frames. Bytes
// are offered with random gaps, the last one flagged. A parser written here
// follows the character stream: idles (at least MIN_GAP between frames),
// K27.7, lane id, sequence number, payload with K23.7 fills, checksum, then
// K29.7 or, for the final frame, K28.0. It checks the payload against the
// bytes offered, the frame sizes, the sequence numbers, the checksums, and
// that fills occurred. A second stream after a new start must restart the
// sequence at 0.
`timescale 1ns/1ps
module tb_frame_generator;
  import slmc_pkg::*;
  localparam int MAXP = 16, GAP = 4;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, in_last = 0, tx_k, first_byte, image_sent, fill_sent;
  logic [7:0] in_data = 0, tx_data;

  frame_generator #(.MAX_PAYLOAD(MAXP), .MIN_GAP(GAP)) dut (
    .clk, .rst_n, .lane_id(8'd5), .start, .in_valid, .in_ready, .in_data, .in_last,
    .tx_k, .tx_data, .first_byte, .image_sent, .fill_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] offered [$];
  // parser of the character stream
  typedef enum {P_IDLE, P_ID, P_SEQ, P_PAY} pst_t;
  pst_t ps = P_IDLE;
  logic [7:0] pay [$];
  int exp_seq = 0, idles = 100, frames = 0, fills = 0, eoi = 0;
  always @(posedge clk) begin
    if (rst_n && !start) begin
      case (ps)
        P_IDLE: begin
          if (tx_k && tx_data == K28_5) idles++;
          else begin
            check(tx_k && tx_data == K27_7, "start of frame");
            check(idles >= GAP, $sformatf("gap %0d idles", idles));
            ps = P_ID;
          end
        end
        P_ID:  begin check(!tx_k && tx_data == 8'd5, "lane id"); ps = P_SEQ; end
        P_SEQ: begin
          check(!tx_k && tx_data == 8'(exp_seq), $sformatf("seq %0d want %0d", tx_data, exp_seq));
          exp_seq++; pay.delete(); ps = P_PAY;
        end
        P_PAY: begin
          if (!tx_k) pay.push_back(tx_data);
          else if (tx_data == K23_7) fills++;
          else begin
            logic [7:0] sum;
            check(tx_data == K29_7 || tx_data == K28_0, "end delimiter");
            check(pay.size() >= 2 && pay.size() <= MAXP + 1, $sformatf("frame size %0d", pay.size()));
            sum = 0;
            for (int i = 0; i < pay.size() - 1; i++) begin
              logic [7:0] e;
              sum += pay[i];
              e = (offered.size() > 0) ? offered.pop_front() : 8'hxx;
              check(pay[i] == e, $sformatf("payload byte %h want %h", pay[i], e));
            end
            check(pay[pay.size() - 1] == sum, "checksum");
            if (tx_data == K28_0) begin
              eoi++;
              check(offered.size() == 0, "all bytes sent at end of stream");
            end else check(pay.size() == MAXP + 1, "non-final frame is full");
            frames++; idles = 0; ps = P_IDLE;
          end
        end
      endcase
    end
  end

  task automatic stream(input int n, input int gap_pct);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 99) < gap_pct) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = 8'($urandom); in_last = (i == n - 1);
      offered.push_back(in_data);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    stream(100, 30);
    repeat (40) @(negedge clk);
    check(eoi == 1, "end of stream delimiter");
    check(frames == 7, $sformatf("frames %0d want 7", frames));
    check(fills > 0, "fill characters used");
    start = 1; @(negedge clk); start = 0;
    exp_seq = 0; idles = 100;
    stream(20, 0);
    repeat (40) @(negedge clk);
    check(eoi == 2 && frames == 9, $sformatf("second stream frames %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
