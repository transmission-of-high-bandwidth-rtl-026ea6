// tb_frame_checker: feeds hand-built character streams to the frame checker.
//
// Frames are built here: idles, K27.7, lane id, sequence, payload with fill
// characters mixed in, checksum, end delimiter. Good frames must deliver
// exactly their payload (not the header, fills or checksum) and count as
// good. Then a frame with a wrong checksum, one with a wrong lane id, one
// with a skipped sequence number, one cut short by a start character and one
// with a code error must each raise its own counter, and a K28.0 end must
// raise image_end.
`timescale 1ns/1ps
module tb_frame_checker;
  import slmc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, aligned = 0;
  logic rx_k = 1, code_err = 0, disp_err = 0, pay_valid, frame_end;
  logic [7:0] rx_data = K28_5, pay_data;
  lane_status_t status;
  always #5 clk = ~clk;

  frame_checker dut (.clk, .rst_n, .lane_id(8'd3), .start, .aligned, .rx_k, .rx_data,
                     .code_err, .disp_err, .pay_valid, .pay_data, .frame_end, .status);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] expq [$];
  int got = 0;
  always @(posedge clk) begin
    if (rst_n && pay_valid) begin
      logic [7:0] e;
      e = (expq.size() > 0) ? expq.pop_front() : 8'h00;
      check(pay_data == e, $sformatf("payload %h want %h", pay_data, e));
      got++;
    end
  end

  task automatic ch(input bit k, input logic [7:0] d, input bit cerr = 0);
    rx_k = k; rx_data = d; code_err = cerr;
    @(negedge clk);
    code_err = 0;
  endtask

  // one frame; 'bad' selects a fault: 1 checksum, 2 lane id, 3 cut short, 4 code error
  task automatic frame(input int seq, input int n, input bit last, input int bad);
    logic [7:0] sum, b;
    // payload bytes are expected at the output in order
    repeat (3) ch(1, K28_5);
    ch(1, K27_7);
    ch(0, (bad == 2) ? 8'd7 : 8'd3);
    ch(0, 8'(seq));
    sum = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 3) == 0) ch(1, K23_7);
      b = 8'($urandom);
      sum += b;
      expq.push_back(b);
      ch(0, b, (bad == 4 && i == 2));
    end
    // the byte before the end delimiter is taken as the checksum, so a
    // frame cut short never delivers its last byte
    if (bad == 3) begin ch(1, K27_7); ch(1, K28_5); void'(expq.pop_back()); return; end
    ch(0, (bad == 1) ? sum + 8'd1 : sum);
    ch(1, last ? K28_0 : K29_7);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; aligned = 1;
    @(negedge clk);
    frame(0, 20, 0, 0);
    frame(1, 33, 0, 0);
    frame(2, 5, 0, 0);
    repeat (4) @(negedge clk);
    check(status.frames_ok == 3, $sformatf("good frames %0d", status.frames_ok));
    check(got == 20 + 33 + 5, $sformatf("payload bytes %0d", got));
    check(status.csum_errs == 0 && status.hdr_errs == 0 && status.frame_errs == 0, "no errors yet");
    check(!status.image_end, "no end of image yet");
    frame(3, 10, 0, 1);
    repeat (3) @(negedge clk);
    check(status.csum_errs == 1, "checksum error counted");
    frame(4, 10, 0, 2);
    repeat (3) @(negedge clk);
    check(status.hdr_errs == 1, "lane id error counted");
    frame(9, 10, 0, 0);
    repeat (3) @(negedge clk);
    check(status.hdr_errs == 2, "sequence error counted");
    frame(10, 10, 0, 3);
    repeat (3) @(negedge clk);
    check(status.frame_errs == 1, $sformatf("truncated frame counted %0d", status.frame_errs));
    frame(0, 10, 0, 4);
    repeat (3) @(negedge clk);
    check(status.code_errs == 1, "code error counted");
    got = 0;
    frame(1, 8, 1, 0);
    repeat (3) @(negedge clk);
    check(status.image_end, "end of image seen");
    check(got == 8, $sformatf("last frame bytes %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
