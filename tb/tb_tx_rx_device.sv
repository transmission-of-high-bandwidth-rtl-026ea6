// tb_tx_rx_device: one lane's transmitter device driving the receiver
// device over a wire.
//
// The transmitter sends K28.5 idles, then a sequence of data characters
// with control characters mixed in. The receiver must align, and must hand
// back every character, data value and control flag, in order, each exactly
// once, with no code or disparity error. Then one line bit is inverted and
// the receiver must report a code or disparity error or deliver a wrong
// character.
`timescale 1ns/1ps
module tb_tx_rx_device;
  logic clk = 0, clk_ser = 0, rst_n = 0;
  always #0.4 clk_ser = ~clk_ser;
  always #4   clk     = ~clk;

  logic tx_k = 1, rx_k, aligned, code_err, disp_err, line, flip = 0;
  logic [7:0] tx_data = 8'hBC, rx_data;

  tx_device u_tx (.clk, .clk_ser, .rst_n, .tx_k, .tx_data, .ser_out(line));
  rx_device u_rx (.clk, .clk_ser, .rst_n, .ser_in(line ^ flip), .aligned, .rx_k, .rx_data, .code_err, .disp_err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [8:0] sent [$];
  int nrx = 0, nerr = 0;
  bit started = 0, corrupt = 0;
  always @(posedge clk) begin
    if (rst_n && !(tx_k && tx_data == 8'hBC)) sent.push_back({tx_k, tx_data});
    if (rst_n && aligned && !(rx_k && rx_data == 8'hBC)) begin
      logic [8:0] e;
      e = (sent.size() > 0) ? sent.pop_front() : 9'h0;
      if (!corrupt) begin
        check({rx_k, rx_data} == e && !code_err && !disp_err,
              $sformatf("char %0d got %0d/%h want %0d/%h", nrx, rx_k, rx_data, e[8], e[7:0]));
        nrx++;
      end else if ({rx_k, rx_data} != e || code_err || disp_err) nerr++;
    end else if (corrupt && (code_err || disp_err)) nerr++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(aligned, "aligned");
    for (int i = 0; i < 300; i++) begin
      if (i % 37 == 5) begin tx_k = 1; tx_data = 8'hFB; end
      else if (i % 53 == 9) begin tx_k = 1; tx_data = 8'hF7; end
      else begin tx_k = 0; tx_data = 8'($urandom); end
      @(negedge clk);
    end
    tx_k = 1; tx_data = 8'hBC;
    repeat (6) @(negedge clk);
    check(nrx == 300, $sformatf("received %0d of 300", nrx));
    check(sent.size() == 0, "nothing left over");
    // one inverted line bit inside a data character
    corrupt = 1;
    tx_k = 0; tx_data = 8'h55;
    repeat (3) @(negedge clk);
    #2.0 flip = 1; #0.8 flip = 0;
    repeat (6) @(negedge clk);
    check(nerr > 0, "line bit error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
