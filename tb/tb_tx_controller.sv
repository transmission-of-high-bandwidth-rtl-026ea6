// tb_tx_controller: checks the transmit transport controller.
//
// Random tokens are offered with random gaps and taken out as bytes with a
// randomly stalling consumer. The byte stream must be count, value, count,
// value ... for every token in order, with byte_last only on the value byte
// of the final token. While the consumer is stopped the FIFO must fill and
// drop tok_ready after DEPTH tokens, never losing one.
`timescale 1ns/1ps
module tb_tx_controller;
  import slmc_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tok_valid = 0, tok_ready, byte_valid, byte_ready = 0, byte_last;
  rle_token_t tok = '0;
  logic [7:0] byte_data;

  tx_controller #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .tok_valid, .tok_ready, .tok,
                                      .byte_valid, .byte_ready, .byte_data, .byte_last);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [8:0] exp_bytes [$];   // {last, byte}
  int nbytes = 0, accepted = 0;
  bit random_ready = 0;
  always @(posedge clk) begin
    if (rst_n && byte_valid && byte_ready) begin
      logic [8:0] e;
      e = (exp_bytes.size() > 0) ? exp_bytes.pop_front() : 9'h1FF;
      check({byte_last, byte_data} == e, $sformatf("byte %0d got %0d/%h want %0d/%h", nbytes, byte_last, byte_data, e[8], e[7:0]));
      nbytes++;
    end
    if (rst_n && tok_valid && tok_ready) begin
      exp_bytes.push_back({1'b0, tok.count});
      exp_bytes.push_back({tok.last, tok.value});
      accepted++;
    end
  end
  always @(negedge clk) if (random_ready) byte_ready = ($urandom_range(0, 1) == 1);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill with the consumer stopped
    for (int i = 0; i < DEPTH + 4; i++) begin
      tok_valid = 1; tok = '{last: 1'b0, count: 8'(i + 1), value: 8'($urandom)};
      @(negedge clk);
    end
    tok_valid = 0;
    check(accepted == DEPTH, $sformatf("accepted %0d while stalled", accepted));
    check(!tok_ready, "tok_ready low when full");
    byte_ready = 1;
    repeat (2 * DEPTH + 4) @(negedge clk);
    check(nbytes == 2 * DEPTH, $sformatf("drained %0d bytes", nbytes));
    // random traffic
    random_ready = 1;
    for (int i = 0; i < 500; i++) begin
      tok_valid = ($urandom_range(0, 2) != 0);
      tok = '{last: 1'b0, count: 8'($urandom), value: 8'($urandom)};
      @(negedge clk);
      while (tok_valid && !tok_ready) @(negedge clk);
    end
    tok_valid = 1; tok = '{last: 1'b1, count: 8'd9, value: 8'hAB};
    @(negedge clk);
    while (!tok_ready) @(negedge clk);
    tok_valid = 0;
    repeat (200) @(negedge clk);
    check(exp_bytes.size() == 0 && !byte_valid, "all bytes out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
