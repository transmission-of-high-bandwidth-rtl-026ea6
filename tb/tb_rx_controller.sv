// tb_rx_controller: checks the receive transport controller.
//
// Byte pairs (count, value) arrive with random gaps, as the frame checker
// delivers them, and tokens are taken with a randomly stalling consumer;
// every token must come out once, in order. Then, with the consumer stopped,
// more bytes than the FIFO holds are pushed: 'overflow' must rise and stay
// up until 'start' clears it.
`timescale 1ns/1ps
module tb_rx_controller;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, tok_valid, tok_ready = 0, overflow;
  logic [7:0] in_data = 0, tok_count, tok_value;

  rx_controller #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .in_valid, .in_data,
    .tok_valid, .tok_ready, .tok_count, .tok_value, .overflow);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] expq [$];
  int ntok = 0;
  bit rnd = 0;
  always @(posedge clk) begin
    if (rst_n && tok_valid && tok_ready) begin
      logic [15:0] e;
      e = (expq.size() > 0) ? expq.pop_front() : 16'hFFFF;
      check({tok_count, tok_value} == e, $sformatf("token %0d got %h want %h", ntok, {tok_count, tok_value}, e));
      ntok++;
    end
  end
  always @(negedge clk) if (rnd) tok_ready = ($urandom_range(0, 3) != 0);

  task automatic put(input logic [7:0] b);
    in_valid = 1; in_data = b; @(negedge clk); in_valid = 0;
  endtask

  initial begin
    logic [7:0] c, v;
    repeat (3) @(negedge clk);
    rst_n = 1; rnd = 1;
    for (int i = 0; i < 300; i++) begin
      c = 8'($urandom); v = 8'($urandom);
      expq.push_back({c, v});
      put(c);
      if ($urandom_range(0, 1) == 1) @(negedge clk);
      put(v);
      @(negedge clk);     // average input rate below one byte per clock
    end
    repeat (50) @(negedge clk);
    check(ntok == 300 && expq.size() == 0, $sformatf("tokens out %0d", ntok));
    check(!overflow, "no overflow at normal rate");
    rnd = 0; tok_ready = 0;
    for (int i = 0; i < DEPTH + 6; i++) put(8'(i));
    @(negedge clk);
    check(overflow, "overflow flagged");
    repeat (5) @(negedge clk);
    check(overflow, "overflow sticky");
    start = 1; @(negedge clk); start = 0;
    check(!overflow, "overflow cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
