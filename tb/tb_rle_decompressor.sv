// tb_rle_decompressor: checks the run-length expander.
//
// Random tokens (count 1..255) are offered, sometimes back to back and
// sometimes with gaps. The pixel output must be each value repeated count
// times, in order, with pix_last on pixel PIXELS exactly. With tokens always
// available the core must produce one pixel per clock: the pixels of
// back-to-back runs of length 2 or more come out with no idle cycle.
`timescale 1ns/1ps
module tb_rle_decompressor;
  localparam int PIXELS = 4000;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic tok_valid = 0, tok_ready, pix_valid, pix_last;
  logic [7:0] tok_count = 0, tok_value = 0, pix_data;

  rle_decompressor #(.PIXELS(PIXELS)) dut (.clk, .rst_n, .start, .tok_valid, .tok_ready,
    .tok_count, .tok_value, .pix_valid, .pix_data, .pix_last);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] expq [$];
  int npix = 0, first_t = -1, last_t = 0, t = 0, nlast = 0;
  always @(posedge clk) begin
    t++;
    if (rst_n && pix_valid) begin
      logic [7:0] e;
      e = (expq.size() > 0) ? expq.pop_front() : 8'h00;
      check(pix_data == e, $sformatf("pixel %0d got %h want %h", npix, pix_data, e));
      npix++;
      check(pix_last == (npix == PIXELS), $sformatf("pix_last at pixel %0d", npix));
      if (pix_last) nlast++;
      if (first_t < 0) first_t = t;
      last_t = t;
    end
  end

  task automatic give(input logic [7:0] c, input logic [7:0] v);
    tok_valid = 1; tok_count = c; tok_value = v;
    for (int i = 0; i < c; i++) expq.push_back(v);
    @(posedge clk);
    while (!tok_ready) @(posedge clk);
    #1 tok_valid = 0;
  endtask

  int sum;
  logic [7:0] c;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // back-to-back runs: one pixel per clock
    sum = 0;
    for (int i = 0; i < 100; i++) begin
      c = 8'($urandom_range(2, 20)); sum += c;
      give(c, 8'($urandom));
    end
    repeat (30) @(negedge clk);
    check(npix == sum, $sformatf("pixels %0d want %0d", npix, sum));
    check(last_t - first_t + 1 == sum, $sformatf("%0d pixels over %0d cycles", sum, last_t - first_t + 1));
    // the rest of the sub-image with gaps and long runs
    while (sum < PIXELS) begin
      c = 8'($urandom_range(1, 255));
      if (sum + c > PIXELS) c = 8'(PIXELS - sum);
      sum += c;
      give(c, 8'($urandom));
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(npix == PIXELS && expq.size() == 0, $sformatf("all %0d pixels out", npix));
    check(nlast == 1, "one last flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
