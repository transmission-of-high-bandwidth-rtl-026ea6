// tb_mem_reader_divider: the reader is connected to a bank memory model
// written here (registered read data that changes only on a read enable).
// After a start pulse each lane must deliver its bank's pixels in address
// order, each exactly once, with pix_last on the final one. With all
// consumers ready a lane delivers one pixel per clock (BANK_DEPTH pixels in
// BANK_DEPTH consecutive cycles); with random per-lane stalls the data must
// still be exact. A second start must replay the image.
`timescale 1ns/1ps
module tb_mem_reader_divider;
  localparam int N = 4, D = 100, BW = $clog2(D);
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic busy;
  logic [N-1:0] mem_re, pix_valid, pix_ready = '1, pix_last;
  logic [BW-1:0] mem_raddr [N];
  logic [7:0] mem_rdata [N], pix_data [N];

  mem_reader_divider #(.N_LANES(N), .BANK_DEPTH(D), .PIX_W(8)) dut (.clk, .rst_n, .start, .busy,
    .mem_re, .mem_raddr, .mem_rdata, .pix_valid, .pix_ready, .pix_data, .pix_last);

  logic [7:0] bank [N][D];
  always @(posedge clk)
    for (int k = 0; k < N; k++) if (mem_re[k]) mem_rdata[k] <= bank[k][mem_raddr[k]];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cnt [N], first_t [N], last_t [N], t = 0;
  bit rnd = 0;
  always @(posedge clk) begin
    t++;
    if (rst_n) for (int k = 0; k < N; k++) begin
      if (pix_valid[k] && pix_ready[k]) begin
        check(pix_data[k] == bank[k][cnt[k]], $sformatf("lane %0d pixel %0d", k, cnt[k]));
        check(pix_last[k] == (cnt[k] == D - 1), $sformatf("lane %0d last flag at %0d", k, cnt[k]));
        if (cnt[k] == 0) first_t[k] = t;
        last_t[k] = t;
        cnt[k]++;
      end
    end
  end
  always @(negedge clk) if (rnd) for (int k = 0; k < N; k++) pix_ready[k] = ($urandom_range(0, 2) != 0);

  initial begin
    for (int k = 0; k < N; k++) begin
      cnt[k] = 0;
      for (int i = 0; i < D; i++) bank[k][i] = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (D + 10) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check(cnt[k] == D, $sformatf("lane %0d delivered %0d", k, cnt[k]));
      check(last_t[k] - first_t[k] + 1 == D, $sformatf("lane %0d took %0d cycles", k, last_t[k] - first_t[k] + 1));
      cnt[k] = 0;
    end
    check(!busy, "idle after the image");
    rnd = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (4 * D) @(negedge clk);
    for (int k = 0; k < N; k++) check(cnt[k] == D, $sformatf("lane %0d delivered %0d with stalls", k, cnt[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
