// tb_rx_frame_memory: every bank is written through its own port in the
// same cycles; the image is then read back through the linear host port,
// where linear address a must return what bank a / BANK_DEPTH got at offset
// a % BANK_DEPTH, one cycle after the address.
`timescale 1ns/1ps
module tb_rx_frame_memory;
  localparam int N = 4, D = 64, AW = $clog2(N * D), BW = $clog2(D);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0] we = 0;
  logic [BW-1:0] waddr [N];
  logic [7:0] wdata [N], rdata;
  logic [AW-1:0] raddr = 0;

  rx_frame_memory #(.N_LANES(N), .BANK_DEPTH(D), .PIX_W(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] img [N * D];
  initial begin
    for (int a = 0; a < N * D; a++) img[a] = 8'($urandom);
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = '1;
      for (int k = 0; k < N; k++) begin waddr[k] = BW'(D - 1 - i); wdata[k] = img[k * D + D - 1 - i]; end
      @(negedge clk);
    end
    we = '0;
    for (int a = 0; a < N * D; a++) begin
      raddr = AW'((a * 37) % (N * D));
      @(negedge clk);
      check(rdata == img[(a * 37) % (N * D)], $sformatf("address %0d", (a * 37) % (N * D)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
