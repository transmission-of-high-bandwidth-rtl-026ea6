// tb_tx_frame_memory: writes a whole image through the linear camera port
// and reads every bank back through its own port, all banks in the same
// cycle. Pixel a must appear in bank a / BANK_DEPTH at offset
// a % BANK_DEPTH, one cycle after the read; read data must hold while the
// read enable is low.
`timescale 1ns/1ps
module tb_tx_frame_memory;
  localparam int N = 4, D = 64, AW = $clog2(N * D), BW = $clog2(D);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [AW-1:0] waddr = 0;
  logic [7:0] wdata = 0, rdata [N];
  logic [N-1:0] re = 0;
  logic [BW-1:0] raddr [N];

  tx_frame_memory #(.N_LANES(N), .BANK_DEPTH(D), .PIX_W(8)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    for (int k = 0; k < N; k++) raddr[k] = '0;
    for (int a = 0; a < N * D; a++) img[a] = 8'($urandom);
    @(negedge clk);
    for (int a = 0; a < N * D; a++) begin
      we = 1; waddr = AW'(a); wdata = img[a]; @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < D; i++) begin
      re = '1;
      for (int k = 0; k < N; k++) raddr[k] = BW'((i * 7 + k) % D);
      @(negedge clk);
      re = '0;
      for (int k = 0; k < N; k++)
        check(rdata[k] == img[k * D + (i * 7 + k) % D], $sformatf("bank %0d offset %0d", k, (i * 7 + k) % D));
      for (int k = 0; k < N; k++) raddr[k] = BW'(i);
      @(negedge clk);
      for (int k = 0; k < N; k++)
        check(rdata[k] == img[k * D + (i * 7 + k) % D], "data held without read enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
