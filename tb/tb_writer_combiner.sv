// tb_writer_combiner: each lane gets a pixel stream with random gaps. Every
// pixel must be written to its lane's bank at consecutive offsets from 0,
// a lane must report done after its last pixel, and image_done must rise
// only when the slowest lane has finished. A start pulse must clear both.
`timescale 1ns/1ps
module tb_writer_combiner;
  localparam int N = 4, D = 50, BW = $clog2(D);
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [N-1:0] pix_valid = 0, pix_last = 0, mem_we, lane_done;
  logic [7:0] pix_data [N], mem_wdata [N];
  logic [BW-1:0] mem_waddr [N];
  logic image_done;

  writer_combiner #(.N_LANES(N), .BANK_DEPTH(D), .PIX_W(8)) dut (.clk, .rst_n, .start,
    .pix_valid, .pix_data, .pix_last, .mem_we, .mem_waddr, .mem_wdata, .lane_done, .image_done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] img [N][D];
  int sent [N], wr [N];

  function automatic bit all_sent();
    for (int k = 0; k < N; k++) if (sent[k] < D) return 0;
    return 1;
  endfunction
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < N; k++) if (mem_we[k]) begin
      check(mem_waddr[k] == BW'(wr[k]) && mem_wdata[k] == img[k][wr[k]], $sformatf("lane %0d write %0d", k, wr[k]));
      wr[k]++;
    end

  initial begin
    for (int k = 0; k < N; k++) begin
      sent[k] = 0; wr[k] = 0; pix_data[k] = 0;
      for (int i = 0; i < D; i++) img[k][i] = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_sent()) begin
      for (int k = 0; k < N; k++) begin
        // higher lanes send less often, lane N-1 is usually the slowest
        pix_valid[k] = (sent[k] < D) && ($urandom_range(0, k + 1) == 0);
        pix_data[k]  = pix_valid[k] ? img[k][sent[k]] : 8'h00;
        pix_last[k]  = pix_valid[k] && (sent[k] == D - 1);
        if (pix_valid[k]) sent[k]++;
      end
      @(negedge clk);
      if (!all_sent()) check(!image_done, "image_done not before the slowest lane");
    end
    pix_valid = 0; pix_last = 0;
    @(negedge clk); @(negedge clk);
    check(lane_done == '1 && image_done, "all lanes done");
    for (int k = 0; k < N; k++) check(wr[k] == D, $sformatf("lane %0d wrote %0d", k, wr[k]));
    start = 1; @(negedge clk); start = 0; @(negedge clk);
    check(lane_done == '0 && !image_done, "cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
