// tb_slmc_top: end-to-end test of the whole link at its default size
// (8 lanes, 256 x 256 pixels of 8 bits).
//
// The serial outputs are looped back to the serial inputs as the cable.
// A synthetic image is written through the camera port: bands of random
// pixels (no runs, so the coder emits two bytes per pixel and back-pressure
// stalls the pixel stream), flat bands longer than the 255-pixel run limit,
// and bands of 32-pixel steps. After all lanes align, an rx_arm pulse arms
// the receiver and one start pulse sends the image. The test waits for
// image_done, reads the rebuilt image through the host port and compares
// every pixel with the original. It also checks the per-lane frame counters
// against a frame count worked out here from the image, that no checksum,
// header, code or overflow error occurred, and that
// the measured compression and transmission times agree with the one pixel
// and one byte per clock rates of the design. Each mechanism (stall, fill
// character, multi-frame split, run-limit split, comma alignment, end-of-image
// delimiter) is counted and must occur at least once.
`timescale 1ns/1ps
module tb_slmc_top;
  import slmc_pkg::*;
  localparam int N = 8, W = 256, H = 256, NPIX = W * H, BANK = NPIX / N, MAXP = 256;
  localparam int AW = $clog2(NPIX);

  logic clk = 0, clk_ser = 0, rst_n = 0;
  logic cam_we = 0, start = 0, rx_arm = 0;
  logic [AW-1:0] cam_addr = '0, host_raddr = '0;
  logic [7:0] cam_data = '0, host_rdata;
  logic [N-1:0] tx_serial, rx_serial;
  logic tx_busy, image_done, timers_done;
  logic [31:0] comp_cycles, tx_cycles, exec_cycles, comp_bytes;
  lane_status_t lane_status [N];

  always #0.4 clk_ser = ~clk_ser;   // 1.25 GHz bit clock
  always #4   clk     = ~clk;       // 125 MHz system clock

  assign rx_serial = tx_serial;

  slmc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference image
  logic [7:0] img [NPIX];
  function automatic logic [7:0] pix(input int a);
    int y = a / W, x = a % W;
    case ((y / 4) % 4)
      0: return 8'($urandom);
      1: return 8'(y * 7);                 // flat row band, runs cross rows
      2: return 8'((x / 32) * 29 + y);     // 32-pixel steps
      default: return (x < 128) ? 8'(y) : 8'($urandom_range(0, 1));
    endcase
  endfunction

  // mechanism counters
  int n_stall = 0, n_fill = 0, n_maxrun = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_stall += $countones(dut.px_valid & ~dut.px_ready);
    end
  end
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk) begin
      if (dut.g_tx[k].u_fgen.fill_sent) n_fill++;
      if (dut.g_tx[k].tok_valid && dut.g_tx[k].tok_ready && dut.g_tx[k].tok.count == 8'd255) n_maxrun++;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_frames [N];
  int exp_bytes  [N];
  int max_bytes, max_frames, cyc;

  initial begin
    for (int a = 0; a < NPIX; a++) img[a] = pix(a);
    // expected token / frame counts per lane, worked out from the image
    max_bytes = 0; max_frames = 0;
    for (int k = 0; k < N; k++) begin
      int toks, run;
      logic [7:0] v;
      toks = 0; run = 0;
      for (int i = 0; i < BANK; i++) begin
        v = img[k * BANK + i];
        if (run == 0 || v != img[k * BANK + i - 1] || run == 255) begin toks++; run = 1; end
        else run++;
      end
      exp_bytes[k]  = 2 * toks;
      exp_frames[k] = (exp_bytes[k] + MAXP - 1) / MAXP;
      if (exp_bytes[k] > max_bytes) max_bytes = exp_bytes[k];
      if (exp_frames[k] > max_frames) max_frames = exp_frames[k];
    end

    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      cam_we = 1; cam_addr = AW'(a); cam_data = img[a];
    end
    @(negedge clk) cam_we = 0;

    // all lanes must have found the comma before data is sent
    cyc = 0;
    while (cyc < 1000) begin
      bit all;
      all = 1;
      for (int k = 0; k < N; k++) all &= lane_status[k].aligned;
      if (all) break;
      @(negedge clk); cyc++;
    end
    for (int k = 0; k < N; k++) check(lane_status[k].aligned, $sformatf("lane %0d aligned", k));

    @(negedge clk) rx_arm = 1;
    @(negedge clk) rx_arm = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!image_done && cyc < 400_000) begin @(negedge clk); cyc++; end
    check(image_done, "image_done");
    repeat (40) @(negedge clk);
    check(timers_done, "timers done");

    for (int a = 0; a < NPIX; a++) begin
      host_raddr = AW'(a);
      @(negedge clk);
      if (host_rdata != img[a]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d got %0h want %0h", a, host_rdata, img[a]);
      end
      checks++;
    end

    for (int k = 0; k < N; k++) begin
      check(int'(lane_status[k].frames_ok) == exp_frames[k],
            $sformatf("lane %0d frames %0d want %0d", k, lane_status[k].frames_ok, exp_frames[k]));
      $display("lane %0d: ok=%0d csum=%0d hdr=%0d frame=%0d code=%0d ovf=%0d", k, lane_status[k].frames_ok, lane_status[k].csum_errs, lane_status[k].hdr_errs, lane_status[k].frame_errs, lane_status[k].code_errs, lane_status[k].overflow);
      check(lane_status[k].csum_errs == 0 && lane_status[k].hdr_errs == 0 &&
            lane_status[k].frame_errs == 0 && lane_status[k].code_errs == 0 &&
            !lane_status[k].overflow, $sformatf("lane %0d error free", k));
      check(lane_status[k].image_end, $sformatf("lane %0d end of image seen", k));
    end

    begin
      int sum;
      sum = 0;
      for (int k = 0; k < N; k++) sum += exp_bytes[k];
      check(int'(comp_bytes) == sum, $sformatf("compressed size %0d want %0d", comp_bytes, sum));
    end

    // timing: one pixel per clock per core, one character per clock per lane
    $display("compression %0d cycles, transmission %0d cycles, execution %0d cycles",
             comp_cycles, tx_cycles, exec_cycles);
    $display("largest lane: %0d bytes in %0d frames; pixel rate %0.3f Gpixel/s at 125 MHz",
             max_bytes, max_frames, real'(NPIX) / (real'(exec_cycles) * 8.0));
    check(comp_cycles >= BANK, "compression no faster than one pixel per clock");
    check(tx_cycles >= max_bytes + 5 * max_frames, "transmission no faster than one byte per clock");
    // every cycle either a core takes a pixel, or the link sends a byte or
    // framing character, so neither time can exceed the sum of the two
    check(comp_cycles <= BANK + max_bytes + 10 * max_frames + 200,
          "compression limited only by the core or the link");
    check(tx_cycles <= BANK + max_bytes + 10 * max_frames + 200,
          "transmission limited only by the core or the link");
    check(exec_cycles >= comp_cycles && exec_cycles >= tx_cycles, "execution spans both");

    $display("mechanisms: stall=%0d fill=%0d max_run=%0d multi_frame=%0d", n_stall, n_fill, n_maxrun, max_frames);
    check(n_stall > 0, "stall happened");
    check(n_fill > 0, "fill character happened");
    check(n_maxrun > 0, "run-limit split happened");
    check(max_frames > 1, "multi-frame split happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
