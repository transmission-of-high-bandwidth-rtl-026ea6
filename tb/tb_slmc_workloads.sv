// tb_slmc_workloads: runs a set of greyscale test images through the whole
// link at its default size (8 lanes, 256 x 256 pixels of 8 bits), one after
// another, and reports the figures the link is judged by: compression ratio,
// compression, transmission and execution time, and pixel rate.
//
// The images span the range of compressibility of medical greyscale images:
//   flat     - one grey level (best case for the run-length coder)
//   phantom  - a CT-like slice: dark surround, body disc, organ ellipse and
//              small bright spots, edges only where the tissue changes
//   gradient - a diagonal ramp, two equal neighbours per run
//   noise    - random pixels, no runs at all (worst case)
// For every image the test works out here, from the pixels, how many run
// tokens and frames each lane must carry, and checks the token count taken
// by each transport controller, the compressed size counted by the link,
// the frame counters, the error counters, the rebuilt image (every pixel)
// and the timer values against the one pixel per clock per core and one
// character per clock per lane rates. Sending several
// images in a row also checks that rx_arm and start rearm the two ends.
`timescale 1ns/1ps
module tb_slmc_workloads;
  import slmc_pkg::*;
  localparam int N = 8, W = 256, H = 256, NPIX = W * H, BANK = NPIX / N, MAXP = 256;
  localparam int AW = $clog2(NPIX);
  localparam int NIMG = 4;

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

  logic [7:0] img [NPIX];

  function automatic logic [7:0] pix(input int kind, input int a);
    int y, x, dx, dy;
    y = a / W; x = a % W; dx = x - 128; dy = y - 128;
    case (kind)
      0: return 8'd16;
      1: begin
        if (dx * dx + dy * dy > 110 * 110) return 8'd0;
        if ((dx + 30) * (dx + 30) + (dy - 10) * (dy - 10) < 12 * 12) return 8'd250;
        if ((dx - 40) * (dx - 40) + (dy + 35) * (dy + 35) < 6 * 6) return 8'd240;
        if (4 * (dx - 20) * (dx - 20) + (dy - 5) * (dy - 5) < 50 * 50) return 8'd120;
        return 8'd60;
      end
      2: return 8'((x + y) / 2);
      default: return 8'($urandom);
    endcase
  endfunction

  // tokens taken by each transport controller during one image
  int tok_cnt [N];
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk) begin
      if (start) tok_cnt[k] = 0;
      else if (rst_n && dut.g_tx[k].tok_valid && dut.g_tx[k].tok_ready) tok_cnt[k]++;
    end
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string names [NIMG] = '{"flat", "phantom", "gradient", "noise"};
  int exp_toks [N];
  int max_bytes, max_frames, total_bytes, cyc, bad, restarts;
  real cr, cr_min, cr_max, rate;

  initial begin
    cr_min = 1.0e9; cr_max = 0.0; restarts = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    cyc = 0;
    while (cyc < 1000) begin
      bit all;
      all = 1;
      for (int k = 0; k < N; k++) all &= lane_status[k].aligned;
      if (all) break;
      @(negedge clk); cyc++;
    end
    for (int k = 0; k < N; k++) check(lane_status[k].aligned, $sformatf("lane %0d aligned", k));

    $display("image     CR      comp(us)  tx(us)  exec(us)  Gpixel/s");
    for (int m = 0; m < NIMG; m++) begin
      for (int a = 0; a < NPIX; a++) img[a] = pix(m, a);
      // reference run-length token count per lane
      max_bytes = 0; max_frames = 0; total_bytes = 0;
      for (int k = 0; k < N; k++) begin
        int toks, run;
        toks = 0; run = 0;
        for (int i = 0; i < BANK; i++) begin
          if (run == 0 || img[k * BANK + i] != img[k * BANK + i - 1] || run == 255) begin
            toks++; run = 1;
          end else run++;
        end
        exp_toks[k] = toks;
        total_bytes += 2 * toks;
        if (2 * toks > max_bytes) max_bytes = 2 * toks;
        if ((2 * toks + MAXP - 1) / MAXP > max_frames) max_frames = (2 * toks + MAXP - 1) / MAXP;
      end

      for (int a = 0; a < NPIX; a++) begin
        @(negedge clk);
        cam_we = 1; cam_addr = AW'(a); cam_data = img[a];
      end
      @(negedge clk) cam_we = 0;

      // the host arms the receiver, then the camera end starts sending
      @(negedge clk) rx_arm = 1;
      @(negedge clk) rx_arm = 0;
      check(!image_done, $sformatf("%s: image_done cleared by rx_arm", names[m]));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (!image_done && cyc < 400_000) begin @(negedge clk); cyc++; end
      check(image_done, $sformatf("%s: image_done", names[m]));
      repeat (40) @(negedge clk);
      check(timers_done, $sformatf("%s: timers done", names[m]));
      if (m > 0 && image_done) restarts++;

      bad = 0;
      for (int a = 0; a < NPIX; a++) begin
        host_raddr = AW'(a);
        @(negedge clk);
        if (host_rdata != img[a]) begin
          bad++;
          if (bad < 5) $display("FAIL: %s pixel %0d got %0h want %0h", names[m], a, host_rdata, img[a]);
        end
      end
      check(bad == 0, $sformatf("%s: %0d wrong pixels", names[m], bad));

      for (int k = 0; k < N; k++) begin
        check(tok_cnt[k] == exp_toks[k],
              $sformatf("%s lane %0d tokens %0d want %0d", names[m], k, tok_cnt[k], exp_toks[k]));
        check(int'(lane_status[k].frames_ok) == (2 * exp_toks[k] + MAXP - 1) / MAXP,
              $sformatf("%s lane %0d frames %0d", names[m], k, lane_status[k].frames_ok));
        check(lane_status[k].csum_errs == 0 && lane_status[k].hdr_errs == 0 &&
              lane_status[k].frame_errs == 0 && lane_status[k].code_errs == 0 &&
              !lane_status[k].overflow && lane_status[k].image_end,
              $sformatf("%s lane %0d error free", names[m], k));
      end

      check(comp_cycles >= BANK, $sformatf("%s: compression no faster than one pixel per clock", names[m]));
      check(tx_cycles >= max_bytes + 5 * max_frames,
            $sformatf("%s: transmission no faster than one byte per clock", names[m]));
      check(comp_cycles <= BANK + max_bytes + 10 * max_frames + 200 &&
            tx_cycles <= BANK + max_bytes + 10 * max_frames + 200,
            $sformatf("%s: times limited only by the cores or the link", names[m]));
      check(exec_cycles >= comp_cycles && exec_cycles >= tx_cycles,
            $sformatf("%s: execution spans both", names[m]));

      check(int'(comp_bytes) == total_bytes,
            $sformatf("%s: compressed size %0d want %0d", names[m], comp_bytes, total_bytes));
      cr   = real'(NPIX) / real'(comp_bytes);
      rate = real'(NPIX) / (real'(exec_cycles) * 8.0);
      if (cr < cr_min) cr_min = cr;
      if (cr > cr_max) cr_max = cr;
      $display("%-9s %7.2f %8.3f %8.3f %8.3f %8.3f", names[m], cr,
               real'(comp_cycles) * 0.008, real'(tx_cycles) * 0.008,
               real'(exec_cycles) * 0.008, rate);
      // the pixel rate can never beat N cores x 1 pixel x 125 MHz, and even
      // incompressible data still moves at half of that (2 bytes per pixel)
      check(rate <= 1.0 && rate > 0.45, $sformatf("%s: pixel rate %0.3f in range", names[m], rate));
    end

    $display("compression ratio range %0.2f .. %0.2f over %0d images, %0d restarts",
             cr_min, cr_max, NIMG, restarts);
    check(cr_min < 1.0, "incompressible image expanded");
    check(cr_max > 100.0, "flat image compressed more than 100:1");
    check(restarts == NIMG - 1, "every later image rearmed the link");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
