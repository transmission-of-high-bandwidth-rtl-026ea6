// tb_slmc_scaling: lane scaling of the link. Four copies of slmc_top with
// 1, 2, 4 and 8 lanes each send the same two 256 x 256 greyscale images:
// a CT-like phantom (compresses well, so the cores set the pace) and a
// noise image (incompressible, so the lanes set the pace). Every copy must
// rebuild both images exactly, with no lane errors. The execution times are
// then compared: with L lanes a copy has L cores and L serial lines, so each
// doubling of the lane count should nearly halve the time, and 8 lanes
// should be close to 8 times faster than 1. The test checks that each
// doubling gains at least 1.9x and that 8 lanes gain at least 7.5x over one.
// Each copy runs its own sequence (arm the receiver, load, start, wait, read
// back); the four run side by side on one clock.
`timescale 1ns/1ps
module tb_slmc_scaling;
  import slmc_pkg::*;
  localparam int W = 256, H = 256, NPIX = W * H;
  localparam int AW = $clog2(NPIX);
  localparam int NCFG = 4, NIMG = 2;

  logic clk = 0, clk_ser = 0, rst_n = 0;
  always #0.4 clk_ser = ~clk_ser;   // 1.25 GHz bit clock
  always #4   clk     = ~clk;       // 125 MHz system clock

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // phantom: dark surround, body disc, organ ellipse, bright spot;
  // noise: a multiplicative hash of the address, the same for every copy
  function automatic logic [7:0] pix(input int kind, input int a);
    int y, x, dx, dy;
    logic [31:0] h;
    y = a / W; x = a % W; dx = x - 128; dy = y - 128;
    if (kind == 0) begin
      if (dx * dx + dy * dy > 110 * 110) return 8'd0;
      if ((dx + 30) * (dx + 30) + (dy - 10) * (dy - 10) < 12 * 12) return 8'd250;
      if (4 * (dx - 20) * (dx - 20) + (dy - 5) * (dy - 5) < 50 * 50) return 8'd120;
      return 8'd60;
    end
    h = 32'(a) * 32'd2654435761;
    return h[23:16];
  endfunction

  int exec_c [NCFG][NIMG];
  bit done   [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int L = 1 << i;
    logic cam_we = 0, start = 0, rx_arm = 0;
    logic [AW-1:0] cam_addr = '0, host_raddr = '0;
    logic [7:0] cam_data = '0, host_rdata;
    logic [L-1:0] tx_serial;
    logic tx_busy, image_done, timers_done;
    logic [31:0] comp_cycles, tx_cycles, exec_cycles, comp_bytes;
    lane_status_t lane_status [L];

    slmc_top #(.N_LANES(L)) dut (
      .clk, .clk_ser, .rst_n, .cam_we, .cam_addr, .cam_data, .start, .tx_busy,
      .tx_serial, .rx_serial(tx_serial), .rx_arm, .host_raddr, .host_rdata,
      .image_done, .comp_cycles, .tx_cycles, .exec_cycles, .comp_bytes, .timers_done, .lane_status
    );

    initial begin
      int cyc, bad, errs;
      done[i] = 0;
      @(posedge rst_n);
      cyc = 0;
      while (cyc < 1000) begin
        bit all;
        all = 1;
        for (int k = 0; k < L; k++) all &= lane_status[k].aligned;
        if (all) break;
        @(negedge clk); cyc++;
      end
      for (int m = 0; m < NIMG; m++) begin
        for (int a = 0; a < NPIX; a++) begin
          @(negedge clk);
          cam_we = 1; cam_addr = AW'(a); cam_data = pix(m, a);
        end
        @(negedge clk) cam_we = 0;
        @(negedge clk) rx_arm = 1;
        @(negedge clk) rx_arm = 0;
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        cyc = 0;
        while (!image_done && cyc < 400_000) begin @(negedge clk); cyc++; end
        check(image_done, $sformatf("%0d lanes image %0d: image_done", L, m));
        repeat (40) @(negedge clk);
        check(timers_done, $sformatf("%0d lanes image %0d: timers done", L, m));
        exec_c[i][m] = exec_cycles;
        bad = 0;
        for (int a = 0; a < NPIX; a++) begin
          host_raddr = AW'(a);
          @(negedge clk);
          if (host_rdata != pix(m, a)) bad++;
        end
        check(bad == 0, $sformatf("%0d lanes image %0d: %0d wrong pixels", L, m, bad));
        errs = 0;
        for (int k = 0; k < L; k++)
          errs += int'(lane_status[k].csum_errs) + int'(lane_status[k].hdr_errs) +
                  int'(lane_status[k].frame_errs) + int'(lane_status[k].code_errs) +
                  int'(lane_status[k].overflow);
        check(errs == 0, $sformatf("%0d lanes image %0d: %0d lane errors", L, m, errs));
      end
      done[i] = 1;
    end
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string names [NIMG] = '{"phantom", "noise"};
  real   sp;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("lanes  %-8s  %-8s  (execution time in us, speed-up over 1 lane)", names[0], names[1]);
    for (int i = 0; i < NCFG; i++)
      $display("%5d  %8.2f (%4.2fx)  %8.2f (%4.2fx)", 1 << i,
               real'(exec_c[i][0]) * 0.008, real'(exec_c[0][0]) / real'(exec_c[i][0]),
               real'(exec_c[i][1]) * 0.008, real'(exec_c[0][1]) / real'(exec_c[i][1]));
    for (int m = 0; m < NIMG; m++) begin
      for (int i = 1; i < NCFG; i++) begin
        sp = real'(exec_c[i - 1][m]) / real'(exec_c[i][m]);
        check(sp >= 1.9, $sformatf("%s: %0d -> %0d lanes gains %0.2fx", names[m], 1 << (i - 1), 1 << i, sp));
      end
      sp = real'(exec_c[0][m]) / real'(exec_c[NCFG - 1][m]);
      check(sp >= 7.5 && sp <= 8.1, $sformatf("%s: 8 lanes gain %0.2fx over one", names[m], sp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
