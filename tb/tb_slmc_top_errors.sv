// tb_slmc_top_errors: the error-detection paths of the whole link, at a
// reduced size (2 lanes, 32 x 32 pixels, 32-byte frames).
//
// Run 1 sends an image cleanly and checks it bit for bit. Run 2 inverts one
// line bit in the middle of lane 1's traffic: lane 1 must report a code,
// disparity, checksum, header or frame error, and lane 0 must stay clean.
// Run 3 uses a second instance whose receive buffer holds only 8 bytes; an
// image with long runs followed by unrepeated pixels makes the decompressor
// fall behind, and the overflow flag must rise. Run 4 sends the image
// cleanly again: the counters must have been cleared by rx_arm and the image
// must be rebuilt exactly, so one bad frame does not upset later images.
`timescale 1ns/1ps
module tb_slmc_top_errors;
  import slmc_pkg::*;
  localparam int N = 2, W = 32, H = 32, NPIX = W * H, AW = $clog2(NPIX);

  logic clk = 0, clk_ser = 0, rst_n = 0;
  always #0.4 clk_ser = ~clk_ser;
  always #4   clk     = ~clk;

  logic cam_we = 0, start = 0, rx_arm = 0;
  logic [AW-1:0] cam_addr = '0, host_raddr = '0;
  logic [7:0] cam_data = '0;
  logic [7:0] host_rdata [2];
  logic [N-1:0] tx_serial [2];
  logic [N-1:0] flip = '0;
  logic tx_busy [2], image_done [2], timers_done [2];
  logic [31:0] comp_cycles [2], tx_cycles [2], exec_cycles [2], comp_bytes [2];
  lane_status_t st_a [N];
  lane_status_t st_b [N];

  slmc_top #(.N_LANES(N), .IMG_W(W), .IMG_H(H), .MAX_PAYLOAD(32)) u_a (
    .clk, .clk_ser, .rst_n, .cam_we, .cam_addr, .cam_data, .start, .rx_arm, .tx_busy(tx_busy[0]),
    .tx_serial(tx_serial[0]), .rx_serial(tx_serial[0] ^ flip), .host_raddr, .host_rdata(host_rdata[0]),
    .image_done(image_done[0]), .comp_cycles(comp_cycles[0]), .tx_cycles(tx_cycles[0]),
    .exec_cycles(exec_cycles[0]), .comp_bytes(comp_bytes[0]), .timers_done(timers_done[0]), .lane_status(st_a));

  slmc_top #(.N_LANES(N), .IMG_W(W), .IMG_H(H), .MAX_PAYLOAD(32), .RX_FIFO(8)) u_b (
    .clk, .clk_ser, .rst_n, .cam_we, .cam_addr, .cam_data, .start, .rx_arm, .tx_busy(tx_busy[1]),
    .tx_serial(tx_serial[1]), .rx_serial(tx_serial[1]), .host_raddr, .host_rdata(host_rdata[1]),
    .image_done(image_done[1]), .comp_cycles(comp_cycles[1]), .tx_cycles(tx_cycles[1]),
    .exec_cycles(exec_cycles[1]), .comp_bytes(comp_bytes[1]), .timers_done(timers_done[1]), .lane_status(st_b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] img [NPIX];
  // first half of each stripe: 200-pixel runs; second half: no repeats
  function automatic logic [7:0] pix(input int a);
    int o = a % (NPIX / N);
    return (o < NPIX / (2 * N)) ? 8'(o / 200 + 1) : 8'(o * 3 + 100);
  endfunction

  task automatic load();
    for (int a = 0; a < NPIX; a++) begin
      img[a] = pix(a);
      @(negedge clk); cam_we = 1; cam_addr = AW'(a); cam_data = img[a];
    end
    @(negedge clk) cam_we = 0;
  endtask

  task automatic run(input int flip_lane, input int flip_at);
    int cyc;
    @(negedge clk) rx_arm = 1;
    @(negedge clk) rx_arm = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!(image_done[0] && timers_done[0]) && cyc < 20000) begin
      @(negedge clk); cyc++;
      if (cyc == flip_at && flip_lane >= 0) begin
        #1.6 flip[flip_lane] = 1; #0.8 flip[flip_lane] = 0;
      end
    end
    repeat (20) @(negedge clk);
  endtask

  function automatic int errs(input lane_status_t s);
    return s.csum_errs + s.hdr_errs + s.frame_errs + s.code_errs;
  endfunction

  int bad;
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    load();
    repeat (50) @(negedge clk);
    // run 1: clean
    run(-1, 0);
    check(image_done[0], "run 1 image done");
    bad = 0;
    for (int a = 0; a < NPIX; a++) begin
      host_raddr = AW'(a); @(negedge clk);
      if (host_rdata[0] != img[a]) bad++;
    end
    check(bad == 0, $sformatf("run 1: %0d wrong pixels", bad));
    check(errs(st_a[0]) == 0 && errs(st_a[1]) == 0, "run 1 error free");
    // run 2: one inverted bit on lane 1, early in the unrepeated half
    run(1, 700);
    $display("run 2 lane 1: csum=%0d hdr=%0d frame=%0d code=%0d", st_a[1].csum_errs,
             st_a[1].hdr_errs, st_a[1].frame_errs, st_a[1].code_errs);
    check(errs(st_a[1]) > 0, "run 2 line error reported on lane 1");
    check(errs(st_a[0]) == 0, "run 2 lane 0 unaffected");
    // run 3 happened alongside on the small-buffer instance
    check(st_b[0].overflow || st_b[1].overflow, "receive buffer overflow flagged");
    // run 4: clean again; rx_arm must have cleared the counters and the
    // link must rebuild the image exactly after the error
    run(-1, 0);
    check(image_done[0], "run 4 image done");
    bad = 0;
    for (int a = 0; a < NPIX; a++) begin
      host_raddr = AW'(a); @(negedge clk);
      if (host_rdata[0] != img[a]) bad++;
    end
    check(bad == 0, $sformatf("run 4: %0d wrong pixels", bad));
    check(errs(st_a[0]) == 0 && errs(st_a[1]) == 0, "run 4 error counters cleared and clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
