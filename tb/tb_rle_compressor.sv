// tb_rle_compressor: checks the run-length coder against a reference
// computed here.
//
// Several sub-images are sent: runs of random length (some far above the
// 255 limit), single pixels, and a final run of one pixel. The reference
// token list is built from the same pixels. With the output always ready,
// the core must take one pixel per clock (N pixels in N cycles). With a
// randomly stalling output, the tokens must still match exactly and the
// 'last' flag must be on the final token only.
`timescale 1ns/1ps
module tb_rle_compressor;
  import slmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1;
  logic [7:0] in_data = 0;
  rle_token_t out_token;

  rle_compressor dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
                      .out_valid, .out_ready, .out_token);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] pix [$];
  rle_token_t ref_q [$];
  int ntok = 0;
  bit stall_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rle_token_t e;
      e = (ref_q.size() > 0) ? ref_q.pop_front() : '0;
      check(out_token == e, $sformatf("token %0d got %0d x %h last %0d want %0d x %h last %0d",
            ntok, out_token.count, out_token.value, out_token.last, e.count, e.value, e.last));
      ntok++;
    end
  end
  always @(negedge clk) out_ready = stall_out ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic make_image(input int n);
    int i, len;
    logic [7:0] v;
    pix.delete();
    i = 0;
    while (i < n) begin
      len = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 700) : $urandom_range(1, 4);
      v = 8'($urandom_range(0, 3));
      for (int j = 0; j < len && i < n; j++) begin pix.push_back(v); i++; end
    end
    // reference tokens
    len = 0;
    for (int j = 0; j < n; j++) begin
      if (len > 0 && (pix[j] != pix[j - 1] || len == 255)) begin
        ref_q.push_back('{last: 1'b0, count: 8'(len), value: pix[j - 1]});
        len = 0;
      end
      len++;
    end
    ref_q.push_back('{last: 1'b1, count: 8'(len), value: pix[n - 1]});
  endtask

  task automatic send_image(output int cycles);
    int t0;
    t0 = 0; cycles = 0;
    for (int j = 0; j < pix.size(); j++) begin
      in_valid = 1; in_data = pix[j]; in_last = (j == pix.size() - 1);
      @(posedge clk); cycles++;
      while (!in_ready) begin @(posedge clk); cycles++; end
      #1;
    end
    in_valid = 0; in_last = 0;
  endtask

  int cyc;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    make_image(3000);
    send_image(cyc);
    check(cyc == 3000, $sformatf("3000 pixels took %0d cycles", cyc));
    repeat (5) @(negedge clk);
    check(ref_q.size() == 0, "all tokens out");
    stall_out = 1;
    for (int r = 0; r < 4; r++) begin
      make_image(1000 + r);
      send_image(cyc);
      repeat (10) @(negedge clk);
      check(ref_q.size() == 0, "all tokens out under stalls");
    end
    pix.delete(); pix.push_back(8'h33);
    ref_q.push_back('{last: 1'b1, count: 8'd1, value: 8'h33});
    send_image(cyc);
    repeat (10) @(negedge clk);
    check(ref_q.size() == 0, "one-pixel image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
