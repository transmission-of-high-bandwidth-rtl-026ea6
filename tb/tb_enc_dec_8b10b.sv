// tb_enc_dec_8b10b: checks the 8b/10b encoder and decoder.
//
// Known symbols from the standard code table are checked against the
// encoder output at both running disparities (K28.5, D0.0, D21.5, D3.3,
// D17.7 and D20.7 with the alternate 3b/4b code). Then every data byte and every valid
// control character, plus a random stream, is encoded and decoded again:
// the decoded character must equal the original, no code or disparity error
// may be flagged, every symbol must have 4, 5 or 6 ones, the line may never
// carry more than five equal bits in a row, and the running sum
// of ones minus zeros must stay within +-3 (the DC balance the code promises).
// Finally a corrupted symbol must raise code_err.
`timescale 1ns/1ps
module tb_enc_dec_8b10b;
  logic clk = 0, rst_n = 0;
  logic k = 0, en = 1;
  logic [7:0] din = 0;
  logic [9:0] code, code_in;
  logic rd, dk, cerr, derr;
  logic force_bad = 0;
  logic [7:0] dout;
  always #5 clk = ~clk;

  enc_8b10b u_enc (.clk, .rst_n, .en, .k, .din, .code, .rd);
  assign code_in = force_bad ? 10'b1111110000 : code;
  dec_8b10b u_dec (.clk, .rst_n, .en, .code(code_in), .k(dk), .dout, .code_err(cerr), .disp_err(derr));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // the decoder output seen at an edge belongs to the character that was on
  // the encoder input two edges earlier
  logic [8:0] p1, p2, p3;
  bit v1 = 0, v2 = 0, checking = 0;
  int rds = 0, run_len = 0, longest_bad = 0;
  logic last_bit = 0;
  always @(posedge clk) begin
    if (v2) check({dk, dout} == p2 && !cerr && !derr,
                  $sformatf("round trip got k=%0d %h want k=%0d %h err=%0d%0d prev %h code %b", dk, dout, p2[8], p2[7:0], cerr, derr, p3, code));
    p3 = p2;
    if (v1) begin
      int ones;
      ones = $countones(code);
      rds += 2 * ones - 10;
      check(ones >= 4 && ones <= 6, $sformatf("symbol %b balance", code));
      check(rds >= -3 && rds <= 3, $sformatf("running sum %0d", rds));
      // no more than five equal bits in a row on the line
      for (int b = 9; b >= 0; b--) begin
        if (code[b] == last_bit) run_len++;
        else begin last_bit = code[b]; run_len = 1; end
        if (run_len > 5) longest_bad++;
      end
    end
    p2 = p1; v2 = v1;
    p1 = {k, din}; v1 = checking;
  end

  task automatic send(input bit kk, input logic [7:0] d);
    @(negedge clk); k = kk; din = d;
  endtask

  task automatic expect_code(input bit kk, input logic [7:0] d, input logic [9:0] want, input string nm);
    k = kk; din = d;
    @(negedge clk);
    check(code == want, $sformatf("%s got %b want %b", nm, code, want));
  endtask

  logic [8:0] kcodes [12] = '{9'h11C, 9'h13C, 9'h15C, 9'h17C, 9'h19C, 9'h1BC, 9'h1DC, 9'h1FC,
                              9'h1F7, 9'h1FB, 9'h1FD, 9'h1FE};
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // reset leaves RD negative
    expect_code(1, 8'hBC, 10'b0011111010, "K28.5 RD-");   // RD now +
    expect_code(1, 8'hBC, 10'b1100000101, "K28.5 RD+");   // RD now -
    expect_code(0, 8'h00, 10'b1001110100, "D0.0 RD-");    // RD now -
    expect_code(0, 8'hB5, 10'b1010101010, "D21.5");
    expect_code(0, 8'h63, 10'b1100011100, "D3.3 RD-");
    expect_code(1, 8'hBC, 10'b0011111010, "K28.5 RD- again");  // RD +
    expect_code(0, 8'h00, 10'b0110001011, "D0.0 RD+");   // RD +
    expect_code(0, 8'hF1, 10'b1000110001, "D17.7 RD+ (P7)");   // RD -
    expect_code(0, 8'hF1, 10'b1000110111, "D17.7 RD- (A7)");   // RD +
    expect_code(1, 8'hBC, 10'b1100000101, "K28.5 RD+ again");  // RD -
    expect_code(0, 8'hF4, 10'b0010110111, "D20.7 RD- (A7)");
    // round trip of every character, then a random stream
    rst_n = 0; @(negedge clk); rst_n = 1;
    k = 1; din = 8'hBC;
    repeat (3) @(negedge clk);
    checking = 1;
    for (int i = 0; i < 256; i++) send(0, 8'(i));
    for (int i = 0; i < 12; i++) send(kcodes[i][8], kcodes[i][7:0]);
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 7) == 0) begin
        int j; j = $urandom_range(0, 11);
        send(kcodes[j][8], kcodes[j][7:0]);
      end else send(0, 8'($urandom));
    end
    @(negedge clk);
    checking = 0;
    check(longest_bad == 0, $sformatf("%0d line runs longer than five bits", longest_bad));
    @(negedge clk); @(negedge clk); @(negedge clk);
    force_bad = 1;
    @(negedge clk); force_bad = 0;
    #1; check(cerr, "invalid symbol flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
