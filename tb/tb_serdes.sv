// tb_serdes: checks the serializer and the deserializer together.
//
// An 8b/10b encoder in the testbench produces the 10-bit codes: a few K28.5
// idles, then a counting sequence of data bytes. The serializer drives the
// line at ten bits per system clock; the deserializer starts at a phase of
// its own and must find the word boundary on the comma. The test checks
// that the line carries every code MSB first, that 'aligned' rises, and that
// after the idles the deserializer delivers every code exactly once, in
// order, at a constant latency (no code lost or repeated).
`timescale 1ns/1ps
module tb_serdes;
  logic clk = 0, clk_ser = 0, rst_n = 0;
  always #0.4 clk_ser = ~clk_ser;
  always #4   clk     = ~clk;

  logic k = 1;
  logic [7:0] din = 8'hBC;
  logic [9:0] code, par_out;
  logic line, aligned;

  enc_8b10b  u_enc (.clk, .rst_n, .en(1'b1), .k, .din, .code, .rd());
  serializer u_ser (.clk_ser, .rst_n, .par_in(code), .ser_out(line));
  deserializer u_des (.clk_ser, .rst_n, .ser_in(line), .par_out, .aligned);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // codes as they leave the encoder, one per clock
  logic [9:0] sent [$];
  always @(posedge clk) if (rst_n) sent.push_back(code);

  // line bits, collected independently of the deserializer
  logic [9:0] win = '0;

  int got = 0, latency = -1, t = 0, seen_data = 0;
  logic [9:0] expq [$];
  always @(posedge clk) begin
    t++;
    if (aligned && par_out != 10'b0011111010 && par_out != 10'b1100000101) begin
      if (seen_data == 0) begin
        // first data code: drop the idles in front of it from the reference
        while (sent.size() > 0 && sent[0] != par_out) void'(sent.pop_front());
      end
      seen_data++;
      if (sent.size() > 0) begin
        logic [9:0] e; e = sent.pop_front();
        check(par_out == e, $sformatf("code %0d got %b want %b", seen_data, par_out, e));
      end else check(0, "code with nothing sent");
    end else if (seen_data > 0) begin
      check(0, "comma inside the data");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    #0.8 rst_n = 1;     // release off the clock edge: arbitrary serializer phase
    repeat (12) @(negedge clk);
    check(aligned, "aligned after idles");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      k = 0; din = 8'(i);
    end
    repeat (4) @(negedge clk);
    check(seen_data >= 200 && seen_data <= 206, $sformatf("codes delivered %0d", seen_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MSB-first line order: every ten line bits at the serializer's reload
  // phase equal the code it loaded ten bits earlier
  logic [9:0] loaded;
  int lcount = 0;
  always @(posedge clk_ser) begin
    win = {win[8:0], line};
    if (rst_n && u_ser.ph == 0) begin
      if (lcount > 0) check(win == loaded, $sformatf("line bits %b want %b", win, loaded));
      loaded = code;
      lcount++;
    end
  end
endmodule
