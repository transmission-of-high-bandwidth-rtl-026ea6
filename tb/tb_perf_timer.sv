// tb_perf_timer: start and end triggers at known distances. An end D clocks
// after the start must read D + 1 cycles; start and end together read 1;
// triggers before the first start or after the end are ignored; clear
// re-arms the controller.
`timescale 1ns/1ps
module tb_perf_timer;
  logic clk = 0, rst_n = 0, clear = 0, st = 0, en = 0, running, done;
  logic [31:0] cycles;
  always #5 clk = ~clk;

  perf_timer dut (.clk, .rst_n, .clear, .start_trig(st), .end_trig(en), .cycles, .running, .done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int gap);
    clear = 1; @(negedge clk); clear = 0;
    en = 1; @(negedge clk); en = 0;          // end before start: ignored
    repeat (3) @(negedge clk);
    check(!running && !done && cycles == 0, "idle before start");
    st = 1;
    if (gap == 0) en = 1;
    @(negedge clk); st = 0; en = 0;
    if (gap > 0) begin
      repeat (gap - 1) @(negedge clk);
      check(running, "running");
      en = 1; @(negedge clk); en = 0;
    end
    check(done && !running, "done");
    check(cycles == 32'(gap + 1), $sformatf("distance %0d read %0d", gap, cycles));
    st = 1; @(negedge clk); st = 0;
    repeat (5) @(negedge clk);
    check(cycles == 32'(gap + 1), "held after end");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(0);
    measure(1);
    measure(17);
    measure(250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
