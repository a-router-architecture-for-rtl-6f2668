// tb_timestamp_unit: checks that the time base advances by exactly one per cycle,
// that a host load takes effect on the next cycle and counting resumes from the
// loaded value, and that it wraps around at 2^32.
`timescale 1ns/1ps
module tb_timestamp_unit;
  import prc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  always #5 clk = ~clk;
  word_t load_value = '0, now;

  timestamp_unit dut (.clk, .rst_n, .load, .load_value, .now);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset value", now == 0);
    rst_n = 1;
    repeat (100) @(posedge clk);
    #1 check("100 cycles", now == 100);
    load = 1; load_value = 32'h1234_5678;
    @(posedge clk); #1 load = 0;
    check("loaded", now == 32'h1234_5678);
    repeat (17) @(posedge clk);
    #1 check("counts from load", now == 32'h1234_5678 + 17);
    load = 1; load_value = 32'hFFFF_FFFE;
    @(posedge clk); #1 load = 0;
    repeat (3) @(posedge clk);
    #1 check("wraps", now == 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
