// tb_baud_gen: checks the baud rate generator.
// A small divider (7) is checked pulse by pulse: one-cycle pulses, the
// first one 6 clock edges after the edge that ends reset (the counter
// reads 0 after reset), then exactly every 7 cycles, and a reset
// in the middle restarts the count. A second instance at the default
// divider checks that 9600 baud from 50 MHz gives a period of
// 50e6 / 9600 = 5208 cycles.
module tb_baud_gen;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en_s, en_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen #(.DIVISOR(7)) dut_s (.clk(clk), .rst(rst), .baud_en(en_s));
  baud_gen                dut_d (.clk(clk), .rst(rst), .baud_en(en_d));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  int last_d;
  int npulse_d;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // small divider: expect pulse on cycle 7,14,21,... after reset release
    for (cyc = 1; cyc <= 50; cyc++) begin
      @(posedge clk); #1;
      check(en_s == ((cyc % 7) == 6), $sformatf("div7 cycle %0d en=%0b", cyc, en_s));
    end
    // reset in the middle of a period restarts the count
    rst <= 1'b1; @(posedge clk); rst <= 1'b0;
    for (cyc = 1; cyc <= 14; cyc++) begin
      @(posedge clk); #1;
      check(en_s == ((cyc % 7) == 6), $sformatf("after reset cycle %0d", cyc));
    end
    // default divider: period of the 9600 baud pulse at 50 MHz
    rst <= 1'b1; @(posedge clk); rst <= 1'b0;
    last_d = -1; npulse_d = 0;  // first pulse on edge 5207
    for (cyc = 1; cyc <= 5208 * 4; cyc++) begin
      @(posedge clk); #1;
      if (en_d) begin
        check(cyc - last_d == 5208, $sformatf("default period %0d", cyc - last_d));
        last_d = cyc;
        npulse_d++;
      end
    end
    check(npulse_d == 4, "four default pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
