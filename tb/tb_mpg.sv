// tb_mpg: checks the mono pulse generator with a 4-bit sampling counter
// (a sample every 16 cycles). Each press is a bouncing level (at most 12
// cycles of bounce, shorter than the sampling period, as the debouncer
// requires) that settles high for 60 cycles, then bounces back low. Expected: exactly one
// one-cycle pulse per press, none while the button is held or released,
// and none after reset with the button up.
module tb_mpg;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic btn = 1'b0;
  logic en;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic en_prev = 1'b0;
  int double_wide = 0;

  always #5 clk = ~clk;

  mpg #(.CNT_WIDTH(4)) dut (.clk(clk), .rst(rst), .btn(btn), .en(en));

  always @(posedge clk) begin
    if (!rst && en) pulses <= pulses + 1;
    if (!rst && en && en_prev) double_wide <= double_wide + 1;
    en_prev <= en;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (40) @(negedge clk);
    check(pulses == 0, "no pulse with button up");
    for (int p = 1; p <= 5; p++) begin
      // bounce on press: short toggles of 1..2 cycles
      for (int b = 0; b < 3; b++) begin
        btn = 1'b1; repeat (1 + $urandom_range(0, 1)) @(negedge clk);
        btn = 1'b0; repeat (1 + $urandom_range(0, 1)) @(negedge clk);
      end
      btn = 1'b1;
      repeat (60) @(negedge clk);
      check(pulses == p, $sformatf("one pulse after press %0d (got %0d)", p, pulses));
      for (int b = 0; b < 3; b++) begin
        btn = 1'b0; repeat (1 + $urandom_range(0, 1)) @(negedge clk);
        btn = 1'b1; repeat (1 + $urandom_range(0, 1)) @(negedge clk);
      end
      btn = 1'b0;
      repeat (40) @(negedge clk);
      check(pulses == p, $sformatf("no pulse on release %0d", p));
    end
    check(double_wide == 0, "pulses are one cycle wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
