// tb_uart_switch_test: the switch-and-button board test, with a bit time
// of 8 clocks and a 3-bit MPG counter. Each (bouncing) press of btn_send
// must put exactly one correct 8N1 frame of the switch value on tx, with
// exact bit timing (checked by uart_line_monitor). Holding the button
// sends nothing more. A press of btn_rst during a frame must return the
// line to idle at once, and the next press must send a clean frame.
module tb_uart_switch_test;
  localparam int P = 8;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic btn_send = 1'b0, btn_rst = 1'b0;
  logic [7:0] sw = '0;
  logic tx, tx_rdy;
  logic mvalid, merr;
  logic [7:0] mdata;
  int checks = 0, failures = 0;
  int frames = 0, errs = 0;
  logic [7:0] last;

  always #5 clk = ~clk;

  uart_switch_test #(.DIVISOR(P), .MPG_CNT_WIDTH(3)) dut (
    .clk(clk), .rst(rst), .btn_send(btn_send), .btn_rst(btn_rst), .sw(sw),
    .tx(tx), .tx_rdy(tx_rdy));

  uart_line_monitor #(.BIT_CYCLES(P)) mon (.clk(clk), .rst(rst), .line(tx), .valid(mvalid),
                                           .data(mdata), .err(merr));

  always @(posedge clk) if (!rst && mvalid) begin
    frames <= frames + 1;
    last   <= mdata;
    if (merr) errs <= errs + 1;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(ref logic b, input int hold);
    for (int k = 0; k < 3; k++) begin
      b = 1'b1; @(negedge clk); b = 1'b0; @(negedge clk);
    end
    b = 1'b1; repeat (hold) @(negedge clk); b = 1'b0;
  endtask

  initial begin
    int f0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (50) @(negedge clk);
    check(tx && frames == 0, "line idle after reset");
    for (int k = 0; k < 5; k++) begin
      f0 = frames;
      sw = (k == 0) ? 8'h41 : 8'(8'h30 + $urandom_range(0, 40));
      press(btn_send, 200);   // held much longer than one frame
      repeat (15 * P) @(negedge clk);
      check(frames == f0 + 1, $sformatf("one frame per press (%0d)", frames - f0));
      check(last == sw, $sformatf("frame carries %02h (got %02h)", sw, last));
    end
    check(errs == 0, "frames well formed and timed");
    // reset button in the middle of a frame
    sw = 8'h00;
    f0 = frames;
    press(btn_send, 20);
    while (tx_rdy) @(negedge clk);
    repeat (3 * P) @(negedge clk);
    btn_rst = 1'b1;
    while (tx_rdy == 1'b0) @(negedge clk);
    check(tx == 1'b1, "reset button forces idle line");
    btn_rst = 1'b0;
    repeat (30 * P) @(negedge clk);
    sw = 8'h5A;
    f0 = frames;
    press(btn_send, 20);
    repeat (15 * P) @(negedge clk);
    check(last == 8'h5A, "clean frame after reset button");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
