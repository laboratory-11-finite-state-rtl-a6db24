// tb_uart_rx: checks the 16x oversampling receiver with a tick of 4
// clocks (a bit time of 64 clocks). The testbench drives frames itself:
// random bytes at the nominal bit time and at bit times 3 % short and
// long, back-to-back frames, a frame with a 0 stop bit (must be flagged as
// a framing error), and a 10-clock low glitch on the idle line (must not
// produce a byte). Counted: bytes received, framing errors, rejected
// glitches.
module tb_uart_rx;
  localparam int TICK = 4;
  localparam int BIT  = 16 * TICK;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic rx = 1'b1;
  logic [7:0] rx_data;
  logic rx_valid, rx_ferr;
  int checks = 0, failures = 0;
  int nvalid = 0, nferr = 0;
  logic [7:0] last;

  always #5 clk = ~clk;

  uart_rx #(.TICK_DIV(TICK)) dut (.clk(clk), .rst(rst), .rx(rx),
                                  .rx_data(rx_data), .rx_valid(rx_valid), .rx_ferr(rx_ferr));

  always @(posedge clk) if (!rst && rx_valid) begin
    nvalid <= nvalid + 1;
    last   <= rx_data;
    if (rx_ferr) nferr <= nferr + 1;
  end

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

  task automatic drive(input logic [7:0] b, input logic stop, input int bitlen);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (bitlen) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  task automatic frame(input logic [7:0] b, input int bitlen, input int gap);
    int n0, e0;
    n0 = nvalid; e0 = nferr;
    drive(b, 1'b1, bitlen);
    repeat (gap) @(negedge clk);
    if (gap == 0) repeat (2) @(negedge clk);
    check(nvalid == n0 + 1, $sformatf("byte %02h received (len %0d)", b, bitlen));
    check(last == b, $sformatf("byte %02h value %02h", b, last));
    check(nferr == e0, "no framing error");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (100) @(negedge clk);
    frame(8'h41, BIT, BIT);
    frame(8'h00, BIT, BIT);
    frame(8'hFF, BIT, BIT);
    for (int k = 0; k < 6; k++) frame(8'($urandom), BIT, $urandom_range(0, 40));
    for (int k = 0; k < 4; k++) frame(8'($urandom), BIT - 2, 10);   // 3 % fast
    for (int k = 0; k < 4; k++) frame(8'($urandom), BIT + 2, 10);   // 3 % slow
    // framing error: stop bit 0
    begin
      int n0, e0;
      n0 = nvalid; e0 = nferr;
      drive(8'h5A, 1'b0, BIT);
      repeat (4 * BIT) @(negedge clk);
      check(nvalid == n0 + 1 && nferr == e0 + 1, "stop bit 0 flagged as framing error");
    end
    // glitch on the idle line
    begin
      int n0;
      n0 = nvalid;
      rx = 1'b0; repeat (10) @(negedge clk); rx = 1'b1;
      repeat (12 * BIT) @(negedge clk);
      check(nvalid == n0, "glitch rejected");
    end
    frame(8'hC3, BIT, BIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
