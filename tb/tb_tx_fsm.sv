// tb_tx_fsm: checks the transmit FSM bit by bit.
// The testbench makes its own baud_en pulse every P cycles. For each test
// byte it raises tx_en, lowers it once tx_rdy falls, and compares the line
// in the middle of each of the 10 bit times with the expected frame
// (0, data LSB first, 1). It also checks that the frame starts on a
// baud_en edge, that tx_rdy is 0 for exactly 10 bit times, and that the
// line stays high with tx_rdy = 1 while tx_en is 0. With tx_en held high
// the FSM sends frames back to back; as the state diagram returns from
// stop to idle and leaves idle only on the next baud_en, consecutive start
// bits are 11 bit times apart (one idle bit between frames).
module tb_tx_fsm;
  localparam int P = 6;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic baud_en;
  logic tx_en = 1'b0;
  logic [7:0] tx_data = '0;
  logic tx, tx_rdy;
  int checks = 0, failures = 0;
  int cyc = 0;
  int bcnt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bcnt <= (bcnt == P - 1) ? 0 : bcnt + 1;
  end
  assign baud_en = (bcnt == P - 1);

  tx_fsm dut (.clk(clk), .rst(rst), .baud_en(baud_en), .tx_en(tx_en),
              .tx_data(tx_data), .tx(tx), .tx_rdy(tx_rdy));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b);
    logic [9:0] frame;
    int t0;
    frame = {1'b1, b, 1'b0};
    @(negedge clk);
    check(tx_rdy && tx, "idle before frame");
    tx_data = b;
    tx_en = 1'b1;
    // wait for the start bit
    while (tx_rdy) @(negedge clk);
    t0 = cyc;
    check(bcnt == 0, "frame starts right after a baud_en edge");
    tx_en = 1'b0;
    for (int i = 0; i < 10; i++) begin
      repeat (P / 2) @(negedge clk);
      check(tx == frame[i], $sformatf("byte %02h bit %0d tx=%0b", b, i, tx));
      check(!tx_rdy, "tx_rdy low inside frame");
      repeat (P - P / 2) @(negedge clk);
    end
    check(tx_rdy && tx, $sformatf("back to idle after 10 bit times (byte %02h)", b));
    check(cyc - t0 == 10 * P, "frame length 10 bit times");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // idle while tx_en is 0
    repeat (4 * P) begin
      @(negedge clk);
      check(tx && tx_rdy, "idle line high");
    end
    send(8'h41);   // 'A': line reads 0 1000 0010 1
    send(8'h00);
    send(8'hFF);
    send(8'hA5);
    for (int k = 0; k < 6; k++) send(8'($urandom));
    // back-to-back frames with tx_en held: start bits 11 bit times apart
    begin
      int starts[$];
      logic prev_tx;
      @(negedge clk);
      tx_data = 8'h55; tx_en = 1'b1;
      prev_tx = tx_rdy;
      while (starts.size() < 4) begin
        @(negedge clk);
        if (prev_tx && !tx_rdy) begin
          starts.push_back(cyc);
          check(tx == 1'b0, "frame begins with the start bit");
        end
        prev_tx = tx_rdy;
      end
      tx_en = 1'b0;
      for (int i = 1; i < 4; i++)
        check(starts[i] - starts[i-1] == 11 * P,
              $sformatf("back-to-back spacing %0d cycles", starts[i] - starts[i-1]));
      while (!tx_rdy) @(negedge clk);
      repeat (2 * P) @(negedge clk);
    end
    // reset in the middle of a frame returns to idle
    @(negedge clk);
    tx_data = 8'h00; tx_en = 1'b1;
    while (tx_rdy) @(negedge clk);
    tx_en = 1'b0;
    repeat (3 * P) @(negedge clk);
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(tx && tx_rdy, "reset forces idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
