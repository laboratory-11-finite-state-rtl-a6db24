// tb_tx_sequencer: checks the four-character sequencer against a
// behavioural stand-in for the TX_EN flip-flop and the transmit FSM: a
// request is taken after a random wait (tx_rdy falls), the "frame" lasts a
// random time, then tx_rdy rises. The digits taken must be those of the
// word, most significant first; there must be exactly four requests per
// word, a done pulse after the last frame, busy in between, no request
// while a frame is in progress, and a start while busy must be ignored.
module tb_tx_sequencer;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic start = 1'b0;
  logic [15:0] data = '0;
  logic tx_rdy = 1'b1;
  logic [3:0] digit;
  logic tx_go, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_sequencer dut (.clk(clk), .rst(rst), .start(start), .data(data), .tx_rdy(tx_rdy),
                    .digit(digit), .tx_go(tx_go), .busy(busy), .done(done));

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

  // transmitter stand-in
  logic [3:0] taken[$];
  int dones = 0;
  logic pending = 1'b0;
  always @(posedge clk) if (!rst && done) dones <= dones + 1;
  initial begin
    forever begin
      @(posedge clk);
      if (tx_go && !rst) begin
        check(tx_rdy, "request only while the transmitter is idle");
        repeat ($urandom_range(0, 5)) @(posedge clk);
        tx_rdy <= 1'b0;
        @(posedge clk);
        taken.push_back(digit);
        repeat ($urandom_range(3, 20)) begin
          @(posedge clk);
          check(!tx_go, "no request inside a frame");
          if (digit != taken[$]) check(1'b0, "digit stable during the frame");
        end
        tx_rdy <= 1'b1;
      end
    end
  end

  task automatic send_word(input logic [15:0] w, input logic poke_while_busy);
    int d0;
    taken.delete();
    d0 = dones;
    @(negedge clk);
    data = w; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    data = ~w;   // the source may change once the word is taken
    check(busy, "busy after start");
    if (poke_while_busy) begin
      repeat (10) @(negedge clk);
      start = 1'b1; @(negedge clk); start = 1'b0;
    end
    while (dones == d0) @(negedge clk);
    check(!busy, "idle after done");
    check(taken.size() == 4, $sformatf("four transfers (got %0d)", taken.size()));
    for (int i = 0; i < 4 && i < taken.size(); i++)
      check(taken[i] == w[15 - 4 * i -: 4],
            $sformatf("word %04h digit %0d = %h", w, i, taken[i]));
    repeat (30) @(negedge clk);
    check(dones == d0 + 1, "exactly one done");
    check(!busy, "stays idle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    send_word(16'h1A2F, 1'b0);
    send_word(16'h0000, 1'b1);
    send_word(16'hFEDC, 1'b0);
    for (int k = 0; k < 5; k++) send_word(16'($urandom), k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
