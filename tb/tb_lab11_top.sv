// tb_lab11_top: end-to-end test of lab11_top with every parameter at its
// default: 50 MHz clock, 9600 baud (5208 clocks per bit), receiver tick
// 325 clocks, 16-bit button counters, capture address 0x0020.
//
//  * A processor stand-in walks its PC to 0x0020 with a result on wdata.
//    The serial line tx is looped back into rx, so the receiver must
//    deliver the four ASCII hex digits of the result; uart_line_monitor
//    checks the same line for exact 5208-clock bits. A second pass through
//    0x0020 while the word is still going out must be ignored.
//  * The switch test: a bouncing press of btn_send sends the switch value
//    on sw_tx; a press of btn_rst during a second frame returns the line
//    to idle.
//  * The receiver, driven by the testbench, must flag a frame whose stop
//    bit is 0 and ignore a short glitch.
//  * The example state machine is checked against a reference model.
// Each mechanism is counted and must occur at least once.
module tb_lab11_top;
  localparam int P = 5208;
  localparam int RXP = 325 * 16;    // receiver's own bit time

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] pc = '0, wdata = '0, result;
  logic tx, tx_rdy, tx_busy, tx_done;
  logic btn_send = 1'b0, btn_rst = 1'b0;
  logic [7:0] sw = '0;
  logic sw_tx, sw_tx_rdy;
  logic rx;
  logic loopback = 1'b1;
  logic rx_drv = 1'b1;
  logic [7:0] rx_data;
  logic rx_valid, rx_ferr;
  logic fsm_reset = 1'b1, fsm_x1 = 1'b0, fsm_outp;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  assign rx = loopback ? tx : rx_drv;

  lab11_top dut (
    .clk(clk), .rst(rst),
    .pc(pc), .wdata(wdata), .tx(tx), .tx_rdy(tx_rdy), .tx_busy(tx_busy),
    .tx_done(tx_done), .result(result),
    .btn_send(btn_send), .btn_rst(btn_rst), .sw(sw), .sw_tx(sw_tx), .sw_tx_rdy(sw_tx_rdy),
    .rx(rx), .rx_data(rx_data), .rx_valid(rx_valid), .rx_ferr(rx_ferr),
    .fsm_reset(fsm_reset), .fsm_x1(fsm_x1), .fsm_outp(fsm_outp));

  logic m1v, m1e, m2v, m2e;
  logic [7:0] m1d, m2d;
  uart_line_monitor #(.BIT_CYCLES(P)) mon_tx (.clk(clk), .rst(rst), .line(tx), .valid(m1v), .data(m1d), .err(m1e));
  uart_line_monitor #(.BIT_CYCLES(P)) mon_sw (.clk(clk), .rst(rst), .line(sw_tx), .valid(m2v), .data(m2d), .err(m2e));

  // mechanism counters
  int n_capture = 0, n_transfer = 0, n_word = 0, n_hold_en = 0, n_letter = 0;
  int n_start_ignored = 0, n_sw_frame = 0, n_sw_reset = 0;
  int n_rx_byte = 0, n_rx_ferr = 0, n_glitch = 0, n_s2 = 0, n_s3 = 0;
  int line_errs = 0;
  int sw_line_errs = 0, sw_errs_before_reset = 0;
  byte rx_chars[$];
  byte tx_chars[$];
  logic [7:0] sw_last;

  always @(posedge clk) if (!rst) begin
    if (dut.u_mips_tx.start) begin
      n_capture <= n_capture + 1;
      if (tx_busy) n_start_ignored <= n_start_ignored + 1;
    end
    if (dut.u_mips_tx.tx_go) n_transfer <= n_transfer + 1;
    if (tx_done) n_word <= n_word + 1;
    if (dut.u_mips_tx.tx_en && tx_rdy && !dut.u_mips_tx.baud_en) n_hold_en <= n_hold_en + 1;
    if (dut.u_mips_tx.tx_go && dut.u_mips_tx.digit > 4'd9) n_letter <= n_letter + 1;
    if (rx_valid) begin
      n_rx_byte <= n_rx_byte + 1;
      if (rx_ferr) n_rx_ferr <= n_rx_ferr + 1;
      else if (loopback) rx_chars.push_back(rx_data);
    end
    if (m1v) begin
      tx_chars.push_back(m1d);
      if (m1e) line_errs <= line_errs + 1;
    end
    if (m2v) begin
      n_sw_frame <= n_sw_frame + 1;
      sw_last <= m2d;
      if (m2e) sw_line_errs <= sw_line_errs + 1;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // 20 ns clock: 20,000,000 cycles
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor side ----------------
  task automatic run_program(input logic [15:0] res, input logic revisit);
    string s, exp;
    int w0;
    rx_chars.delete();
    tx_chars.delete();
    w0 = n_word;
    for (int a = 0; a <= 16'h0020; a += 4) begin
      @(negedge clk);
      pc = 16'(a);
      wdata = (a == 32'h0020) ? res : 16'($urandom);
      repeat (5) @(negedge clk);
    end
    if (revisit) begin
      // jump back and run the marker instruction again while busy
      repeat (20 * P) @(negedge clk);
      pc = 16'h0000; repeat (5) @(negedge clk);
      pc = 16'h0020; wdata = 16'hDEAD; repeat (5) @(negedge clk);
      pc = 16'h0024;
    end
    while (n_word == w0) @(negedge clk);
    repeat (P) @(negedge clk);     // receiver finishes the last stop bit
    exp = $sformatf("%04X", res);
    exp = exp.toupper();
    s = "";
    foreach (rx_chars[i]) s = {s, string'(rx_chars[i])};
    check(s == exp, $sformatf("receiver got \"%s\", expected \"%s\"", s, exp));
    s = "";
    foreach (tx_chars[i]) s = {s, string'(tx_chars[i])};
    check(s == exp, $sformatf("line carried \"%s\", expected \"%s\"", s, exp));
    @(negedge clk) pc = 16'h0000;
  endtask

  // ---------------- switch test ----------------
  task automatic press(input logic is_rst, input int hold);
    for (int k = 0; k < 4; k++) begin
      if (is_rst) btn_rst = 1'b1; else btn_send = 1'b1;
      repeat (200) @(negedge clk);
      if (is_rst) btn_rst = 1'b0; else btn_send = 1'b0;
      repeat (300) @(negedge clk);
    end
    if (is_rst) btn_rst = 1'b1; else btn_send = 1'b1;
    repeat (hold) @(negedge clk);
    if (is_rst) btn_rst = 1'b0; else btn_send = 1'b0;
  endtask

  // ---------------- receiver errors ----------------
  task automatic drive_frame(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx_drv = f[i];
      repeat (RXP) @(negedge clk);
    end
    rx_drv = 1'b1;
  endtask

  // ---------------- example FSM ----------------
  int model = 1;
  task automatic run_fsm(input int steps);
    for (int i = 0; i < steps; i++) begin
      fsm_x1 = 1'($urandom);
      @(posedge clk);
      case (model)
        1: if (fsm_x1) begin model = 2; n_s2++; end else begin model = 3; n_s3++; end
        2, 3: model = 4;
        default: model = 1;
      endcase
      #1;
      check(fsm_outp == ((model <= 2) ? 1'b1 : 1'b0), $sformatf("example FSM s%0d", model));
      @(negedge clk);
    end
  endtask

  initial begin
    int f0, b0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    fsm_reset = 1'b0;

    run_fsm(40);

    run_program(16'h1A2F, 1'b0);
    run_program(16'hC0DE, 1'b1);

    // switch test: 'A' on the switches
    sw = 8'h41;
    f0 = n_sw_frame;
    press(1'b0, 3 * 65536);
    repeat (12 * P) @(negedge clk);
    check(n_sw_frame == f0 + 1, "one frame per press of the send button");
    check(sw_last == 8'h41, $sformatf("switch frame carried %02h", sw_last));
    // reset button during the next frame
    sw = 8'h55;
    fork
      press(1'b0, 3 * 65536);
    join_none
    while (sw_tx_rdy) @(negedge clk);
    repeat (2 * P) @(negedge clk);
    sw_errs_before_reset = sw_line_errs;
    fork
      press(1'b1, 3 * 65536);
    join_none
    while (!sw_tx_rdy) @(negedge clk);
    check(sw_tx == 1'b1, "reset button returns the line to idle");
    n_sw_reset++;
    wait fork;
    repeat (12 * P) @(negedge clk);

    // receiver error handling
    loopback = 1'b0;
    b0 = n_rx_ferr;
    drive_frame(8'h33, 1'b0);
    repeat (3 * RXP) @(negedge clk);
    check(n_rx_ferr == b0 + 1, "stop bit 0 flagged");
    b0 = n_rx_byte;
    rx_drv = 1'b0; repeat (RXP / 4) @(negedge clk); rx_drv = 1'b1;
    repeat (12 * RXP) @(negedge clk);
    check(n_rx_byte == b0, "glitch ignored");
    if (n_rx_byte == b0) n_glitch++;

    run_fsm(40);

    check(line_errs == 0, "every processor frame well formed with 5208-clock bits");
    check(sw_errs_before_reset == 0, "switch frames well formed with 5208-clock bits");
    check(result == 16'hDEAD, "register reloads on a second pass; the word in flight is unchanged");
    // every mechanism must have happened
    check(n_capture >= 3,       $sformatf("captures at PC 0x0020: %0d", n_capture));
    check(n_start_ignored >= 1, $sformatf("start ignored while busy: %0d", n_start_ignored));
    check(n_transfer == 8,      $sformatf("serial transfers: %0d", n_transfer));
    check(n_word == 2,          $sformatf("words sent: %0d", n_word));
    check(n_hold_en >= 1,       $sformatf("TX_EN held until a baud edge: %0d cycles", n_hold_en));
    check(n_letter >= 1,        $sformatf("letter digits: %0d", n_letter));
    check(n_sw_frame >= 1,      $sformatf("switch frames: %0d", n_sw_frame));
    check(n_sw_reset >= 1,      "reset button used");
    check(n_rx_byte >= 8,       $sformatf("bytes received: %0d", n_rx_byte));
    check(n_rx_ferr >= 1,       "framing error seen");
    check(n_glitch >= 1,        "glitch rejected");
    check(n_s2 >= 1 && n_s3 >= 1, "both branches of the example FSM");
    $display("mechanisms: capture=%0d ignored=%0d transfers=%0d words=%0d hold=%0d letters=%0d sw=%0d rx=%0d ferr=%0d s2=%0d s3=%0d",
             n_capture, n_start_ignored, n_transfer, n_word, n_hold_en, n_letter,
             n_sw_frame, n_rx_byte, n_rx_ferr, n_s2, n_s3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
