// tb_mips_uart_tx: the processor output path end to end with a bit time of
// 8 clocks. A stand-in for the processor steps its PC through a program,
// one instruction every few clocks, with the result on wdata while the PC
// is at 0x0020, then halts. The serial line, decoded by
// uart_line_monitor, must carry the four ASCII hex digits of the result,
// most significant first, with exact bit timing; done must pulse once;
// the whole word must take 43 to 44 bit times (up to one bit time of wait
// for the first start bit, a 10-bit frame, then three frames of 11 bit
// times each, since the FSM spends one bit time in idle between frames).
module tb_mips_uart_tx;
  localparam int P = 8;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] pc = '0, wdata = '0, result;
  logic tx, tx_rdy, busy, done;
  logic mvalid, merr;
  logic [7:0] mdata;
  int checks = 0, failures = 0;
  byte chars[$];
  int errs = 0, dones = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mips_uart_tx #(.DIVISOR(P)) dut (.clk(clk), .rst(rst), .pc(pc), .wdata(wdata),
    .tx(tx), .tx_rdy(tx_rdy), .busy(busy), .done(done), .result(result));

  uart_line_monitor #(.BIT_CYCLES(P)) mon (.clk(clk), .rst(rst), .line(tx), .valid(mvalid),
                                           .data(mdata), .err(merr));

  always @(posedge clk) if (!rst) begin
    if (mvalid) begin
      chars.push_back(mdata);
      if (merr) errs <= errs + 1;
    end
    if (done) dones <= dones + 1;
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

  function automatic string hex4(input logic [15:0] v);
    return $sformatf("%04X", v);
  endfunction

  task automatic run_program(input logic [15:0] res);
    int t0, d0;
    string s, exp;
    chars.delete();
    d0 = dones;
    for (int a = 0; a <= 16'h0020; a += 4) begin
      @(negedge clk);
      pc = 16'(a);
      wdata = (a == 16'h0020) ? res : 16'($urandom);
      repeat (3) @(negedge clk);
    end
    t0 = cyc;
    // halted on the last instruction while the word goes out
    while (dones == d0) @(negedge clk);
    check((cyc - t0) >= 43 * P && (cyc - t0) <= 44 * P + 4,
          $sformatf("word took %0d bit times", (cyc - t0) / P));
    repeat (3 * P) @(negedge clk);
    s = "";
    foreach (chars[i]) s = {s, string'(chars[i])};
    exp = hex4(res).toupper();
    check(result == res, "result register");
    check(s == exp, $sformatf("line carried \"%s\", expected \"%s\"", s, exp));
    check(dones == d0 + 1, "one done pulse");
    // leave the capture address and restart the program
    @(negedge clk) pc = 16'h0000;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_program(16'h1A2F);
    run_program(16'h0000);
    run_program(16'hBEEF);
    run_program(16'($urandom));
    check(errs == 0, "all frames well formed and timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
