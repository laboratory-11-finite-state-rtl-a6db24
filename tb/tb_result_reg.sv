// tb_result_reg: checks the PC-enabled result register.
// The PC walks a short program; wdata changes every cycle. The register
// must load only while PC = 0x0020, hold otherwise, and pulse start once,
// one cycle after the first matching cycle, even when the PC stays there.
module tb_result_reg;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [15:0] pc = '0, wdata = '0, q;
  logic start;
  int checks = 0, failures = 0;
  int starts = 0;
  logic [15:0] exp_q = '0;

  always #5 clk = ~clk;

  result_reg dut (.clk(clk), .rst(rst), .pc(pc), .wdata(wdata), .q(q), .start(start));

  always @(posedge clk) if (!rst && start) starts <= starts + 1;

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

  task automatic step(input logic [15:0] p, input logic [15:0] w);
    logic was_match;
    @(negedge clk);
    was_match = (pc == 16'h0020);
    pc = p; wdata = w;
    @(posedge clk);
    if (p == 16'h0020) exp_q = w;
    #1;
    check(q == exp_q, $sformatf("pc=%04h q=%04h expected %04h", p, q, exp_q));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(q == 16'h0 && !start, "reset value");
    for (int a = 0; a < 16'h0020; a += 4) step(16'(a), 16'($urandom));
    check(starts == 0, "no start before the capture address");
    step(16'h0020, 16'h1A2F);
    @(negedge clk);
    check(start == 1'b1, "start one cycle after the first match");
    // stay halted on the capture address: value keeps loading, no new start
    for (int k = 0; k < 5; k++) step(16'h0020, 16'h1A2F);
    check(starts == 1, "a single start while halted");
    step(16'h0024, 16'hFFFF);
    step(16'h0000, 16'h1111);
    check(q == 16'h1A2F, "holds after leaving");
    // a second pass through the address gives a second start
    step(16'h0020, 16'hBEEF);
    step(16'h0024, 16'h0000);
    check(starts == 2, "second pass gives a second start");
    check(q == 16'hBEEF, "second value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
