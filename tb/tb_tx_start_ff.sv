// tb_tx_start_ff: checks the set/reset flag that holds TX_EN.
// Every combination of rst, set and clr is applied from both stored
// values and the stored result is compared with the table
// (rst or clr -> 0, else set -> 1, else hold).
module tb_tx_start_ff;
  logic clk = 1'b0;
  logic rst, set, clr, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_start_ff dut (.clk(clk), .rst(rst), .set(set), .clr(clr), .q(q));

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    rst = 1'b1; set = 1'b0; clr = 1'b0;
    @(negedge clk);
    for (int prev = 0; prev < 2; prev++) begin
      for (int v = 0; v < 8; v++) begin
        // bring q to prev
        rst = 1'b0; clr = 1'b0; set = prev[0]; if (!prev[0]) clr = 1'b1;
        @(negedge clk);
        checks++;
        if (q != prev[0]) begin failures++; $display("FAIL: preset %0d", prev); end
        {rst, set, clr} = v[2:0];
        exp = (rst || clr) ? 1'b0 : (set ? 1'b1 : prev[0]);
        @(negedge clk);
        checks++;
        if (q != exp) begin
          failures++;
          $display("FAIL: prev=%0d rst=%0b set=%0b clr=%0b q=%0b", prev, rst, set, clr, q);
        end
      end
    end
    // hold for several cycles
    {rst, set, clr} = 3'b010; @(negedge clk);
    {rst, set, clr} = 3'b000;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (q != 1'b1) begin failures++; $display("FAIL: hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
