// tb_fsm_example: compares the example state machine with a reference
// model under random x1 and occasional asynchronous resets that arrive
// between clock edges. Both branches out of s1 are counted and must occur.
module tb_fsm_example;
  logic clk = 1'b0;
  logic reset = 1'b1;
  logic x1 = 1'b0;
  logic outp;
  int checks = 0, failures = 0;
  int model;          // 1..4
  int took_s2 = 0, took_s3 = 0;

  always #5 clk = ~clk;

  fsm_example dut (.clk(clk), .reset(reset), .x1(x1), .outp(outp));

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
    model = 1;
    #12;
    check(outp == 1'b1, "s1 output after reset");
    @(negedge clk) reset = 1'b0;
    for (int i = 0; i < 400; i++) begin
      x1 = 1'($urandom);
      @(posedge clk);
      case (model)
        1: if (x1) begin model = 2; took_s2++; end else begin model = 3; took_s3++; end
        2: model = 4;
        3: model = 4;
        default: model = 1;
      endcase
      #2;
      check(outp == ((model == 1 || model == 2) ? 1'b1 : 1'b0),
            $sformatf("step %0d state s%0d outp=%0b", i, model, outp));
      if ($urandom_range(0, 30) == 0) begin
        // asynchronous reset pulse between edges
        reset = 1'b1; #1;
        model = 1;
        check(outp == 1'b1, "async reset acts without a clock");
        reset = 1'b0;
      end
      @(negedge clk);
    end
    check(took_s2 > 0 && took_s3 > 0, "both branches from s1 taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
