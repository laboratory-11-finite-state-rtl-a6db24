// tb_hex_ascii: all sixteen digits against the ASCII table
// ('0'..'9' = 30h..39h, 'A'..'F' = 41h..46h), taken from a string.
module tb_hex_ascii;
  logic [3:0] digit;
  logic [7:0] ascii;
  int checks = 0, failures = 0;
  string ref_chars = "0123456789ABCDEF";

  hex_ascii dut (.digit(digit), .ascii(ascii));

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (ascii != 8'(ref_chars[d])) begin
        failures++;
        $display("FAIL: digit %0d -> %02h, expected %02h", d, ascii, 8'(ref_chars[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
