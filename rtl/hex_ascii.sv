// hex_ascii: hexadecimal digit to ASCII decoder.
//
// Maps a 4-bit value to the 8-bit ASCII code of its hexadecimal digit so
// that a number can be shown as text in a serial terminal:
//   0..9  -> 30h..39h ('0'..'9')
//   10..15 -> 41h..46h ('A'..'F')
// Purely combinational. The use of upper-case letters is this design's
// choice; the lab only asks for "a decoder/ROM".
module hex_ascii (
  input  logic [3:0] digit,
  output logic [7:0] ascii
);

  always_comb begin
    if (digit < 4'd10) ascii = 8'h30 + {4'd0, digit};
    else               ascii = 8'h41 + {4'd0, digit} - 8'd10;
  end

endmodule
