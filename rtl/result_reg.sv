// result_reg: 16-bit result register tapped off the processor.
//
// The processor's program ends with a marker instruction (for example
// "addi R7, R7, 0") placed at a known address CAPTURE_PC. While the
// processor's PC equals CAPTURE_PC the register loads wdata, which is wired
// to the register-file read port RD1 or to the ALU result; the marker
// instruction makes that value the final result. On the first cycle of a
// match a one-cycle start pulse is issued, one clock after the register
// has been written, to launch the serial transfer. If the processor stays
// at that address (halted or single-stepped) no second pulse is produced.
//
// Following the lab: the 16-bit width, the source of the data and the
// write enable derived from the PC. The default address 0x0020 is the
// lab's example; the pulse on the first match cycle is this design's
// choice. rst is synchronous and active high.
module result_reg #(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned PC_WIDTH   = 16,
  parameter logic [PC_WIDTH-1:0] CAPTURE_PC = 16'h0020
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PC_WIDTH-1:0] pc,
  input  logic [WIDTH-1:0]    wdata,
  output logic [WIDTH-1:0]    q,
  output logic                start
);

  logic we, we_d;

  assign we = (pc == CAPTURE_PC);

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      we_d  <= 1'b0;
      start <= 1'b0;
    end else begin
      if (we) q <= wdata;
      we_d  <= we;
      start <= we & ~we_d;
    end
  end

endmodule
