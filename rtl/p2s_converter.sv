// p2s_converter: 8-bit parallel-to-serial converter for the JTAG read-out.
//
// The result memory delivers bytes in parallel while the JTAG port moves data
// one bit per TCK. The converter is a WIDTH-bit shift register: load copies a
// parallel word in, each shift moves it one place towards sout, the least
// significant bit first, and fills the vacated top bit from sin so that the
// register can sit in a JTAG data-register chain between TDI and TDO. The
// converter itself follows the architecture; LSB-first order and the serial
// input are this design's choices, matching JTAG conventions.
//
// Interface: load has priority over shift; both act on the rising clk edge.
// sout is the current bit 0, valid right after load.
module p2s_converter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] pdata,
  input  logic             shift,
  input  logic             sin,
  output logic             sout
);

  logic [WIDTH-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sreg <= '0;
    else if (load)  sreg <= pdata;
    else if (shift) sreg <= {sin, sreg[WIDTH-1:1]};
  end

  assign sout = sreg[0];

endmodule
