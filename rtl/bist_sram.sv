// bist_sram: on-chip result memory of the self-test, 4096 x 8 bits (4 KB).
//
// Holds one averaged ADC result per ramp code: address = ramp code, data =
// mean ADC output for that code, the layout the ramp-histogram analysis
// reads. In silicon this is a radiation-hardened SRAM macro; here it is a
// plain synchronous single-port array with the macro's size and width, which
// synthesis maps to a memory. Hardening (cell design, layout, error
// protection) is outside the RTL.
//
// Interface: one port. With we high, wdata is written to addr on the rising
// edge. rdata is registered: it shows the word at the address presented in
// the previous cycle (read-before-write on a write cycle). Contents are not
// initialised.
module bist_sram #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
