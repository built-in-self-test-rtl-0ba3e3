// tmr_reg: register protected by triple modular redundancy.
//
// Single-event upsets can flip a flip-flop of the self-test logic during a
// cycle that lasts over a second. This register keeps three copies of its
// value and drives q with their bit-wise majority, so one upset copy never
// reaches the output. Every clock all three copies are rewritten - with d
// when en is high, otherwise with the voted q - so an upset copy is repaired
// on the next edge and upsets cannot accumulate across copies. Triple modular
// redundancy is one of the hardening techniques the architecture names; the
// per-register voting with continuous scrubbing is this design's form of it.
// The copies carry a keep attribute, but a synthesis tool that merges
// equivalent flip-flops will still fold them into one: the implementation
// flow must mark tmr_reg instances as not to be optimised (dont_touch or the
// tool's equivalent) and keep the three copies apart in the layout.
//
// Interface: like a plain enabled register with asynchronous active-low
// reset to RESET_VALUE; q follows d one clock after an enabled edge.
module tmr_reg #(
  parameter int unsigned           WIDTH       = 1,
  parameter logic [WIDTH-1:0]      RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  (* keep *) logic [WIDTH-1:0] r0, r1, r2;
  logic [WIDTH-1:0] nxt;

  assign q   = (r0 & r1) | (r1 & r2) | (r0 & r2);
  assign nxt = en ? d : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= RESET_VALUE;
      r1 <= RESET_VALUE;
      r2 <= RESET_VALUE;
    end else begin
      r0 <= nxt;
      r1 <= nxt;
      r2 <= nxt;
    end
  end

endmodule
