// averager: arithmetic mean of 2**AVG_LOG2 consecutive ADC results.
//
// The ADC runs far faster than the ramp DAC steps, so every ramp step yields
// many conversions. Instead of storing all of them, the averager adds
// 2**AVG_LOG2 (64) consecutive results in an accumulator and shifts the sum
// right by AVG_LOG2 bits, which divides it by the sample count; one byte per
// ramp step is then stored. This cuts the memory from 4096 x 64 samples to
// 4096 bytes. Adder plus shift is the structure the architecture gives; the
// division truncates (a plain right shift, no rounding), which is this
// design's choice.
//
// Interface: clr empties the accumulator and the sample count (priority over
// in_valid). Each cycle with in_valid high adds in_data. In the cycle after
// the 2**AVG_LOG2-th sample, out_valid is high for one cycle with the mean on
// out_data, and the accumulator restarts from zero; in_valid may stay high
// back to back. Latency: one clock from the last sample to out_valid.
module averager #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned AVG_LOG2 = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned ACC_W = DATA_W + AVG_LOG2;

  logic [ACC_W-1:0]    acc;
  logic [ACC_W-1:0]    sum;
  logic [AVG_LOG2-1:0] cnt;

  assign sum = acc + ACC_W'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        acc <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        if (&cnt) begin
          out_data  <= sum[ACC_W-1:AVG_LOG2];
          out_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= sum;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
