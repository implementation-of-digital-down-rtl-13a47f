// ADC capture register: takes the 14-bit ADC word each sample clock and converts it to a
// two's complement sample.
//
// With OFFSET_BINARY = 1 the ADC code is offset binary (0 = most negative) and the sample is
// code - 2^(W-1); with OFFSET_BINARY = 0 the code is passed on as two's complement. The result
// is registered: `x`/`x_valid` follow `adc_data`/`adc_valid` by one clock.
// As in the source design: a registered 14-bit ADC input followed by a subtractor. This
// design's own choice: reading that subtractor as the offset-binary conversion.
module adc_capture #(
  parameter int unsigned W             = ddc_pkg::ADC_W,
  parameter bit          OFFSET_BINARY = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adc_valid,
  input  logic [W-1:0]        adc_data,
  output logic signed [W-1:0] x,
  output logic                x_valid
);
  logic [W-1:0] conv;
  assign conv = OFFSET_BINARY ? adc_data - (W'(1) << (W - 1)) : adc_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= '0;
      x_valid <= 1'b0;
    end else begin
      x_valid <= adc_valid;
      if (adc_valid) x <= $signed(conv);
    end
  end
endmodule
