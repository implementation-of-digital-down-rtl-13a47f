// Complex mixer: multiplies the real IF sample by e^{-jwt} = cos(wt) - j sin(wt).
//
// I = x * cos, Q = -(x * sin), each a full-precision XW+LW bit product, registered:
// outputs follow inputs by one clock, `out_valid` follows `in_valid`.
// As in the source design: the two multipliers fed by the NCO cosine and sine and the 28-bit
// product width. This design's own choice: the negation that makes the LO e^{-jwt}.
module mixer #(
  parameter int unsigned XW = ddc_pkg::ADC_W,
  parameter int unsigned LW = ddc_pkg::NCO_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [XW-1:0]    x,
  input  logic signed [LW-1:0]    lo_cos,
  input  logic signed [LW-1:0]    lo_sin,
  output logic signed [XW+LW-1:0] i_o,
  output logic signed [XW+LW-1:0] q_o,
  output logic                    out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_o       <= '0;
      q_o       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_o <= x * lo_cos;
        q_o <= -(x * lo_sin);
      end
    end
  end
endmodule
