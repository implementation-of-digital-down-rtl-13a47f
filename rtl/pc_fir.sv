// Real FIR filter of the pulse compressor (one of the four in the complex matched filter).
//
// Direct form, one output per input: y[n] = sum_k coef[k] * x[n-k], k = 0..TAPS-1, at full
// precision (ACC_W = DW + CW + ceil(log2 TAPS) bits), registered: `out_valid` one clock after
// `in_valid`. The coefficients come in on a port so that the pulse compressor can load the
// reference waveform at run time.
// As in the source design: an FIR per product of input part and reference part. This
// design's own choices: direct form, full-precision output, run-time coefficients.
module pc_fir #(
  parameter int unsigned DW   = ddc_pkg::DATA_W,
  parameter int unsigned CW   = ddc_pkg::COEF_W,
  parameter int unsigned TAPS = ddc_pkg::REF_LEN,
  parameter int unsigned ACC_W = DW + CW + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    x,
  input  logic signed [CW-1:0]    coef [TAPS],
  output logic signed [ACC_W-1:0] y,
  output logic                    out_valid
);
  logic signed [DW-1:0]    sr [TAPS-1];   // previous inputs, [0] newest
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(x) * ACC_W'(coef[0]);
    for (int k = 1; k < TAPS; k++) acc += ACC_W'(sr[k-1]) * ACC_W'(coef[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) sr[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sr[0] <= x;
        for (int k = 1; k < TAPS - 1; k++) sr[k] <= sr[k-1];
        y <= acc;
      end
    end
  end
endmodule
