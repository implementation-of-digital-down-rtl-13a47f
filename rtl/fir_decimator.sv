// Decimating FIR filter (used for both the CIC compensator CFIR and the post filter PFIR).
//
// The coefficients sit in a register bank that reset loads with COEFS and that
// `coef_we/coef_addr/coef_wdata` can rewrite at run time, one tap per clock, so that the
// cut-off and shape can be changed without rebuilding. A write takes effect for outputs
// computed from the next clock on.
// Direct form: a TAPS-deep shift register takes one sample per `in_valid`; after every
// DECIM-th input the full dot product of that input and the TAPS-1 before it with the
// coefficients c (Q1.15) is formed in parallel, rounded (add 2^(CW-2), shift right by CW-1) and saturated to
// OUT_W bits. For input index n = e*DECIM + DECIM - 1 the output e is
// sat(round(sum_k c[k] * x[n-k])), registered: valid one clock after that input.
// One output per DECIM inputs; inputs may arrive on every clock.
// As in the source design: an FIR with decimation after the CIC, a programmable cut-off and
// shape; the post filter has 41 coefficients. This design's own choices: direct form, the
// coefficient values, the write port, rounding and saturation, DECIM = 2 for each stage.
module fir_decimator #(
  parameter int unsigned IN_W  = ddc_pkg::DATA_W,
  parameter int unsigned OUT_W = ddc_pkg::DATA_W,
  parameter int unsigned CW    = ddc_pkg::COEF_W,
  parameter int unsigned TAPS  = ddc_pkg::PFIR_TAPS,
  parameter int unsigned DECIM = ddc_pkg::PFIR_DECIM,
  parameter logic signed [CW-1:0] COEFS [TAPS] = ddc_pkg::PFIR_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic                    out_valid,
  // coefficient write port
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  logic signed [CW-1:0]    coef_wdata
);
  localparam int unsigned ACC_W = IN_W + CW + $clog2(TAPS);

  logic signed [CW-1:0] c [TAPS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      for (int k = 0; k < TAPS; k++) c[k] <= COEFS[k];
    else if (coef_we && 32'(coef_addr) < TAPS)
      c[coef_addr] <= coef_wdata;

  logic signed [IN_W-1:0]  sr [TAPS-1];   // previous inputs, [0] newest
  logic [$clog2(DECIM+1)-1:0] cnt;
  logic                    fire;
  logic signed [ACC_W-1:0] acc, rnd;

  assign fire = in_valid && (cnt == ($bits(cnt))'(DECIM - 1));

  always_comb begin
    acc = ACC_W'(x) * ACC_W'(c[0]);
    for (int k = 1; k < TAPS; k++) acc += ACC_W'(sr[k-1]) * ACC_W'(c[k]);
    rnd = (acc + (ACC_W'(1) <<< (CW - 2))) >>> (CW - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) sr[k] <= '0;
      cnt       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= fire;
      if (in_valid) begin
        sr[0] <= x;
        for (int k = 1; k < TAPS - 1; k++) sr[k] <= sr[k-1];
        cnt <= fire ? '0 : cnt + 1'b1;
      end
      if (fire) begin
        if (rnd > ACC_W'(2**(OUT_W-1) - 1))       y <= {1'b0, {(OUT_W-1){1'b1}}};
        else if (rnd < -ACC_W'(2**(OUT_W-1)))     y <= {1'b1, {(OUT_W-1){1'b0}}};
        else                                      y <= rnd[OUT_W-1:0];
      end
    end
  end
endmodule
