// Cascaded integrator-comb (CIC) decimator: N integrators, a rate switch, N combs.
//
// The integrators run at the input rate (one step per `in_valid`) as a pipelined chain: stage k
// adds the previous value of stage k-1, so the chain holds S_N[n-N+1] after input n, where
// S_N is the N-fold running sum. Every R-th input the switch samples the last integrator and
// the N combs (y = v - v delayed by M decimated samples) run once, combinationally, into the
// output register. Internal width W = IN_W + N*ceil(log2(R*M)); the integrators wrap modulo
// 2^W, which the combs undo exactly. The DC gain (R*M)^N is removed by keeping the top OUT_W
// bits (floor). For input index n = e*R + R - 1 the output e is
//   y[e] = ( sum_j h[j] * x[e*R + R - 1 - N - j] ) >>> (W - OUT_W),
// h the N-fold convolution of R*M ones; `out_valid` rises one clock after that input.
// As in the source design: integrators, switch and an equal number of combs, no
// multipliers; eight stages of each. This design's own choices: R = 2, M = 1, the pipelined
// integrators, the truncating output.
module cic_decimator #(
  parameter int unsigned IN_W  = ddc_pkg::MIX_W,
  parameter int unsigned OUT_W = ddc_pkg::DATA_W,
  parameter int unsigned N     = ddc_pkg::CIC_N,
  parameter int unsigned R     = ddc_pkg::CIC_R,
  parameter int unsigned M     = ddc_pkg::CIC_M
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic                    out_valid
);
  localparam int unsigned W = IN_W + N * $clog2(R * M);

  logic signed [W-1:0] integ [N];
  logic signed [W-1:0] cdelay [N][M];   // comb delay lines, [k][0] newest
  logic signed [W-1:0] comb [N+1];      // comb chain, combinational
  logic [$clog2(R+1)-1:0] phase_cnt;
  logic dump;

  assign dump = in_valid && (phase_cnt == ($bits(phase_cnt))'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) integ[k] <= '0;
      phase_cnt <= '0;
    end else if (in_valid) begin
      integ[0] <= integ[0] + W'(x);
      for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
      phase_cnt <= dump ? '0 : phase_cnt + 1'b1;
    end
  end

  always_comb begin
    comb[0] = integ[N-1];
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - cdelay[k][M-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++)
        for (int d = 0; d < M; d++) cdelay[k][d] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= dump;
      if (dump) begin
        for (int k = 0; k < N; k++) begin
          cdelay[k][0] <= comb[k];
          for (int d = 1; d < M; d++) cdelay[k][d] <= cdelay[k][d-1];
        end
        y <= comb[N][W-1 -: OUT_W];
      end
    end
  end
endmodule
