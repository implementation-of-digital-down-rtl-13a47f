// Magnitude |x + jy| by a pipelined vectoring CORDIC.
//
// Stage 0 folds the vector into the right half plane (negating both parts when x < 0, which
// keeps the magnitude). Each of ITER stages then rotates by +-atan(2^-i) toward the x axis:
// if y >= 0 { x += y>>>i; y -= x>>>i } else { x -= y>>>i; y += x>>>i }. After the last stage
// x = K*|v| with K = prod sqrt(1 + 2^-2i) ~ 1.64676; a final constant multiply by
// round(2^16/K) = 39797 and shift by 16 removes K. Internal width W + 2 (growth up to
// K*sqrt(2) < 2.33). Fully pipelined: one result per clock, `out_valid` ITER + 2 clocks after
// `in_valid`. Error: a few LSBs plus about 2^-ITER of the magnitude (rounding down).
// As in the source design: the magnitude of the compressed complex signal is taken with a
// CORDIC. This design's own choices: ITER = 16, gain compensation, widths.
module cordic_abs #(
  parameter int unsigned W    = 2 * ddc_pkg::DATA_W + $clog2(ddc_pkg::REF_LEN) + 1,
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic [W-1:0]        mag,
  output logic                out_valid
);
  localparam int unsigned IW = W + 2;
  localparam logic [16:0] INV_K = 17'd39797;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic [ITER+1:0]      vld;
  logic signed [IW+17:0] scaled;

  assign scaled = xs[ITER] * $signed({1'b0, INV_K});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= ITER; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
      end
      vld <= '0;
      mag <= '0;
    end else begin
      vld <= {vld[ITER:0], in_valid};
      if (x < 0) begin
        xs[0] <= -IW'(x);
        ys[0] <= -IW'(y);
      end else begin
        xs[0] <= IW'(x);
        ys[0] <= IW'(y);
      end
      for (int i = 0; i < ITER; i++) begin
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
        end
      end
      mag <= W'(scaled >>> 16);
    end
  end

  assign out_valid = vld[ITER+1];
endmodule
