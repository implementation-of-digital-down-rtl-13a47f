// Phase accumulator of the NCO.
//
// An N-bit phase register that adds the frequency tuning word (FTW) each enabled clock and
// wraps modulo 2^N, so f_out = FTW * f_clk / 2^N. The phase on `phase` is the register
// contents; it advances one clock after `en`. `wrap` pulses (registered, with the new phase)
// when an addition carried out of the top bit, i.e. once per output cycle.
// As in the source design: the adder/register loop and the N-bit width (16 bits). This
// design's own choices: the enable, the wrap flag and the asynchronous active-low reset to 0.
module phase_accumulator #(
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] ftw,
  output logic [PHASE_W-1:0] phase,
  output logic               wrap
);
  logic [PHASE_W:0] sum;
  assign sum = {1'b0, phase} + {1'b0, ftw};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      wrap <= en & sum[PHASE_W];
      if (en) phase <= sum[PHASE_W-1:0];
    end
  end
endmodule
