// Numerically controlled oscillator: phase accumulator followed by the sine/cosine ROM.
//
// Each clock with `en` high the accumulator steps by `ftw`; the ROM turns the phase held
// before that step into cos/sin, so the k-th enabled clock yields cos/sin(2*pi*k*FTW/2^N)
// with `out_valid` one clock after `en`. f_out = FTW * f_clk / 2^N; FTW = 0x4000 gives
// 10 MHz at 40 MSps. `wrap` marks each full turn of the phase wheel.
// As in the source design: an accumulator and phase register feeding a ROM.
// This design's own choice: the valid strobe.
module nco #(
  parameter int unsigned PHASE_W = ddc_pkg::PHASE_W,
  parameter int unsigned AW      = ddc_pkg::LUT_AW,
  parameter int unsigned DW      = ddc_pkg::NCO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [PHASE_W-1:0]   ftw,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o,
  output logic                 out_valid,
  output logic                 wrap
);
  logic [PHASE_W-1:0] phase;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_pa (
    .clk, .rst_n, .en, .ftw, .phase, .wrap
  );

  phase_to_amplitude #(.PHASE_W(PHASE_W), .AW(AW), .DW(DW)) u_pac (
    .clk, .phase, .cos_o, .sin_o
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= en;
endmodule
