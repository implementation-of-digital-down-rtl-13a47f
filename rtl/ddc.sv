// Digital down converter: real IF samples at the input rate to complex baseband at 1/8 rate.
//
// Chain per branch: NCO -> mixer (x*cos for I, -x*sin for Q) -> CIC decimator (by 2)
// -> compensating FIR CFIR (by 2) -> post FIR PFIR (41 taps, by 2). With a 40 MSps input
// and FTW = 0x4000 (10 MHz LO) a 10 MHz IF lands at 0 Hz and the output is 5 MSps.
// The ADC sample is delayed one clock to meet the NCO output (ROM latency); the mixer adds
// one clock, the CIC one, each FIR one. Both branches run in lock step; `out_valid` marks a
// new (out_i, out_q) pair, one per eight `in_valid`s. `nco_wrap` marks each NCO cycle and
// `cic_valid` / `cfir_valid` the intermediate rates (for observation).
// Bandwidth programming: `bw_we` writes `bw_data` into tap `bw_addr` of the CFIR pair
// (`bw_sel` = 0, taps 0..20) or the PFIR pair (`bw_sel` = 1, taps 0..40); the I and Q filters
// of a stage always get the same coefficient. Reset restores the default sets of ddc_pkg.
// As in the source design: the block order NCO, two mixers,
// low pass, decimator, the 40 MSps -> 5 MSps rate, the programmable LO and bandwidth. This design's own
// choices: the split of the decimation into CIC 2, CFIR 2, PFIR 2 and the widths after the CIC.
module ddc #(
  parameter int unsigned ADC_W   = ddc_pkg::ADC_W,
  parameter int unsigned PHASE_W = ddc_pkg::PHASE_W,
  parameter int unsigned NCO_W   = ddc_pkg::NCO_W,
  parameter int unsigned DATA_W  = ddc_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [ADC_W-1:0]  x,
  input  logic [PHASE_W-1:0]       ftw,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q,
  output logic                     out_valid,
  output logic                     nco_wrap,
  output logic                     cic_valid,
  output logic                     cfir_valid,
  input  logic                     bw_we,
  input  logic                     bw_sel,
  input  logic [5:0]               bw_addr,
  input  logic signed [15:0]       bw_data
);
  import ddc_pkg::*;
  localparam int unsigned MW = ADC_W + NCO_W;

  logic signed [NCO_W-1:0]  lo_cos, lo_sin;
  logic                     lo_valid;
  logic signed [ADC_W-1:0]  x_d;
  logic signed [MW-1:0]     mix_i, mix_q;
  logic                     mix_valid;
  logic signed [DATA_W-1:0] cic_i, cic_q, cfir_i, cfir_q;
  logic                     cic_valid_q, cfir_valid_q, pfir_valid_q;
  logic                     cfir_we, pfir_we;

  assign cfir_we = bw_we && !bw_sel && (32'(bw_addr) < CFIR_TAPS);
  assign pfir_we = bw_we &&  bw_sel && (32'(bw_addr) < PFIR_TAPS);

  nco #(.PHASE_W(PHASE_W), .DW(NCO_W)) u_nco (
    .clk, .rst_n, .en(in_valid), .ftw,
    .cos_o(lo_cos), .sin_o(lo_sin), .out_valid(lo_valid), .wrap(nco_wrap)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        x_d <= '0;
    else if (in_valid) x_d <= x;

  mixer #(.XW(ADC_W), .LW(NCO_W)) u_mix (
    .clk, .rst_n, .in_valid(lo_valid), .x(x_d), .lo_cos, .lo_sin,
    .i_o(mix_i), .q_o(mix_q), .out_valid(mix_valid)
  );

  cic_decimator #(.IN_W(MW), .OUT_W(DATA_W)) u_cic_i (
    .clk, .rst_n, .in_valid(mix_valid), .x(mix_i), .y(cic_i), .out_valid(cic_valid_q)
  );
  cic_decimator #(.IN_W(MW), .OUT_W(DATA_W)) u_cic_q (
    .clk, .rst_n, .in_valid(mix_valid), .x(mix_q), .y(cic_q), .out_valid()
  );

  fir_decimator #(.IN_W(DATA_W), .OUT_W(DATA_W), .TAPS(CFIR_TAPS), .DECIM(CFIR_DECIM),
                  .COEFS(CFIR_COEFS)) u_cfir_i (
    .clk, .rst_n, .in_valid(cic_valid_q), .x(cic_i), .y(cfir_i), .out_valid(cfir_valid_q),
    .coef_we(cfir_we), .coef_addr(bw_addr[$clog2(CFIR_TAPS)-1:0]), .coef_wdata(bw_data)
  );
  fir_decimator #(.IN_W(DATA_W), .OUT_W(DATA_W), .TAPS(CFIR_TAPS), .DECIM(CFIR_DECIM),
                  .COEFS(CFIR_COEFS)) u_cfir_q (
    .clk, .rst_n, .in_valid(cic_valid_q), .x(cic_q), .y(cfir_q), .out_valid(),
    .coef_we(cfir_we), .coef_addr(bw_addr[$clog2(CFIR_TAPS)-1:0]), .coef_wdata(bw_data)
  );

  fir_decimator #(.IN_W(DATA_W), .OUT_W(DATA_W), .TAPS(PFIR_TAPS), .DECIM(PFIR_DECIM),
                  .COEFS(PFIR_COEFS)) u_pfir_i (
    .clk, .rst_n, .in_valid(cfir_valid_q), .x(cfir_i), .y(out_i), .out_valid(pfir_valid_q),
    .coef_we(pfir_we), .coef_addr(bw_addr[$clog2(PFIR_TAPS)-1:0]), .coef_wdata(bw_data)
  );
  fir_decimator #(.IN_W(DATA_W), .OUT_W(DATA_W), .TAPS(PFIR_TAPS), .DECIM(PFIR_DECIM),
                  .COEFS(PFIR_COEFS)) u_pfir_q (
    .clk, .rst_n, .in_valid(cfir_valid_q), .x(cfir_q), .y(out_q), .out_valid(),
    .coef_we(pfir_we), .coef_addr(bw_addr[$clog2(PFIR_TAPS)-1:0]), .coef_wdata(bw_data)
  );

  assign out_valid  = pfir_valid_q;
  assign cic_valid  = cic_valid_q;
  assign cfir_valid = cfir_valid_q;
endmodule
