// Digital receiver core: ADC capture, digital down converter and pulse compression.
//
// The 14-bit ADC word (offset binary, one sample per clock of the 40 MHz sample clock) is
// registered and converted to two's complement, mixed to baseband by the NCO (tuning word
// `ftw`, 0x4000 = 10 MHz), filtered and decimated by 8 (CIC, CFIR, PFIR) to 5 MSps complex
// samples (`ddc_i/ddc_q` with `ddc_valid`), and correlated with the reference pulse held in the
// pulse compressor (written through `ref_*`). The CFIR/PFIR coefficients, and so the
// bandwidth, can be rewritten through `bw_*` (see ddc). The compressed output is the complex
// correlation (`pc_re/pc_im`, `pc_ri_valid`) and its magnitude (`pc_mag`, `pc_valid`), one
// value per DDC output. The clock manager is outside: its lock flag enters as `locked`, and
// the design is held in reset until it is high and `reset` is low.
// Latency from an ADC word to the DDC output that first includes it: a few clocks plus the
// filter delays; see the blocks. Rate: ddc_valid once every 8 clocks.
// As in the source design: ADC -> DDC -> pulse compression -> (external DSP) and the clock
// and reset arrangement of its schematic. This design's own choices: a single clock domain
// with valid strobes in place of the divided clocks.
module ddc_pc_top
  import ddc_pkg::*;
#(
  parameter int unsigned PC_REF_LEN = ddc_pkg::REF_LEN,
  localparam int unsigned RAW   = $clog2(PC_REF_LEN),
  localparam int unsigned RW    = 2 * DATA_W + $clog2(PC_REF_LEN) + 1
) (
  input  logic                     clk_40mhz,
  input  logic                     reset,
  input  logic                     locked,
  input  logic [ADC_W-1:0]         adc_data_input,
  input  logic [PHASE_W-1:0]       ftw,
  input  logic                     ref_we,
  input  logic [RAW-1:0]           ref_addr,
  input  logic signed [COEF_W-1:0] ref_i,
  input  logic signed [COEF_W-1:0] ref_q,
  input  logic                     bw_we,
  input  logic                     bw_sel,
  input  logic [5:0]               bw_addr,
  input  logic signed [COEF_W-1:0] bw_data,
  output logic                     glbl_reset_b,
  output logic signed [DATA_W-1:0] ddc_i,
  output logic signed [DATA_W-1:0] ddc_q,
  output logic                     ddc_valid,
  output logic signed [RW-1:0]     pc_re,
  output logic signed [RW-1:0]     pc_im,
  output logic                     pc_ri_valid,
  output logic [RW-1:0]            pc_mag,
  output logic                     pc_valid
);
  logic                    rst_n;
  logic signed [ADC_W-1:0] x;
  logic                    x_valid;

  reset_sync u_rst (
    .clk(clk_40mhz), .reset, .locked, .glbl_reset_b(rst_n)
  );
  assign glbl_reset_b = rst_n;

  adc_capture u_adc (
    .clk(clk_40mhz), .rst_n, .adc_valid(1'b1), .adc_data(adc_data_input),
    .x, .x_valid
  );

  ddc u_ddc (
    .clk(clk_40mhz), .rst_n, .in_valid(x_valid), .x, .ftw,
    .out_i(ddc_i), .out_q(ddc_q), .out_valid(ddc_valid),
    .nco_wrap(), .cic_valid(), .cfir_valid(),
    .bw_we, .bw_sel, .bw_addr, .bw_data
  );

  pulse_compression #(.REF_LEN(PC_REF_LEN)) u_pc (
    .clk(clk_40mhz), .rst_n, .ref_we, .ref_addr, .ref_i, .ref_q,
    .in_valid(ddc_valid), .in_i(ddc_i), .in_q(ddc_q),
    .re(pc_re), .im(pc_im), .ri_valid(pc_ri_valid), .mag(pc_mag), .out_valid(pc_valid)
  );
endmodule
