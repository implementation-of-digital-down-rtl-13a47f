// Pulse compressor: complex matched filter built from four real FIRs, then |.| by CORDIC.
//
// The reference (the transmitted pulse, REF_LEN complex samples r[0..L-1]) is written into a
// register store through `ref_we/ref_addr/ref_i/ref_q`. The filters use it time reversed,
// c[k] = r[L-1-k], so that with input s = I + jQ the output is the correlation
//   R[n] = sum_m s[n-L+1+m] * conj(r[m]),
//   Re R = FIR(I, r_I) + FIR(Q, r_Q)        (filters 2 and 1)
//   Im R = FIR(Q, r_I) - FIR(I, r_Q)        (filters 3 and 4).
// A pulse matching the reference that starts at input n0 peaks at n = n0 + L - 1.
// Timing: FIRs one clock, real/imag sum one clock, CORDIC ITER + 2 clocks; `re/im` are valid
// with `ri_valid` (2 clocks after `in_valid`), `mag` with `out_valid` (ITER + 4 clocks).
// As in the source design: four FIR filters crossing the I/Q input with the I/Q reference,
// two adders forming the real and imaginary parts, and a CORDIC magnitude. This design's own
// choices: the reference length, the write port, the sign of the imaginary sum (conjugate
// reference) and the widths.
module pulse_compression #(
  parameter int unsigned DW      = ddc_pkg::DATA_W,
  parameter int unsigned CW      = ddc_pkg::COEF_W,
  parameter int unsigned REF_LEN = ddc_pkg::REF_LEN,
  parameter int unsigned ITER    = 16,
  localparam int unsigned AW     = $clog2(REF_LEN),
  localparam int unsigned ACC_W  = DW + CW + $clog2(REF_LEN),
  localparam int unsigned RW     = ACC_W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reference store write port
  input  logic                 ref_we,
  input  logic [AW-1:0]        ref_addr,
  input  logic signed [CW-1:0] ref_i,
  input  logic signed [CW-1:0] ref_q,
  // baseband input
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  // correlation output
  output logic signed [RW-1:0] re,
  output logic signed [RW-1:0] im,
  output logic                 ri_valid,
  output logic [RW-1:0]        mag,
  output logic                 out_valid
);
  logic signed [CW-1:0] r_i [REF_LEN];
  logic signed [CW-1:0] r_q [REF_LEN];
  logic signed [CW-1:0] c_i [REF_LEN];
  logic signed [CW-1:0] c_q [REF_LEN];
  logic signed [ACC_W-1:0] f1, f2, f3, f4;
  logic                    fv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < REF_LEN; k++) begin
        r_i[k] <= '0;
        r_q[k] <= '0;
      end
    end else if (ref_we) begin
      r_i[ref_addr] <= ref_i;
      r_q[ref_addr] <= ref_q;
    end
  end

  always_comb
    for (int k = 0; k < REF_LEN; k++) begin
      c_i[k] = r_i[REF_LEN-1-k];
      c_q[k] = r_q[REF_LEN-1-k];
    end

  pc_fir #(.DW(DW), .CW(CW), .TAPS(REF_LEN)) u_fir1 (   // Q input x reference Q
    .clk, .rst_n, .in_valid, .x(in_q), .coef(c_q), .y(f1), .out_valid(fv)
  );
  pc_fir #(.DW(DW), .CW(CW), .TAPS(REF_LEN)) u_fir2 (   // I input x reference I
    .clk, .rst_n, .in_valid, .x(in_i), .coef(c_i), .y(f2), .out_valid()
  );
  pc_fir #(.DW(DW), .CW(CW), .TAPS(REF_LEN)) u_fir3 (   // Q input x reference I
    .clk, .rst_n, .in_valid, .x(in_q), .coef(c_i), .y(f3), .out_valid()
  );
  pc_fir #(.DW(DW), .CW(CW), .TAPS(REF_LEN)) u_fir4 (   // I input x reference Q
    .clk, .rst_n, .in_valid, .x(in_i), .coef(c_q), .y(f4), .out_valid()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re       <= '0;
      im       <= '0;
      ri_valid <= 1'b0;
    end else begin
      ri_valid <= fv;
      if (fv) begin
        re <= RW'(f1) + RW'(f2);
        im <= RW'(f3) - RW'(f4);
      end
    end
  end

  cordic_abs #(.W(RW), .ITER(ITER)) u_abs (
    .clk, .rst_n, .in_valid(ri_valid), .x(re), .y(im), .mag, .out_valid
  );
endmodule
