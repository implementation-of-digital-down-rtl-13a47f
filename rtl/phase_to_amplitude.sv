// Phase-to-amplitude converter (PAC) of the NCO: a sine/cosine look-up ROM.
//
// The phase is truncated to its top AW bits, which address a table of one full sine period of
// 2^AW samples, amplitude 2^(DW-1)-1. The cosine reads the same table a quarter period ahead
// (address + 2^(AW-2)). Table entry i = round((2^(DW-1)-1) * sin(2*pi*i / 2^AW)), computed at
// elaboration. Both outputs are registered: one clock of latency from `phase`.
// As in the source design: ROM look-up addressed by the truncated accumulator phase, in-phase
// and quadrature outputs. This design's own choices: AW = 10, DW = 14, one shared table.
module phase_to_amplitude #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned AW      = 10,
  parameter int unsigned DW      = 14
) (
  input  logic                 clk,
  input  logic [PHASE_W-1:0]   phase,
  output logic signed [DW-1:0] cos_o,
  output logic signed [DW-1:0] sin_o
);
  typedef logic signed [DW-1:0] table_t [2**AW];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < 2**AW; i++)
      t[i] = DW'($rtoi($floor((2.0**(DW-1) - 1.0) *
                              $sin(2.0 * 3.14159265358979323846 * i / (2.0**AW)) + 0.5)));
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [AW-1:0] addr_s, addr_c;
  assign addr_s = phase[PHASE_W-1 -: AW];
  assign addr_c = addr_s + AW'(2**(AW-2));

  always_ff @(posedge clk) begin
    sin_o <= SINE[addr_s];
    cos_o <= SINE[addr_c];
  end
endmodule
