// Self-checking test of the sine/cosine ROM: every table address and random full-width
// phases, outputs compared one clock later with 8191*sin/cos of the truncated phase computed
// here in floating point (within 1 LSB).
module tb_phase_to_amplitude;
  localparam int unsigned PW = 16, AW = 10, DW = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [PW-1:0] phase = '0;
  logic signed [DW-1:0] cos_o, sin_o;
  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  int checks = 0, failures = 0;
  real a, es, ec;

  phase_to_amplitude #(.PHASE_W(PW), .AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [PW-1:0] p);
    @(negedge clk);
    phase = p;
    @(posedge clk);
    #1;
    a  = 2.0 * PI * real'(p >> (PW - AW)) / real'(2**AW);
    es = 8191.0 * $sin(a);
    ec = 8191.0 * $cos(a);
    checks += 2;
    if (fabs(real'(sin_o) - es) > 1.0 || fabs(real'(cos_o) - ec) > 1.0) begin
      failures++;
      if (failures < 8) $display("phase %h: sin %0d (%f) cos %0d (%f)", p, sin_o, es, cos_o, ec);
    end
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) check_one(PW'(i << (PW - AW)) | PW'($urandom % 64));
    for (int i = 0; i < 2000; i++) check_one(PW'($urandom));
    // exact points of the wheel
    check_one(16'h0000); checks++; if (sin_o !== 0 || cos_o !== 8191) failures++;
    check_one(16'h4000); checks++; if (sin_o !== 8191 || cos_o !== 0) failures++;
    check_one(16'h8000); checks++; if (sin_o !== 0 || cos_o !== -8191) failures++;
    check_one(16'hC000); checks++; if (sin_o !== -8191 || cos_o !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
