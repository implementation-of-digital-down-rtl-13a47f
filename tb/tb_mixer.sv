// Self-checking test of the complex mixer: random samples and LO values including the
// extremes; I must equal x*cos and Q must equal -(x*sin), one clock after in_valid.
module tb_mixer;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [13:0] x = 0, lo_cos = 0, lo_sin = 0;
  logic signed [27:0] i_o, q_o;
  int checks = 0, failures = 0;
  longint ei, eq;

  mixer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = 1;
      case (t % 50)
        0: begin x = -14'sd8192; lo_cos = 14'sd8191;  lo_sin = -14'sd8191; end
        1: begin x = 14'sd8191;  lo_cos = -14'sd8192; lo_sin = 14'sd8191;  end
        default: begin x = 14'($urandom); lo_cos = 14'($urandom); lo_sin = 14'($urandom); end
      endcase
      ei = longint'(x) * longint'(lo_cos);
      eq = -(longint'(x) * longint'(lo_sin));
      @(negedge clk);
      in_valid = 0;
      checks += 2;
      if (!out_valid) failures++;
      if (longint'(i_o) != ei || longint'(q_o) != eq) begin
        failures++;
        if (failures < 8) $display("x=%0d c=%0d s=%0d -> %0d %0d", x, lo_cos, lo_sin, i_o, q_o);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
