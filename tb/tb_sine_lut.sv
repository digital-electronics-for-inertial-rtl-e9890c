// tb_sine_lut: sweeps all 4096 phase codes and compares the LUT output with
// round(32767 * sin(2*pi*(i+0.5)/4096)) scaled by the amplitude word, computed
// here with real arithmetic; allows one LSB. Also checks the two-clock latency.
module tb_sine_lut;
  logic clk = 0;
  logic [11:0] phase;
  logic [15:0] amp;
  logic signed [15:0] sample;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  sine_lut dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int p, input int a);
    int  t;
    t = int'($floor(32767.0 * $sin(2.0 * PI * (real'(p) + 0.5) / 4096.0) + 0.5));
    return int'($floor(real'(t) * real'(a) / 65536.0));
  endfunction

  initial begin
    int e, a, worst;
    int amps[3] = '{65535, 32768, 12345};
    worst = 0;
    foreach (amps[k]) begin
      a   = amps[k];
      amp = 16'(a);
      for (int p = 0; p < 4096 + 2; p++) begin
        @(negedge clk);
        if (p >= 2) begin
          e = expected(p - 2, a);
          checks++;
          if (sample > e + 1 || sample < e - 1) begin
            failures++;
            if (failures < 10) $display("FAIL phase %0d amp %0d: got %0d exp %0d", p - 2, a, sample, e);
          end
        end
        phase = 12'(p);
      end
    end
    // latency: step phase from 0 to quarter turn, value must change 2 clocks later
    amp = 16'hFFFF;
    phase = 12'd0;
    repeat (3) @(negedge clk);
    phase = 12'd1024;
    @(negedge clk);
    checks++;
    if (sample > 100) failures++;   // still old value after 1 clock
    @(negedge clk);
    checks++;
    if (sample < 32000) begin
      failures++;
      $display("FAIL latency: %0d", sample);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
