// tb_sigma_delta_mod: checks the one-bit modulator in both orders.
// (1) Bit-exact comparison with a behavioural model of the textbook loops
//     written here with integers. (2) The mean of the +/-1 stream over 8192
//     clocks equals x / 2^15 for constant inputs (the property the RC filter
//     relies on). (3) qn is always the complement of q. (4) A slow sine input is
//     recovered by a moving average of the stream.
module tb_sigma_delta_mod;
  logic clk = 0, rst_n = 0, order2 = 0;
  logic signed [15:0] x;
  logic q, qn;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  sigma_delta_mod dut (.*);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint m1, m2;
  bit     mq;
  task automatic model_step(input int xin, input bit o2);
    longint fb;
    fb = mq ? 32768 : -32768;
    m1 = m1 + xin - fb;
    if (o2) begin
      m2 = m2 + m1 - fb;
      mq = (m2 >= 0);
    end else begin
      m2 = 0;
      mq = (m1 >= 0);
    end
  endtask

  initial begin
    int xs[6] = '{0, 10000, -10000, 20000, -22000, 3};
    int sum, n;
    real mean, err, acc, y;
    x = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 2; o++) begin
      foreach (xs[k]) begin
        // restart both from reset so the model and the design share a state
        rst_n = 0;
        m1 = 0; m2 = 0; mq = 0;
        order2 = o[0];
        x = 16'(xs[k]);
        @(negedge clk);
        rst_n = 1;
        sum = 0;
        for (int i = 0; i < 8192; i++) begin
          @(negedge clk);
          model_step(xs[k], o[0]);
          check(q == mq, $sformatf("bit %0d order %0d x %0d", i, o + 1, xs[k]));
          check(qn == !q, "complementary output");
          sum += q ? 1 : -1;
        end
        mean = real'(sum) / 8192.0;
        err  = mean - real'(xs[k]) / 32768.0;
        check(err < 0.002 && err > -0.002, $sformatf("mean %f for x %0d order %0d", mean, xs[k], o + 1));
      end
    end
    // slow sine, second order: 64-tap moving average follows the input
    order2 = 1;
    acc = 0.0;
    n = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      x = 16'(int'(16000.0 * $sin(2.0 * PI * real'(i) / 5000.0)));
      acc = acc * (63.0 / 64.0) + (q ? 1.0 : -1.0) / 64.0;
      if (i > 2000 && (i % 500) == 0) begin
        // the one-pole average lags by about 64 clocks
        y = 16000.0 / 32768.0 * $sin(2.0 * PI * real'(i - 64) / 5000.0);
        check(acc - y < 0.12 && y - acc < 0.12, $sformatf("filtered %f vs %f", acc, y));
        n++;
      end
    end
    check(n > 30, "sine points");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
