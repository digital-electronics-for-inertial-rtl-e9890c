// tb_workload_sigma_delta_spectrum: the drive-signal workload. DDS 0 of one
// resonator manager (default size) generates 100 kHz at half scale; its
// one-bit stream is analysed over 40 whole periods (100 000 clocks, a
// sampling-to-signal ratio of 2500) by correlating it with sine and cosine at
// the fundamental and at harmonics 2 to 5, for the first- and the
// second-order modulator. The fundamental must be within 1 % of the amplitude
// word and every harmonic at least 50 dB below it: the spectrum holds the
// expected line and no harmonics near it, so an RC filter recovers a clean
// sine. A one-pole RC model (corner 1 MHz) also filters the stream, and its
// output must follow the ideal filtered sine to within 0.1 (5 % of the +/-1
// span of the stream).
module tb_workload_sigma_delta_spectrum;
  import mems_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real TWO48 = 281474976710656.0;
  localparam int  NCLK = 100000;

  logic [3:0] clk_ph = '0;
  logic clk, rst_n = 0;
  reg_req_t req;
  logic [31:0] rdata;
  logic cycle_irq;
  logic [3:0] comp = '0;
  logic [3:0] sd_q, sd_qn;
  int checks = 0, failures = 0;

  assign clk = clk_ph[0];

  resonator_manager dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_clk
    initial begin
      #(0.5 * k);
      clk_ph[k] = 1'b1;
      forever #2 clk_ph[k] = ~clk_ph[k];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    req = '0;
    req.addr = 10'(a); req.wdata = d; req.we = 1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic analyse(input bit order2);
    longint dphi;
    real ci[6], cq[6], mag[6], th, y, v, rc, worst_rc;
    int  j;
    // 100 kHz exactly: 2500 clocks per period, dphi = 2^48 / 2500
    dphi = longint'(TWO48 / 2500.0);
    wr(8'h10, 32'(dphi)); wr(8'h11, 32'(dphi >> 32));
    wr(8'h12, 32'h8000);
    wr(8'h00, order2 ? 32'h0000_0016 : 32'h0000_0006);   // clear + apply
    wr(8'h00, order2 ? 32'h0000_0011 : 32'h0000_0001);   // run
    // settle 2 periods, then analyse; j counts clocks since the accumulator left 0
    repeat (5000) @(negedge clk);
    j = 5000;
    foreach (ci[h]) begin ci[h] = 0.0; cq[h] = 0.0; end
    rc = 0.0; worst_rc = 0.0;
    for (int i = 0; i < NCLK; i++) begin
      @(posedge clk);
      j++;
      v  = sd_q[0] ? 1.0 : -1.0;
      // stream bit at this edge comes from the phase 3 clocks earlier
      th = 2.0 * PI * real'(j - 4) / 2500.0;
      for (int h = 1; h <= 5; h++) begin
        ci[h] += v * $sin(real'(h) * th);
        cq[h] += v * $cos(real'(h) * th);
      end
      // one-pole RC at 1 MHz: alpha = 1 - exp(-2 pi 1e6 * 4 ns)
      rc += (v - rc) * 0.0248;
      if (i > 2000) begin
        // the filter delays a 100 kHz sine by atan(0.1)/(2 pi 100 kHz) = 0.159 us = 39.7 clocks
        y = 0.5 * $sin(th - 2.0 * PI * 39.7 / 2500.0) / $sqrt(1.01);
        if (rc - y > worst_rc) worst_rc = rc - y;
        if (y - rc > worst_rc) worst_rc = y - rc;
      end
    end
    for (int h = 1; h <= 5; h++) mag[h] = 2.0 * $sqrt(ci[h] * ci[h] + cq[h] * cq[h]) / real'(NCLK);
    $display("order %0d: fundamental %0.5f, harmonics 2..5: %0.1f %0.1f %0.1f %0.1f dBc, RC output worst error %0.3f",
             order2 ? 2 : 1, mag[1], 20.0 * $log10(mag[2] / mag[1]), 20.0 * $log10(mag[3] / mag[1]),
             20.0 * $log10(mag[4] / mag[1]), 20.0 * $log10(mag[5] / mag[1]), worst_rc);
    check(mag[1] > 0.99 * 0.49998 && mag[1] < 1.01 * 0.49998, $sformatf("fundamental %f", mag[1]));
    for (int h = 2; h <= 5; h++)
      check(20.0 * $log10(mag[h] / mag[1]) < -50.0, $sformatf("harmonic %0d too strong", h));
    check(worst_rc < 0.05 * 2.0, $sformatf("RC-filtered stream off by %f", worst_rc));
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    analyse(1'b0);
    analyse(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
