// tb_workload_tdc_resolution: the intrinsic-resolution measurement of the
// platform, run on one resonator manager at its default size. A comparator
// signal whose edges fall at known instants (a square wave slightly detuned
// from DDS 0, so the edges sweep through every sub-clock slot) is timestamped,
// and each timestamp (phase + frac/8 of an increment) is turned back into a
// time error against the true edge instant. With eight sub-clocks at 250 MHz
// the error must lie in [0, 0.5 ns) and its spread must be that of a 0.5 ns
// quantizer (rms about 0.144 ns around its mean), not of a 4 ns one. The run is
// repeated for a 100 kHz and a 20 kHz drive; the equivalent phase resolution
// per edge is printed.
module tb_workload_tdc_resolution;
  import mems_pkg::*;
  localparam real TCLK = 4.0;
  localparam real TWO48 = 281474976710656.0;

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
    #20000000;
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

  task automatic rd(input int a, output logic [31:0] d);
    req = '0;
    req.addr = 10'(a); req.re = 1;
    @(negedge clk);
    req = '0;
    d = rdata;
  endtask

  realtime t0;
  longint  dphi0;
  real     fc_per;          // comparator period, ns
  real     t_first;
  bit      go = 0;
  realtime edges[$];        // true edge instants

  initial begin
    int m;
    real tn;
    forever begin
      wait (go);
      m = 0;
      while (go) begin
        tn = t_first + real'(m) * fc_per / 2.0;
        #(tn - $realtime);
        if (!go) break;
        comp[0] = ~comp[0];
        edges.push_back($realtime);
        m++;
      end
    end
  end

  // DDS 0 phase (in increments of dphi, i.e. clocks) -> time since t0
  task automatic run(input real f_hz, input int n_edges);
    logic [31:0] info, ph;
    real sum, sum2, err, mean, rms, emin, emax, ph48, t_ts, x;
    int  n;
    dphi0 = longint'(f_hz / 250.0e6 * TWO48);
    wr(8'h10, 32'(dphi0)); wr(8'h11, 32'(dphi0 >> 32));
    wr(8'h12, 32'h8000);
    wr(8'h02, 1);
    wr(8'h00, 32'h0000_0106);                 // clear + apply
    req = '0; req.addr = 10'h000; req.wdata = 32'h0000_0101; req.we = 1;
    @(posedge clk);
    t0 = $realtime;
    @(negedge clk);
    req = '0;
    // comparator detuned by about 1.2e-4 so its edges drift through the slots
    fc_per  = 1.0e9 / (real'(dphi0) / TWO48 * 250.0e6) * (1.0 + 1.234567e-4);
    t_first = $realtime + 1000.37;
    edges.delete();
    go = 1;
    n = 0; sum = 0; sum2 = 0; emin = 1e9; emax = -1e9;
    while (n < n_edges) begin
      repeat (200) @(negedge clk);
      forever begin
        rd(8'h40, info);
        if (!info[31]) break;
        rd(8'h41, ph);
        // timestamp in clocks since t0: phase48 / dphi, unwrapped with the true edge
        ph48 = real'(ph) * 65536.0 + real'(info[2:0]) / 8.0 * real'(dphi0);
        t_ts = ph48 / real'(dphi0);                     // clocks, modulo one period
        x = (edges[n] - t0) / TCLK;                     // true instant, clocks
        // phase after edge t0 + j*TCLK is j*dphi, so ts time = t0 + t_ts*TCLK (+k periods)
        err = x - t_ts;
        err = err - TWO48 / real'(dphi0) * $floor(err / (TWO48 / real'(dphi0)) + 0.5);
        err = err * TCLK;                               // ns, timestamp earlier than edge
        sum += err; sum2 += err * err;
        if (err < emin) emin = err;
        if (err > emax) emax = err;
        n++;
      end
    end
    go = 0;
    mean = sum / real'(n);
    rms  = $sqrt(sum2 / real'(n) - mean * mean);
    $display("f = %0.0f Hz: %0d edges, time error min %0.3f max %0.3f mean %0.3f rms %0.4f ns; per-edge phase rms %0.1f urad",
             f_hz, n, emin, emax, mean, rms, rms * 1e-9 * 2.0 * 3.14159265 * f_hz * 1e6);
    check(emin > -0.002, "timestamp never after the edge");
    check(emax < 0.502, "timestamp less than one sub-clock before the edge");
    check(emax - emin > 0.45, "errors span a whole 0.5 ns step");
    check(rms > 0.12 && rms < 0.17, $sformatf("rms %f ns is that of a 0.5 ns quantizer", rms));
    repeat (50) @(negedge clk);
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(100.0e3, 400);
    run(20.0e3, 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
