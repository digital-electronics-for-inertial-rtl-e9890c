// tb_resonator_manager: one resonator IP at its default size (4 DDS, 4 TDC),
// driven through its registers with 250 MHz clocks in four phases.
//   DDS 0 (resonator) runs at 3K and DDS 1 (reference) at 4K, K chosen so that
//   DDS 0 is near 100 kHz: a cycle is Q = 3 resonator periods = P = 4
//   reference periods. Checks the cycle length in clocks and P read back.
//   The comparator inputs are square waves locked to DDS 0 with known phase
//   offsets; every timestamp read back, phase + frac/8 of an increment, must
//   match the DDS 0 phase the testbench computes for the nearest edge of the
//   same polarity, within one sub-clock step.
//   The sigma-delta streams of DDS 0 and 1 are correlated with sine and cosine
//   of the expected phase: the magnitude must match the amplitude word.
//   A new increment written mid-cycle must only take effect at the cycle end.
// Counts: cycles, shadow updates, timestamps of each polarity, FIFO overflow,
// sigma-delta order switch, synchronous clear.
module tb_resonator_manager;
  import mems_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real TCLK = 4.0;
  localparam real TWO48 = 281474976710656.0;
  localparam longint K = 64'd37529996895;   // 3K ~ 100 kHz at 250 MHz

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
    #2000000;
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

  // time of the clock edge at which the accumulators left zero
  realtime t0;
  longint  dphi0;
  bit      started = 0;

  // DDS 0 phase (fraction of a turn) at time t; the phase after edge
  // t0 + j*TCLK is j*dphi0 (constant increment assumed while measured)
  function automatic real phase_turns(input realtime t, input real scale = 1.0);
    real x;
    x = (t - t0) / TCLK * real'(dphi0) * scale / TWO48;
    return x - $floor(x);
  endfunction

  // comparator models: square waves at DDS 0 frequency, rising at phase off[j]
  real off[2] = '{0.1234, 0.6071};
  for (genvar j = 0; j < 2; j++) begin : g_comp
    initial begin
      real per, tn;
      int  m;
      wait (started);
      per = TCLK * TWO48 / real'(dphi0);
      m   = 0;
      forever begin
        tn = t0 + (real'(m) * 0.5 + off[j]) * per;
        #(tn - $realtime);
        comp[j] = ~comp[j];
        m++;
      end
    end
  end

  // sigma-delta correlation over one window
  real ci[2], cq[2];
  int  ncorr;
  bit  corr_on = 0;
  always @(posedge clk) if (corr_on) begin
    real th;
    // sample at this edge left the modulator 3 clocks after its phase
    th = 2.0 * PI * phase_turns($realtime - 4.0 * TCLK);
    ci[0] += (sd_q[0] ? 1.0 : -1.0) * $sin(th);
    cq[0] += (sd_q[0] ? 1.0 : -1.0) * $cos(th);
    th = 2.0 * PI * phase_turns($realtime - 4.0 * TCLK, 4.0 / 3.0);
    ci[1] += (sd_q[1] ? 1.0 : -1.0) * $sin(th);
    cq[1] += (sd_q[1] ? 1.0 : -1.0) * $cos(th);
    ncorr++;
  end

  int n_irq, last_irq_clk, clk_count, irq_gap[$];
  always @(posedge clk) begin
    clk_count++;
    if (cycle_irq) begin
      n_irq++;
      irq_gap.push_back(clk_count - last_irq_clk);
      last_irq_clk = clk_count;
    end
  end

  int n_ts[2], n_rise, n_fall, n_ovf, n_clear, n_order, n_shadow;

  // read and check all timestamps waiting in TDC channel j
  task automatic drain(input int j);
    logic [31:0] info, ph;
    real got, expv, err, per_t;
    for (int guard = 0; guard < 40; guard++) begin
      rd(8'h40 + 2 * j, info);
      if (!info[31]) break;
      if (info[30]) n_ovf++;
      rd(8'h41 + 2 * j, ph);
      // timestamp as fraction of a turn
      got = (real'(ph) * 65536.0 + real'(info[2:0]) / 8.0 * real'(dphi0)) / TWO48;
      got = got - $floor(got);
      expv = off[j] + (info[3] ? 0.0 : 0.5);
      err = got - expv;
      err = err - $floor(err + 0.5);
      // one sub-clock step is dphi0/8 of phase; the timestamp is never late
      per_t = real'(dphi0) / 8.0 / TWO48;
      check(err <= 1e-6 && err > -per_t - 1e-6,
            $sformatf("TDC %0d ts phase %f expected %f (err %g, step %g)", j, got, expv, err, per_t));
      n_ts[j]++;
      if (info[3]) n_rise++; else n_fall++;
    end
  endtask

  initial begin
    logic [31:0] d;
    real mag, want;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    dphi0 = 3 * K;
    wr(8'h10, 32'(3 * K));       wr(8'h11, 32'((3 * K) >> 32));
    wr(8'h14, 32'(4 * K));       wr(8'h15, 32'((4 * K) >> 32));
    wr(8'h12, 32'h8000);         wr(8'h16, 32'h6000);
    wr(8'h02, 3);                                    // Q = 3
    wr(8'h00, 32'h0000_0306);                        // clear + apply, TDC 0/1 on
    n_clear++;
    // run, first order, TDC 0 and 1 enabled
    req = '0; req.addr = 10'h000; req.wdata = 32'h0000_0301; req.we = 1;
    @(posedge clk);
    t0 = $realtime;          // run is registered here; first add at the next edge
    started = 1;
    @(negedge clk);
    req = '0;
    // let TDC 0 overflow: no reads for 10 periods (20 events into 16 places)
    repeat (25000) @(negedge clk);
    rd(8'h01, d);
    check(d[4] == 1, "TDC 0 FIFO overflow after 20 events");
    if (d[4]) n_ovf++;
    drain(0);
    drain(1);
    wr(8'h01, 32'h0000_00F0);                        // clear overflow flags
    rd(8'h01, d);
    check(d[7:4] == 0, "overflow cleared");
    // cycle checks
    rd(8'h03, d);
    check(d[15:0] == 4, $sformatf("P read back %0d", d[15:0]));
    check(d[31:16] >= 3, "cycles counted");
    foreach (irq_gap[i]) if (i > 0)
      check(irq_gap[i] >= 7499 && irq_gap[i] <= 7501, $sformatf("cycle length %0d clocks", irq_gap[i]));
    // sigma-delta correlation over 3 cycles (22500 clocks)
    ci = '{0.0, 0.0}; cq = '{0.0, 0.0}; ncorr = 0;
    corr_on = 1;
    for (int i = 0; i < 22500; i++) begin
      @(negedge clk);
      if (i % 4000 == 0) begin drain(0); drain(1); end
    end
    corr_on = 0;
    for (int c = 0; c < 2; c++) begin
      mag  = $sqrt(ci[c] * ci[c] + cq[c] * cq[c]) / real'(ncorr) * 2.0;
      want = (c == 0 ? 32768.0 : 24576.0) / 65536.0 * 32767.0 / 32768.0;
      check(mag > want * 0.97 && mag < want * 1.03, $sformatf("DDS %0d stream amplitude %f want %f", c, mag, want));
      // DDS 0 is in sine phase with its accumulator
      if (c == 0) check(ci[0] > 0 && cq[0] / ci[0] < 0.05 && cq[0] / ci[0] > -0.05, "DDS 0 stream in phase");
    end
    // switch DDS 0 to second order and check amplitude again
    wr(8'h00, 32'h0000_0311);
    n_order++;
    ci = '{0.0, 0.0}; cq = '{0.0, 0.0}; ncorr = 0;
    corr_on = 1;
    for (int i = 0; i < 7500; i++) begin
      @(negedge clk);
      if (i % 4000 == 0) begin drain(0); drain(1); end
    end
    corr_on = 0;
    mag = $sqrt(ci[0] * ci[0] + cq[0] * cq[0]) / real'(ncorr) * 2.0;
    check(mag > 0.97 * 0.49998 && mag < 1.03 * 0.49998, $sformatf("second-order amplitude %f", mag));
    drain(0); drain(1);
    // shadow update: new ratio P/Q = 5/4, Q = 4; written now, active at next cycle end
    begin
      int g0, gi;
      @(posedge cycle_irq);
      @(negedge clk);
      wr(8'h10, 32'(3 * K + 3 * K / 10)); wr(8'h11, 32'((3 * K + 3 * K / 10) >> 32));
      gi = irq_gap.size();
      repeat (3) @(posedge cycle_irq);
      @(negedge clk);
      // cycle right after the write still used the old increment
      check(irq_gap[gi] >= 7499 && irq_gap[gi] <= 7501, $sformatf("old rate kept to cycle end: %0d", irq_gap[gi]));
      // afterwards 3 periods at 1.1x the frequency: 7500 / 1.1 clocks
      check(irq_gap[gi + 1] >= 6817 && irq_gap[gi + 1] <= 6819, $sformatf("new rate after cycle end: %0d", irq_gap[gi + 1]));
      if (irq_gap[gi + 1] < 7000) n_shadow++;
    end
    $display("cycles %0d, timestamps %0d/%0d (rise %0d fall %0d), overflow %0d, order switch %0d, shadow %0d, clear %0d",
             n_irq, n_ts[0], n_ts[1], n_rise, n_fall, n_ovf, n_order, n_shadow, n_clear);
    check(n_irq > 5, "cycles happened");
    check(n_ts[0] > 10 && n_ts[1] > 10, "timestamps on both channels");
    check(n_rise > 0 && n_fall > 0, "both polarities");
    check(n_ovf > 0, "overflow happened");
    check(n_shadow > 0, "shadow update happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
