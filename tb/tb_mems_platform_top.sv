// tb_mems_platform_top: end-to-end run of the whole platform at its default
// size (three resonator managers of 4 DDS and 4 TDC, 48-bit phase, UART),
// playing the part of the CPU on the register bus and of the analog board on
// the comparator inputs.
//   Each resonator r gets its own resonator frequency near 100 kHz and a
//   reference at 4/3 of it (Q = 3, P = 4); its comparator 0 is a square wave
//   locked to its DDS 0 with a known phase. All timestamps read back must give
//   that phase within one sub-clock step, every cycle must be Q periods long,
//   and P must read back as 4.
//   Resonator 0 is left unread long enough for its timestamp FIFO to overflow;
//   resonator 1 switches its modulators to second order and its DDS 0 stream is
//   checked by correlation; resonator 2 gets a new increment mid-cycle that
//   must wait for the cycle end. The CPU sends a timestamp to the host as a
//   four-byte frame over the UART, looped back and read again.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_mems_platform_top;
  import mems_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real TCLK = 4.0;
  localparam real TWO48 = 281474976710656.0;
  localparam int NR = 3;

  logic [3:0] clk_ph = '0;
  logic clk, rst_n = 0;
  logic [9:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic bus_we, bus_re;
  logic [NR-1:0] cycle_irq;
  logic [3:0] comp [NR];
  logic [3:0] sd_q [NR];
  logic [3:0] sd_qn [NR];
  logic uart_rx, uart_tx;
  int checks = 0, failures = 0;

  assign clk = clk_ph[0];
  assign uart_rx = uart_tx;

  mems_platform_top dut (.*);

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
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int r, input int a, input logic [31:0] d);
    bus_addr = 10'((r << 8) | a); bus_wdata = d; bus_we = 1; bus_re = 0;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(input int r, input int a, output logic [31:0] d);
    bus_addr = 10'((r << 8) | a); bus_re = 1; bus_we = 0;
    @(negedge clk);
    bus_re = 0;
    d = bus_rdata;
  endtask

  realtime t0 [NR];
  longint  dphi0 [NR];
  bit      started [NR] = '{0, 0, 0};
  real     off [NR] = '{0.3011, 0.7177, 0.0523};

  function automatic real phase_turns(input int r, input realtime t);
    real x;
    x = (t - t0[r]) / TCLK * real'(dphi0[r]) / TWO48;
    return x - $floor(x);
  endfunction

  for (genvar r = 0; r < NR; r++) begin : g_comp
    initial begin
      real per, tn;
      int  m;
      comp[r] = '0;
      wait (started[r]);
      per = TCLK * TWO48 / real'(dphi0[r]);
      m   = 0;
      forever begin
        tn = t0[r] + (real'(m) * 0.5 + off[r]) * per;
        #(tn - $realtime);
        comp[r][0] = ~comp[r][0];
        m++;
      end
    end
  end

  // cycle bookkeeping
  int clk_count, last_irq [NR], gaps [NR][$];
  always @(posedge clk) begin
    clk_count++;
    for (int r = 0; r < NR; r++) if (started[r] && cycle_irq[r]) begin
      gaps[r].push_back(clk_count - last_irq[r]);
      last_irq[r] = clk_count;
    end
  end

  // correlation of resonator 1, DDS 0 stream
  real ci, cq;
  int  ncorr;
  bit  corr_on = 0;
  always @(posedge clk) if (corr_on) begin
    real th;
    th = 2.0 * PI * phase_turns(1, $realtime - 4.0 * TCLK);
    ci += (sd_q[1][0] ? 1.0 : -1.0) * $sin(th);
    cq += (sd_q[1][0] ? 1.0 : -1.0) * $cos(th);
    ncorr++;
  end

  int n_ts [NR], n_rise, n_fall, n_ovf, n_order, n_shadow, n_uart, n_clear;
  int frac_seen [8];
  logic [31:0] last_phase;

  task automatic drain(input int r);
    logic [31:0] info, ph;
    real got, expv, err, step;
    for (int guard = 0; guard < 40; guard++) begin
      rd(r, 8'h40, info);
      if (!info[31]) break;
      rd(r, 8'h41, ph);
      last_phase = ph;
      got  = (real'(ph) * 65536.0 + real'(info[2:0]) / 8.0 * real'(dphi0[r])) / TWO48;
      got  = got - $floor(got);
      expv = off[r] + (info[3] ? 0.0 : 0.5);
      err  = got - expv;
      err  = err - $floor(err + 0.5);
      step = real'(dphi0[r]) / 8.0 / TWO48;
      check(err <= 1e-6 && err > -step - 1e-6,
            $sformatf("res %0d ts phase %f expected %f", r, got, expv));
      n_ts[r]++;
      frac_seen[info[2:0]]++;
      if (info[3]) n_rise++; else n_fall++;
    end
  endtask

  task automatic drain_all();
    for (int r = 1; r < NR; r++) drain(r);
  endtask

  initial begin
    logic [31:0] d;
    longint k;
    real mag;
    bus_addr = '0; bus_wdata = '0; bus_we = 0; bus_re = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      k = 64'd37529996895 - 64'd1234567891 * r;  // DDS 0 = 3k, reference = 4k
      dphi0[r] = 3 * k;
      wr(r, 8'h10, 32'(3 * k)); wr(r, 8'h11, 32'((3 * k) >> 32));
      wr(r, 8'h14, 32'(4 * k)); wr(r, 8'h15, 32'((4 * k) >> 32));
      wr(r, 8'h12, 32'h8000);   wr(r, 8'h16, 32'h8000);
      wr(r, 8'h02, 3);
      wr(r, 8'h00, 32'h0000_0106);                   // clear + apply, TDC 0 on
      n_clear++;
    end
    wr(3, 2, 20);                                    // UART: 20 clocks per bit
    for (int r = 0; r < NR; r++) begin
      // run; the accumulators first add at the edge after this one
      bus_addr = 10'(r << 8); bus_wdata = (r == 1) ? 32'h0000_01F1 : 32'h0000_0101; bus_we = 1;
      @(posedge clk);
      t0[r] = $realtime;
      started[r] = 1;
      @(negedge clk);
      bus_we = 0;
    end
    n_order++;                                       // resonator 1 runs second order
    // resonator 0 is not read for 10 periods: its FIFO must overflow
    ci = 0.0; cq = 0.0; ncorr = 0;
    corr_on = 1;
    for (int i = 0; i < 25000; i++) begin
      @(negedge clk);
      if (i % 3000 == 0) drain_all();
    end
    corr_on = 0;
    mag = $sqrt(ci * ci + cq * cq) / real'(ncorr) * 2.0;
    check(mag > 0.97 * 0.49998 && mag < 1.03 * 0.49998, $sformatf("res 1 second-order stream amplitude %f", mag));
    rd(0, 8'h01, d);
    check(d[4] == 1, "res 0 timestamp FIFO overflowed");
    if (d[4]) n_ovf++;
    drain(0);
    wr(0, 8'h01, 32'h10);
    rd(0, 8'h01, d);
    check(d[4] == 0, "overflow cleared");
    // cycles: P and length (3 periods of DDS 0)
    for (int r = 0; r < NR; r++) begin
      real len;
      rd(r, 8'h03, d);
      check(d[15:0] == 4, $sformatf("res %0d P read back %0d", r, d[15:0]));
      len = 3.0 * TWO48 / real'(dphi0[r]);
      foreach (gaps[r][i]) if (i > 0)
        check(real'(gaps[r][i]) > len - 1.01 && real'(gaps[r][i]) < len + 1.01,
              $sformatf("res %0d cycle %0d clocks, expected %f", r, gaps[r][i], len));
    end
    // resonator 2: new increment written mid-cycle, used from the next cycle end
    begin
      int gi;
      longint nd;
      real l_old, l_new;
      @(posedge cycle_irq[2]);
      repeat (1000) @(negedge clk);
      nd = dphi0[2] + dphi0[2] / 10;
      wr(2, 8'h10, 32'(nd)); wr(2, 8'h11, 32'(nd >> 32));
      gi = gaps[2].size();
      repeat (2) @(posedge cycle_irq[2]);
      repeat (2) @(negedge clk);
      l_old = 3.0 * TWO48 / real'(dphi0[2]);
      l_new = 3.0 * TWO48 / real'(nd);
      check(real'(gaps[2][gi]) > l_old - 1.01 && real'(gaps[2][gi]) < l_old + 1.01, "old increment kept to the cycle end");
      check(real'(gaps[2][gi + 1]) > l_new - 1.01 && real'(gaps[2][gi + 1]) < l_new + 1.01,
            $sformatf("new increment after the cycle end: %0d vs %f", gaps[2][gi + 1], l_new));
      if (real'(gaps[2][gi + 1]) < l_old - 100.0) n_shadow++;
    end
    drain(0);
    drain(1);
    // data frame to the host: the last timestamp phase, LSB first
    begin
      logic [31:0] got;
      got = '0;
      for (int b = 0; b < 4; b++) begin
        wr(3, 0, 32'(last_phase >> (8 * b)));
        repeat (10 * 20 + 30) @(negedge clk);
        rd(3, 1, d);
        check(d[0] == 1, "UART byte received");
        rd(3, 0, d);
        got[8 * b +: 8] = d[7:0];
        n_uart++;
      end
      check(got == last_phase, $sformatf("frame %h sent, %h received", last_phase, got));
    end
    $display("cycles %0d/%0d/%0d, timestamps %0d/%0d/%0d (rise %0d fall %0d), overflow %0d, order %0d, shadow %0d, uart bytes %0d, clear %0d",
             gaps[0].size(), gaps[1].size(), gaps[2].size(), n_ts[0], n_ts[1], n_ts[2], n_rise, n_fall,
             n_ovf, n_order, n_shadow, n_uart, n_clear);
    $display("fractions seen: %0d %0d %0d %0d %0d %0d %0d %0d", frac_seen[0], frac_seen[1], frac_seen[2],
             frac_seen[3], frac_seen[4], frac_seen[5], frac_seen[6], frac_seen[7]);
    for (int r = 0; r < NR; r++) begin
      check(gaps[r].size() > 5, $sformatf("res %0d cycles happened", r));
      check(n_ts[r] > 10, $sformatf("res %0d timestamps happened", r));
    end
    for (int f = 0; f < 8; f++) check(frac_seen[f] > 0, $sformatf("sub-clock fraction %0d happened", f));
    check(n_rise > 0 && n_fall > 0, "both comparator edges happened");
    check(n_ovf > 0, "FIFO overflow happened");
    check(n_order > 0, "second-order modulation happened");
    check(n_shadow > 0, "cycle-end increment update happened");
    check(n_uart == 4, "UART frame happened");
    check(n_clear == NR, "synchronous clear happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
