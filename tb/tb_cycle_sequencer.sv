// tb_cycle_sequencer: two coherent 20-bit phase accumulators in the testbench
// (increments in the ratio Q : P) drive
// the sequencer. Checks that cycle_end comes one clock after every Q-th
// resonator wrap, that p_count then equals the reference wraps counted here
// (P), that cycle_no counts cycles, and that clear restarts the count.
module tb_cycle_sequencer;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [15:0] q_periods, p_count, cycle_no;
  logic wrap_res = 0, wrap_ref = 0, cycle_end;
  int checks = 0, failures = 0;
  int unsigned acc_res, acc_ref, inc_res, inc_ref;
  int qseen, pseen, cycles, exp_end, ncyc;

  cycle_sequencer #(.CNT_W(16)) dut (.*);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int P, input int Q, input int clocks);
    int lastp;
    acc_res = 0; acc_ref = 0;
    // increments in the ratio Q : P keep P * T_ref = Q * T exact
    inc_res = 1200 * Q;
    inc_ref = 1200 * P;
    q_periods = 16'(Q);
    clear = 1;
    @(negedge clk);
    clear = 0;
    qseen = 0; pseen = 0; exp_end = 0; ncyc = 0; lastp = 0;
    for (int i = 0; i < clocks; i++) begin
      // model wraps for this clock
      acc_res += inc_res; acc_ref += inc_ref;
      wrap_res = acc_res >= (1 << 20);
      wrap_ref = acc_ref >= (1 << 20);
      acc_res &= (1 << 20) - 1;
      acc_ref &= (1 << 20) - 1;
      if (wrap_ref) pseen++;
      if (wrap_res) qseen++;
      exp_end = 0;
      if (qseen == Q && wrap_res) begin
        exp_end = 1;
        lastp   = pseen;
        qseen   = 0;
        pseen   = 0;
      end
      @(negedge clk);
      check(cycle_end == (exp_end != 0), $sformatf("cycle_end at clock %0d", i));
      if (exp_end) begin
        check(p_count == 16'(lastp), $sformatf("p_count %0d expected %0d", p_count, lastp));
        check(p_count == 16'(P), "P periods of the reference in a cycle");
        ncyc++;
      end
    end
    wrap_res = 0;
    wrap_ref = 0;
    check(ncyc > 2, "several cycles");
  endtask

  initial begin
    int c0;
    q_periods = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c0 = cycle_no;
    run(4, 3, 20000);    // the P = 4, Q = 3 example
    check(cycle_no == 16'(c0 + ncyc), "cycle number counts cycles");
    run(7, 5, 20000);
    run(1, 1, 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
