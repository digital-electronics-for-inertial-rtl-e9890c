// tb_subclock_sampler: four 250 MHz clocks 0.5 ns apart (0/45/90/135 deg) and
// an asynchronous event that toggles at random times placed midway between
// sub-clock slots. For every system clock period n the testbench works out,
// from its own record of toggle times, the event level at n + i/8 (i = 0..7),
// and checks 'samp' two clocks later. It also checks that every slot position
// saw a transition.
module tb_subclock_sampler;
  logic [3:0] clk_ph = '0;
  logic rst_n = 0, ev = 0;
  logic [7:0] samp;
  int checks = 0, failures = 0;
  realtime toggles[$];
  int slot_hits[8];

  subclock_sampler dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_clk
    initial begin
      #(0.5 * k);
      clk_ph[k] = 1'b1;
      forever #2 clk_ph[k] = ~clk_ph[k];
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit level_at(input realtime t);
    bit l = 0;
    foreach (toggles[j]) if (toggles[j] < t) l = ~l;
    return l;
  endfunction

  // event generator: toggles at 0.5*j + 0.25 ns
  initial begin
    int gap;
    #40.25;
    rst_n = 1;
    repeat (400) begin
      gap = 3 + ($urandom % 40);
      #(0.5 * gap);
      ev = ~ev;
      toggles.push_back($realtime);
    end
  end

  initial begin
    bit [7:0] e;
    realtime tn;
    int n;
    #41;
    forever begin
      @(negedge clk_ph[0]);
      if ($realtime > 4000.0) break;
      // this negedge is at 4m+2; samp describes period n = m-2, starting at 4n
      n  = int'(($realtime - 2.0) / 4.0) - 2;
      tn = 4.0 * n;
      for (int i = 0; i < 8; i++) e[i] = level_at(tn + 0.5 * i);
      if (tn > 44.0) begin
        checks++;
        if (samp !== e) begin
          failures++;
          if (failures < 10) $display("FAIL period at %0t: samp %b expected %b", tn, samp, e);
        end
        for (int i = 0; i < 7; i++) if (e[i] != e[i+1]) slot_hits[i]++;
      end
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (slot_hits[i] == 0) begin
        failures++;
        $display("FAIL no transition seen between slots %0d and %0d", i, i + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
