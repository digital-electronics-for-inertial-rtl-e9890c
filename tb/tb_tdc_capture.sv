// tb_tdc_capture: feeds the capture stage with slot vectors and DDS phases in
// the timing subclock_sampler and the accumulator give them, from a random list
// of comparator changes dated in eighths of a clock. An event in period k
// between slots f and f+1 must come out as {rising, P(k), f}, three clocks after
// period k ends (four when f = 7, because it is only seen in the next period's
// slot 0). Counts each fraction value and both polarities.
module tb_tdc_capture;
  import mems_pkg::*;
  localparam int NP = 3000;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] samp;
  logic [31:0] phase;
  logic ts_valid;
  ts_t ts;
  int checks = 0, failures = 0;

  logic [31:0] P [NP];
  bit   [7:0]  L [NP];
  bit          exp_v  [NP + 8];
  ts_t         exp_ts [NP + 8];
  int frac_hits[8];
  int rise_hits, fall_hits;

  tdc_capture dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (NP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, nxt, k, f;
    bit lvl, newl;
    // phases: an accumulator of the top 32 bits
    P[0] = $urandom;
    for (int i = 1; i < NP; i++) P[i] = P[i-1] + 32'd1234567;
    // events, at least 9 eighths apart
    foreach (exp_v[i]) exp_v[i] = 0;
    lvl = 0;
    nxt = 40 + ($urandom % 20);
    for (int s = 0; s < 8 * NP; s++) begin
      k = s / 8;
      L[k][s % 8] = lvl;
      if (s == nxt) begin
        // change between slot s and s+1
        newl = ~lvl;
        f = s % 8;
        e = (f < 7) ? k + 3 : k + 4;
        if (e < NP + 8) begin
          exp_v[e]         = 1;
          exp_ts[e].rising = newl;
          exp_ts[e].phase  = P[k];
          exp_ts[e].frac   = 3'(f);
        end
        lvl = newl;
        nxt = s + 9 + ($urandom % 30);
      end
    end
    samp  = 0;
    phase = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en    = 1;
    // drive: after edge c, phase = P[c] and samp = L[c-2]; check outputs of edge c
    for (int c = 0; c < NP + 4; c++) begin
      @(posedge clk);
      #0.5;
      if (c < NP) phase = P[c];
      if (c >= 2 && c - 2 < NP) samp = L[c-2];
      else samp = {8{samp[7]}};
      if (c >= 3) begin
        checks++;
        if (ts_valid !== exp_v[c] || (exp_v[c] && ts !== exp_ts[c])) begin
          failures++;
          if (failures < 10)
            $display("FAIL edge %0d: valid %b ts %h, expected %b %h", c, ts_valid, ts, exp_v[c], exp_ts[c]);
        end
        if (ts_valid) begin
          frac_hits[ts.frac]++;
          if (ts.rising) rise_hits++; else fall_hits++;
        end
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (frac_hits[i] == 0) begin
        failures++;
        $display("FAIL fraction %0d never seen", i);
      end
    end
    checks++;
    if (rise_hits == 0 || fall_hits == 0) failures++;
    // disabled channel reports nothing
    en = 0;
    samp = ~samp;
    repeat (3) @(posedge clk);
    #0.5;
    checks++;
    if (ts_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
