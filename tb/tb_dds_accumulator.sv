// tb_dds_accumulator: checks the DDS phase accumulator against a reference
// model: phase(n+1) = phase(n) + dphi mod 2^48, wrap on every carry out, the
// wrap count over a run equal to floor(N * dphi / 2^48) (output frequency),
// hold while disabled and synchronous clear to zero. A second instance, 64 bits
// wide and split into 6 pipelined segments, gets a new random increment, enable
// and clear every clock and must give the exact 64-bit accumulator (and carry)
// 5 clocks late.
module tb_dds_accumulator;
  localparam int unsigned W = 48;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] dphi, phase, model;
  logic wrap;
  int checks = 0, failures = 0;
  longint wraps;

  dds_accumulator #(.PHASE_W(W)) dut (.*);

  logic clear2 = 0, en2 = 0, wrap2;
  logic [63:0] dphi2 = '0, phase2;
  dds_accumulator #(.PHASE_W(64), .LAT(6)) dut64 (
    .clk, .rst_n, .clear(clear2), .en(en2), .dphi(dphi2), .phase(phase2), .wrap(wrap2)
  );
  logic [63:0] m64 [$];
  bit          w64 [$];

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] s;
    dphi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(phase == 0, "reset value");
    // random increments
    for (int t = 0; t < 4; t++) begin
      dphi  = {$urandom, $urandom} & ((W'(1) << (W - t * 4)) - 1);
      en    = 1;
      model = phase;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        s     = {1'b0, model} + {1'b0, dphi};
        model = s[W-1:0];
        check(phase == model, $sformatf("phase step %0d", i));
        check(wrap == s[W], "wrap flag");
      end
    end
    // frequency: 100 kHz at 250 MHz -> dphi = round(1e5/2.5e8 * 2^48)
    dphi  = 48'd112589990684;
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(phase == 0 && !wrap, "clear");
    wraps = 0;
    for (int i = 0; i < 25000; i++) begin
      @(negedge clk);
      if (wrap) wraps++;
    end
    // 25000 clocks = 100 us = 10 periods of 100 kHz; exact: floor(25000*dphi/2^48)
    check(wraps == longint'((64'd25000 * 64'd112589990684) >> 48), $sformatf("wrap count %0d", wraps));
    check(wraps == 9 || wraps == 10, "about ten periods in 100 us");
    // hold when disabled
    en    = 0;
    model = phase;
    repeat (10) @(negedge clk);
    check(phase == model && !wrap, "hold while disabled");
    // pipelined 64-bit accumulator: model state after each edge, compared 5 late
    begin
      logic [64:0] s2;
      logic [63:0] a;
      int nwrap;
      a = '0;
      nwrap = 0;
      for (int j = 0; j < 3000; j++) begin
        // outputs after edge j
        if (j >= 5 && m64.size() > 5) begin
          check(phase2 == m64[m64.size() - 6], $sformatf("64-bit phase at %0d", j));
          check(wrap2 == w64[w64.size() - 6], $sformatf("64-bit wrap at %0d", j));
          if (wrap2) nwrap++;
        end
        // inputs for edge j+1
        dphi2  = (j % 7 == 0) ? {$urandom, $urandom} : {$urandom, $urandom} >> ($urandom % 64);
        en2    = ($urandom % 10) != 0;
        clear2 = ($urandom % 500) == 0;
        if (clear2) begin
          a = '0; s2 = '0;
        end else if (en2) begin
          s2 = {1'b0, a} + {1'b0, dphi2};
          a  = s2[63:0];
        end else begin
          s2 = {1'b0, a};
        end
        m64.push_back(a);
        w64.push_back(s2[64] && en2 && !clear2);
        @(negedge clk);
      end
      check(nwrap > 10, "64-bit wraps seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
