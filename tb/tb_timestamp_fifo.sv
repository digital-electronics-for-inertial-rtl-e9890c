// tb_timestamp_fifo: random pushes and pops against a queue model; checks
// order, empty/full/count, that a push into a full buffer is dropped and sets
// the sticky overflow flag, and that clr_ovf clears it.
module tb_timestamp_fifo;
  localparam int W = 36, D = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, clr_ovf = 0;
  logic [W-1:0] din, dout;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  bit ovf_model;
  int ovf_events;

  timestamp_fifo #(.W(W), .DEPTH(D)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // check state
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || count != q.size() ||
          (q.size() > 0 && dout != q[0]) || overflow != ovf_model) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d: size %0d count %0d dout %h", i, q.size(), count, dout);
      end
      // new stimulus; push-heavy in the first phase to reach overflow
      pp   = (i / 2000) % 2 == 0 ? 70 : 30;
      push = ($urandom % 100) < pp;
      pop  = ($urandom % 100) < 50;
      clr_ovf = ($urandom % 100) < 2;
      din  = {4'($urandom), $urandom};
      // model (applied at the coming edge)
      @(posedge clk);
      #0.1;
      begin
        bit dp, dq;
        dq = pop && q.size() > 0;
        dp = push && (q.size() < D || dq);
        if (dq) void'(q.pop_front());
        if (dp) q.push_back(din);
        if (push && !dp) begin
          ovf_model = 1;
          ovf_events++;
        end else if (clr_ovf) ovf_model = 0;
      end
    end
    checks++;
    if (ovf_events == 0) begin
      failures++;
      $display("FAIL overflow never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
