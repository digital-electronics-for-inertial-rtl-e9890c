// tb_uart: runs the UART with a 16-clock bit time, tx looped back to rx.
// Checks the transmitted waveform bit by bit against the 8N1 frame computed
// here (start, data LSB first, stop, each exactly 16 clocks), that the looped
// byte is received, the busy/valid flags, the overrun flag when a byte is not
// read in time and its clearing, and reception of a frame driven directly by
// the testbench.
module tb_uart;
  import mems_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [31:0] rdata;
  logic rx, tx;
  logic loop = 1, rx_tb = 1;
  int checks = 0, failures = 0;

  uart #(.DIV_RESET(DIV)) dut (.*);

  assign rx = loop ? tx : rx_tb;

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int d);
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

  task automatic send_and_watch(input logic [7:0] b);
    logic [9:0] frame;
    int t0;
    frame = {1'b1, b, 1'b0};
    wr(0, b);
    // find the start bit
    t0 = 0;
    while (tx == 1 && t0 < 100) begin @(negedge clk); t0++; end
    check(t0 < 100, "start bit appears");
    for (int bit_i = 0; bit_i < 10; bit_i++) begin
      for (int c = 0; c < DIV; c++) begin
        check(tx == frame[bit_i], $sformatf("tx bit %0d clock %0d of byte %h", bit_i, c, b));
        @(negedge clk);
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] bytes[4] = '{8'hA5, 8'h3C, 8'h00, 8'hFF};
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(2, d);
    check(d == DIV, "divisor reset value");
    foreach (bytes[i]) begin
      send_and_watch(bytes[i]);
      repeat (DIV) @(negedge clk);
      rd(1, d);
      check(d[0] == 1 && d[1] == 0 && d[2] == 0, $sformatf("status after byte %0d: %b", i, d[2:0]));
      rd(0, d);
      check(d[7:0] == bytes[i], $sformatf("loopback byte %h got %h", bytes[i], d[7:0]));
      rd(1, d);
      check(d[0] == 0, "valid cleared by read");
    end
    // overrun: two bytes without reading
    send_and_watch(8'h11);
    send_and_watch(8'h22);
    repeat (DIV) @(negedge clk);
    rd(1, d);
    check(d[2] == 1, "overrun flagged");
    rd(0, d);
    check(d[7:0] == 8'h22, "newest byte kept");
    wr(1, 0);
    rd(1, d);
    check(d[2] == 0, "overrun cleared");
    // frame from the host, divisor changed to 24
    wr(2, 24);
    loop = 0;
    begin
      logic [9:0] f = {1'b1, 8'h5A, 1'b0};
      for (int b = 0; b < 10; b++) begin
        rx_tb = f[b];
        repeat (24) @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);
    rd(0, d);
    check(d[7:0] == 8'h5A, $sformatf("host byte got %h", d[7:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
