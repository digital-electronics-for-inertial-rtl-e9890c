// subclock_sampler: samples an asynchronous event eight times per system clock.
//
// Four copies of the system clock, shifted by 0, 45, 90 and 135 degrees, are
// used on both edges: the rising edges give slots 0..3 and the falling edges
// slots 4..7 of each system clock period, so the effective sampling clock is
// eight times the system clock (2 GHz for a 250 MHz system clock) although no
// logic runs faster than the system clock. Each first-stage flop is followed by
// a register on the 0-degree clock: at system clock edge n+1 all eight samples
// taken in period n (at n + i/8) are gathered, and one more register makes
// 'samp' stable for a whole period.
//
// Interface: clk_ph[k] is the clock at k*45 degrees, clk_ph[0] is the system
// clock. samp[i] is the event level at slot i; samp changes two system clocks
// after the period it describes. The eight-slot phase tree follows the platform
// description; the retiming stages are this design's choice. Slot 7 is retimed
// one eighth of a period after it was sampled, which the FPGA placement has to
// allow.
module subclock_sampler (
  input  logic [3:0] clk_ph,
  input  logic       rst_n,
  input  logic       ev,
  output logic [7:0] samp
);

  logic [3:0] s_rise, s_fall;
  logic [7:0] gather;

  for (genvar k = 0; k < 4; k++) begin : g_ph
    logic r, f;
    always_ff @(posedge clk_ph[k] or negedge rst_n) begin
      if (!rst_n) r <= 1'b0;
      else        r <= ev;
    end
    always_ff @(negedge clk_ph[k] or negedge rst_n) begin
      if (!rst_n) f <= 1'b0;
      else        f <= ev;
    end
    assign s_rise[k] = r;
    assign s_fall[k] = f;
  end

  always_ff @(posedge clk_ph[0] or negedge rst_n) begin
    if (!rst_n) begin
      gather <= '0;
      samp   <= '0;
    end else begin
      gather <= {s_fall, s_rise};
      samp   <= gather;
    end
  end

endmodule
