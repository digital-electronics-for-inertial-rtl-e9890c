// tdc_capture: time-to-digital conversion of comparator events.
//
// Input 'samp' holds the comparator level at the eight sub-clock slots of one
// system clock period n (bit i at n + i/8), as delivered by subclock_sampler two
// clocks after that period. The DDS phase is delayed by the same two clocks so
// that each slot vector meets the phase the accumulator held during its period.
// The nine-bit sequence {samp, last slot of the previous period} is searched
// for its first level change. A change between slot i and slot i+1 is dated
// n + i/8: the timestamp is the phase of period n plus the 3-bit fraction i
// (so an event between slots 5 and 6 reads n+5/8). A change between slot 7 of
// the previous period and slot 0 is dated (n-1) + 7/8. Only the first change in
// a period is reported; the comparator is assumed to have hysteresis.
//
// Interface: 'phase' is the top TS_PHASE_W bits of the DDS accumulator output.
// 'ts_valid' pulses for one clock with 'ts' = {rising, phase, frac}, three
// clocks after the period in which the event happened. The phase-plus-fraction
// timestamp follows the platform description; recording both edge polarities
// and the first-change rule are this design's choices.
module tdc_capture
  import mems_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [7:0]            samp,
  input  logic [TS_PHASE_W-1:0] phase,
  output logic                  ts_valid,
  output ts_t                   ts
);

  logic [TS_PHASE_W-1:0] ph_d1, ph_d2, ph_d3;
  logic                  last7;
  logic [8:0]            seq;
  logic                  found;
  logic [3:0]            pos;

  assign seq = {samp, last7};

  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int j = 8; j >= 1; j--) begin
      if (seq[j] != seq[j-1]) begin
        found = 1'b1;
        pos   = 4'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_d1    <= '0;
      ph_d2    <= '0;
      ph_d3    <= '0;
      last7    <= 1'b0;
      ts_valid <= 1'b0;
      ts       <= '0;
    end else begin
      ph_d1    <= phase;
      ph_d2    <= ph_d1;
      ph_d3    <= ph_d2;
      last7    <= samp[7];
      ts_valid <= en && found;
      if (found) begin
        ts.rising <= seq[pos];
        if (pos == 4'd1) begin
          ts.phase <= ph_d3;
          ts.frac  <= 3'd7;
        end else begin
          ts.phase <= ph_d2;
          ts.frac  <= 3'(pos - 4'd2);
        end
      end
    end
  end

endmodule
