// cycle_sequencer: delimits the measurement cycles of a resonator channel.
//
// A measurement cycle spans exactly Q periods of the resonator synthesizer and
// P periods of the phase-coherent reference synthesizer (P x Tref = Q x T). The
// sequencer counts the period ends ('wrap' pulses) of the resonator DDS and
// pulses 'cycle_end' on the Q-th one. Over the same cycle it counts the
// reference DDS periods; that count is published as 'p_count' at the cycle end,
// so software can confirm the P/Q ratio it programmed. 'cycle_no' counts the
// completed cycles (wrapping). 'clear' restarts the cycle with the accumulators.
//
// Timing: cycle_end is registered, one clock after the wrap that ends the
// cycle. A reference wrap on the same clock as the closing resonator wrap is
// counted in the ending cycle. q_periods = 0 is treated as 1. The cycle
// definition follows the platform description; making the boundary from the
// resonator DDS wraps is this design's choice.
module cycle_sequencer #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [CNT_W-1:0] q_periods,
  input  logic             wrap_res,
  input  logic             wrap_ref,
  output logic             cycle_end,
  output logic [CNT_W-1:0] p_count,
  output logic [CNT_W-1:0] cycle_no
);

  logic [CNT_W-1:0] q_cnt, p_cnt, p_next;
  logic             last;

  assign p_next = p_cnt + CNT_W'(wrap_ref);
  assign last   = wrap_res && (q_cnt + 1'b1 >= q_periods);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt     <= '0;
      p_cnt     <= '0;
      p_count   <= '0;
      cycle_no  <= '0;
      cycle_end <= 1'b0;
    end else if (clear) begin
      q_cnt     <= '0;
      p_cnt     <= '0;
      cycle_end <= 1'b0;
    end else begin
      cycle_end <= last;
      if (last) begin
        q_cnt    <= '0;
        p_cnt    <= '0;
        p_count  <= p_next;
        cycle_no <= cycle_no + 1'b1;
      end else begin
        if (wrap_res) q_cnt <= q_cnt + 1'b1;
        p_cnt <= p_next;
      end
    end
  end

endmodule
