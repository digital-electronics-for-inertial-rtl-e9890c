// sigma_delta_mod: one-bit sigma-delta modulator, first or second order.
//
// Turns a multibit sine sample into a two-level stream whose low-frequency
// content equals the input, so that a passive RC filter recovers the sine and
// no multibit DAC is needed. The loop is the textbook one: the quantizer is
// the sign of the last integrator and feeds back +FS or -FS, FS = 2^(IN_W-1).
//   first order : v1 += x - fb;              q = (v1 >= 0)
//   second order: v1 += x - fb; v2 += v1 - fb; q = (v2 >= 0)
// (fb is the level of the previous output bit). 'order2' selects the loop at run
// time and clears nothing; the second-order loop is stable for |x| below about
// 0.7 FS. q and qn are complementary registered outputs for a differential pair.
//
// Timing: one output bit per clock; q(n) reflects the integrator state after
// sample n-1. The two loop orders and the complementary outputs follow the
// platform description; the run-time order select, the feedback level and the
// integrator widths are this design's choices.
module sigma_delta_mod #(
  parameter int unsigned IN_W = mems_pkg::SAMPLE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   order2,
  input  logic signed [IN_W-1:0] x,
  output logic                   q,
  output logic                   qn
);

  localparam int unsigned V1_W = IN_W + 3;
  localparam int unsigned V2_W = IN_W + 6;

  logic signed [V1_W-1:0] v1, v1_n;
  logic signed [V2_W-1:0] v2, v2_n;
  logic signed [V1_W-1:0] fb;
  logic                   q_n;

  assign fb = q ? V1_W'(signed'(1 << (IN_W - 1))) : -V1_W'(signed'(1 << (IN_W - 1)));

  always_comb begin
    v1_n = v1 + V1_W'(x) - fb;
    if (order2) begin
      v2_n = v2 + V2_W'(v1_n) - V2_W'(fb);
      q_n  = ~v2_n[V2_W-1];
    end else begin
      v2_n = '0;
      q_n  = ~v1_n[V1_W-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0;
      v2 <= '0;
      q  <= 1'b0;
      qn <= 1'b1;
    end else begin
      v1 <= v1_n;
      v2 <= v2_n;
      q  <= q_n;
      qn <= ~q_n;
    end
  end

endmodule
