// sine_lut: phase-to-amplitude conversion of the DDS, with amplitude scaling.
//
// The top LUT_ADDR_W bits of the DDS phase address a sine table. Only a
// quarter wave is stored (2^(LUT_ADDR_W-2) words); the other quadrants are made
// by mirroring the address and negating the value. Entry i holds
// round((2^(SAMPLE_W-1)-1) * sin(pi/2 * (i+0.5) / 2^(LUT_ADDR_W-2))); the
// half-step offset makes the four quadrants exact mirrors. The table is
// computed at elaboration with an integer Taylor series (Q30 fixed point), so
// no data file is needed. The table value is then multiplied by the unsigned
// amplitude word: sample = (table * amp) >>> AMP_W, i.e. amp = 2^AMP_W would be
// unity gain.
//
// Timing: two register stages, so 'sample' belongs to the phase presented two
// clocks earlier. The sine table itself follows the platform description; its
// size, the quarter-wave folding and the amplitude multiplier are this design's
// choices (the amplitude being a control the loop software sets).
module sine_lut #(
  parameter int unsigned LUT_ADDR_W = mems_pkg::LUT_ADDR_W,
  parameter int unsigned SAMPLE_W   = mems_pkg::SAMPLE_W,
  parameter int unsigned AMP_W      = mems_pkg::AMP_W
) (
  input  logic                       clk,
  input  logic [LUT_ADDR_W-1:0]      phase,
  input  logic [AMP_W-1:0]           amp,
  output logic signed [SAMPLE_W-1:0] sample
);

  localparam int unsigned QA    = LUT_ADDR_W - 2;
  localparam int unsigned QSIZE = 1 << QA;

  typedef logic signed [SAMPLE_W-1:0] rom_t [QSIZE];

  // sin(x) for x in Q30, by Taylor series to the x^13 term
  function automatic longint sin_q30(input longint x);
    longint term, s;
    term = x;
    s    = x;
    for (int k = 1; k <= 6; k++) begin
      term = (term * x) >>> 30;
      term = (term * x) >>> 30;
      term = -(term / longint'((2 * k) * (2 * k + 1)));
      s    = s + term;
    end
    return s;
  endfunction

  function automatic rom_t build_rom();
    rom_t   r;
    longint x, full;
    full = (longint'(1) << (SAMPLE_W - 1)) - 1;
    for (int i = 0; i < int'(QSIZE); i++) begin
      // pi/2 in Q30 is 1686629713
      x    = (longint'(2 * i + 1) * 64'sd1686629713) / longint'(2 * QSIZE);
      r[i] = SAMPLE_W'((sin_q30(x) * full + (longint'(1) << 29)) >>> 30);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  // stage 1: quadrant folding and table read
  logic [1:0]                quad;
  logic [QA-1:0]             idx;
  logic signed [SAMPLE_W-1:0] mag_q;
  logic                      neg_q;
  logic [AMP_W-1:0]          amp_q;

  assign quad = phase[LUT_ADDR_W-1 -: 2];
  assign idx  = quad[0] ? ~phase[QA-1:0] : phase[QA-1:0];

  always_ff @(posedge clk) begin
    mag_q <= ROM[idx];
    neg_q <= quad[1];
    amp_q <= amp;
  end

  // stage 2: sign and amplitude
  logic signed [SAMPLE_W-1:0]       val;
  logic signed [SAMPLE_W+AMP_W:0]   prod;
  assign val  = neg_q ? -mag_q : mag_q;
  assign prod = val * $signed({1'b0, amp_q});

  always_ff @(posedge clk) begin
    sample <= prod[SAMPLE_W+AMP_W-1:AMP_W];
  end

endmodule
