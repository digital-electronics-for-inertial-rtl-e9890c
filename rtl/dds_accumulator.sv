// dds_accumulator: phase accumulator of a direct digital synthesizer.
//
// Each enabled system clock the phase advances by the increment dphi, modulo
// 2^PHASE_W, so the output frequency is f_clk * dphi / 2^PHASE_W. With the
// default 48 bits at 250 MHz the frequency step is 0.89 uHz. A period of the
// synthesized signal is complete when the adder carries out; 'wrap' pulses for
// that clock. 'clear' forces the phase to zero so that several accumulators can
// be restarted together and stay phase coherent.
//
// For wide accumulators (64 bits, 10 pHz step) the adder can be split into
// LAT segments so that each clock only has a short carry chain: segment s adds
// its slice of dphi plus the carry segment s-1 produced one clock earlier.
// The inputs of segment s are delayed s clocks and its result LAT-1-s clocks,
// so the output is the exact accumulator value, LAT-1 clocks late. That fixed
// delay is a constant phase offset for the rest of the system.
//
// Timing: phase and wrap are registered. With LAT = 1 (default),
// phase(n+1) = phase(n) + dphi; with LAT > 1 every input (en, clear, dphi)
// acts LAT-1 clocks later on the outputs. The widths, the carry-out period
// marker and the segmented wide option follow the platform description; the
// segment split and reset to zero are this design's choices.
module dds_accumulator #(
  parameter int unsigned PHASE_W = mems_pkg::PHASE_W,
  parameter int unsigned LAT     = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               en,
  input  logic [PHASE_W-1:0] dphi,
  output logic [PHASE_W-1:0] phase,
  output logic               wrap
);

  localparam int unsigned SEG_W = (PHASE_W + LAT - 1) / LAT;

  if (LAT < 1 || LAT > PHASE_W || SEG_W * (LAT - 1) >= PHASE_W) begin : g_bad_lat
    $error("dds_accumulator: LAT must split PHASE_W into LAT non-empty segments");
  end

  logic [LAT-1:0] carry;

  for (genvar s = 0; s < int'(LAT); s++) begin : g_seg
    localparam int unsigned LO = s * SEG_W;
    localparam int unsigned W  = (LO + SEG_W <= PHASE_W) ? SEG_W : PHASE_W - LO;

    // inputs delayed s clocks (index 0 = undelayed)
    logic [W-1:0] d_dl [s+1];
    logic         en_dl [s+1];
    logic         clr_dl [s+1];
    assign d_dl[0]   = dphi[LO +: W];
    assign en_dl[0]  = en;
    assign clr_dl[0] = clear;
    for (genvar k = 1; k <= s; k++) begin : g_in
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          d_dl[k]   <= '0;
          en_dl[k]  <= 1'b0;
          clr_dl[k] <= 1'b0;
        end else begin
          d_dl[k]   <= d_dl[k-1];
          en_dl[k]  <= en_dl[k-1];
          clr_dl[k] <= clr_dl[k-1];
        end
      end
    end

    logic [W-1:0] acc;
    logic         cin;
    logic [W:0]   sum;
    if (s == 0) begin : g_c0
      assign cin = 1'b0;
    end else begin : g_cn
      assign cin = carry[s-1];
    end
    assign sum = {1'b0, acc} + {1'b0, d_dl[s]} + (W+1)'(cin);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc      <= '0;
        carry[s] <= 1'b0;
      end else if (clr_dl[s]) begin
        acc      <= '0;
        carry[s] <= 1'b0;
      end else if (en_dl[s]) begin
        acc      <= sum[W-1:0];
        carry[s] <= sum[W];
      end else begin
        acc      <= acc + W'(cin);   // a carry still in flight is not lost
        carry[s] <= 1'b0;
      end
    end

    // result delayed LAT-1-s clocks so all segments line up
    logic [W-1:0] q_dl [LAT-s];
    assign q_dl[0] = acc;
    for (genvar k = 1; k < int'(LAT) - s; k++) begin : g_out
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q_dl[k] <= '0;
        else        q_dl[k] <= q_dl[k-1];
      end
    end
    assign phase[LO +: W] = q_dl[LAT-1-s];
  end

  assign wrap = carry[LAT-1];

endmodule
