// resonator_manager: drive and measurement IP for one resonant sensor.
//
// N_DDS phase-coherent synthesizers each run a chain DDS accumulator -> sine
// LUT -> one-bit sigma-delta modulator, whose complementary bitstreams leave
// the FPGA and, after an RC low-pass filter, excite the resonator (DDS 0) or
// serve as the reference sine the comparators compare against (DDS 1). N_TDC
// time-to-digital channels sample comparator outputs on the eight-slot
// sub-clock tree and timestamp every change with the upper 32 bits of DDS 0's
// phase plus the 3-bit slot fraction; timestamps queue in a FIFO per channel.
// The cycle sequencer ends a measurement cycle every Q periods of DDS 0 and
// reports how many periods of DDS 1 (P) it contained. Demodulation, the PLL and
// decimation run as software on the CPU, which steers the DDS through these
// registers once per cycle.
//
// Coherence: new phase increments are written to shadow registers and copied
// into all accumulators together at the end of a cycle (or at once with
// CTRL.apply), and CTRL.clear zeroes every accumulator in the same clock.
//
// Registers (word address req.addr[7:0]; read data one clock after req.re):
//   0x00 CTRL      [0] run  [1] clear (pulse)  [2] apply (pulse)
//                  [7:4] second-order sigma-delta per DDS  [11:8] TDC enable
//   0x01 STATUS    [3:0] timestamp FIFO not empty  [7:4] FIFO overflow;
//                  write 1 to [7:4] clears overflow
//   0x02 CYCLE_Q   [15:0] resonator periods per cycle (Q)
//   0x03 CYCLE     [31:16] completed cycles  [15:0] reference periods (P) in
//                  the last cycle
//   0x10+4i        DDS i: +0 increment [31:0], +1 increment [47:32],
//                  +2 amplitude [15:0], +3 phase [47:16] (read only)
//   0x40+2j        TDC j: +0 peek {not_empty, overflow, 25'b0, rising, frac}
//                  +1 timestamp phase; reading it removes the entry
// The DDS/LUT/sigma-delta/TDC chain, the counts of four DDS and four TDC, the
// 32 phase bits and the P/Q cycle follow the platform description; the
// register map, the shadow update and the FIFOs are this design's choices.
module resonator_manager
  import mems_pkg::*;
#(
  parameter int unsigned N_DDS      = 4,
  parameter int unsigned N_TDC      = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic [3:0]        clk_ph,
  input  logic              rst_n,
  input  reg_req_t          req,
  output logic [31:0]       rdata,
  output logic              cycle_irq,
  input  logic [N_TDC-1:0]  comp,
  output logic [N_DDS-1:0]  sd_q,
  output logic [N_DDS-1:0]  sd_qn
);

  // the CTRL and STATUS fields hold four DDS and four TDC
  if (N_DDS < 2 || N_DDS > 4 || N_TDC < 1 || N_TDC > 4) begin : g_bad_size
    $error("resonator_manager: N_DDS must be 2..4 and N_TDC 1..4");
  end

  // ---------------- control registers ----------------
  logic               run;
  logic [N_DDS-1:0]   order2;
  logic [N_TDC-1:0]   tdc_en;
  logic [15:0]        q_periods;
  logic               clear, apply;
  logic [PHASE_W-1:0] dphi_sh  [N_DDS];
  logic [PHASE_W-1:0] dphi_act [N_DDS];
  logic [AMP_W-1:0]   amp      [N_DDS];

  logic [PHASE_W-1:0] phase [N_DDS];
  logic [N_DDS-1:0]   wrap;
  logic               cycle_end;
  logic [15:0]        p_count, cycle_no;

  logic [N_TDC-1:0]   f_empty, f_full, f_ovf, f_pop, f_clr;
  logic [TS_W-1:0]    f_dout [N_TDC];

  logic [7:0] a;
  assign a = req.addr[7:0];

  assign clear = req.we && a == 8'h00 && req.wdata[1];
  assign apply = req.we && a == 8'h00 && req.wdata[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      order2    <= '0;
      tdc_en    <= '0;
      q_periods <= 16'd1;
      for (int i = 0; i < int'(N_DDS); i++) begin
        dphi_sh[i]  <= '0;
        dphi_act[i] <= '0;
        amp[i]      <= '0;
      end
    end else begin
      if (req.we) begin
        if (a == 8'h00) begin
          run    <= req.wdata[0];
          order2 <= req.wdata[4 +: N_DDS];
          tdc_en <= req.wdata[8 +: N_TDC];
        end
        if (a == 8'h02) q_periods <= req.wdata[15:0];
        for (int i = 0; i < int'(N_DDS); i++) begin
          if (a == 8'(8'h10 + 4 * i)) dphi_sh[i][31:0]         <= req.wdata;
          if (a == 8'(8'h11 + 4 * i)) dphi_sh[i][PHASE_W-1:32] <= req.wdata[PHASE_W-33:0];
          if (a == 8'(8'h12 + 4 * i)) amp[i]                   <= req.wdata[AMP_W-1:0];
        end
      end
      if (cycle_end || apply) begin
        for (int i = 0; i < int'(N_DDS); i++) dphi_act[i] <= dphi_sh[i];
      end
    end
  end

  // ---------------- synthesizers ----------------
  for (genvar i = 0; i < int'(N_DDS); i++) begin : g_dds
    logic signed [SAMPLE_W-1:0] sample;

    dds_accumulator #(.PHASE_W(PHASE_W), .LAT(DDS_LAT)) u_acc (
      .clk, .rst_n, .clear, .en(run), .dphi(dphi_act[i]),
      .phase(phase[i]), .wrap(wrap[i])
    );

    sine_lut u_lut (
      .clk, .phase(phase[i][PHASE_W-1 -: LUT_ADDR_W]), .amp(amp[i]), .sample
    );

    sigma_delta_mod u_sd (
      .clk, .rst_n, .order2(order2[i]), .x(sample), .q(sd_q[i]), .qn(sd_qn[i])
    );
  end

  cycle_sequencer #(.CNT_W(16)) u_seq (
    .clk, .rst_n, .clear, .q_periods,
    .wrap_res(wrap[0]), .wrap_ref(wrap[1]),
    .cycle_end, .p_count, .cycle_no
  );
  assign cycle_irq = cycle_end;

  // ---------------- time to digital converters ----------------
  for (genvar j = 0; j < int'(N_TDC); j++) begin : g_tdc
    logic [7:0] samp;
    logic       ts_valid;
    ts_t        ts;

    subclock_sampler u_smp (.clk_ph, .rst_n, .ev(comp[j]), .samp);

    tdc_capture u_tdc (
      .clk, .rst_n, .en(tdc_en[j]), .samp,
      .phase(phase[0][PHASE_W-1 -: TS_PHASE_W]), .ts_valid, .ts
    );

    timestamp_fifo #(.W(TS_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(ts_valid), .din(ts), .pop(f_pop[j]), .clr_ovf(f_clr[j]),
      .dout(f_dout[j]), .empty(f_empty[j]), .full(f_full[j]), .overflow(f_ovf[j]),
      .count()
    );

    assign f_pop[j] = req.re && a == 8'(8'h41 + 2 * j);
    assign f_clr[j] = req.we && a == 8'h01 && req.wdata[4 + j];
  end

  // ---------------- read back ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.re) begin
      rdata <= '0;
      if (a == 8'h00) begin
        rdata[0]            <= run;
        rdata[4 +: N_DDS]   <= order2;
        rdata[8 +: N_TDC]   <= tdc_en;
      end
      if (a == 8'h01) begin
        rdata[0 +: N_TDC] <= ~f_empty;
        rdata[4 +: N_TDC] <= f_ovf;
      end
      if (a == 8'h02) rdata <= {16'd0, q_periods};
      if (a == 8'h03) rdata <= {cycle_no, p_count};
      for (int i = 0; i < int'(N_DDS); i++) begin
        if (a == 8'(8'h10 + 4 * i)) rdata <= dphi_sh[i][31:0];
        if (a == 8'(8'h11 + 4 * i)) rdata <= 32'(dphi_sh[i][PHASE_W-1:32]);
        if (a == 8'(8'h12 + 4 * i)) rdata <= 32'(amp[i]);
        if (a == 8'(8'h13 + 4 * i)) rdata <= phase[i][PHASE_W-1 -: 32];
      end
      for (int j = 0; j < int'(N_TDC); j++) begin
        if (a == 8'(8'h40 + 2 * j))
          rdata <= {~f_empty[j], f_ovf[j], 26'd0, f_dout[j][TS_W-1], f_dout[j][FRAC_W-1:0]};
        if (a == 8'(8'h41 + 2 * j))
          rdata <= f_dout[j][FRAC_W +: TS_PHASE_W];
      end
    end
  end

endmodule
