// mems_platform_top: all-digital drive and read-out platform for resonant MEMS.
//
// Three resonator managers (one per resonator, e.g. three vibrating-beam
// accelerometers or the drive and sense loops of gyroscopes) share the system
// clock and its sub-clock phases. Each drives its sensor through sigma-delta
// bitstreams and reads it back through comparators and time-to-digital
// conversion, so that no ADC or DAC is used. The CPU that runs demodulation,
// the phase-locked loop and decimation, and the clock manager that makes the
// four clock phases, are outside this RTL: the CPU's register bus and the four
// clocks are ports. A UART on the same bus carries configuration from, and
// data frames to, the host.
//
// Bus: bus_addr[9:8] selects resonator manager 0..2 (value 3: the UART);
// bus_addr[7:0] is the register inside it. Writes take effect at the clock
// edge; read data appears on bus_rdata one clock after bus_re. A clock may
// carry a read or a write, not both (checked by an assertion).
// The three managers and the shared clock follow the platform description; the
// address map is this design's choice.
module mems_platform_top
  import mems_pkg::*;
#(
  parameter int unsigned N_RES = 3
) (
  input  logic [3:0]       clk_ph,
  input  logic             rst_n,
  input  logic [9:0]       bus_addr,
  input  logic [31:0]      bus_wdata,
  input  logic             bus_we,
  input  logic             bus_re,
  output logic [31:0]      bus_rdata,
  output logic [N_RES-1:0] cycle_irq,
  input  logic [3:0]       comp  [N_RES],
  output logic [3:0]       sd_q  [N_RES],
  output logic [3:0]       sd_qn [N_RES],
  input  logic             uart_rx,
  output logic             uart_tx
);

  logic        clk;
  logic [1:0]  sel_q;
  logic [31:0] rd_res [N_RES];
  logic [31:0] rd_uart;
  reg_req_t    req_res [N_RES];
  reg_req_t    req_uart;

  assign clk = clk_ph[0];

  if (N_RES < 1 || N_RES > 3) begin : g_bad_size
    $error("mems_platform_top: N_RES must be 1..3");
  end

  for (genvar r = 0; r < int'(N_RES); r++) begin : g_res
    always_comb begin
      req_res[r].addr  = bus_addr;
      req_res[r].wdata = bus_wdata;
      req_res[r].we    = bus_we && bus_addr[9:8] == 2'(r);
      req_res[r].re    = bus_re && bus_addr[9:8] == 2'(r);
    end

    resonator_manager u_res (
      .clk, .clk_ph, .rst_n, .req(req_res[r]), .rdata(rd_res[r]),
      .cycle_irq(cycle_irq[r]), .comp(comp[r]), .sd_q(sd_q[r]), .sd_qn(sd_qn[r])
    );
  end

  always_comb begin
    req_uart.addr  = bus_addr;
    req_uart.wdata = bus_wdata;
    req_uart.we    = bus_we && bus_addr[9:8] == 2'd3;
    req_uart.re    = bus_re && bus_addr[9:8] == 2'd3;
  end

  uart u_uart (
    .clk, .rst_n, .req(req_uart), .rdata(rd_uart), .rx(uart_rx), .tx(uart_tx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel_q <= '0;
    else if (bus_re) sel_q <= bus_addr[9:8];
  end

  // the bus carries one access per clock: a read or a write, not both
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re));

  always_comb begin
    bus_rdata = rd_uart;
    for (int r = 0; r < int'(N_RES); r++) begin
      if (sel_q == 2'(r)) bus_rdata = rd_res[r];
    end
  end

endmodule
