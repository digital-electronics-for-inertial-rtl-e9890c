// mems_pkg: types and constants shared by the resonator drive and measurement IP.
//
// The sizes follow the platform description where it gives them: a 48-bit DDS
// phase accumulator clocked at 250 MHz, 32 phase bits kept for timestamps, eight
// sub-clock slots per system clock period, four DDS and four TDC per resonator
// manager and three resonator managers per FPGA. The register-bus bundle, the
// timestamp record layout and the LUT/sample widths are this design's own choices.
package mems_pkg;

  localparam int unsigned PHASE_W    = 48;  // DDS phase accumulator width
  localparam int unsigned DDS_LAT    = 1;   // accumulator segments (6 for 64 bits)
  localparam int unsigned TS_PHASE_W = 32;  // phase bits kept in a timestamp
  localparam int unsigned N_SUB      = 8;   // sub-clock slots per system clock
  localparam int unsigned FRAC_W     = 3;   // log2(N_SUB)
  localparam int unsigned SAMPLE_W   = 16;  // sine sample / sigma-delta input width
  localparam int unsigned AMP_W      = 16;  // amplitude word width
  localparam int unsigned LUT_ADDR_W = 12;  // phase bits entering the sine LUT

  // CPU register bus request (single-cycle, word addressed)
  typedef struct packed {
    logic [9:0]  addr;
    logic [31:0] wdata;
    logic        we;
    logic        re;
  } reg_req_t;

  // One TDC timestamp: phase of DDS 0 at the start of the system clock period
  // in which the comparator changed, plus the sub-clock slot within that period.
  typedef struct packed {
    logic                    rising;  // 1: comparator went 0->1
    logic [TS_PHASE_W-1:0]   phase;
    logic [FRAC_W-1:0]       frac;
  } ts_t;

  localparam int unsigned TS_W = $bits(ts_t);

endpackage
