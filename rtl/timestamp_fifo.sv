// timestamp_fifo: synchronous first-in first-out buffer for TDC timestamps.
//
// Holds the timestamps of a measurement cycle until the CPU reads them. 'dout'
// shows the oldest entry while 'empty' is low; 'pop' removes it. A push into a
// full buffer is dropped and sets the sticky 'overflow' flag, which 'clr_ovf'
// clears. Push and pop in the same clock are both honoured.
//
// Timing: one clock from push to the entry being visible. The buffer, its
// depth and the overflow rule are this design's choices.
module timestamp_fifo #(
  parameter int unsigned W     = mems_pkg::TS_W,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  input  logic         clr_ovf,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
      else if (clr_ovf)     overflow <= 1'b0;
    end
  end

  // a pop of an empty buffer is a software error: it is ignored
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) do_pop |-> count != 0);

endmodule
