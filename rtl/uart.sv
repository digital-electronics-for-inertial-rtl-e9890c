// uart: bidirectional serial link between the CPU and the host computer.
//
// The host sends configuration (cycle P/Q ratio, loop coefficients, ...) and
// receives the data frames. Frames are 8N1: start bit, eight data bits LSB
// first, one stop bit, each bit 'div' system clocks long. The receiver
// synchronises 'rx' with two flops, waits half a bit after the falling edge of
// the start bit, re-checks it, then samples the middle of every bit; a byte
// whose stop bit is low is dropped.
//
// Registers (req.addr[1:0], 32-bit words, read data one clock after req.re):
//   0 DATA   write: send wdata[7:0] (ignored while busy); read: received byte,
//            clears rx_valid
//   1 STATUS read: {rx_overrun, tx_busy, rx_valid}; write: clears rx_overrun
//   2 DIV    clocks per bit, reset value DIV_RESET (115200 baud at 250 MHz)
// The link itself follows the platform description; the frame format, the
// registers and the baud rate are this design's choices.
module uart
  import mems_pkg::*;
#(
  parameter int unsigned DIV_RESET = 2170
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    req,
  output logic [31:0] rdata,
  input  logic        rx,
  output logic        tx
);

  logic [15:0] div;

  // ---------------- transmitter ----------------
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;

  assign tx_busy = (tx_bits != 0);

  // ---------------- receiver -------------------
  logic [2:0]  rx_sync;
  logic        rx_s;
  logic        rx_act;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_sh;
  logic        rx_done;
  logic [7:0]  rx_data;
  logic        rx_valid, rx_overrun;

  assign rx_s = rx_sync[2];
  assign rx_done = rx_act && rx_bits == 4'd9 && rx_cnt == div - 1'b1 && rx_s;

  logic wr_data, rd_data, wr_stat, wr_div;
  assign wr_data = req.we && req.addr[1:0] == 2'd0;
  assign rd_data = req.re && req.addr[1:0] == 2'd0;
  assign wr_stat = req.we && req.addr[1:0] == 2'd1;
  assign wr_div  = req.we && req.addr[1:0] == 2'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= 16'(DIV_RESET);
      tx_sh      <= '1;
      tx_bits    <= '0;
      tx_cnt     <= '0;
      tx         <= 1'b1;
      rx_sync    <= '1;
      rx_act     <= 1'b0;
      rx_bits    <= '0;
      rx_cnt     <= '0;
      rx_sh      <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
      rdata      <= '0;
    end else begin
      if (wr_div) div <= req.wdata[15:0];

      // transmit
      if (!tx_busy) begin
        tx <= 1'b1;
        if (wr_data) begin
          tx_sh   <= {1'b1, req.wdata[7:0], 1'b0};
          tx_bits <= 4'd10;
          tx_cnt  <= '0;
        end
      end else begin
        tx <= tx_sh[0];
        if (tx_cnt == div - 1'b1) begin
          tx_cnt  <= '0;
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 1'b1;
        end else begin
          tx_cnt <= tx_cnt + 1'b1;
        end
      end

      // receive
      rx_sync <= {rx_sync[1:0], rx};
      if (!rx_act) begin
        if (!rx_s) begin
          rx_act  <= 1'b1;
          rx_cnt  <= '0;
          rx_bits <= '0;
        end
      end else if (rx_cnt == ((rx_bits == 0) ? (div >> 1) : div - 1'b1)) begin
        rx_cnt <= '0;
        if (rx_bits == 4'd0) begin
          if (rx_s) rx_act <= 1'b0;       // false start
          else      rx_bits <= 4'd1;
        end else if (rx_bits == 4'd9) begin
          rx_act <= 1'b0;
          if (rx_s) begin                 // valid stop bit
            rx_data <= rx_sh;
            if (rx_valid && !rd_data) rx_overrun <= 1'b1;
          end
        end else begin
          rx_sh   <= {rx_s, rx_sh[7:1]};
          rx_bits <= rx_bits + 1'b1;
        end
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end

      if (rx_done)      rx_valid <= 1'b1;
      else if (rd_data) rx_valid <= 1'b0;
      if (wr_stat) rx_overrun <= 1'b0;

      if (req.re) begin
        case (req.addr[1:0])
          2'd0:    rdata <= {24'd0, rx_data};
          2'd1:    rdata <= {29'd0, rx_overrun, tx_busy, rx_valid};
          2'd2:    rdata <= {16'd0, div};
          default: rdata <= '0;
        endcase
      end
    end
  end

endmodule
