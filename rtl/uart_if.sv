// uart_if: memory-mapped UART interface for collecting sensor data and sending
// results, 8 data bits, no parity, one stop bit, LSB first, CLKS_PER_BIT clock
// cycles per bit (default 234: 115200 baud from a 27 MHz clock).
// Registers (word offsets in addr[3:2]):
//   0  write: send the byte wdata[7:0] (ignored while the transmitter is busy)
//      read : the last received byte; reading clears the rx-valid flag
//   1  read : status {29'b0, rx_overrun, rx_valid, tx_busy}; a write clears rx_overrun
// An access happens in a cycle where valid (u_valid) is high; we selects write,
// otherwise it is a read. Read data is combinational, side effects take place
// at the clock edge. The receiver double-registers rx, checks the start bit at
// its middle and samples each data bit in the middle of its bit time; a byte
// that arrives while the previous one is unread sets rx_overrun and replaces it.
// The design names a UART interface only; register map, frame and baud rate
// are local choices.
module uart_if #(
  parameter int CLKS_PER_BIT = 234
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        we,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        tx,
  input  logic        rx
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_shift;    // {stop, data[7:0], start}
  logic [3:0]    tx_bits;     // bits left to send
  logic [CW-1:0] tx_cnt;
  logic          tx_busy;
  assign tx_busy = (tx_bits != 0);

  logic wr_data, rd_data, wr_stat;
  assign wr_data = valid &&  we && addr[3:2] == 2'd0;
  assign rd_data = valid && !we && addr[3:2] == 2'd0;
  assign wr_stat = valid &&  we && addr[3:2] == 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (!tx_busy) begin
      if (wr_data) begin
        tx_shift <= {1'b1, wdata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tx_cnt == 0) begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end
  assign tx = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] { RX_IDLE, RX_START, RX_DATA, RX_STOP } rx_state_e;
  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift, rx_byte;
  logic          rx_valid, rx_overrun;
  logic          rx_s;
  assign rx_s = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync    <= 2'b11;
      rx_state   <= RX_IDLE;
      rx_cnt     <= '0;
      rx_bit     <= '0;
      rx_shift   <= '0;
      rx_byte    <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      if (rd_data) rx_valid <= 1'b0;
      if (wr_stat) rx_overrun <= 1'b0;
      unique case (rx_state)
        RX_IDLE:
          if (!rx_s) begin
            rx_state <= RX_START;
            rx_cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
          end
        RX_START:
          if (rx_cnt == 0) begin
            if (!rx_s) begin
              rx_state <= RX_DATA;
              rx_cnt   <= CW'(CLKS_PER_BIT - 1);
              rx_bit   <= '0;
            end else begin
              rx_state <= RX_IDLE;          // glitch, not a start bit
            end
          end else rx_cnt <= rx_cnt - 1'b1;
        RX_DATA:
          if (rx_cnt == 0) begin
            rx_shift <= {rx_s, rx_shift[7:1]};
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
            rx_bit <= rx_bit + 3'd1;
          end else rx_cnt <= rx_cnt - 1'b1;
        RX_STOP:
          if (rx_cnt == 0) begin
            rx_state <= RX_IDLE;
            if (rx_s) begin                   // valid stop bit
              rx_byte  <= rx_shift;
              rx_valid <= 1'b1;
              if (rx_valid && !rd_data) rx_overrun <= 1'b1;
            end
          end else rx_cnt <= rx_cnt - 1'b1;
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (addr[3:2])
      2'd0:    rdata = {24'b0, rx_byte};
      2'd1:    rdata = {29'b0, rx_overrun, rx_valid, tx_busy};
      default: rdata = '0;
    endcase
  end
endmodule
