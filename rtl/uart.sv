// uart: serial port used as the slave core at each node, with an OCP slave
// register interface.
//
// Serial format: 8 data bits, LSB first, no parity, one stop bit, idle high;
// each bit lasts CLKS_PER_BIT clocks (default: 115200 baud from 100 MHz).
// The receive line passes a two flip-flop synchronizer; the receiver waits
// for a falling edge, checks the start bit half a bit later and then samples
// every bit in its middle. A byte whose stop bit is low is discarded.
//
// Registers, selected by MAddr[3:2]:
//   0 TXDATA  write: send MData[7:0]. The write is accepted (SCmdAccept)
//                    only when the transmitter is idle, so a second write
//                    waits until the first byte has gone out.
//   1 RXDATA  read : {23'b0, valid, byte}; reading clears valid.
//   2 STATUS  read : {30'b0, rx valid, tx busy}
// Other commands are accepted at once. Reads are answered with SResp = DVA
// in the clock after acceptance; writes get no response.
module uart
  import noc_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  m_cmd,
  input  logic [31:0] m_addr,
  input  logic [31:0] m_data,
  output logic        s_cmd_accept,
  output logic [1:0]  s_resp,
  output logic [31:0] s_data,
  input  logic        rx,
  output logic        tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- transmitter ----------------
  logic          tx_busy;
  logic [9:0]    tx_shift;    // stop, data[7:0], start
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;
  logic          tx_start;

  assign tx_start = (m_cmd == OCP_WR) && (m_addr[3:2] == 2'd0) && !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      tx       <= 1'b1;
    end else if (tx_start) begin
      tx_busy  <= 1'b1;
      tx_shift <= {1'b1, m_data[7:0], 1'b0};
      tx_bits  <= 4'd10;
      tx_cnt   <= '0;
    end else if (tx_busy) begin
      if (tx_cnt == '0) begin
        tx       <= tx_shift[0];
        tx_shift <= {1'b1, tx_shift[9:1]};
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
        if (tx_bits == 4'd0) begin
          tx_busy <= 1'b0;
          tx_cnt  <= '0;
        end else begin
          tx_bits <= tx_bits - 1'b1;
        end
      end else begin
        tx_cnt <= tx_cnt - 1'b1;
      end
    end
  end

  // ---------------- receiver ----------------
  logic          rx_s;
  logic          rx_busy;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [8:0]    rx_shift;
  logic [7:0]    rx_byte;
  logic          rx_valid;
  logic          rx_read;

  sync2 #(.RESET_VAL(1'b1)) u_sync (.clk, .rst_n, .d(rx), .q(rx_s));

  assign rx_read = (m_cmd == OCP_RD) && (m_addr[3:2] == 2'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_busy  <= 1'b0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_shift <= '0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
    end else begin
      if (rx_read) rx_valid <= 1'b0;
      if (!rx_busy) begin
        if (!rx_s) begin                       // start bit edge
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
          rx_bits <= 4'd0;
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLKS_PER_BIT - 1);
        if (rx_bits == 4'd0 && rx_s) begin
          rx_busy <= 1'b0;                     // false start
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (rx_s) begin
            rx_byte  <= rx_shift[8:1];
            rx_valid <= 1'b1;
          end
        end else begin
          rx_shift <= {rx_s, rx_shift[8:1]};
          rx_bits  <= rx_bits + 1'b1;
        end
      end
    end
  end

  // ---------------- OCP ----------------
  assign s_cmd_accept = !((m_cmd == OCP_WR) && (m_addr[3:2] == 2'd0) && tx_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_resp <= OCP_NULL;
      s_data <= '0;
    end else begin
      s_resp <= OCP_NULL;
      if (m_cmd == OCP_RD) begin
        s_resp <= OCP_DVA;
        unique case (m_addr[3:2])
          2'd1:    s_data <= {23'b0, rx_valid, rx_byte};
          2'd2:    s_data <= {30'b0, rx_valid, tx_busy};
          default: s_data <= '0;
        endcase
      end
    end
  end

endmodule
