// usb_interface: byte link between the DIF FPGA and an FT245B USB FIFO chip.
//
// Two state machines share the FT245B's 8-bit data bus. The receive machine
// (PC to FPGA) waits for USB_RXFn low, pulls USB_rdn low for RD_PULSE clock
// cycles, samples the bus on the cycle USB_rdn returns high, and presents the
// byte on Rx_data with a one-cycle usb_strobe. A read starts only while
// rx_enable is high; otherwise bytes stay in the FT245B FIFO (rx_enable is an
// addition of this design, it must fall within RECOVER cycles of the strobe
// of the last byte the consumer wants). The transmit machine (FPGA to
// PC) latches a byte offered with a one-cycle usb_write_ask pulse, waits for
// USB_TXEn low, drives the bus for one set-up cycle, raises USB_wr for
// WR_PULSE cycles (the FT245B stores the byte on the falling edge of WR),
// holds the data one more cycle and then releases the bus. Both machines then
// wait RECOVER cycles so that the FIFO flags, which the FT245B keeps inactive
// for at least 80 ns after each access, are seen correctly through the
// two-flop synchronisers.
//
// Handshake with the byte producer: usb_write_ask is a single-cycle request
// with tx_data valid in the same cycle; `writing` rises on the next cycle and
// stays high until the byte has been handed to the FT245B. A producer must not
// ask again while `writing` is high. A pending write has priority over a new
// read, and neither machine starts while the other is busy, so the bus never
// has two drivers.
//
// Following the DIF firmware view, USB_SIWU is held high (send-immediate not
// used) and `reading` is held low. Port names follow the DIF firmware; the
// bidirectional USB_data bus is split into USB_data_i / USB_data_o /
// USB_data_oe, to be joined by the FPGA's tristate pad. The pulse lengths are
// this design's choice for a 40 MHz clock, from the FT245B data sheet timing
// (RD low >= 50 ns, WR high >= 50 ns, flags inactive >= 80 ns after access).
module usb_interface #(
  parameter int unsigned RD_PULSE = 3,  // cycles of USB_rdn low
  parameter int unsigned WR_PULSE = 3,  // cycles of USB_wr high
  parameter int unsigned RECOVER  = 5   // cycles idle after each access
) (
  input  logic       clock,          // 40 MHz
  input  logic       reset,          // asynchronous, active high
  input  logic       USB_TXEn,       // FT245B: low when a byte can be written
  input  logic       USB_RXFn,       // FT245B: low when a byte can be read
  input  logic       rx_enable,      // the consumer can take a byte
  input  logic       usb_write_ask,  // one-cycle request to send tx_data
  input  logic [7:0] tx_data,
  input  logic [7:0] USB_data_i,     // bus as seen by the FPGA
  output logic [7:0] USB_data_o,     // bus value driven by the FPGA
  output logic       USB_data_oe,    // FPGA drives the bus
  output logic [7:0] Rx_data,        // byte received from the PC
  output logic       USB_rdn,
  output logic       USB_wr,
  output logic       USB_SIWU,
  output logic       usb_strobe,     // Rx_data is new this cycle
  output logic       writing,        // a byte to the PC is pending
  output logic       reading
);

  typedef enum logic [1:0] {RX_IDLE, RX_READ, RX_RECOVER} rx_state_e;
  typedef enum logic [2:0] {TX_IDLE, TX_SETUP, TX_STROBE, TX_HOLD, TX_RECOVER} tx_state_e;

  rx_state_e  rx_state;
  tx_state_e  tx_state;
  logic [3:0] rx_cnt, tx_cnt;
  logic [1:0] rxf_sync, txe_sync;
  logic       rxf_n, txe_n;       // synchronised flags
  logic [7:0] tx_buf;
  logic       tx_pending;

  assign USB_SIWU = 1'b1;
  assign reading  = 1'b0;
  assign writing  = tx_pending;

  // Flags come from the FT245B's own clock domain.
  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      rxf_sync <= 2'b11;
      txe_sync <= 2'b11;
    end else begin
      rxf_sync <= {rxf_sync[0], USB_RXFn};
      txe_sync <= {txe_sync[0], USB_TXEn};
    end
  end
  assign rxf_n = rxf_sync[1];
  assign txe_n = txe_sync[1];

  // Receive machine (PC to FPGA).
  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      rx_state   <= RX_IDLE;
      rx_cnt     <= '0;
      USB_rdn    <= 1'b1;
      Rx_data    <= '0;
      usb_strobe <= 1'b0;
    end else begin
      usb_strobe <= 1'b0;
      unique case (rx_state)
        RX_IDLE: begin
          if (!rxf_n && rx_enable && !tx_pending && tx_state == TX_IDLE) begin
            USB_rdn  <= 1'b0;
            rx_cnt   <= 4'(RD_PULSE - 1);
            rx_state <= RX_READ;
          end
        end
        RX_READ: begin
          if (rx_cnt == 0) begin
            USB_rdn    <= 1'b1;
            Rx_data    <= USB_data_i;
            usb_strobe <= 1'b1;
            rx_cnt     <= 4'(RECOVER - 1);
            rx_state   <= RX_RECOVER;
          end else begin
            rx_cnt <= rx_cnt - 1'b1;
          end
        end
        RX_RECOVER: begin
          if (rx_cnt == 0) rx_state <= RX_IDLE;
          else             rx_cnt   <= rx_cnt - 1'b1;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // Transmit machine (FPGA to PC).
  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      tx_state    <= TX_IDLE;
      tx_cnt      <= '0;
      tx_buf      <= '0;
      tx_pending  <= 1'b0;
      USB_wr      <= 1'b0;
      USB_data_oe <= 1'b0;
    end else begin
      if (usb_write_ask) begin
        tx_buf     <= tx_data;
        tx_pending <= 1'b1;
      end
      unique case (tx_state)
        TX_IDLE: begin
          if (tx_pending && !txe_n && rx_state == RX_IDLE) begin
            USB_data_oe <= 1'b1;
            tx_state    <= TX_SETUP;
          end
        end
        TX_SETUP: begin
          USB_wr   <= 1'b1;
          tx_cnt   <= 4'(WR_PULSE - 1);
          tx_state <= TX_STROBE;
        end
        TX_STROBE: begin
          if (tx_cnt == 0) begin
            USB_wr   <= 1'b0;        // falling edge stores the byte
            tx_state <= TX_HOLD;
          end else begin
            tx_cnt <= tx_cnt - 1'b1;
          end
        end
        TX_HOLD: begin
          USB_data_oe <= 1'b0;
          tx_pending  <= 1'b0;
          tx_cnt      <= 4'(RECOVER - 1);
          tx_state    <= TX_RECOVER;
        end
        TX_RECOVER: begin
          if (tx_cnt == 0) tx_state <= TX_IDLE;
          else             tx_cnt   <= tx_cnt - 1'b1;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  assign USB_data_o = tx_buf;

  // A producer may not ask while the previous byte is still pending.
  a_no_overrun: assert property (@(posedge clock) disable iff (reset)
    usb_write_ask |-> !tx_pending)
    else $error("usb_write_ask while a byte is pending");
  // The bus is never driven during a read strobe.
  a_bus_exclusive: assert property (@(posedge clock) disable iff (reset)
    !(USB_data_oe && !USB_rdn));

endmodule
