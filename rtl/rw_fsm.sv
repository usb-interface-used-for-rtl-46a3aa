// rw_fsm: USB access protocol of the DIF.
//
// Every access from the PC starts with a 16-bit address word, sent most
// significant byte first. Bit 15 set makes the access a command: the word is
// handed to the command decoder on USB_add while USB_CMD is held high, until
// the decoder answers with end_cmd. Bit 15 clear makes it a 32-bit register
// access to the address in the word: with bit 14 set (read) the machine pulses
// USB_read, takes USB_data_out two cycles later and sends its four bytes to
// the PC, MSB first; with bit 14 clear (write) it collects four more bytes
// from the PC, MSB first, and presents them on USB_data_in with a one-cycle
// USBW_DRY.
//
// Bytes arrive as Rx_data/usb_strobe from the USB interface. A byte to the PC
// is offered with a one-cycle usb_write_ask once the interface is not writing
// and the FT245B reports room (usb_txen low); the machine then waits for
// `writing` to rise and fall again before offering the next byte, which leaves
// room for the register stage of the transmit multiplexer.
//
// rx_ready is high in the states that take bytes from the PC (address and
// write data). It lets the USB interface leave further bytes in the FT245B
// FIFO while a read reply is sent or a command runs, so that a PC that sends
// its next access early loses nothing. This output is an addition of this
// design to the DIF port list.
//
// The access format follows the DIF protocol; the handshake timing, the
// rx_ready flow control and the two-cycle register read latency are this
// design's choices.
module rw_fsm
  import dif_usb_pkg::*;
(
  input  logic        clk,           // 40 MHz
  input  logic        reset,         // asynchronous, active high
  input  logic [7:0]  rx_data,       // byte from the USB interface
  input  logic        usb_strobe,    // rx_data is new
  input  logic        writing,       // USB interface is writing to the PC
  input  logic        usb_txen,      // FT245B transmit FIFO full when high
  output logic [7:0]  tx_data,       // byte to the PC
  output logic        usb_write_ask, // one-cycle request to send tx_data
  output logic [15:0] USB_add,       // address / command word
  output logic [31:0] USB_data_in,   // data for a register write
  input  logic [31:0] USB_data_out,  // data of a register read
  output logic        USBW_DRY,      // USB_data_in is ready to be written
  output logic        USB_read,      // register read request
  output logic        USB_CMD,       // a command is active
  input  logic        end_cmd,       // the active command has finished
  output logic        rx_ready       // the machine can take a byte from the PC
);

  typedef enum logic [3:0] {
    S_ADDR_H, S_ADDR_L, S_CMD, S_WR_DATA, S_RD_REQ, S_RD_WAIT, S_RD_LOAD,
    S_TX_ASK, S_TX_BUSY, S_TX_DONE
  } state_e;

  state_e      state;
  logic [1:0]  byte_cnt;
  logic [31:0] shift;

  assign tx_data  = shift[31:24];
  assign rx_ready = (state == S_ADDR_H) || (state == S_ADDR_L) || (state == S_WR_DATA);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state         <= S_ADDR_H;
      byte_cnt      <= '0;
      shift         <= '0;
      USB_add       <= '0;
      USB_data_in   <= '0;
      USBW_DRY      <= 1'b0;
      USB_read      <= 1'b0;
      USB_CMD       <= 1'b0;
      usb_write_ask <= 1'b0;
    end else begin
      USBW_DRY      <= 1'b0;
      USB_read      <= 1'b0;
      usb_write_ask <= 1'b0;
      unique case (state)
        S_ADDR_H: if (usb_strobe) begin
          USB_add[15:8] <= rx_data;
          state         <= S_ADDR_L;
        end
        S_ADDR_L: if (usb_strobe) begin
          USB_add[7:0] <= rx_data;
          byte_cnt     <= '0;
          if (USB_add[ADD_CMD_BIT]) begin
            USB_CMD <= 1'b1;
            state   <= S_CMD;
          end else if (USB_add[ADD_READ_BIT]) begin
            USB_read <= 1'b1;
            state    <= S_RD_REQ;
          end else begin
            state <= S_WR_DATA;
          end
        end
        S_CMD: if (end_cmd) begin
          USB_CMD <= 1'b0;
          state   <= S_ADDR_H;
        end
        S_WR_DATA: if (usb_strobe) begin
          shift    <= {shift[23:0], rx_data};
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt == 2'd3) begin
            USB_data_in <= {shift[23:0], rx_data};
            USBW_DRY    <= 1'b1;
            state       <= S_ADDR_H;
          end
        end
        S_RD_REQ:  state <= S_RD_WAIT;   // register file latches its output
        S_RD_WAIT: state <= S_RD_LOAD;
        S_RD_LOAD: begin
          shift <= USB_data_out;
          state <= S_TX_ASK;
        end
        S_TX_ASK: if (!writing && !usb_txen) begin
          usb_write_ask <= 1'b1;
          state         <= S_TX_BUSY;
        end
        S_TX_BUSY: if (writing) state <= S_TX_DONE;
        S_TX_DONE: if (!writing) begin
          shift    <= {shift[23:0], 8'h00};
          byte_cnt <= byte_cnt + 1'b1;
          state    <= (byte_cnt == 2'd3) ? S_ADDR_H : S_TX_ASK;
        end
        default: state <= S_ADDR_H;
      endcase
    end
  end

endmodule
