// faux_ro: dummy digital readout, an example of an FPGA-to-PC data transfer.
//
// A one-cycle RO_cmd starts a transfer of NB_BYTES bytes to the PC through
// the USB interface; the bytes are the values 0, 1, 2, ... of an 8-bit
// counter. Each byte is offered with a one-cycle usb_write_ask, once the
// interface is not writing and the FT245B reports room (USB_TXEn low); the
// block then waits for `writing` to rise and to fall again before the next
// byte. After the last byte RO_end_cmd is pulsed for one cycle, which ends
// the readout command. RO_cmd during a transfer is ignored.
//
// The ports and the role of the block follow the DIF firmware; the block
// length and the counting data pattern are this design's choices, as the
// transferred content of the dummy readout is not specified.
module faux_ro #(
  parameter int unsigned NB_BYTES = 16   // bytes sent per readout, 1..256
) (
  input  logic       clock,          // 40 MHz
  input  logic       reset,          // asynchronous, active high
  input  logic       USB_TXEn,       // FT245B transmit FIFO full when high
  input  logic       RO_cmd,         // start a readout
  input  logic       writing,        // USB interface is writing
  output logic       RO_end_cmd,     // readout finished
  output logic       usb_write_ask,  // one-cycle request to send tx_data
  output logic [7:0] tx_data
);

  typedef enum logic [1:0] {S_IDLE, S_ASK, S_BUSY, S_DONE} state_e;

  state_e     state;
  logic [8:0] sent;   // bytes already sent

  assign tx_data = sent[7:0];

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state         <= S_IDLE;
      sent          <= '0;
      usb_write_ask <= 1'b0;
      RO_end_cmd    <= 1'b0;
    end else begin
      usb_write_ask <= 1'b0;
      RO_end_cmd    <= 1'b0;
      unique case (state)
        S_IDLE: if (RO_cmd) begin
          sent  <= '0;
          state <= S_ASK;
        end
        S_ASK: if (!writing && !USB_TXEn) begin
          usb_write_ask <= 1'b1;
          state         <= S_BUSY;
        end
        S_BUSY: if (writing) state <= S_DONE;
        S_DONE: if (!writing) begin
          sent <= sent + 1'b1;
          if (sent == 9'(NB_BYTES - 1)) begin
            RO_end_cmd <= 1'b1;
            state      <= S_IDLE;
          end else begin
            state <= S_ASK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
