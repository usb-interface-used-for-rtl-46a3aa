// tx_source_mux: chooses which block sends bytes to the PC.
//
// Two producers can offer bytes to the USB interface: the access state
// machine (register read data) and the readout. A readout flag is set by
// RO_cmd and cleared by RO_end_cmd; while it is set the readout's
// usb_write_ask and tx_data are passed on, otherwise those of the access state
// machine. The selected pair is registered, so it reaches the USB interface
// one cycle after the producer offers it. This follows the multiplexer of the
// DIF top level.
module tx_source_mux (
  input  logic       clock,
  input  logic       reset,              // asynchronous, active high
  input  logic       RO_cmd,             // readout starts
  input  logic       RO_end_cmd,         // readout ends
  input  logic       usb_write_ask_FSM,
  input  logic [7:0] tx_data_FSM,
  input  logic       usb_write_ask_RO,
  input  logic [7:0] tx_data_RO,
  output logic       readout,            // readout owns the transmit path
  output logic       usb_write_ask,
  output logic [7:0] tx_data
);

  always_ff @(posedge clock or posedge reset) begin
    if (reset)           readout <= 1'b0;
    else if (RO_cmd)     readout <= 1'b1;
    else if (RO_end_cmd) readout <= 1'b0;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      usb_write_ask <= 1'b0;
      tx_data       <= '0;
    end else if (readout) begin
      usb_write_ask <= usb_write_ask_RO;
      tx_data       <= tx_data_RO;
    end else begin
      usb_write_ask <= usb_write_ask_FSM;
      tx_data       <= tx_data_FSM;
    end
  end

endmodule
