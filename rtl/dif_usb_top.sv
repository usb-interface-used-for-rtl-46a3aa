// dif_usb_top: USB control path of the DIF (detector interface) FPGA.
//
// The PC talks to the FPGA through an FT245B USB FIFO chip. usb_interface
// moves bytes across the FT245B bus; rw_fsm turns the byte stream into
// accesses (2-byte address word, then 4 data bytes in or out, MSB first);
// usb_register holds the FPGA registers; cmd_decoder executes command-mode
// accesses (address bit 15 set) and waits for their completion; faux_ro is a
// dummy readout that streams a block of bytes to the PC on the readout
// command; tx_source_mux gives the readout the transmit path while it runs.
//
// The slow-control, acquisition and HARDROC trigger logic of the DIF is not
// part of this design: its orders (load_SC, load_no_check_SC, start_acq_cmd,
// RamFullExt_cmd, TrigExt_cmd) and completion signals are ports. The FT245B
// data bus is brought out as USB_data_i / USB_data_o / USB_data_oe, to be
// joined by a tristate pad. All logic runs on the 40 MHz clock with an
// asynchronous active-high reset. The block structure and wiring follow the
// DIF firmware view.
module dif_usb_top #(
  parameter int unsigned RO_NB_BYTES = 16   // bytes of one dummy readout
) (
  input  logic        clock,
  input  logic        reset,
  // FT245B
  input  logic        USB_TXEn,
  input  logic        USB_RXFn,
  input  logic [7:0]  USB_data_i,
  output logic [7:0]  USB_data_o,
  output logic        USB_data_oe,
  output logic        USB_rdn,
  output logic        USB_wr,
  output logic        USB_SIWU,
  // monitored values and registers
  input  logic [7:0]  report_SC_reg,
  input  logic [7:0]  temperature_reg,
  input  logic [7:0]  dif_current_reg,
  input  logic [7:0]  slab_current_reg,
  input  logic [7:0]  channel4_monitoring_reg,
  output logic [12:0] control_reg,
  output logic [7:0]  NB_chip_reg,
  output logic [7:0]  monitoring_reg,
  output logic [7:0]  SC_debug_reg,
  // orders to and completions from the rest of the DIF
  output logic        load_SC,
  output logic        load_no_check_SC,
  output logic        start_acq_cmd,
  output logic        RamFullExt_cmd,
  output logic        TrigExt_cmd,
  input  logic        SC_end_cmd,
  input  logic        Acq_end_cmd,
  input  logic        RamFullExt_end_cmd,
  input  logic        TrigExt_end_cmd
);

  logic [7:0]  Rx_data, tx_data, tx_data_FSM, tx_data_RO;
  logic        usb_strobe, writing, reading;
  logic        usb_write_ask, usb_write_ask_FSM, usb_write_ask_RO;
  logic [15:0] USB_add;
  logic [31:0] USB_data_in, USB_data_out;
  logic        USBW_DRY, USB_read, USB_CMD, end_cmd;
  logic        RO_cmd, RO_end_cmd, readout, rx_ready;

  usb_interface USB (
    .clock, .reset, .USB_TXEn, .USB_RXFn, .rx_enable(rx_ready), .usb_write_ask, .tx_data,
    .USB_data_i, .USB_data_o, .USB_data_oe, .Rx_data, .USB_rdn, .USB_wr,
    .USB_SIWU, .usb_strobe, .writing, .reading
  );

  rw_fsm RW (
    .clk(clock), .reset, .rx_data(Rx_data), .usb_strobe, .writing,
    .usb_txen(USB_TXEn), .tx_data(tx_data_FSM),
    .usb_write_ask(usb_write_ask_FSM), .USB_add, .USB_data_in, .USB_data_out,
    .USBW_DRY, .USB_read, .USB_CMD, .end_cmd, .rx_ready
  );

  cmd_decoder cmd (
    .clk(clock), .reset, .USB_cmd(USB_CMD), .command(USB_add), .SC_end_cmd,
    .Acq_end_cmd, .RO_end_cmd, .RamFullExt_end_cmd, .TrigExt_end_cmd,
    .end_cmd, .load_SC, .load_no_check_SC, .start_acq_cmd, .RamFullExt_cmd,
    .TrigExt_cmd, .RO_cmd
  );

  usb_register reg_file (
    .clk(clock), .reset, .USB_add, .USB_data_in, .USB_data_out, .USBW_DRY,
    .USB_read, .report_SC_reg, .control_reg, .NB_chip_reg, .temperature_reg,
    .dif_current_reg, .slab_current_reg, .channel4_monitoring_reg,
    .monitoring_reg, .SC_debug_reg
  );

  faux_ro #(.NB_BYTES(RO_NB_BYTES)) FauxRO (
    .clock, .reset, .USB_TXEn, .RO_cmd, .writing, .RO_end_cmd,
    .usb_write_ask(usb_write_ask_RO), .tx_data(tx_data_RO)
  );

  tx_source_mux mux (
    .clock, .reset, .RO_cmd, .RO_end_cmd, .usb_write_ask_FSM, .tx_data_FSM,
    .usb_write_ask_RO, .tx_data_RO, .readout, .usb_write_ask, .tx_data
  );

endmodule
