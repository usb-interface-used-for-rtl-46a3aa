// dif_usb_pkg: constants shared by the USB part of the DIF firmware.
//
// Holds the command codes understood by the command decoder, the register
// addresses and reset values of the USB register file, and the bit meaning of
// the 16-bit address word that opens every USB access. Codes, addresses and
// default values are those of the DIF command and register lists; the choice
// of which address bits are decoded is this design's own (see the modules).
package dif_usb_pkg;

  // First two bytes of every access: mode bits and address/command.
  localparam int unsigned ADD_CMD_BIT  = 15;  // 1: command, 0: register access
  localparam int unsigned ADD_READ_BIT = 14;  // register access: 1 read, 0 write

  // Command codes, compared with the low byte of the command word.
  typedef enum logic [7:0] {
    CMD_LOAD_SC          = 8'h01,  // load slow control and check it
    CMD_LOAD_SC_NO_CHECK = 8'h11,  // load slow control without checking
    CMD_START_ACQ        = 8'h02,  // start acquisition
    CMD_RAMFULL_EXT      = 8'h21,  // send RamFullExt to the HARDROCs
    CMD_TRIG_EXT         = 8'h22,  // send TrigExt to the HARDROCs
    CMD_READOUT          = 8'h03   // digital readout
  } cmd_code_e;

  // Register addresses (decimal, as listed), compared with address bits 13..0.
  localparam logic [13:0] REG_TEST       = 14'd0;
  localparam logic [13:0] REG_ID         = 14'd1;
  localparam logic [13:0] REG_TEST_RW    = 14'd2;
  localparam logic [13:0] REG_CONTROL    = 14'd3;
  localparam logic [13:0] REG_STATUS     = 14'd4;
  localparam logic [13:0] REG_NB_HR      = 14'd5;
  localparam logic [13:0] REG_SC_REPORT  = 14'd6;
  localparam logic [13:0] REG_MONITORING = 14'd10;
  localparam logic [13:0] REG_TEMP       = 14'd11;
  localparam logic [13:0] REG_DIF_CUR    = 14'd12;
  localparam logic [13:0] REG_SLAB_CUR   = 14'd13;
  localparam logic [13:0] REG_CH4_MON    = 14'd14;
  localparam logic [13:0] REG_SC_DEBUG   = 14'd19;

  // Reset values and constants.
  localparam logic [31:0] TEST_VALUE        = 32'h9876_5432;
  localparam logic [31:0] ID_VALUE          = 32'hBABA_CAFE;
  localparam logic [31:0] TEST_RW_DEFAULT   = 32'h1234_ABCD;
  localparam logic [12:0] CONTROL_DEFAULT   = 13'h1F3F;
  localparam logic [31:0] STATUS_VALUE      = 32'h2222_2222;
  localparam logic [7:0]  NB_HR_DEFAULT     = 8'h01;
  localparam logic [7:0]  MONITORING_DEFAULT = 8'hF9;
  localparam logic [7:0]  SC_DEBUG_DEFAULT  = 8'h00;

endpackage
