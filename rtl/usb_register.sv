// usb_register: the FPGA registers reachable through USB.
//
// A register write takes USB_data_in into the register at USB_add[13:0] on a
// cycle with USBW_DRY high; writes to read-only addresses are ignored. A
// register read copies the register at USB_add[13:0] into USB_data_out on a
// cycle with USB_read high, so the value is available from the next cycle.
// Narrow registers are right-aligned and read with zero upper bits; unused
// addresses read as zero. Address bits 15 and 14 (mode bits) are not decoded.
//
//  addr  register                   reset value  access
//     0  test                       98765432     read
//     1  ID                         BABACAFE     read
//     2  test_register              1234ABCD     read/write
//     3  control_register [12:0]    1F3F         read/write
//     4  status_register            22222222     read
//     5  nb_HR [7:0]                01           read/write
//     6  SC report [7:0]            (input)      read
//    10  monitoring [7:0]           F9           read/write
//    11  temperature [7:0]          (input)      read
//    12  DIF current [7:0]          (input)      read
//    13  slab current [7:0]         (input)      read
//    14  channel 4 monitoring [7:0] (input)      read
//    19  SC debug [7:0]             00           read/write
// Control register bits 0..5 are active-low resets (FPGA, HARDROC, BCID, slow
// control, shift register, SC report) and bits 8..12 are power enables
// (analog, DAC, ss, digital, ADC); they are outputs only, acted on elsewhere.
// The map and reset values follow the DIF register list; the latched read and
// the handling of undecoded bits are this design's choices.
module usb_register
  import dif_usb_pkg::*;
(
  input  logic        clk,                      // 40 MHz
  input  logic        reset,                    // asynchronous, active high
  input  logic [15:0] USB_add,
  input  logic [31:0] USB_data_in,              // from the PC
  output logic [31:0] USB_data_out,             // to the PC
  input  logic        USBW_DRY,                 // write strobe
  input  logic        USB_read,                 // read strobe
  input  logic [7:0]  report_SC_reg,
  output logic [12:0] control_reg,
  output logic [7:0]  NB_chip_reg,              // number of HARDROC chips
  input  logic [7:0]  temperature_reg,
  input  logic [7:0]  dif_current_reg,
  input  logic [7:0]  slab_current_reg,
  input  logic [7:0]  channel4_monitoring_reg,
  output logic [7:0]  monitoring_reg,
  output logic [7:0]  SC_debug_reg
);

  logic [31:0] test_reg;
  logic [31:0] read_value;
  logic [13:0] addr;

  assign addr = USB_add[13:0];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      test_reg       <= TEST_RW_DEFAULT;
      control_reg    <= CONTROL_DEFAULT;
      NB_chip_reg    <= NB_HR_DEFAULT;
      monitoring_reg <= MONITORING_DEFAULT;
      SC_debug_reg   <= SC_DEBUG_DEFAULT;
    end else if (USBW_DRY) begin
      case (addr)
        REG_TEST_RW:    test_reg       <= USB_data_in;
        REG_CONTROL:    control_reg    <= USB_data_in[12:0];
        REG_NB_HR:      NB_chip_reg    <= USB_data_in[7:0];
        REG_MONITORING: monitoring_reg <= USB_data_in[7:0];
        REG_SC_DEBUG:   SC_debug_reg   <= USB_data_in[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (addr)
      REG_TEST:       read_value = TEST_VALUE;
      REG_ID:         read_value = ID_VALUE;
      REG_TEST_RW:    read_value = test_reg;
      REG_CONTROL:    read_value = {19'd0, control_reg};
      REG_STATUS:     read_value = STATUS_VALUE;
      REG_NB_HR:      read_value = {24'd0, NB_chip_reg};
      REG_SC_REPORT:  read_value = {24'd0, report_SC_reg};
      REG_MONITORING: read_value = {24'd0, monitoring_reg};
      REG_TEMP:       read_value = {24'd0, temperature_reg};
      REG_DIF_CUR:    read_value = {24'd0, dif_current_reg};
      REG_SLAB_CUR:   read_value = {24'd0, slab_current_reg};
      REG_CH4_MON:    read_value = {24'd0, channel4_monitoring_reg};
      REG_SC_DEBUG:   read_value = {24'd0, SC_debug_reg};
      default:        read_value = '0;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)         USB_data_out <= '0;
    else if (USB_read) USB_data_out <= read_value;
  end

  a_no_read_write: assert property (@(posedge clk) disable iff (reset)
    !(USB_read && USBW_DRY));

endmodule
