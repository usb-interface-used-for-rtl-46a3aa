// tb_rw_fsm: self-checking test of the USB access state machine.
// The testbench plays the USB interface (bytes with usb_strobe, a `writing`
// reply to each usb_write_ask), the register file (on USB_read it returns a
// value derived from the address two cycles later) and the command decoder
// (end_cmd some cycles after USB_CMD rises). It checks a register write
// (one USBW_DRY with the four bytes assembled MSB first), register reads (one
// USB_read, then the four bytes sent MSB first, also while the transmit FIFO
// is reported full for a while), and command accesses (USB_CMD held until
// end_cmd).
module tb_rw_fsm;
  logic clk = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clk = ~clk;

  logic [7:0]  rx_data = '0, tx_data;
  logic        usb_strobe = 1'b0, writing = 1'b0, usb_txen = 1'b0;
  logic        usb_write_ask, USBW_DRY, USB_read, USB_CMD, rx_ready, end_cmd = 1'b0;
  logic [15:0] USB_add;
  logic [31:0] USB_data_in, USB_data_out = '0;

  int checks = 0, failures = 0;

  rw_fsm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] reg_value(input logic [15:0] a);
    return {a, ~a} ^ 32'h5A5A_0F0F;
  endfunction

  // Register file stand-in: latches on USB_read.
  int n_read = 0, n_wdry = 0;
  logic [31:0] last_wdata;
  logic [15:0] last_wadd;
  always @(posedge clk) begin
    if (USB_read) begin USB_data_out <= reg_value(USB_add); n_read++; end
    if (USBW_DRY) begin last_wdata = USB_data_in; last_wadd = USB_add; n_wdry++; end
  end

  // USB interface stand-in for the transmit side.
  logic [7:0] sent[$];
  always @(posedge clk) begin
    if (usb_write_ask) begin
      sent.push_back(tx_data);
      if (writing) begin failures++; $display("FAIL: ask while writing"); end
      if (usb_txen) begin failures++; $display("FAIL: ask while FIFO full"); end
      fork begin
        @(posedge clk); @(posedge clk); writing <= 1'b1;
        repeat (5) @(posedge clk); writing <= 1'b0;
      end join_none
    end
  end

  // Command decoder stand-in.
  int cmd_cycles = 0;
  always @(posedge clk) begin
    if (USB_CMD) cmd_cycles++;
  end
  initial forever begin
    @(posedge clk iff USB_CMD);
    repeat (7) @(posedge clk);
    end_cmd <= 1'b1;
    @(posedge clk);
    end_cmd <= 1'b0;
    @(posedge clk);
  end

  task automatic pc_byte(input logic [7:0] b);
    @(negedge clk); rx_data = b; usb_strobe = 1'b1;
    @(negedge clk); usb_strobe = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    pc_byte(a[15:8]); pc_byte(a[7:0]);
    for (int i = 3; i >= 0; i--) pc_byte(d[8*i +: 8]);
  endtask

  task automatic reg_read(input logic [15:0] a, input bit stall);
    int n0 = n_read;
    logic [31:0] exp;
    sent.delete();
    pc_byte(a[15:8]);
    pc_byte(a[7:0]);
    check(!rx_ready, "no byte taken while a read is answered");
    if (stall) begin usb_txen = 1'b1; repeat (30) @(negedge clk); check(sent.size() == 0, "no byte while full"); usb_txen = 1'b0; end
    repeat (60) @(negedge clk);
    exp = reg_value(a);
    check(n_read == n0 + 1, "one USB_read per read access");
    check(sent.size() == 4, $sformatf("four bytes sent (got %0d)", sent.size()));
    if (sent.size() == 4)
      check({sent[0], sent[1], sent[2], sent[3]} == exp,
            $sformatf("read data %h%h%h%h, expected %h", sent[0], sent[1], sent[2], sent[3], exp));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(!USB_CMD && !USBW_DRY && !USB_read && !usb_write_ask, "outputs idle after reset");
    check(rx_ready, "ready for an address after reset");

    reg_write(16'h0002, 32'hDEAD_BEEF);
    check(n_wdry == 1, "one USBW_DRY");
    check(last_wdata == 32'hDEAD_BEEF, $sformatf("write data %h", last_wdata));
    check(last_wadd == 16'h0002, "write address");
    check(n_read == 0 && sent.size() == 0, "a write does not read or send");

    reg_write(16'h0013, 32'h0000_00A5);
    check(n_wdry == 2 && last_wdata == 32'h0000_00A5 && last_wadd == 16'h0013, "second write");

    reg_read(16'h4001, 1'b0);
    reg_read(16'h400A, 1'b1);
    check(n_wdry == 2, "reads do not write");

    // Command access: USB_CMD until end_cmd.
    cmd_cycles = 0;
    pc_byte(8'h80); pc_byte(8'h03);
    check(USB_add == 16'h8003, "command word on USB_add");
    check(!rx_ready, "no byte taken while a command runs");
    repeat (20) @(negedge clk);
    check(!USB_CMD, "USB_CMD released after end_cmd");
    check(cmd_cycles >= 8 && cmd_cycles <= 10, $sformatf("USB_CMD high %0d cycles", cmd_cycles));
    check(n_wdry == 2 && n_read == 2, "command neither writes nor reads");

    // The machine is back at the start: another write works.
    reg_write(16'h0003, 32'h0000_1ABC);
    check(n_wdry == 3 && last_wdata == 32'h0000_1ABC, "write after command");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
