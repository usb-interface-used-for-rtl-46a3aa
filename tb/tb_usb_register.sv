// tb_usb_register: self-checking test of the USB register file.
// Reads every listed address after reset and compares with the reset values
// and the monitored inputs, writes every read/write register and reads it
// back (checking its output port too), and checks that writes to read-only
// addresses change nothing. A read value must appear the cycle after USB_read.
module tb_usb_register;
  logic clk = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clk = ~clk;

  logic [15:0] USB_add = '0;
  logic [31:0] USB_data_in = '0, USB_data_out;
  logic USBW_DRY = 0, USB_read = 0;
  logic [7:0] report_SC_reg = 8'h05, temperature_reg = 8'h1B, dif_current_reg = 8'h2C;
  logic [7:0] slab_current_reg = 8'h3D, channel4_monitoring_reg = 8'h4E;
  logic [12:0] control_reg;
  logic [7:0] NB_chip_reg, monitoring_reg, SC_debug_reg;

  int checks = 0, failures = 0;

  usb_register dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [15:0] a, input logic [31:0] exp);
    @(negedge clk); USB_add = a; USB_read = 1;
    @(negedge clk); USB_read = 0;
    check(USB_data_out == exp, $sformatf("read %h = %h, expected %h", a, USB_data_out, exp));
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); USB_add = a; USB_data_in = d; USBW_DRY = 1;
    @(negedge clk); USBW_DRY = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(control_reg == 13'h1F3F && NB_chip_reg == 8'h01 && monitoring_reg == 8'hF9 &&
          SC_debug_reg == 8'h00, "output registers at reset values");
    rd(16'h4000, 32'h9876_5432);
    rd(16'h4001, 32'hBABA_CAFE);
    rd(16'h4002, 32'h1234_ABCD);
    rd(16'h4003, 32'h0000_1F3F);
    rd(16'h4004, 32'h2222_2222);
    rd(16'h4005, 32'h0000_0001);
    rd(16'h4006, 32'h0000_0005);
    rd(16'h400A, 32'h0000_00F9);
    rd(16'h400B, 32'h0000_001B);
    rd(16'h400C, 32'h0000_002C);
    rd(16'h400D, 32'h0000_003D);
    rd(16'h400E, 32'h0000_004E);
    rd(16'h4013, 32'h0000_0000);
    rd(16'h4007, 32'h0000_0000);

    wr(16'h0002, 32'hCAFE_F00D);  rd(16'h4002, 32'hCAFE_F00D);
    wr(16'h0003, 32'hFFFF_0A55);  rd(16'h4003, 32'h0000_0A55);
    check(control_reg == 13'h0A55, "control_reg output");
    wr(16'h0005, 32'h0000_0107);  rd(16'h4005, 32'h0000_0007);
    check(NB_chip_reg == 8'h07, "NB_chip_reg output");
    wr(16'h000A, 32'h0000_0012);  rd(16'h400A, 32'h0000_0012);
    check(monitoring_reg == 8'h12, "monitoring_reg output");
    wr(16'h0013, 32'h0000_0033);  rd(16'h4013, 32'h0000_0033);
    check(SC_debug_reg == 8'h33, "SC_debug_reg output");

    // read-only addresses
    wr(16'h0000, 32'h1111_1111);  rd(16'h4000, 32'h9876_5432);
    wr(16'h0001, 32'h1111_1111);  rd(16'h4001, 32'hBABA_CAFE);
    wr(16'h0004, 32'h1111_1111);  rd(16'h4004, 32'h2222_2222);
    wr(16'h000B, 32'h1111_1111);  rd(16'h400B, 32'h0000_001B);
    rd(16'h4002, 32'hCAFE_F00D);

    // monitored inputs are live
    temperature_reg = 8'h77;
    rd(16'h400B, 32'h0000_0077);
    // output holds between reads
    @(negedge clk); USB_add = 16'h4001;
    @(negedge clk);
    check(USB_data_out == 32'h0000_0077, "output holds without USB_read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
