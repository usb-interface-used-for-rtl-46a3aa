// tb_tx_source_mux: self-checking test of the transmit multiplexer.
// Drives random request/data pairs on both sources and checks, one cycle
// later, that the registered output carries the access state machine's pair
// outside a readout and the readout's pair between RO_cmd and RO_end_cmd.
module tb_tx_source_mux;
  logic clock = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clock = ~clock;

  logic RO_cmd = 0, RO_end_cmd = 0, usb_write_ask_FSM = 0, usb_write_ask_RO = 0;
  logic [7:0] tx_data_FSM = '0, tx_data_RO = '0;
  logic readout, usb_write_ask;
  logic [7:0] tx_data;

  int checks = 0, failures = 0;
  bit model_ro = 0;

  tx_source_mux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_ask;
    logic [7:0] exp_data;
    int n_ro_cycles = 0;
    repeat (3) @(negedge clock);
    reset = 1'b0;
    check(!readout && !usb_write_ask && tx_data == 0, "reset state");
    for (int i = 0; i < 400; i++) begin
      @(negedge clock);
      RO_cmd            = ($urandom_range(0, 29) == 0);
      RO_end_cmd        = !RO_cmd && ($urandom_range(0, 29) == 0);
      usb_write_ask_FSM = $urandom_range(0, 1) == 1;
      usb_write_ask_RO  = $urandom_range(0, 1) == 1;
      tx_data_FSM       = 8'($urandom);
      tx_data_RO        = 8'($urandom);
      exp_ask  = model_ro ? usb_write_ask_RO : usb_write_ask_FSM;
      exp_data = model_ro ? tx_data_RO : tx_data_FSM;
      if (RO_cmd) model_ro = 1;
      else if (RO_end_cmd) model_ro = 0;
      if (model_ro) n_ro_cycles++;
      @(negedge clock);
      check(usb_write_ask == exp_ask && tx_data == exp_data,
            $sformatf("cycle %0d: output %b/%h expected %b/%h", i, usb_write_ask, tx_data, exp_ask, exp_data));
      check(readout == model_ro, "readout flag");
      RO_cmd = 0; RO_end_cmd = 0;
      exp_ask  = model_ro ? usb_write_ask_RO : usb_write_ask_FSM;
      exp_data = model_ro ? tx_data_RO : tx_data_FSM;
      @(negedge clock);
      check(usb_write_ask == exp_ask && tx_data == exp_data, "output with steady flag");
    end
    check(n_ro_cycles > 20 && n_ro_cycles < 380, "both sources exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
