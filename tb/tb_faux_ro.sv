// tb_faux_ro: self-checking test of the dummy readout.
// The testbench answers each usb_write_ask with a `writing` pulse, as the USB
// interface does, records the bytes, and checks that one RO_cmd yields exactly
// NB_BYTES bytes 0, 1, 2, ... followed by a single RO_end_cmd, that a full
// transmit FIFO (USB_TXEn high) holds the transfer, that RO_cmd during a
// transfer is ignored, and that a second readout starts again from 0.
module tb_faux_ro;
  localparam int unsigned N = 16;
  logic clock = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clock = ~clock;

  logic USB_TXEn = 1'b0, RO_cmd = 1'b0, writing = 1'b0;
  logic RO_end_cmd, usb_write_ask;
  logic [7:0] tx_data;

  int checks = 0, failures = 0;

  faux_ro #(.NB_BYTES(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] sent[$];
  int n_end = 0;
  always @(posedge clock) if (!reset) begin
    if (RO_end_cmd) n_end++;
    if (usb_write_ask) begin
      sent.push_back(tx_data);
      if (writing)  begin failures++; $display("FAIL: ask while writing"); end
      if (USB_TXEn) begin failures++; $display("FAIL: ask while FIFO full"); end
      fork begin
        @(posedge clock); @(posedge clock); writing <= 1'b1;
        repeat (4) @(posedge clock); writing <= 1'b0;
      end join_none
    end
  end

  task automatic readout(input bit stall);
    sent.delete();
    n_end = 0;
    @(negedge clock); RO_cmd = 1;
    @(negedge clock); RO_cmd = 0;
    if (stall) begin
      repeat (20) @(negedge clock);
      USB_TXEn = 1;
      repeat (40) @(negedge clock);
      check(sent.size() < N && sent.size() > 0, "transfer held while FIFO full");
      begin
        int held = sent.size();
        repeat (20) @(negedge clock);
        check(sent.size() == held, "no byte while FIFO full");
        // RO_cmd during a transfer is ignored
        RO_cmd = 1; @(negedge clock); RO_cmd = 0;
      end
      USB_TXEn = 0;
    end
    wait (n_end == 1);
    repeat (10) @(negedge clock);
    check(sent.size() == N, $sformatf("%0d bytes sent", sent.size()));
    foreach (sent[i]) check(sent[i] == 8'(i), $sformatf("byte %0d = %h", i, sent[i]));
    check(n_end == 1, "one RO_end_cmd");
  endtask

  initial begin
    repeat (3000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 1'b0;
    repeat (10) @(negedge clock);
    check(sent.size() == 0 && n_end == 0, "quiet without RO_cmd");
    readout(1'b0);
    readout(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
