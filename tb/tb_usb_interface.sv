// tb_usb_interface: self-checking test of usb_interface against the FT245B
// bus model. It sends bytes from the PC side and checks that they appear on
// Rx_data in order, one usb_strobe each, spaced by 1 + RD_PULSE + RECOVER
// cycles when the PC keeps the FIFO filled; it offers bytes with
// usb_write_ask and checks that the PC side receives them in order; it holds
// the transmit FIFO full and checks that nothing is written until it frees
// up; and it offers a byte while PC data is waiting, checking that both get
// through; and it holds rx_enable low and checks that PC bytes wait in the
// FIFO until it rises. The bus model counts FT245B timing violations as failures.
module tb_usb_interface;
  logic clock = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;   // an edge, so the asynchronous reset acts
  logic usb_write_ask = 1'b0;
  logic [7:0] tx_data = '0;
  logic [7:0] usb_d_in, usb_d_out, Rx_data;
  logic USB_TXEn, USB_RXFn, USB_data_oe, USB_rdn, USB_wr, USB_SIWU;
  logic usb_strobe, writing, reading;
  logic full = 1'b0;
  logic rx_enable = 1'b1;

  int checks = 0, failures = 0;
  localparam int PERIOD = 1 + 3 + 5;

  always #12.5ns clock = ~clock;

  usb_interface dut (
    .clock, .reset, .USB_TXEn, .USB_RXFn, .rx_enable, .usb_write_ask, .tx_data,
    .USB_data_i(usb_d_in), .USB_data_o(usb_d_out), .USB_data_oe, .Rx_data,
    .USB_rdn, .USB_wr, .USB_SIWU, .usb_strobe, .writing, .reading
  );

  ft245b_model fifo (
    .reset,
    .RDn(USB_rdn), .WR(USB_wr), .data_from_fpga(usb_d_out),
    .data_oe(USB_data_oe), .full, .data_to_fpga(usb_d_in),
    .RXFn(USB_RXFn), .TXEn(USB_TXEn)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Record every received byte and the cycle it arrived.
  logic [7:0] got[$];
  longint     got_cycle[$];
  longint     cycle = 0;
  always @(posedge clock) begin
    cycle <= cycle + 1;
    if (usb_strobe && !reset) begin got.push_back(Rx_data); got_cycle.push_back(cycle); end
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clock);
    check(!writing, "writing low before ask");
    usb_write_ask = 1'b1; tx_data = b;
    @(negedge clock);
    usb_write_ask = 1'b0; tx_data = 8'hXX;
    check(writing, "writing high after ask");
    while (writing) @(negedge clock);
  endtask

  initial begin
    repeat (3000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] pat[8] = '{8'h12, 8'h34, 8'h56, 8'h78, 8'h9A, 8'hBC, 8'hDE, 8'hF0};
    repeat (3) @(negedge clock);
    reset = 1'b0;
    check(USB_SIWU == 1'b1 && reading == 1'b0, "SIWU high, reading low");
    check(USB_rdn && !USB_wr && !USB_data_oe, "bus idle after reset");

    // PC to FPGA: eight bytes queued at once.
    foreach (pat[i]) fifo.pc_send(pat[i]);
    wait (got.size() == 8);
    @(negedge clock);
    foreach (pat[i]) check(got[i] == pat[i], $sformatf("rx byte %0d = %h", i, got[i]));
    for (int i = 1; i < 8; i++)
      check(got_cycle[i] - got_cycle[i-1] == longint'(PERIOD),
            $sformatf("rx spacing %0d cycles", got_cycle[i] - got_cycle[i-1]));

    // FPGA to PC.
    for (int i = 0; i < 4; i++) send_byte(8'hA0 + 8'(i));
    repeat (10) @(negedge clock);
    check(fifo.pc_rx.size() == 4, "four bytes written");
    for (int i = 0; i < 4; i++)
      if (i < fifo.pc_rx.size()) check(fifo.pc_rx[i] == 8'hA0 + 8'(i), "tx byte value");

    // Transmit FIFO full: the write waits.
    full = 1'b1;
    @(negedge clock);
    usb_write_ask = 1'b1; tx_data = 8'h5A;
    @(negedge clock);
    usb_write_ask = 1'b0;
    repeat (40) @(negedge clock);
    check(writing, "write held while FIFO full");
    check(fifo.pc_rx.size() == 4, "nothing written while full");
    full = 1'b0;
    while (writing) @(negedge clock);
    check(fifo.pc_rx.size() == 5 && fifo.pc_rx[4] == 8'h5A, "byte written after full clears");

    // A write pending while PC data waits: both complete.
    got.delete();
    fifo.pc_send(8'h3C);
    @(negedge clock);
    usb_write_ask = 1'b1; tx_data = 8'hC3;
    @(negedge clock);
    usb_write_ask = 1'b0;
    repeat (60) @(negedge clock);
    check(got.size() == 1 && got[0] == 8'h3C, "rx byte after contention");
    check(fifo.pc_rx.size() == 6 && fifo.pc_rx[5] == 8'hC3, "tx byte after contention");

    // rx_enable low: bytes stay in the FIFO until it rises.
    got.delete();
    rx_enable = 1'b0;
    fifo.pc_send(8'h66);
    fifo.pc_send(8'h77);
    repeat (50) @(negedge clock);
    check(got.size() == 0 && fifo.pc_tx.size() == 2, "no read while rx_enable low");
    rx_enable = 1'b1;
    repeat (40) @(negedge clock);
    check(got.size() == 2 && got[0] == 8'h66 && got[1] == 8'h77, "bytes read after rx_enable");

    check(fifo.errors == 0, $sformatf("FT245B timing errors: %0d", fifo.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
