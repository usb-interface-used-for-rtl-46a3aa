// tb_dif_usb_top: end-to-end test of the DIF USB control path.
// The FT245B bus model stands for the USB chip and the PC; small responders
// stand for the slow-control and acquisition logic and answer each order with
// its completion signal some cycles later. The PC side performs, through the
// real byte protocol: reads of every listed register with their reset values,
// writes and read-backs of the read/write registers (checking the register
// outputs), every command of the command list (checking that the matching
// order reaches its port exactly once), the readout command (checking the
// streamed block), an unknown command, a register read while the transmit
// FIFO is full for a while, and a read immediately followed by the next access
// so that PC data is waiting while a reply is pending. Each of these
// mechanisms is counted and must happen at least once. The top runs with its
// default parameters.
module tb_dif_usb_top;
  localparam int unsigned RO_BYTES = 16;   // the top's default readout length

  logic clock = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clock = ~clock;

  logic        USB_TXEn, USB_RXFn, USB_data_oe, USB_rdn, USB_wr, USB_SIWU;
  logic [7:0]  usb_d_in, usb_d_out;
  logic [7:0]  report_SC_reg = 8'h05, temperature_reg = 8'h21, dif_current_reg = 8'h32;
  logic [7:0]  slab_current_reg = 8'h43, channel4_monitoring_reg = 8'h54;
  logic [12:0] control_reg;
  logic [7:0]  NB_chip_reg, monitoring_reg, SC_debug_reg;
  logic        load_SC, load_no_check_SC, start_acq_cmd, RamFullExt_cmd, TrigExt_cmd;
  logic        SC_end_cmd = 0, Acq_end_cmd = 0, RamFullExt_end_cmd = 0, TrigExt_end_cmd = 0;
  logic        full = 1'b0;

  int checks = 0, failures = 0;

  dif_usb_top dut (
    .clock, .reset, .USB_TXEn, .USB_RXFn, .USB_data_i(usb_d_in), .USB_data_o(usb_d_out),
    .USB_data_oe, .USB_rdn, .USB_wr, .USB_SIWU, .report_SC_reg, .temperature_reg,
    .dif_current_reg, .slab_current_reg, .channel4_monitoring_reg, .control_reg,
    .NB_chip_reg, .monitoring_reg, .SC_debug_reg, .load_SC, .load_no_check_SC,
    .start_acq_cmd, .RamFullExt_cmd, .TrigExt_cmd, .SC_end_cmd, .Acq_end_cmd,
    .RamFullExt_end_cmd, .TrigExt_end_cmd
  );

  ft245b_model fifo (
    .reset, .RDn(USB_rdn), .WR(USB_wr), .data_from_fpga(usb_d_out), .data_oe(USB_data_oe),
    .full, .data_to_fpga(usb_d_in), .RXFn(USB_RXFn), .TXEn(USB_TXEn)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  typedef enum int {M_REG_WRITE, M_REG_READ, M_CMD_LOAD_SC, M_CMD_LOAD_NC, M_CMD_ACQ,
                    M_CMD_RAMFULL, M_CMD_TRIG, M_CMD_READOUT, M_CMD_UNKNOWN,
                    M_TX_FULL_STALL, M_RX_WHILE_TX_PENDING, M_COUNT} mech_e;
  int mech[M_COUNT] = '{default: 0};

  // Orders seen at the ports; completions answered after a delay.
  int n_order[5] = '{default: 0};
  always @(posedge clock) if (!reset) begin
    n_order[0] += int'(load_SC);
    n_order[1] += int'(load_no_check_SC);
    n_order[2] += int'(start_acq_cmd);
    n_order[3] += int'(RamFullExt_cmd);
    n_order[4] += int'(TrigExt_cmd);
    if (dut.USB.tx_pending && !USB_RXFn && dut.USB.tx_state == dut.USB.TX_IDLE) mech[M_RX_WHILE_TX_PENDING]++;
    if ((dut.USB.tx_pending || dut.RW.state == dut.RW.S_TX_ASK) && USB_TXEn && full)
      mech[M_TX_FULL_STALL]++;
  end

  task automatic respond(ref logic done_sig, input int delay);
    repeat (delay) @(posedge clock);
    done_sig <= 1'b1;
    @(posedge clock);
    done_sig <= 1'b0;
  endtask
  always @(posedge clock) if (!reset) begin
    if (load_SC || load_no_check_SC) fork respond(SC_end_cmd, 30); join_none
    if (start_acq_cmd)  fork respond(Acq_end_cmd, 12); join_none
    if (RamFullExt_cmd) fork respond(RamFullExt_end_cmd, 5); join_none
    if (TrigExt_cmd)    fork respond(TrigExt_end_cmd, 8); join_none
  end

  // PC side.
  task automatic pc_bytes(input logic [7:0] b[]);
    foreach (b[i]) fifo.pc_send(b[i]);
  endtask

  task automatic wait_rx(input int n);
    int guard = 0;
    while (fifo.pc_rx.size() < n && guard < 4000) begin @(negedge clock); guard++; end
  endtask

  task automatic wait_idle();
    // all PC bytes consumed and the access machine back at its start
    while (fifo.pc_tx.size() != 0 || dut.RW.state != dut.RW.S_ADDR_H || dut.USB.writing) @(negedge clock);
    repeat (20) @(negedge clock);
  endtask

  task automatic reg_write(input logic [13:0] a, input logic [31:0] d);
    pc_bytes('{{2'b00, a[13:8]}, a[7:0], d[31:24], d[23:16], d[15:8], d[7:0]});
    wait_idle();
    mech[M_REG_WRITE]++;
  endtask

  task automatic reg_read(input logic [13:0] a, input logic [31:0] exp);
    logic [31:0] got;
    fifo.pc_rx.delete();
    pc_bytes('{{2'b01, a[13:8]}, a[7:0]});
    wait_rx(4);
    got = {fifo.pc_rx[0], fifo.pc_rx[1], fifo.pc_rx[2], fifo.pc_rx[3]};
    check(got == exp, $sformatf("register %0d = %h, expected %h", a, got, exp));
    wait_idle();
    check(fifo.pc_rx.size() == 4, "exactly four bytes per read");
    mech[M_REG_READ]++;
  endtask

  task automatic command(input logic [7:0] code, input int order, input mech_e m);
    int prev[5];
    prev = n_order;
    fifo.pc_rx.delete();
    pc_bytes('{8'h80, code});
    wait_idle();
    for (int i = 0; i < 5; i++)
      check(n_order[i] - prev[i] == ((i == order) ? 1 : 0),
            $sformatf("command %h: order %0d seen %0d times", code, i, n_order[i] - prev[i]));
    check(!dut.USB_CMD, "command finished");
    mech[m]++;
  endtask

  initial begin
    repeat (60000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 1'b0;
    repeat (5) @(negedge clock);
    check(control_reg == 13'h1F3F && NB_chip_reg == 1 && monitoring_reg == 8'hF9 && SC_debug_reg == 0,
          "register outputs at reset");

    // Register map after reset.
    reg_read(0,  32'h9876_5432);
    reg_read(1,  32'hBABA_CAFE);
    reg_read(2,  32'h1234_ABCD);
    reg_read(3,  32'h0000_1F3F);
    reg_read(4,  32'h2222_2222);
    reg_read(5,  32'h0000_0001);
    reg_read(6,  32'h0000_0005);
    reg_read(10, 32'h0000_00F9);
    reg_read(11, 32'h0000_0021);
    reg_read(12, 32'h0000_0032);
    reg_read(13, 32'h0000_0043);
    reg_read(14, 32'h0000_0054);
    reg_read(19, 32'h0000_0000);

    // Writes and read-back.
    reg_write(2, 32'h0BAD_F00D);  reg_read(2, 32'h0BAD_F00D);
    reg_write(3, 32'h0000_1E3E);  reg_read(3, 32'h0000_1E3E);
    check(control_reg == 13'h1E3E, "control_reg port after write");
    reg_write(5, 32'h0000_0007);  reg_read(5, 32'h0000_0007);
    check(NB_chip_reg == 8'h07, "NB_chip_reg port after write");
    reg_write(10, 32'h0000_0042); check(monitoring_reg == 8'h42, "monitoring_reg port");
    reg_write(19, 32'h0000_0003); check(SC_debug_reg == 8'h03, "SC_debug_reg port");
    reg_write(1, 32'h0);          reg_read(1, 32'hBABA_CAFE);

    // Commands.
    command(8'h01, 0, M_CMD_LOAD_SC);
    command(8'h11, 1, M_CMD_LOAD_NC);
    command(8'h02, 2, M_CMD_ACQ);
    command(8'h21, 3, M_CMD_RAMFULL);
    command(8'h22, 4, M_CMD_TRIG);
    command(8'h55, -1, M_CMD_UNKNOWN);

    // Readout: a block of RO_BYTES bytes 0, 1, 2, ...
    fifo.pc_rx.delete();
    pc_bytes('{8'h80, 8'h03});
    wait_rx(RO_BYTES);
    wait_idle();
    check(fifo.pc_rx.size() == RO_BYTES, $sformatf("readout length %0d", fifo.pc_rx.size()));
    foreach (fifo.pc_rx[i]) check(fifo.pc_rx[i] == 8'(i), $sformatf("readout byte %0d = %h", i, fifo.pc_rx[i]));
    check(!dut.readout, "readout flag cleared");
    mech[M_CMD_READOUT]++;

    // A register read after the readout still answers from the registers.
    reg_read(2, 32'h0BAD_F00D);

    // Transmit FIFO full during a read reply.
    full = 1'b1;
    fifo.pc_rx.delete();
    pc_bytes('{8'h40, 8'h01});
    repeat (200) @(negedge clock);
    check(fifo.pc_rx.size() == 0, "no reply while FIFO full");
    full = 1'b0;
    wait_rx(4);
    check({fifo.pc_rx[0], fifo.pc_rx[1], fifo.pc_rx[2], fifo.pc_rx[3]} == 32'hBABA_CAFE,
          "reply after FIFO full");
    wait_idle();

    // Read request immediately followed by a write: PC data waits while
    // the reply is being sent.
    fifo.pc_rx.delete();
    pc_bytes('{8'h40, 8'h02, 8'h00, 8'h13, 8'h00, 8'h00, 8'h00, 8'h44});
    wait_rx(4);
    wait_idle();
    check({fifo.pc_rx[0], fifo.pc_rx[1], fifo.pc_rx[2], fifo.pc_rx[3]} == 32'h0BAD_F00D,
          "pipelined read reply");
    check(SC_debug_reg == 8'h44, "pipelined write applied");
    mech[M_REG_WRITE]++;

    check(fifo.errors == 0, $sformatf("FT245B bus protocol errors: %0d", fifo.errors));
    for (int m = 0; m < M_COUNT; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-24s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
