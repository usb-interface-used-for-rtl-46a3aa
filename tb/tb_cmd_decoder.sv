// tb_cmd_decoder: self-checking test of the command decoder.
// For each command code it raises USB_cmd with the command word, checks that
// exactly the matching order is pulsed once, that end_cmd stays low until the
// matching completion signal arrives (other completions are ignored), that
// end_cmd is then a single pulse, and that nothing restarts while USB_cmd is
// still high. An unknown code must be answered with end_cmd at once.
module tb_cmd_decoder;
  logic clk = 1'b0, reset = 1'b0;
  initial #1ns reset = 1'b1;
  always #12.5ns clk = ~clk;

  logic        USB_cmd = 1'b0;
  logic [15:0] command = '0;
  logic SC_end_cmd = 0, Acq_end_cmd = 0, RO_end_cmd = 0, RamFullExt_end_cmd = 0, TrigExt_end_cmd = 0;
  logic end_cmd, load_SC, load_no_check_SC, start_acq_cmd, RamFullExt_cmd, TrigExt_cmd, RO_cmd;

  int checks = 0, failures = 0;

  cmd_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count pulses of every output.
  int n_order[6] = '{default: 0};
  int n_end = 0;
  always @(posedge clk) if (!reset) begin
    n_order[0] += int'(load_SC);
    n_order[1] += int'(load_no_check_SC);
    n_order[2] += int'(start_acq_cmd);
    n_order[3] += int'(RamFullExt_cmd);
    n_order[4] += int'(TrigExt_cmd);
    n_order[5] += int'(RO_cmd);
    n_end      += int'(end_cmd);
  end

  task automatic pulse_end(input int which);
    @(negedge clk);
    case (which)
      0: SC_end_cmd = 1; 1: Acq_end_cmd = 1; 2: RamFullExt_end_cmd = 1;
      3: TrigExt_end_cmd = 1; default: RO_end_cmd = 1;
    endcase
    @(negedge clk);
    {SC_end_cmd, Acq_end_cmd, RamFullExt_end_cmd, TrigExt_end_cmd, RO_end_cmd} = '0;
  endtask

  // code, expected order index, completion index
  task automatic run(input logic [7:0] code, input int order, input int compl);
    int prev[6];
    int e0;
    prev = n_order; e0 = n_end;
    @(negedge clk); command = {8'h80, code}; USB_cmd = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 6; i++)
      check(n_order[i] - prev[i] == ((i == order) ? 1 : 0),
            $sformatf("code %h: order %0d pulsed %0d times", code, i, n_order[i] - prev[i]));
    // a wrong completion first: must be ignored
    pulse_end((compl + 1) % 5);
    repeat (3) @(negedge clk);
    check(n_end == e0, $sformatf("code %h: no end_cmd on another completion", code));
    pulse_end(compl);
    repeat (2) @(negedge clk);
    check(n_end == e0 + 1, $sformatf("code %h: one end_cmd", code));
    repeat (5) @(negedge clk);
    check(n_end == e0 + 1, "end_cmd is a single pulse");
    for (int i = 0; i < 6; i++)
      check(n_order[i] - prev[i] == ((i == order) ? 1 : 0), "no new order while USB_cmd high");
    USB_cmd = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);
    check(n_end == 0 && !end_cmd, "idle after reset");
    run(8'h01, 0, 0);
    run(8'h11, 1, 0);
    run(8'h02, 2, 1);
    run(8'h21, 3, 2);
    run(8'h22, 4, 3);
    run(8'h03, 5, 4);
    // unknown code
    e0 = n_end;
    @(negedge clk); command = 16'h80FF; USB_cmd = 1'b1;
    repeat (4) @(negedge clk);
    check(n_end == e0 + 1, "unknown code finishes at once");
    USB_cmd = 1'b0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
