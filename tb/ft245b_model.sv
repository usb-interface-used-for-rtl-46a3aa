// ft245b_model: behavioural model of the FT245B USB FIFO chip, bus side only.
// Not synthesizable; used by the testbenches in place of the real chip.
//
// The PC side is two queues. Bytes the PC sends are queued with pc_send();
// RXFn is low while one is available. Pulling RDn low makes the byte appear on
// data_to_fpga 40 ns later (before that the bus shows the inverted byte, so
// early sampling is caught); the rising edge of RDn removes it and holds RXFn
// high for 100 ns. Bytes written by the FPGA (falling edge of WR) are stored
// in pc_rx, after which TXEn is held high for 100 ns; while `full` is high TXEn
// stays high. Timing rules checked (errors counts violations): RDn low only
// while RXFn is low and for at least 50 ns; WR high only while TXEn is low and
// for at least 50 ns; data driven by the FPGA for at least 20 ns before WR
// falls; the FPGA never drives the bus while RDn is low. Strobe edges while
// reset is high (the FPGA pins settling) are ignored.
module ft245b_model (
  input  logic       reset,          // board reset: bus strobes ignored
  input  logic       RDn,
  input  logic       WR,
  input  logic [7:0] data_from_fpga,
  input  logic       data_oe,
  input  logic       full,           // test control: transmit FIFO full
  output logic [7:0] data_to_fpga,
  output logic       RXFn,
  output logic       TXEn
);
  logic [7:0] pc_tx[$];   // PC to FPGA, not yet read
  logic [7:0] pc_rx[$];   // FPGA to PC, received
  int   errors = 0;
  int   bytes_read = 0;
  int   bytes_written = 0;
  logic rx_recover = 1'b0;
  logic tx_recover = 1'b0;
  logic rx_avail = 1'b0;
  time  t_rd_fall = 0, t_wr_rise = 0, t_data = 0;
  logic [7:0] cur = 8'h00;

  function automatic void pc_send(input logic [7:0] b);
    pc_tx.push_back(b);
    rx_avail = 1'b1;
  endfunction

  assign RXFn = !rx_avail || rx_recover;
  assign TXEn = tx_recover || full;

  initial data_to_fpga = 8'h00;

  always @(data_from_fpga or data_oe) t_data = $time;

  always @(negedge RDn) if (!reset) begin
    t_rd_fall = $time;
    if (RXFn) begin errors++; $display("FT245B: RD# while RXF# high"); end
    cur = (pc_tx.size() > 0) ? pc_tx[0] : 8'h00;
    data_to_fpga = ~cur;
    #40ns;
    if (!RDn) data_to_fpga = cur;
  end

  always @(posedge RDn) if (!reset) begin
    if ($time - t_rd_fall < 50ns) begin errors++; $display("FT245B: RD# pulse too short"); end
    if (pc_tx.size() > 0) void'(pc_tx.pop_front());
    bytes_read++;
    rx_avail = pc_tx.size() > 0;
    data_to_fpga = ~cur;
    #15ns rx_recover = 1'b1;
    #85ns rx_recover = 1'b0;
  end

  always @(posedge WR) if (!reset) begin
    t_wr_rise = $time;
    if (TXEn) begin errors++; $display("FT245B: WR while TXE# high"); end
  end

  always @(negedge WR) if (!reset) begin
    if ($time - t_wr_rise < 50ns) begin errors++; $display("FT245B: WR pulse too short"); end
    if (!data_oe || ($time - t_data < 20ns)) begin
      errors++; $display("FT245B: data not set up before WR fell");
    end
    pc_rx.push_back(data_from_fpga);
    bytes_written++;
    #15ns tx_recover = 1'b1;
    #85ns tx_recover = 1'b0;
  end

  always @(negedge RDn or posedge data_oe)
    if (!reset && !RDn && data_oe) begin errors++; $display("FT245B: bus contention"); end

endmodule
