// cmd_decoder: executes the USB commands of the DIF.
//
// Used only in command mode (address word bit 15 set). When USB_cmd rises,
// the low byte of the command word selects one order, which is pulsed for one
// cycle:
//   x01 load_SC           (load the slow control and check it)
//   x11 load_no_check_SC  (load the slow control without checking)
//   x02 start_acq_cmd     (start the acquisition)
//   x21 RamFullExt_cmd    (send RamFullExt to the HARDROC chips)
//   x22 TrigExt_cmd       (send TrigExt to the HARDROC chips)
//   x03 RO_cmd            (start the digital readout)
// The decoder then waits for the completion signal of that order (SC_end_cmd
// for both slow-control loads, Acq_end_cmd, RamFullExt_end_cmd,
// TrigExt_end_cmd, RO_end_cmd) and pulses end_cmd for one cycle. An unknown
// code is answered with end_cmd at once. After end_cmd the decoder waits for
// USB_cmd to fall before it accepts the next command.
//
// The codes and the order/completion pairs follow the DIF command list; the
// one-cycle pulses, the use of the low byte only and the handling of unknown
// codes are this design's choices.
module cmd_decoder
  import dif_usb_pkg::*;
(
  input  logic        clk,                 // 40 MHz
  input  logic        reset,               // asynchronous, active high
  input  logic        USB_cmd,             // a command is active
  input  logic [15:0] command,             // command word
  input  logic        SC_end_cmd,          // slow control finished
  input  logic        Acq_end_cmd,         // acquisition finished
  input  logic        RO_end_cmd,          // readout finished
  input  logic        RamFullExt_end_cmd,  // RamFullExt has been sent
  input  logic        TrigExt_end_cmd,     // TrigExt has been sent
  output logic        end_cmd,             // the command has finished
  output logic        load_SC,
  output logic        load_no_check_SC,
  output logic        start_acq_cmd,
  output logic        RamFullExt_cmd,
  output logic        TrigExt_cmd,
  output logic        RO_cmd
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_END, S_RELEASE} state_e;
  typedef enum logic [2:0] {W_SC, W_ACQ, W_RAMFULL, W_TRIG, W_RO} wait_e;

  state_e state;
  wait_e  waiting_for;
  logic   done;

  always_comb begin
    unique case (waiting_for)
      W_SC:      done = SC_end_cmd;
      W_ACQ:     done = Acq_end_cmd;
      W_RAMFULL: done = RamFullExt_end_cmd;
      W_TRIG:    done = TrigExt_end_cmd;
      W_RO:      done = RO_end_cmd;
      default:   done = 1'b0;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state            <= S_IDLE;
      waiting_for      <= W_SC;
      end_cmd          <= 1'b0;
      load_SC          <= 1'b0;
      load_no_check_SC <= 1'b0;
      start_acq_cmd    <= 1'b0;
      RamFullExt_cmd   <= 1'b0;
      TrigExt_cmd      <= 1'b0;
      RO_cmd           <= 1'b0;
    end else begin
      end_cmd          <= 1'b0;
      load_SC          <= 1'b0;
      load_no_check_SC <= 1'b0;
      start_acq_cmd    <= 1'b0;
      RamFullExt_cmd   <= 1'b0;
      TrigExt_cmd      <= 1'b0;
      RO_cmd           <= 1'b0;
      unique case (state)
        S_IDLE: if (USB_cmd) begin
          state <= S_WAIT_END;
          case (command[7:0])
            CMD_LOAD_SC:          begin load_SC          <= 1'b1; waiting_for <= W_SC;      end
            CMD_LOAD_SC_NO_CHECK: begin load_no_check_SC <= 1'b1; waiting_for <= W_SC;      end
            CMD_START_ACQ:        begin start_acq_cmd    <= 1'b1; waiting_for <= W_ACQ;     end
            CMD_RAMFULL_EXT:      begin RamFullExt_cmd   <= 1'b1; waiting_for <= W_RAMFULL; end
            CMD_TRIG_EXT:         begin TrigExt_cmd      <= 1'b1; waiting_for <= W_TRIG;    end
            CMD_READOUT:          begin RO_cmd           <= 1'b1; waiting_for <= W_RO;      end
            default: begin                      // unknown code: finish at once
              end_cmd <= 1'b1;
              state   <= S_RELEASE;
            end
          endcase
        end
        S_WAIT_END: if (done) begin
          end_cmd <= 1'b1;
          state   <= S_RELEASE;
        end
        S_RELEASE: if (!USB_cmd) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
