// trigger_decoder: decodes the serial fast-command (T1) line.
//
// The T1 line is low when idle. A command is a 3-bit pattern sent one bit
// per 40 MHz clock, always starting with a '1':
//   100 LV1A, 110 CalPulse, 101 ReSync, 111 BC0.
// After the leading '1' the next two bits are shifted in; the decoded command
// is issued as a one-cycle pulse on the clock after the third bit. Each command
// can be suppressed by its bit in the 4-bit trigger mask register
// (bit 0 LV1A, 1 CalPulse, 2 ReSync, 3 BC0). The last received pattern, masked
// or not, is kept for the Last Trigger Command register.
// The command patterns, the mask and the last-command register follow the
// chip; the bit order of the mask and the timing are this design's choices.
// SEU protection: the state register (bitcnt) is kept in three copies; the
// logic uses their bitwise majority, every clock reloads all three with the
// voted (or next) state, and fsm_upset is high while a copy disagrees. The
// triplication follows the chip; the scrubbing is this design's choice.
module trigger_decoder
  import kchip_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       t1,          // serial command line (already synchronous)
  input  logic [3:0] mask,        // 1 = command suppressed
  output logic       lv1a,
  output logic       calpulse,
  output logic       resync,
  output logic       bc0,
  output logic [2:0] last_cmd,    // last received 3-bit pattern
  output logic        fsm_upset      // the copies of the state register disagree
);
  logic [1:0] bitcnt;   // 0: waiting for start bit, 1..2: bits received
  logic [1:0] bitcnt_r [3];   // three copies of the state (TMR)
  always_comb begin
    bitcnt = (bitcnt_r[0] & bitcnt_r[1]) | (bitcnt_r[1] & bitcnt_r[2]) | (bitcnt_r[0] & bitcnt_r[2]);
    fsm_upset = (bitcnt_r[0] != bitcnt_r[1]) || (bitcnt_r[1] != bitcnt_r[2]);
  end
  logic       b1;       // second bit of the pattern

  logic       done;
  logic [2:0] pat;
  always_comb begin
    done = (bitcnt == 2'd2);
    pat  = {1'b1, b1, t1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt_r <= '{'0, '0, '0};
      b1       <= 1'b0;
      lv1a     <= 1'b0;
      calpulse <= 1'b0;
      resync   <= 1'b0;
      bc0      <= 1'b0;
      last_cmd <= '0;
    end else begin
      bitcnt_r <= '{bitcnt, bitcnt, bitcnt};   // scrub
      lv1a <= 1'b0; calpulse <= 1'b0; resync <= 1'b0; bc0 <= 1'b0;
      unique case (bitcnt)
        2'd0: if (t1) bitcnt_r <= '{2'd1, 2'd1, 2'd1};
        2'd1: begin b1 <= t1; bitcnt_r <= '{2'd2, 2'd2, 2'd2}; end
        default: begin
          bitcnt_r <= '{2'd0, 2'd0, 2'd0};
          last_cmd <= pat;
          unique case (t1_cmd_e'(pat))
            T1_LV1A:   lv1a     <= !mask[CMD_LV1A];
            T1_CALP:   calpulse <= !mask[CMD_CALP];
            T1_RESYNC: resync   <= !mask[CMD_RESYNC];
            T1_BC0:    bc0      <= !mask[CMD_BC0];
            default: ;
          endcase
        end
      endcase
    end
  end
  // `done` documents the decode point; kept for assertions
  assert property (@(posedge clk) disable iff (!rst_n) done |-> pat[2]);
endmodule
