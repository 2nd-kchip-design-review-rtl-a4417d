// calib_ctrl: calibration pulse generator and calibration-trigger latency timer.
//
// A CalPulse command starts two counters. The first drives `cal_req` high for
// `width` clock cycles (1..256; a register value of 0 means 256), starting on
// the cycle after the command; on the chip this request goes through the DLL,
// which shifts it by a programmable fraction of the clock before it reaches
// the PACE3. The second counts `latency` cycles (0 means 256) from the
// command and then, if `cal_trig_en`, emits a one-cycle `cal_trig`: the Kchip's
// own readout trigger for the calibration event. CalPulse commands that arrive
// while either counter runs are ignored (`ignored` pulses).
// The width range, the latency register and the optional calibration trigger
// follow the chip; ignoring overlapping commands and the 0 = 256 encoding are
// this design's choices.
module calib_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       calpulse,     // decoded CalPulse command (1 cycle)
  input  logic       resync,       // abort a calibration in progress
  input  logic [7:0] width,        // CalPulse_WIDTH register
  input  logic [7:0] latency,      // LATENCY register
  input  logic       cal_trig_en,
  output logic       cal_req,      // calibration request towards DLL / PACE3
  output logic       cal_trig,     // readout trigger for the calibration event
  output logic       busy,
  output logic       ignored
);
  logic [8:0] wcnt;   // remaining pulse cycles
  logic [8:0] lcnt;   // remaining latency cycles
  logic       lrun;

  always_comb begin
    busy    = (wcnt != '0) || lrun;
    cal_req = (wcnt != '0);
    ignored = calpulse && busy;
    cal_trig = lrun && (lcnt == '0) && cal_trig_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; lcnt <= '0; lrun <= 1'b0;
    end else begin
      if (resync) begin
        wcnt <= '0; lcnt <= '0; lrun <= 1'b0;
      end else if (calpulse && !busy) begin
        wcnt <= (width   == 8'd0) ? 9'd256 : {1'b0, width};
        lcnt <= (latency == 8'd0) ? 9'd255 : {1'b0, latency} - 9'd1;
        lrun <= 1'b1;
      end else begin
        if (wcnt != '0) wcnt <= wcnt - 9'd1;
        if (lrun) begin
          if (lcnt == '0) begin
            lrun <= 1'b0;
          end else begin
            lcnt <= lcnt - 9'd1;
          end
        end
      end
    end
  end
endmodule
