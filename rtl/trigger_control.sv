// trigger_control: acts on decoded fast commands and fills the Trigger FIFO.
//
// Keeps the 8-bit Event Counter (EC) and the 12-bit Bunch Counter (BC, +1 every
// 40 MHz cycle). For each readout trigger (LV1A, or the calibration trigger
// from calib_ctrl) it:
//   * drops it silently if the trigger inhibit logic is enabled and the PACE3
//     trigger FIFO emulator reports full (counted in inhib_cnt);
//   * otherwise increments EC; if the Trigger FIFO has no room for two more
//     words the trigger is lost (not sent to the PACE3, counted in lost_cnt);
//   * otherwise sends a one-cycle trigger to the PACE3s and writes two words:
//     {type, pace_ovf, lost, EC, BC} and {lost_cnt, inhib_cnt}.
// pace_ovf marks a trigger the PACE3 cannot store (inhibit disabled, PACE3
// FIFO full); the event will be sent as a NULL event.
// ReSync clears EC, BC, counters and (via fifo_clr) the Data, Column and
// Trigger FIFOs; BC0 clears EC and BC.
// The command actions follow the chip; the word layout, counting lost
// triggers in EC and the one-trigger pending slot are this design's choices.
// Timing: trigger in cycle c -> pace_trig and word 0 in cycle c+1, word 1 in c+2.
module trigger_control
  import kchip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lv1a,
  input  logic        cal_trig,
  input  logic        resync,
  input  logic        bc0,
  input  logic        inhibit_en,
  input  logic        pace_full,       // PACE3 trigger FIFO emulator full
  input  logic [7:0]  tfifo_free,      // free words in the Trigger FIFO (saturated)
  output logic        pace_trig,       // trigger to the PACE3 chips
  output logic        tfifo_we,
  output logic [TFIFO_W-1:0] tfifo_wdata,
  output logic        fifo_clr,
  output logic [7:0]  ec,
  output logic [11:0] bc,
  output logic [11:0] last_bc,         // BC that tagged the last event
  output logic        ev_stored,       // pulse: trigger stored
  output logic        ev_lost,         // pulse: trigger lost, Trigger FIFO full
  output logic        ev_inhibited     // pulse: trigger filtered by inhibit logic
);
  logic       pend_cal;     // calibration trigger waiting for a free slot
  logic       wr1;          // second word due this cycle
  logic [7:0] lost_cnt, inhib_cnt;
  trig_w1_t   w1;

  logic       trig_now;
  ev_type_e   trig_type;
  logic [7:0] ec_base;      // EC after a BC0 in the same cycle
  logic [11:0] bc_base;
  always_comb begin
    ec_base   = bc0 ? 8'd0 : ec;
    bc_base   = bc0 ? 12'd0 : bc;
    trig_now  = !wr1 && (lv1a || cal_trig || pend_cal);
    trig_type = lv1a ? EV_NORMAL : EV_CALIB;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ec <= '0; bc <= '0; last_bc <= '0;
      pend_cal <= 1'b0; wr1 <= 1'b0;
      lost_cnt <= '0; inhib_cnt <= '0;
      pace_trig <= 1'b0; tfifo_we <= 1'b0; tfifo_wdata <= '0; fifo_clr <= 1'b0;
      ev_stored <= 1'b0; ev_lost <= 1'b0; ev_inhibited <= 1'b0;
      w1 <= '0;
    end else begin
      pace_trig <= 1'b0; tfifo_we <= 1'b0; fifo_clr <= 1'b0;
      ev_stored <= 1'b0; ev_lost <= 1'b0; ev_inhibited <= 1'b0;
      bc <= bc + 12'd1;
      if (resync) begin
        ec <= '0; bc <= '0; pend_cal <= 1'b0; wr1 <= 1'b0;
        lost_cnt <= '0; inhib_cnt <= '0;
        fifo_clr <= 1'b1;
      end else begin
        ec <= ec_base;
        bc <= bc_base + 12'd1;
        // a calibration trigger that cannot be served now waits one slot
        if (cal_trig && (lv1a || wr1)) pend_cal <= 1'b1;
        else if (trig_now && !lv1a)    pend_cal <= 1'b0;

        if (wr1) begin
          wr1         <= 1'b0;
          tfifo_we    <= 1'b1;
          tfifo_wdata <= w1;
        end else if (trig_now) begin
          if (inhibit_en && pace_full) begin
            ev_inhibited <= 1'b1;
            if (inhib_cnt != 8'hFF) inhib_cnt <= inhib_cnt + 8'd1;
          end else if (tfifo_free < 8'(TRIG_WORDS)) begin
            ev_lost <= 1'b1;
            ec <= ec_base + 8'd1;
            if (lost_cnt != 8'hFF) lost_cnt <= lost_cnt + 8'd1;
          end else begin
            ev_stored    <= 1'b1;
            pace_trig    <= 1'b1;
            ec <= ec_base + 8'd1;
            last_bc      <= bc_base;
            tfifo_we     <= 1'b1;
            tfifo_wdata  <= {trig_type, pace_full, (lost_cnt != '0), 3'b000,
                             ec_base + 8'd1, bc_base};
            w1           <= '{lost_cnt: lost_cnt, inhib_cnt: inhib_cnt, rsv: '0};
            wr1          <= 1'b1;
            lost_cnt     <= '0;
            inhib_cnt    <= '0;
          end
        end
      end
    end
  end
endmodule
