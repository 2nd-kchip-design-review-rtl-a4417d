// pace_supervisor: PACE3 trigger FIFO emulator and readout-sequence checker.
//
// The Kchip cannot see inside the PACE3 chips, so it runs a copy of their
// readout sequencer. `pend` counts the events held in the PACE3 trigger FIFO:
// +1 for each trigger sent while it is below PACE_DEPTH, -1 when the readout
// of an event ends. Whenever events are pending and the sequencer is idle it
// waits RO_DELAY cycles and then runs one readout sequence of 3 slots
// (J, K, L) x 32 samples, one sample per clock, during which the PACE3
// DataValid lines are expected high. The expected AlmostFull is
// pend >= AF_LEVEL. For every enabled stream the real DataValid and AlmostFull
// are compared with the expected ones each cycle; a mismatch sets a sticky
// per-stream error flag ("PACE out of sync"), cleared by ReSync.
// `pace_full` tells the trigger logic whether a trigger issued now would find
// the PACE3 FIFO full (used by the trigger inhibit logic and to mark NULL
// events); it already accounts for a readout ending this cycle.
// Emulating the sequencer, counting pending events and cross-checking the
// four DataValid and AlmostFull lines follow the chip; PACE_DEPTH, AF_LEVEL
// and RO_DELAY are this design's values, as the PACE3 figures are not given.
// SEU protection: the state register (st) is kept in three copies; the
// logic uses their bitwise majority, every clock reloads all three with the
// voted (or next) state, and fsm_upset is high while a copy disagrees. The
// triplication follows the chip; the scrubbing is this design's choice.
module pace_supervisor
  import kchip_pkg::*;
#(
  parameter int unsigned PACE_DEPTH = 32,
  parameter int unsigned AF_LEVEL   = 28,
  parameter int unsigned RO_DELAY   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               resync,
  input  logic               pace_trig,     // trigger sent to the PACE3s
  input  logic [NSTREAM-1:0] stream_en,
  input  logic [NSTREAM-1:0] pace_dv,
  input  logic [NSTREAM-1:0] pace_af,
  output logic               pace_full,
  output logic               ro_active,     // expected DataValid
  output logic               ro_first,
  output logic               ro_last,
  output logic [1:0]         ro_slot,       // 0 J, 1 K, 2 L
  output logic [4:0]         ro_chan,
  output logic [NSTREAM-1:0] dv_mis,        // DataValid mismatch this cycle
  output logic [NSTREAM-1:0] dv_err,        // sticky
  output logic [NSTREAM-1:0] af_err,        // sticky
  output logic [7:0]         ro_cnt,        // readouts started since ReSync
  output logic [$clog2(PACE_DEPTH+1)-1:0] pend,
  output logic               pace_ovf,      // pulse: trigger found PACE3 FIFO full
  output logic        fsm_upset      // the copies of the state register disagree
);
  localparam int unsigned PW = $clog2(PACE_DEPTH+1);
  localparam int unsigned DW = $clog2(RO_DELAY+2);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_READ} seq_e;
  seq_e      st;
  seq_e st_r [3];   // three copies of the state (TMR)
  always_comb begin
    st = seq_e'((st_r[0] & st_r[1]) | (st_r[1] & st_r[2]) | (st_r[0] & st_r[2]));
    fsm_upset = (st_r[0] != st_r[1]) || (st_r[1] != st_r[2]);
  end
  logic [DW-1:0] dcnt;
  logic [6:0] rcnt;            // 0..95 sample index within the event
  logic       af_exp;
  logic [PW-1:0] pend_dec;

  always_comb begin
    ro_active = (st == S_READ);
    ro_first  = ro_active && (rcnt == 7'd0);
    ro_last   = ro_active && (rcnt == 7'(EVT_WORDS-1));
    ro_slot   = (rcnt >= 7'(2*NCHAN)) ? 2'd2 : (rcnt >= 7'(NCHAN)) ? 2'd1 : 2'd0;
    ro_chan   = rcnt[4:0];
    pend_dec  = pend - PW'(ro_last);
    pace_full = (pend_dec == PW'(PACE_DEPTH));
    af_exp    = (pend >= PW'(AF_LEVEL));
    dv_mis    = stream_en & (pace_dv ^ {NSTREAM{ro_active}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_r <= '{S_IDLE, S_IDLE, S_IDLE}; dcnt <= '0; rcnt <= '0; pend <= '0;
      dv_err <= '0; af_err <= '0; ro_cnt <= '0; pace_ovf <= 1'b0;
    end else if (resync) begin
      st_r <= '{st, st, st};   // scrub
      st_r <= '{S_IDLE, S_IDLE, S_IDLE}; dcnt <= '0; rcnt <= '0; pend <= '0;
      dv_err <= '0; af_err <= '0; ro_cnt <= '0; pace_ovf <= 1'b0;
    end else begin
      st_r <= '{st, st, st};   // scrub
      pace_ovf <= 1'b0;
      // event bookkeeping
      if (pace_trig && pend < PW'(PACE_DEPTH)) pend <= pend_dec + PW'(1);
      else                                      pend <= pend_dec;
      if (pace_trig && pend >= PW'(PACE_DEPTH)) pace_ovf <= 1'b1;
      // readout sequencer
      unique case (st)
        S_IDLE: if (pend != '0) begin st_r <= '{S_WAIT, S_WAIT, S_WAIT}; dcnt <= DW'(RO_DELAY); end
        S_WAIT: if (dcnt == '0) begin st_r <= '{S_READ, S_READ, S_READ}; rcnt <= '0; ro_cnt <= ro_cnt + 8'd1; end
                else dcnt <= dcnt - DW'(1);
        S_READ: if (ro_last) st_r <= '{S_IDLE, S_IDLE, S_IDLE};
                else rcnt <= rcnt + 7'd1;
        default: st_r <= '{S_IDLE, S_IDLE, S_IDLE};
      endcase
      // cross-checks
      dv_err <= dv_err | dv_mis;
      af_err <= af_err | (stream_en & (pace_af ^ {NSTREAM{af_exp}}));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pend <= PW'(PACE_DEPTH));
endmodule
