// data_capture: stores the samples of each PACE3 readout in the Data FIFOs and
// a per-event record in the Column Address FIFO.
//
// Driven by the supervisor's readout sequence (ro_first .. ro_last, 96 cycles).
// On the first cycle it checks that every Data FIFO has room for a whole event
// (96 words) and the Column FIFO for two records (12 words, one may still be
// in the write queue). If so, each cycle writes one 18-bit word per stream:
// {DataValid mismatch, channel number (5), ADC sample (12)}, in the order
// J1..J32, K1..K32, L1..L32. If not, the event is dropped (Data FIFO
// overflow) and will be sent as a NULL event.
// The PACE3 column address of each stream is taken on the first sample of
// each slot. After the last sample the record is written to the Column FIFO
// over six cycles: four words of {err, column} x J, K, L (one per stream), a
// status word {dv_err, af_err, readout number, BC} and a word holding the
// number of dropped events that came just before this one plus the
// complement of the readout number and BC as a check. Only stored events get
// a record, so the Column FIFO never holds more events than the Data FIFOs.
// Dropped events not yet covered by a record are counted in drop_pending;
// the event builder takes them one at a time with drop_ack.
// The Data FIFO words are the sample inputs themselves (only the write
// enables are decided here), so synthesis sees those outputs wired to inputs.
// 96 words/event, 6 words/event and the J/K/L order follow the chip's FIFO
// description; the contents of the 18- and 27-bit words are this design's.
module data_capture
  import kchip_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,            // ReSync
  input  logic               ro_active,
  input  logic               ro_first,
  input  logic               ro_last,
  input  logic [1:0]         ro_slot,
  input  logic [4:0]         ro_chan,
  input  logic [NSTREAM-1:0] dv_mis,
  input  logic [NSTREAM-1:0] dv_err,
  input  logic [NSTREAM-1:0] af_err,
  input  logic [7:0]         ro_cnt,
  input  logic [11:0]        bc,
  input  logic [NSTREAM-1:0][ADC_W-1:0] adc,
  input  logic [NSTREAM-1:0][COL_W-1:0] col,
  input  logic [NSTREAM-1:0][10:0]      dfifo_free,
  input  logic [7:0]         cfifo_free,
  output logic [NSTREAM-1:0] dfifo_we,
  output logic [NSTREAM-1:0][DFIFO_W-1:0] dfifo_wdata,
  output logic               cfifo_we,
  output logic [CFIFO_W-1:0] cfifo_wdata,
  input  logic               drop_ack,       // builder consumed one pending drop
  output logic [7:0]         drop_pending,   // dropped events after the last record
  output logic               ev_dropped,     // pulse: event not stored
  output logic               col_ovf         // sticky: a record was lost
);
  logic keep_q, room;
  logic [NSTREAM-1:0][NSLOT-1:0][COL_W-1:0] col_q;
  logic [NSTREAM-1:0][NSLOT-1:0]            err_q;
  col_word_t [NSTREAM-1:0] rec_col;
  col_stat_t rec_stat;
  col_chk_t  rec_chk;
  logic [2:0] wq;          // record words still to write (0 = none)
  logic       keep;
  logic [11:0] bc_q;

  always_comb begin
    room = (cfifo_free >= 8'(2*COL_WORDS));
    for (int s = 0; s < NSTREAM; s++)
      if (dfifo_free[s] < 11'(EVT_WORDS)) room = 1'b0;
    keep = ro_first ? room : keep_q;
    for (int s = 0; s < NSTREAM; s++) begin
      dfifo_we[s]    = ro_active && keep;
      dfifo_wdata[s] = {dv_mis[s], ro_chan, adc[s]};
    end
    cfifo_we = (wq != 3'd0);
    unique case (wq)
      3'd6: cfifo_wdata = rec_col[0];
      3'd5: cfifo_wdata = rec_col[1];
      3'd4: cfifo_wdata = rec_col[2];
      3'd3: cfifo_wdata = rec_col[3];
      3'd2: cfifo_wdata = rec_stat;
      3'd1: cfifo_wdata = rec_chk;
      default: cfifo_wdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      keep_q <= 1'b0; col_q <= '0; err_q <= '0; wq <= '0; rec_col <= '0;
      rec_stat <= '0; rec_chk <= '0; ev_dropped <= 1'b0; col_ovf <= 1'b0; bc_q <= '0;
      drop_pending <= '0;
    end else if (clr) begin
      keep_q <= 1'b0; wq <= '0; ev_dropped <= 1'b0; col_ovf <= 1'b0; drop_pending <= '0;
    end else begin
      ev_dropped <= 1'b0;
      drop_pending <= drop_pending - 8'(drop_ack && drop_pending != '0);
      if (ro_first) begin
        keep_q     <= room;
        ev_dropped <= !room;
        if (!room && drop_pending != 8'hFF)
          drop_pending <= drop_pending - 8'(drop_ack && drop_pending != '0) + 8'd1;
        bc_q       <= bc;
        err_q      <= '0;
      end
      if (ro_active) begin
        for (int s = 0; s < NSTREAM; s++) begin
          if (ro_chan == 5'd0) col_q[s][ro_slot] <= col[s];
          if (dv_mis[s]) err_q[s][ro_slot] <= 1'b1;
        end
      end
      if (cfifo_we) begin
        wq <= wq - 3'd1;
        if (cfifo_free == 8'd0) col_ovf <= 1'b1;
      end
      if (ro_last && keep) begin
        for (int s = 0; s < NSTREAM; s++) begin
          rec_col[s].err_j <= err_q[s][0]; rec_col[s].col_j <= col_q[s][0];
          rec_col[s].err_k <= err_q[s][1]; rec_col[s].col_k <= col_q[s][1];
          rec_col[s].err_l <= err_q[s][2] | dv_mis[s];
          rec_col[s].col_l <= col_q[s][2];
        end
        rec_stat <= '{dv_err: dv_err | dv_mis, af_err: af_err, ro_cnt: ro_cnt[6:0], bc: bc_q};
        rec_chk  <= '{drop_cnt: drop_pending - 8'(drop_ack && drop_pending != '0),
                      ro_cnt_n: ~ro_cnt[6:0], bc_n: ~bc_q};
        drop_pending <= '0;
        wq <= 3'd6;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ro_last |-> wq == 3'd0);
endmodule
