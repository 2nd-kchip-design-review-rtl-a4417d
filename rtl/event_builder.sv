// event_builder: turns stored events into packets for the link layer.
//
// For each trigger it pops the two Trigger FIFO words. A trigger that the
// PACE3 could not store (pace_ovf) becomes a NULL event at once. Otherwise the
// event was read out, and was either stored or dropped for lack of Data FIFO
// room. Dropped events have no record: each stored event's six-word record in
// the Column Address FIFO says how many dropped events came just before it,
// and drop_pending counts those after the last record. So the builder first
// uses up the drop count of the record it holds (one NULL event each), then
// sends the stored event; with no record held it loads the next one, or, if
// the Column FIFO has none, takes one of the pending drops (drop_ack).
// Two sides work in parallel: the fetch side reads the trigger words and the
// record of the next packet while the send side transmits the current one, so
// that consecutive packets leave back to back (the next header word follows
// the last word of the previous packet on the next accepted cycle).
// Packet words (16 bit), before the link layer adds SOF and CRC:
//   H0 {type(2), flags(6), EC(8)}   flags = {out_of_sync, pace_ovf, data_ovf,
//                                            trig_lost, inhibited, rec_err}
//   H1 {stream_err(4), BC(12)}
//   H2 Kchip ID
//   normal / calibration events only:
//   C0..C5  12 column addresses, 2 per word: stream 0 J,K,L, stream 1 J,K,L ...
//   D  4 x 96 samples {stream(2), slot(2), ADC(12)}: stream 0 J1..J32,K1..,L1..,
//      then stream 1, 2, 3
// NULL events carry only H0..H2. In Link Test mode (and when no event is
// waiting) it sends Link Test packets back to back: header type TEST with a
// packet counter, BC and ID, then 16 walking-one words.
// Normal and NULL events, the EC/BC tags, the sample order and the Link Test
// packet follow the chip; all word layouts are this design's.
// SEU protection: the state register (fst) is kept in three copies; the
// logic uses their bitwise majority, every clock reloads all three with the
// voted (or next) state, and fsm_upset is high while a copy disagrees. The
// triplication follows the chip; the scrubbing is this design's choice.
module event_builder
  import kchip_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,          // ReSync
  input  logic               link_test,
  input  logic [15:0]        kid,
  input  logic [11:0]        bc,
  input  logic [NSTREAM-1:0] live_err,     // supervisor's sticky error flags
  // Trigger FIFO
  input  logic [TFIFO_W-1:0] tf_rdata,
  input  logic [7:0]         tf_count,
  output logic               tf_re,
  // Column Address FIFO
  input  logic [CFIFO_W-1:0] cf_rdata,
  input  logic [7:0]         cf_count,
  output logic               cf_re,
  input  logic [7:0]         drop_pending,
  output logic               drop_ack,
  // Data FIFOs
  input  logic [NSTREAM-1:0][DFIFO_W-1:0] df_rdata,
  output logic [NSTREAM-1:0] df_re,
  // to the link layer
  output logic               out_valid,
  output logic [15:0]        out_data,
  output logic               out_last,
  input  logic               out_ready,
  // monitoring
  output logic               pkt_normal,   // pulse at the start of each packet kind
  output logic               pkt_null,
  output logic               pkt_test,
  output logic        fsm_upset      // the copies of the state register disagree
);
  // fetch side: prepares the next packet while the current one is sent
  typedef enum logic [2:0] {F_IDLE, F_TW0, F_TW1, F_WCOL, F_COL} fstate_e;
  fstate_e   fst;
  fstate_e fst_r [3];   // three copies of the state (TMR)
  always_comb begin
    fst = fstate_e'((fst_r[0] & fst_r[1]) | (fst_r[1] & fst_r[2]) | (fst_r[0] & fst_r[2]));
    fsm_upset = (fst_r[0] != fst_r[1]) || (fst_r[1] != fst_r[2]);
  end
  logic      nx_valid;     // next packet ready to start
  ev_type_e  nx_type;
  logic [8:0] nx_words;
  trig_w0_t  nx_tw0;
  trig_w1_t  nx_tw1;
  col_word_t [NSTREAM-1:0] rcw;   // record held by the fetch side
  col_stat_t rstat;
  logic      rerr;
  col_chk_t  cf_chk;       // head of the Column FIFO seen as a check word
  logic      rec_loaded;   // a record is held
  logic [7:0] rec_drops;   // NULL events still due before the held record
  logic [2:0] ci;          // column record word index
  // send side: the packet being sent
  logic      sending;
  trig_w0_t  tw0;
  trig_w1_t  tw1;
  col_word_t [NSTREAM-1:0] cw;
  col_stat_t cstat;
  logic      rec_err;
  logic [8:0] wi;          // word index within the packet
  logic [8:0] nwords;
  ev_type_e  ptype;
  logic [7:0] test_cnt;
  logic      pkt_end, take, test_next;

  logic [1:0] ds;          // data stream being sent
  logic [6:0] di;          // sample index 0..95 within the stream
  logic [1:0] dslot;
  logic [3:0] serr;
  logic [5:0] flags;
  logic [7:0] cols [12];

  always_comb begin
    for (int s = 0; s < NSTREAM; s++) begin
      cols[3*s]   = cw[s].col_j;
      cols[3*s+1] = cw[s].col_k;
      cols[3*s+2] = cw[s].col_l;
    end
    ds    = 2'((wi - 9'd9) / 9'(EVT_WORDS));
    di    = 7'((wi - 9'd9) % 9'(EVT_WORDS));
    dslot = (di >= 7'(2*NCHAN)) ? 2'd2 : (di >= 7'(NCHAN)) ? 2'd1 : 2'd0;
    for (int s = 0; s < NSTREAM; s++)
      serr[s] = (ptype == EV_NULL) ? live_err[s]
              : (cstat.dv_err[s] | cstat.af_err[s] | cw[s].err_j | cw[s].err_k | cw[s].err_l);
    flags = {(serr != '0), tw0.pace_ovf, (ptype == EV_NULL) && !tw0.pace_ovf,
             tw0.lost, (tw1.inhib_cnt != '0), rec_err && (ptype != EV_NULL)};
    if (ptype == EV_TEST) flags = '0;

    out_valid = sending;
    out_last  = (wi == nwords - 9'd1);
    out_data  = '0;
    unique case (wi)
      9'd0: out_data = {ptype, flags, (ptype == EV_TEST) ? test_cnt : tw0.ec};
      9'd1: out_data = {(ptype == EV_TEST) ? 4'h0 : serr,
                        (ptype == EV_TEST) ? bc : tw0.bc};
      9'd2: out_data = kid;
      default:
        if (ptype == EV_TEST)      out_data = 16'h0001 << (wi - 9'd3);
        else if (wi < 9'd9)        out_data = {cols[2*(wi-9'd3)], cols[2*(wi-9'd3)+1]};
        else                       out_data = {ds, dslot, df_rdata[ds][ADC_W-1:0]};
    endcase

    // the send side is free now, or frees up at the end of this cycle
    pkt_end   = !sending || (out_ready && out_last);
    take      = pkt_end && nx_valid;
    test_next = pkt_end && !nx_valid && link_test && fst == F_IDLE &&
                tf_count < 8'(TRIG_WORDS);

    cf_chk = cf_rdata;
    tf_re = (fst == F_TW0) || (fst == F_TW1);
    cf_re = (fst == F_COL);
    drop_ack = (fst == F_WCOL) && !rec_loaded && (cf_count < 8'(COL_WORDS)) && (drop_pending != '0);
    df_re = '0;
    if (sending && out_ready && ptype inside {EV_NORMAL, EV_CALIB} && wi >= 9'd9)
      df_re[ds] = 1'b1;
  end

  // fetch side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst_r <= '{F_IDLE, F_IDLE, F_IDLE}; nx_valid <= 1'b0; nx_type <= EV_NULL; nx_words <= '0;
      nx_tw0 <= '0; nx_tw1 <= '0; rcw <= '0; rstat <= '0; rerr <= 1'b0;
      rec_loaded <= 1'b0; rec_drops <= '0; ci <= '0;
    end else if (clr) begin
      fst_r <= '{fst, fst, fst};   // scrub
      fst_r <= '{F_IDLE, F_IDLE, F_IDLE}; nx_valid <= 1'b0; rec_loaded <= 1'b0; rec_drops <= '0;
    end else begin
      fst_r <= '{fst, fst, fst};   // scrub
      if (take) nx_valid <= 1'b0;
      unique case (fst)
        F_IDLE: if (!nx_valid && tf_count >= 8'(TRIG_WORDS)) fst_r <= '{F_TW0, F_TW0, F_TW0};
        F_TW0: begin nx_tw0 <= tf_rdata; fst_r <= '{F_TW1, F_TW1, F_TW1}; end
        F_TW1: begin
          nx_tw1 <= tf_rdata;
          if (nx_tw0.pace_ovf) begin
            nx_type <= EV_NULL; nx_words <= 9'd3; nx_valid <= 1'b1; fst_r <= '{F_IDLE, F_IDLE, F_IDLE};
          end else begin
            fst_r <= '{F_WCOL, F_WCOL, F_WCOL};
          end
        end
        F_WCOL: begin
          if (rec_loaded && rec_drops != '0) begin
            rec_drops <= rec_drops - 8'd1;
            nx_type <= EV_NULL; nx_words <= 9'd3; nx_valid <= 1'b1; fst_r <= '{F_IDLE, F_IDLE, F_IDLE};
          end else if (rec_loaded) begin
            rec_loaded <= 1'b0;
            nx_type  <= ev_type_e'(nx_tw0.ev_type);
            nx_words <= 9'(9 + NSTREAM*EVT_WORDS);
            nx_valid <= 1'b1; fst_r <= '{F_IDLE, F_IDLE, F_IDLE};
          end else if (cf_count >= 8'(COL_WORDS)) begin
            ci <= '0; fst_r <= '{F_COL, F_COL, F_COL};
          end else if (drop_pending != '0) begin   // drop_ack is high this cycle
            nx_type <= EV_NULL; nx_words <= 9'd3; nx_valid <= 1'b1; fst_r <= '{F_IDLE, F_IDLE, F_IDLE};
          end
        end
        F_COL: begin
          ci <= ci + 3'd1;
          if (ci < 3'd4) rcw[ci[1:0]] <= cf_rdata;
          else if (ci == 3'd4) rstat <= cf_rdata;
          else begin
            rerr       <= (cf_chk.bc_n != ~rstat.bc) || (cf_chk.ro_cnt_n != ~rstat.ro_cnt);
            rec_drops  <= cf_chk.drop_cnt;
            rec_loaded <= 1'b1;
            fst_r <= '{F_WCOL, F_WCOL, F_WCOL};
          end
        end
        default: fst_r <= '{F_IDLE, F_IDLE, F_IDLE};
      endcase
    end
  end

  // send side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0; tw0 <= '0; tw1 <= '0; cw <= '0; cstat <= '0; rec_err <= 1'b0;
      wi <= '0; nwords <= '0; ptype <= EV_NULL; test_cnt <= '0;
      pkt_normal <= 1'b0; pkt_null <= 1'b0; pkt_test <= 1'b0;
    end else if (clr) begin
      sending <= 1'b0; wi <= '0;
      pkt_normal <= 1'b0; pkt_null <= 1'b0; pkt_test <= 1'b0;
    end else begin
      pkt_normal <= 1'b0; pkt_null <= 1'b0; pkt_test <= 1'b0;
      if (sending && out_ready) wi <= wi + 9'd1;
      if (take) begin
        sending <= 1'b1; wi <= '0;
        ptype <= nx_type; nwords <= nx_words; tw0 <= nx_tw0; tw1 <= nx_tw1;
        cw <= rcw; cstat <= rstat; rec_err <= rerr;
        if (nx_type == EV_NULL) pkt_null <= 1'b1;
        else                    pkt_normal <= 1'b1;
      end else if (test_next) begin
        sending <= 1'b1; wi <= '0;
        ptype <= EV_TEST; nwords <= 9'd19; tw0 <= '0; tw1 <= '0; rec_err <= 1'b0;
        test_cnt <= test_cnt + 8'd1; pkt_test <= 1'b1;
      end else if (pkt_end) begin
        sending <= 1'b0; wi <= '0;
      end
    end
  end
endmodule
