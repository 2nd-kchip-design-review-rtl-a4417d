// kchip_top: digital core of the Kchip, the readout chip between four PACE3
// front-end chips (through 12-bit ADCs) and a GOL optical-link serializer.
//
// Data flow. A serial fast-command line (T1) is decoded into LV1A, CalPulse,
// ReSync and BC0. Each accepted readout trigger (LV1A, or the calibration
// trigger that follows a CalPulse after LATENCY cycles) is sent to the PACE3s
// and tagged with the event and bunch counters in the Trigger FIFO. A PACE3
// supervisor emulates the PACE3 trigger FIFO and readout sequencer, checks
// the chips' DataValid and AlmostFull lines against it, and drives the
// capture of 3 slots x 32 samples per stream into four Data FIFOs (1K x 18)
// and a per-event record into the Column Address FIFO (128 x 27). The event
// builder assembles normal, calibration, NULL and Link Test packets, and the
// link layer frames them with SOF, fill words and CRC-CCITT for the GOL, in
// CIMT or 8b/10b control characters. All configuration registers are
// triplicated and reachable over I2C, together with status, counters and a
// 16-bit window on the FIFOs.
// Overflow handling: a trigger the PACE3 cannot store, or an event the Data
// FIFOs cannot hold, is sent as a NULL event carrying EC/BC; a trigger that
// finds the Trigger FIFO full is counted in EC but not read out; with the
// trigger inhibit logic enabled, triggers that would overflow the PACE3 are
// filtered out.
// FIFO window (registers 0D-0F): FIFOMAP 0-3 selects Data FIFO 0-3, 4 the
// Column FIFO, 5 the Trigger FIFO. FIFODATA_L/H show bits 15:0 of the head
// word. In Link Test mode a read of FIFODATA_H pops that word and a write of
// FIFODATA_H pushes {FIFODATA_H, last FIFODATA_L write} (upper bits zero).
// The DLL that fine-delays the calibration pulse is outside this core:
// cal_req goes to it and dll_tap (CalPulse_DELAY[3:0]) selects its phase.
// Block structure, FIFO sizes, command set and link characters follow the
// chip; everything the description leaves open is chosen in the sub-blocks.
// Timing: one 40 MHz clock, asynchronous active-low reset. A T1 command acts
// three clocks after its first bit; a packet leaves on gol_data some tens of
// cycles after its event is read out of the PACE3s.
// Lint note: rst_n is reported as used both as an asynchronous reset and as a
// synchronous signal; the synchronous use is only the `disable iff` of the
// sub-blocks' assertions, which is not logic, so the warning stands.
module kchip_top
  import kchip_pkg::*;
#(
  parameter int unsigned PACE_DEPTH = 32,
  parameter int unsigned AF_LEVEL   = 28,
  parameter int unsigned RO_DELAY   = 4,
  parameter int unsigned DF_DEPTH   = DFIFO_DEPTH,
  parameter int unsigned CF_DEPTH   = CFIFO_DEPTH,
  parameter int unsigned TF_DEPTH   = TFIFO_DEPTH
) (
  input  logic        clk,            // 40 MHz system clock
  input  logic        rst_n,          // hardware reset
  input  logic [1:0]  chip_id,        // I2C chip address / default ID pins
  input  logic        t1,             // serial fast-command line
  // PACE3 / ADC side
  input  logic [NSTREAM-1:0]            pace_dv,
  input  logic [NSTREAM-1:0]            pace_af,
  input  logic [NSTREAM-1:0][ADC_W-1:0] adc_data,
  input  logic [NSTREAM-1:0][COL_W-1:0] pace_col,
  output logic        pace_trig,      // readout trigger to the PACE3s
  output logic        cal_req,        // calibration request, to the DLL
  output logic [3:0]  dll_tap,        // DLL phase step
  // I2C
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  // GOL
  output logic [15:0] gol_data,
  output logic [1:0]  gol_k
);
  // ---------------- registers / I2C ----------------
  logic       reg_we, reg_rd;
  logic [4:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  config_t    cfg;
  logic       idle_d56;
  logic [15:0] kid;
  logic [3:0] t1_mask;
  logic [7:0] latency, gint_busy, gint_idle, fifomap, cal_delay, cal_width;
  logic [7:0] status1, seu_count, status0, status1_set;
  logic [15:0] fifo_word;

  logic [4:0] fsm_up;   // state-register upsets: i2c, decoder, supervisor, builder, link
  i2c_slave u_i2c (.clk, .rst_n, .chip_id, .scl, .sda_in, .sda_oe,
                   .reg_we, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .fsm_upset(fsm_up[0]));

  // ---------------- triggers ----------------
  logic       lv1a, calpulse, resync, bc0, cal_trig, cal_busy, cal_ignored;
  logic [2:0] last_cmd;
  logic [7:0] ec;
  logic [11:0] bc, last_bc;
  logic       tf_we_t, fifo_clr, ev_stored, ev_lost, ev_inhibited, pace_full;
  logic [TFIFO_W-1:0] tf_wdata_t;

  trigger_decoder u_tdec (.clk, .rst_n, .t1, .mask(t1_mask), .lv1a, .calpulse,
                          .resync, .bc0, .last_cmd, .fsm_upset(fsm_up[1]));

  calib_ctrl u_cal (.clk, .rst_n, .calpulse, .resync, .width(cal_width),
                    .latency, .cal_trig_en(!cfg.cal_trig_dis), .cal_req,
                    .cal_trig, .busy(cal_busy), .ignored(cal_ignored));
  assign dll_tap = cal_delay[3:0];

  // ---------------- FIFOs ----------------
  localparam int unsigned DAW = $clog2(DF_DEPTH);
  localparam int unsigned CAW = $clog2(CF_DEPTH);
  localparam int unsigned TAW = $clog2(TF_DEPTH);

  logic [NSTREAM-1:0] df_we, df_re, df_we_c, df_re_b, df_empty, df_full, df_ovf;
  logic [NSTREAM-1:0][DFIFO_W-1:0] df_wdata, df_wdata_c, df_rdata;
  logic [NSTREAM-1:0][DAW:0] df_count, df_free;
  logic [NSTREAM-1:0][10:0]  df_free11;

  logic cf_we, cf_re, cf_we_c, cf_re_b, cf_empty, cf_full, cf_ovf;
  logic [CFIFO_W-1:0] cf_wdata, cf_wdata_c, cf_rdata;
  logic [CAW:0] cf_count, cf_free;

  logic tf_we, tf_re, tf_re_b, tf_empty, tf_full, tf_ovf;
  logic [TFIFO_W-1:0] tf_wdata, tf_rdata;
  logic [TAW:0] tf_count, tf_free;

  function automatic logic [7:0] sat8(input int unsigned v);
    return (v > 255) ? 8'hFF : 8'(v);
  endfunction

  for (genvar s = 0; s < NSTREAM; s++) begin : g_df
    kchip_fifo #(.DEPTH(DF_DEPTH), .W(DFIFO_W)) u_df (
      .clk, .rst_n, .clr(fifo_clr), .we(df_we[s]), .wdata(df_wdata[s]),
      .re(df_re[s]), .rdata(df_rdata[s]), .empty(df_empty[s]), .full(df_full[s]),
      .count(df_count[s]), .free(df_free[s]), .ovf(df_ovf[s]));
    assign df_free11[s] = (int'(df_free[s]) > 2047) ? 11'h7FF : 11'(df_free[s]);
  end

  kchip_fifo #(.DEPTH(CF_DEPTH), .W(CFIFO_W)) u_cf (
    .clk, .rst_n, .clr(fifo_clr), .we(cf_we), .wdata(cf_wdata), .re(cf_re),
    .rdata(cf_rdata), .empty(cf_empty), .full(cf_full), .count(cf_count),
    .free(cf_free), .ovf(cf_ovf));

  kchip_fifo #(.DEPTH(TF_DEPTH), .W(TFIFO_W)) u_tf (
    .clk, .rst_n, .clr(fifo_clr), .we(tf_we), .wdata(tf_wdata), .re(tf_re),
    .rdata(tf_rdata), .empty(tf_empty), .full(tf_full), .count(tf_count),
    .free(tf_free), .ovf(tf_ovf));

  trigger_control u_tctl (.clk, .rst_n, .lv1a, .cal_trig, .resync, .bc0,
    .inhibit_en(!cfg.inhibit_dis), .pace_full, .tfifo_free(sat8(int'(tf_free))),
    .pace_trig, .tfifo_we(tf_we_t), .tfifo_wdata(tf_wdata_t), .fifo_clr, .ec, .bc,
    .last_bc, .ev_stored, .ev_lost, .ev_inhibited);

  // ---------------- PACE3 supervisor and capture ----------------
  logic ro_active, ro_first, ro_last, sup_pace_ovf, ev_dropped, col_ovf, drop_ack;
  logic [7:0] drop_pending;
  logic [1:0] ro_slot;
  logic [4:0] ro_chan;
  logic [NSTREAM-1:0] dv_mis, dv_err, af_err;
  logic [7:0] ro_cnt;
  logic [$clog2(PACE_DEPTH+1)-1:0] pend;

  pace_supervisor #(.PACE_DEPTH(PACE_DEPTH), .AF_LEVEL(AF_LEVEL), .RO_DELAY(RO_DELAY))
  u_sup (.clk, .rst_n, .resync, .pace_trig, .stream_en(cfg.stream_en), .pace_dv,
         .pace_af, .pace_full, .ro_active, .ro_first, .ro_last, .ro_slot, .ro_chan,
         .dv_mis, .dv_err, .af_err, .ro_cnt, .pend, .pace_ovf(sup_pace_ovf), .fsm_upset(fsm_up[2]));

  data_capture u_cap (.clk, .rst_n, .clr(resync), .ro_active, .ro_first, .ro_last,
    .ro_slot, .ro_chan, .dv_mis, .dv_err, .af_err, .ro_cnt, .bc, .adc(adc_data),
    .col(pace_col), .dfifo_free(df_free11), .cfifo_free(sat8(int'(cf_free))),
    .dfifo_we(df_we_c), .dfifo_wdata(df_wdata_c), .cfifo_we(cf_we_c),
    .cfifo_wdata(cf_wdata_c), .drop_ack, .drop_pending, .ev_dropped, .col_ovf);

  // ---------------- event builder and link ----------------
  logic        pk_valid, pk_last, pk_ready, pkt_normal, pkt_null, pkt_test;
  logic        tx_sof, idle_inserted;
  logic [15:0] pk_data;

  event_builder u_evb (.clk, .rst_n, .clr(resync), .link_test(cfg.link_test), .kid,
    .bc, .live_err(dv_err | af_err), .tf_rdata, .tf_count(sat8(int'(tf_count))),
    .tf_re(tf_re_b), .cf_rdata, .cf_count(sat8(int'(cf_count))), .cf_re(cf_re_b),
    .drop_pending, .drop_ack,
    .df_rdata, .df_re(df_re_b), .out_valid(pk_valid), .out_data(pk_data),
    .out_last(pk_last), .out_ready(pk_ready), .pkt_normal, .pkt_null, .pkt_test, .fsm_upset(fsm_up[3]));

  gol_link u_link (.clk, .rst_n, .enc_8b10b(cfg.enc_8b10b), .idle_d56, .gint_busy,
    .gint_idle, .in_valid(pk_valid), .in_data(pk_data), .in_last(pk_last),
    .in_ready(pk_ready), .tx_data(gol_data), .tx_k(gol_k), .tx_sof, .idle_inserted, .fsm_upset(fsm_up[4]));

  // ---------------- I2C window on the FIFOs ----------------
  logic [7:0] fdata_l;
  logic       win_rd, win_wr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 fdata_l <= '0;
    else if (reg_we && reg_addr == R_FDATA_L)   fdata_l <= reg_wdata;
  end
  always_comb begin
    win_rd = cfg.link_test && reg_rd && (reg_addr == R_FDATA_H);
    win_wr = cfg.link_test && reg_we && (reg_addr == R_FDATA_H);
    unique case (fifomap)
      8'd0, 8'd1, 8'd2, 8'd3: fifo_word = df_rdata[fifomap[1:0]][15:0];
      8'd4:    fifo_word = cf_rdata[15:0];
      8'd5:    fifo_word = tf_rdata[15:0];
      default: fifo_word = 16'h0000;
    endcase
    for (int s = 0; s < NSTREAM; s++) begin
      df_we[s]    = df_we_c[s] || (win_wr && fifomap == 8'(s));
      df_wdata[s] = (win_wr && fifomap == 8'(s)) ? DFIFO_W'({reg_wdata, fdata_l}) : df_wdata_c[s];
      df_re[s]    = df_re_b[s] || (win_rd && fifomap == 8'(s));
    end
    cf_we    = cf_we_c || (win_wr && fifomap == 8'd4);
    cf_wdata = (win_wr && fifomap == 8'd4) ? CFIFO_W'({reg_wdata, fdata_l}) : cf_wdata_c;
    cf_re    = cf_re_b || (win_rd && fifomap == 8'd4);
    tf_we    = tf_we_t || (win_wr && fifomap == 8'd5);
    tf_wdata = (win_wr && fifomap == 8'd5) ? TFIFO_W'({reg_wdata, fdata_l}) : tf_wdata_t;
    tf_re    = tf_re_b || (win_rd && fifomap == 8'd5);
  end

  // ---------------- status ----------------
  always_comb begin
    status0     = {af_err, dv_err};
    status1_set = {col_ovf, (df_ovf != '0) || cf_ovf || tf_ovf, idle_inserted,
                   cal_ignored, ev_dropped, sup_pace_ovf, ev_inhibited, ev_lost};
  end

  kchip_regs u_regs (.fsm_upset(|fsm_up), .clk, .rst_n, .chip_id, .resync, .reg_we, .reg_addr, .reg_wdata,
    .reg_rdata, .last_cmd, .evcnt(ec), .last_bc, .status0, .status1_set, .fifo_word,
    .cfg, .idle_d56, .kid, .t1_mask, .latency, .gint_busy, .gint_idle, .fifomap,
    .cal_delay, .cal_width, .status1, .seu_count);
endmodule
