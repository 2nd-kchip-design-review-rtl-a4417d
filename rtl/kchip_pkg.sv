// kchip_pkg: types and constants shared by the Kchip readout core.
//
// The Kchip reads four PACE3 front-end data streams (via 12-bit ADCs), stores
// three time samples (slots J, K, L) of 32 channels per stream and event,
// and ships the events as packets over a 16-bit GOL serializer link.
// Constants printed in the design review (trigger command patterns, FIFO
// sizes, link control characters, CRC polynomial, register map) are taken
// from it; field layouts of FIFO words and packets are this design's own.
package kchip_pkg;

  // ---- front end -----------------------------------------------------------
  localparam int unsigned NSTREAM    = 4;   // PACE3 / ADC channels
  localparam int unsigned NSLOT      = 3;   // memory slots per event: J, K, L
  localparam int unsigned NCHAN      = 32;  // samples per slot
  localparam int unsigned EVT_WORDS  = NSLOT * NCHAN;  // 96 words/event/stream
  localparam int unsigned ADC_W      = 12;
  localparam int unsigned COL_W      = 8;   // PACE3 column (cell) address

  // ---- FIFOs (native sizes) ------------------------------------------------
  localparam int unsigned DFIFO_DEPTH = 1024, DFIFO_W = 18;
  localparam int unsigned CFIFO_DEPTH = 128,  CFIFO_W = 27;
  localparam int unsigned TFIFO_DEPTH = 128,  TFIFO_W = 27;
  localparam int unsigned COL_WORDS   = 6;    // column FIFO words per event
  localparam int unsigned TRIG_WORDS  = 2;    // trigger FIFO words per trigger

  // ---- fast trigger commands (3-bit serial pattern, leading '1') -----------
  typedef enum logic [2:0] {
    T1_NONE   = 3'b000,
    T1_LV1A   = 3'b100,
    T1_CALP   = 3'b110,
    T1_RESYNC = 3'b101,
    T1_BC0    = 3'b111
  } t1_cmd_e;

  // mask / command one-hot positions
  localparam int unsigned CMD_LV1A = 0, CMD_CALP = 1, CMD_RESYNC = 2, CMD_BC0 = 3;

  // ---- event types ---------------------------------------------------------
  typedef enum logic [1:0] {
    EV_NORMAL = 2'd0,
    EV_CALIB  = 2'd1,
    EV_NULL   = 2'd2,
    EV_TEST   = 2'd3
  } ev_type_e;

  // Trigger FIFO entry (two 27-bit words)
  typedef struct packed {
    logic [1:0]  ev_type;    // EV_NORMAL or EV_CALIB
    logic        pace_ovf;   // PACE3 trigger FIFO was full: no data will come
    logic        lost;       // triggers were lost before this one (FIFO full)
    logic [2:0]  rsv;
    logic [7:0]  ec;
    logic [11:0] bc;
  } trig_w0_t;               // 27 bits
  typedef struct packed {
    logic [7:0]  lost_cnt;   // triggers lost since previous stored trigger
    logic [7:0]  inhib_cnt;  // triggers filtered by the inhibit logic since previous
    logic [10:0] rsv;
  } trig_w1_t;               // 27 bits

  // Column FIFO: words 0..3 one per stream, {err,col} x slots J,K,L
  typedef struct packed {
    logic             err_j; logic [COL_W-1:0] col_j;
    logic             err_k; logic [COL_W-1:0] col_k;
    logic             err_l; logic [COL_W-1:0] col_l;
  } col_word_t;              // 27 bits
  // word 4: readout status
  typedef struct packed {
    logic [NSTREAM-1:0]   dv_err;    // DataValid mismatch per stream (sticky)
    logic [NSTREAM-1:0]   af_err;    // AlmostFull mismatch per stream (sticky)
    logic [6:0]           ro_cnt;    // readout sequence number (low bits)
    logic [11:0]          bc;        // bunch counter at readout start
  } col_stat_t;              // 27 bits
  // word 5: dropped events ahead of this one, and a check of word 4
  typedef struct packed {
    logic [7:0]           drop_cnt;  // events dropped (Data FIFO full) just before
    logic [6:0]           ro_cnt_n;  // ~ro_cnt
    logic [11:0]          bc_n;      // ~bc
  } col_chk_t;               // 27 bits

  // ---- link layer characters ---------------------------------------------
  localparam logic [15:0] CIMT_FF1A = 16'hFF1A;
  localparam logic [15:0] CIMT_FF1B = 16'hFF1B;
  localparam logic [15:0] CIMT_SOF  = 16'h3F80;
  localparam logic [7:0]  K28_5 = 8'hBC, D5_6 = 8'hC5, D16_2 = 8'h50, K23_7 = 8'hF7;
  localparam logic [15:0] CRC_POLY = 16'h1021;   // x^16 + x^12 + x^5 + 1
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // ---- register map (I2C addresses) --------------------------------------
  localparam logic [4:0] R_CONFIG = 5'h00, R_ECONFIG = 5'h01, R_KID_L = 5'h02,
    R_KID_H = 5'h03, R_MASK = 5'h04, R_LAST = 5'h05, R_LATENCY = 5'h06,
    R_EVCNT = 5'h07, R_BC_L = 5'h08, R_BC_H = 5'h09, R_GBUSY = 5'h0B,
    R_GIDLE = 5'h0C, R_FIFOMAP = 5'h0D, R_FDATA_L = 5'h0E, R_FDATA_H = 5'h0F,
    R_STAT0 = 5'h10, R_STAT1 = 5'h11, R_SEU = 5'h12, R_CDELAY = 5'h13,
    R_CWIDTH = 5'h14;

  // CONFIG register fields (layout chosen by this design)
  typedef struct packed {
    logic       cal_trig_dis;  // [7] no readout trigger after a CalPulse
    logic       inhibit_dis;   // [6] trigger inhibit logic disabled
    logic       enc_8b10b;     // [5] 1: 8b/10b control characters, 0: CIMT
    logic       link_test;     // [4] Link Test mode
    logic [3:0] stream_en;     // [3:0] PACE streams supervised
  } config_t;

endpackage
