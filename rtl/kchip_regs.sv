// kchip_regs: the Kchip internal register file, reached over I2C.
//
// Address map (5-bit register address):
//   00 CONFIG      R/W  default 0x0F  {cal_trig_dis, inhibit_dis, enc_8b10b,
//                                      link_test, stream_en[3:0]}
//   01 ECONFIG     R/W  default 0     {-, idle_d56}
//   02/03 KID_L/H  R/W  default {14'b0, chip_id pins} until first written
//   04 MASK_T1CMD  R/W  default 0     {BC0, ReSync, CalPulse, LV1A} mask
//   05 LAST_T1CMD  RO   last received 3-bit trigger pattern
//   06 LATENCY     R/W  default 128   calibration-trigger latency (cycles)
//   07 EVCNT       RO   event counter
//   08/09 BNCHCNT  RO   BC of the last event, 12 bits (09 holds bits 11:8)
//   0B GINT_BUSY   R/W  default 0     idle-insertion period (x16 cycles)
//   0C GINT_IDLE   R/W  default 0     number of inserted idle words
//   0D FIFOMAP     R/W  default 0     FIFO selected for FIFODATA
//   0E/0F FIFODATA      FIFO access word (see the top level)
//   10 STATUS_0    RO   {af_err[3:0], dv_err[3:0]} per PACE3 stream
//   11 STATUS_1    RO   sticky event flags, cleared by ReSync
//   12 SEU_COUNTER RO   corrected upsets since hardware reset (saturating)
//   13 CalPulse_DELAY R/W default 1  DLL phase step of the calibration pulse
//   14 CalPulse_WIDTH R/W default 1  calibration pulse width (0 = 256)
// Every read/write configuration register is a tmr_reg (three copies and a
// voter, scrubbed every cycle); a cycle in which any copy disagrees counts
// one upset in SEU_COUNTER, as does a cycle in which the triplicated state
// register of a state machine elsewhere disagrees (fsm_upset). Writes take effect on the clock after reg_we;
// reads are combinational. Unlisted addresses read 0 and ignore writes.
// Addresses, defaults and the TMR protection follow the chip; the bit fields
// of CONFIG, ECONFIG, STATUS_1 and the meaning of CalPulse_DELAY are this
// design's choices, since the field tables are not given.
module kchip_regs
  import kchip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  chip_id,
  input  logic        resync,
  input  logic        reg_we,
  input  logic [4:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_rdata,
  // read-only sources
  input  logic [2:0]  last_cmd,
  input  logic [7:0]  evcnt,
  input  logic [11:0] last_bc,
  input  logic [7:0]  status0,
  input  logic [7:0]  status1_set,     // event pulses, made sticky here
  input  logic        fsm_upset,       // a triplicated state machine outvoted a copy
  input  logic [15:0] fifo_word,       // FIFO word shown at FIFODATA
  // configuration outputs
  output config_t     cfg,
  output logic        idle_d56,
  output logic [15:0] kid,
  output logic [3:0]  t1_mask,
  output logic [7:0]  latency,
  output logic [7:0]  gint_busy,
  output logic [7:0]  gint_idle,
  output logic [7:0]  fifomap,
  output logic [7:0]  cal_delay,
  output logic [7:0]  cal_width,
  output logic [7:0]  status1,
  output logic [7:0]  seu_count
);
  localparam int unsigned NTMR = 11;
  logic [NTMR-1:0] upset;
  logic [7:0] cfg_q, kid_l, kid_h;
  logic [1:0] econf_q;
  logic       kid_set;

  function automatic logic wr(input logic [4:0] a);
    return reg_we && (reg_addr == a);
  endfunction

  tmr_reg #(.W(8), .INIT(8'h0F)) u_cfg  (.clk, .rst_n, .we(wr(R_CONFIG)),  .d(reg_wdata),      .q(cfg_q),     .upset(upset[0]));
  tmr_reg #(.W(2), .INIT(2'b00)) u_ecfg (.clk, .rst_n, .we(wr(R_ECONFIG)), .d(reg_wdata[1:0]), .q(econf_q),   .upset(upset[1]));
  tmr_reg #(.W(8), .INIT(8'h00)) u_kidl (.clk, .rst_n, .we(wr(R_KID_L)),   .d(reg_wdata),      .q(kid_l),     .upset(upset[2]));
  tmr_reg #(.W(8), .INIT(8'h00)) u_kidh (.clk, .rst_n, .we(wr(R_KID_H)),   .d(reg_wdata),      .q(kid_h),     .upset(upset[3]));
  tmr_reg #(.W(1), .INIT(1'b0))  u_kids (.clk, .rst_n, .we(wr(R_KID_L) || wr(R_KID_H)), .d(1'b1), .q(kid_set), .upset(upset[4]));
  tmr_reg #(.W(4), .INIT(4'h0))  u_mask (.clk, .rst_n, .we(wr(R_MASK)),    .d(reg_wdata[3:0]), .q(t1_mask),   .upset(upset[5]));
  tmr_reg #(.W(8), .INIT(8'd128)) u_lat (.clk, .rst_n, .we(wr(R_LATENCY)), .d(reg_wdata),      .q(latency),   .upset(upset[6]));
  tmr_reg #(.W(8), .INIT(8'd0))  u_gbsy (.clk, .rst_n, .we(wr(R_GBUSY)),   .d(reg_wdata),      .q(gint_busy), .upset(upset[7]));
  tmr_reg #(.W(8), .INIT(8'd0))  u_gidl (.clk, .rst_n, .we(wr(R_GIDLE)),   .d(reg_wdata),      .q(gint_idle), .upset(upset[8]));
  tmr_reg #(.W(8), .INIT(8'd1))  u_cdly (.clk, .rst_n, .we(wr(R_CDELAY)),  .d(reg_wdata),      .q(cal_delay), .upset(upset[9]));
  tmr_reg #(.W(8), .INIT(8'd1))  u_cwid (.clk, .rst_n, .we(wr(R_CWIDTH)),  .d(reg_wdata),      .q(cal_width), .upset(upset[10]));

  // FIFOMAP is a data-path pointer, not configuration: plain register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             fifomap <= '0;
    else if (wr(R_FIFOMAP)) fifomap <= reg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status1   <= '0;
      seu_count <= '0;
    end else begin
      status1 <= resync ? '0 : (status1 | status1_set);
      if ((upset != '0 || fsm_upset) && seu_count != 8'hFF) seu_count <= seu_count + 8'd1;
    end
  end

  always_comb begin
    cfg      = config_t'(cfg_q);
    idle_d56 = econf_q[0];
    kid      = kid_set ? {kid_h, kid_l} : {14'b0, chip_id};
    unique case (reg_addr)
      R_CONFIG:  reg_rdata = cfg_q;
      R_ECONFIG: reg_rdata = {6'b0, econf_q};
      R_KID_L:   reg_rdata = kid[7:0];
      R_KID_H:   reg_rdata = kid[15:8];
      R_MASK:    reg_rdata = {4'b0, t1_mask};
      R_LAST:    reg_rdata = {5'b0, last_cmd};
      R_LATENCY: reg_rdata = latency;
      R_EVCNT:   reg_rdata = evcnt;
      R_BC_L:    reg_rdata = last_bc[7:0];
      R_BC_H:    reg_rdata = {4'b0, last_bc[11:8]};
      R_GBUSY:   reg_rdata = gint_busy;
      R_GIDLE:   reg_rdata = gint_idle;
      R_FIFOMAP: reg_rdata = fifomap;
      R_FDATA_L: reg_rdata = fifo_word[7:0];
      R_FDATA_H: reg_rdata = fifo_word[15:8];
      R_STAT0:   reg_rdata = status0;
      R_STAT1:   reg_rdata = status1;
      R_SEU:     reg_rdata = seu_count;
      R_CDELAY:  reg_rdata = cal_delay;
      R_CWIDTH:  reg_rdata = cal_width;
      default:   reg_rdata = 8'h00;
    endcase
  end
endmodule
