// tb_fifo_capacity: checks the event and trigger capacities of the Kchip
// buffers at their full sizes, with nothing read out.
//
// Part 1 plays 12 complete PACE3 readouts (3 slots x 32 samples each) into
// data_capture with four 1K x 18 Data FIFOs and a 128 x 27 Column Address
// FIFO behind it. 1024/96 gives exactly 10 whole events per Data FIFO: the
// first 10 readouts must be stored (960 words in every Data FIFO, 60 in the
// Column FIFO) and the 11th and 12th dropped, with drop_pending = 2.
// Part 2 sends 70 LV1A triggers to trigger_control with a 128 x 27 Trigger
// FIFO behind it: 128/2 gives 64 triggers, so 64 must be stored (128 words)
// and 6 lost, with EC = 70.
// Timing: one sample per clock during a readout, a 20-cycle gap between
// readouts; one trigger every 4 clocks. The FIFO sizes and the 10-event /
// 64-trigger capacities follow the chip; the drive pattern is this design's.
module tb_fifo_capacity;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- data path: capture + Data / Column FIFOs ----------------
  logic ro_active = 0, ro_first = 0, ro_last = 0;
  logic [1:0] ro_slot = 0; logic [4:0] ro_chan = 0;
  logic [3:0][11:0] adc; logic [3:0][7:0] col;
  logic [3:0][10:0] df_free; logic [7:0] cf_free8;
  logic [3:0] df_we; logic [3:0][17:0] df_wdata;
  logic cf_we; logic [26:0] cf_wdata;
  logic [7:0] drop_pending; logic ev_dropped, col_ovf;
  logic [3:0][10:0] df_count; logic [7:0] cf_count, cf_free;
  int n_dropped = 0;

  data_capture u_cap (.clk, .rst_n, .clr(1'b0), .ro_active, .ro_first, .ro_last, .ro_slot,
    .ro_chan, .dv_mis(4'b0), .dv_err(4'b0), .af_err(4'b0), .ro_cnt(8'd0), .bc(12'd0),
    .adc, .col, .dfifo_free(df_free), .cfifo_free(cf_free8), .dfifo_we(df_we),
    .dfifo_wdata(df_wdata), .cfifo_we(cf_we), .cfifo_wdata(cf_wdata), .drop_ack(1'b0),
    .drop_pending, .ev_dropped, .col_ovf);
  for (genvar s = 0; s < 4; s++) begin : g_df
    logic [17:0] rd; logic e, f, o;
    kchip_fifo #(.DEPTH(DFIFO_DEPTH), .W(DFIFO_W)) u_df (.clk, .rst_n, .clr(1'b0),
      .we(df_we[s]), .wdata(df_wdata[s]), .re(1'b0), .rdata(rd), .empty(e), .full(f),
      .count(df_count[s]), .free(df_free[s]), .ovf(o));
    assign adc[s] = 12'(s * 100) + 12'(ro_chan);
    assign col[s] = 8'(s);
  end
  logic [26:0] cf_rd; logic cf_e, cf_f, cf_o;
  kchip_fifo #(.DEPTH(CFIFO_DEPTH), .W(CFIFO_W)) u_cf (.clk, .rst_n, .clr(1'b0),
    .we(cf_we), .wdata(cf_wdata), .re(1'b0), .rdata(cf_rd), .empty(cf_e), .full(cf_f),
    .count(cf_count), .free(cf_free), .ovf(cf_o));
  assign cf_free8 = cf_free;
  always @(posedge clk) if (rst_n && ev_dropped) n_dropped++;

  // ---------------- trigger path: control + Trigger FIFO ----------------
  logic lv1a = 0, pace_trig, tf_we, fifo_clr, ev_stored, ev_lost, ev_inh;
  logic [26:0] tf_wdata, tf_rd; logic [7:0] ec, tf_count, tf_free; logic [11:0] bc, last_bc;
  logic tf_e, tf_f, tf_o;
  int n_stored = 0, n_lost = 0;
  trigger_control u_tc (.clk, .rst_n, .lv1a, .cal_trig(1'b0), .resync(1'b0), .bc0(1'b0),
    .inhibit_en(1'b0), .pace_full(1'b0), .tfifo_free(tf_free), .pace_trig, .tfifo_we(tf_we),
    .tfifo_wdata(tf_wdata), .fifo_clr, .ec, .bc, .last_bc, .ev_stored, .ev_lost,
    .ev_inhibited(ev_inh));
  kchip_fifo #(.DEPTH(TFIFO_DEPTH), .W(TFIFO_W)) u_tf (.clk, .rst_n, .clr(1'b0),
    .we(tf_we), .wdata(tf_wdata), .re(1'b0), .rdata(tf_rd), .empty(tf_e), .full(tf_f),
    .count(tf_count), .free(tf_free), .ovf(tf_o));
  always @(posedge clk) if (rst_n) begin
    if (ev_stored) n_stored++;
    if (ev_lost) n_lost++;
  end

  task automatic readout();
    for (int i = 0; i < EVT_WORDS; i++) begin
      @(negedge clk);
      ro_active = 1; ro_first = (i == 0); ro_last = (i == EVT_WORDS - 1);
      ro_slot = 2'(i / NCHAN); ro_chan = 5'(i % NCHAN);
    end
    @(negedge clk); ro_active = 0; ro_first = 0; ro_last = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // part 1: Data FIFO holds 10 events of 96 words
    for (int e = 0; e < 12; e++) begin
      readout();
      if (e < 10) chk(n_dropped == 0, $sformatf("event %0d stored", e));
      else        chk(n_dropped == e - 9, $sformatf("event %0d dropped", e));
    end
    for (int s = 0; s < 4; s++)
      chk(df_count[s] == 11'd960, $sformatf("Data FIFO %0d holds 10 events (%0d words)", s, df_count[s]));
    chk(cf_count == 8'd60, $sformatf("Column FIFO holds 10 records (%0d words)", cf_count));
    chk(drop_pending == 8'd2, "two dropped events pending");
    chk(!col_ovf && !cf_o, "no Column FIFO overflow");
    // part 2: Trigger FIFO holds 64 triggers of 2 words
    for (int t = 0; t < 70; t++) begin
      @(negedge clk); lv1a = 1; @(negedge clk); lv1a = 0; repeat (2) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(n_stored == 64, $sformatf("64 triggers stored (%0d)", n_stored));
    chk(n_lost == 6, $sformatf("6 triggers lost (%0d)", n_lost));
    chk(tf_count == 8'd128 && !tf_o, "Trigger FIFO full, no overflow");
    chk(ec == 8'd70, "EC counts lost triggers");
    $display("stored events 10, dropped %0d; triggers stored %0d lost %0d", n_dropped, n_stored, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
