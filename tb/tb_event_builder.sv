// tb_event_builder: fills real Trigger, Column and Data FIFOs with a mix of
// normal, calibration, PACE3-overflow and Data-FIFO-overflow events, drains
// the builder with a randomly stalling consumer, and compares every packet
// word with the expected layout; then checks Link Test packets. Dropped
// events are reported both ways: in the next record and as a live count.
// The FIFOs are real kchip_fifo instances at their default sizes; the packet
// layout checked is this design's, the packet kinds follow the chip.
// Also injects upsets into one copy of the triplicated state register.
module tb_event_builder;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, link_test = 0;
  logic [15:0] kid = 16'h1234; logic [11:0] bc = 12'h777; logic [3:0] live_err = 4'b0110;
  logic tf_we = 0, cf_we = 0; logic [3:0] df_we = 0;
  logic [26:0] tf_wd = 0, cf_wd = 0; logic [3:0][17:0] df_wd = '0;
  logic [26:0] tf_rdata, cf_rdata; logic [3:0][17:0] df_rdata;
  logic [7:0] tf_count8, cf_count8; logic [7:0] tf_cnt, cf_cnt;
  logic tf_re, cf_re; logic [3:0] df_re;
  logic [7:0] drop_pending = 0; logic drop_ack; int attach_cnt = 0, n_live = 0, n_attach = 0;
  logic out_valid, out_last, out_ready = 0; logic [15:0] out_data;
  logic pkt_normal, pkt_null, pkt_test;
  int checks = 0, failures = 0, n_norm = 0, n_null = 0, n_test = 0, n_cal = 0;

  // State-register upsets: now and then one copy of the triplicated state is
  // moved to another state. The voter must hide it (every other check keeps passing) and
  // fsm_upset must show it until the next clock scrubs the copy.
  logic fsm_upset; int n_seu = 0;
  always @(negedge clk) if (rst_n && ($urandom % 97) == 0) begin
    automatic int k = $urandom % 3;
    dut.fst_r[k] = dut.fst_r[k].next();
    #1 checks++;
    if (!fsm_upset) begin failures++; $display("FAIL state upset not flagged"); end
    n_seu++;
  end
  kchip_fifo #(.DEPTH(128), .W(27)) u_tf (.clk, .rst_n, .clr, .we(tf_we), .wdata(tf_wd), .re(tf_re),
    .rdata(tf_rdata), .empty(), .full(), .count(tf_cnt), .free(), .ovf());
  kchip_fifo #(.DEPTH(128), .W(27)) u_cf (.clk, .rst_n, .clr, .we(cf_we), .wdata(cf_wd), .re(cf_re),
    .rdata(cf_rdata), .empty(), .full(), .count(cf_cnt), .free(), .ovf());
  for (genvar s = 0; s < 4; s++) begin : g
    kchip_fifo #(.DEPTH(1024), .W(18)) u_df (.clk, .rst_n, .clr, .we(df_we[s]), .wdata(df_wd[s]),
      .re(df_re[s]), .rdata(df_rdata[s]), .empty(), .full(), .count(), .free(), .ovf());
  end
  event_builder dut (.clk, .rst_n, .clr, .link_test, .kid, .bc, .live_err, .tf_rdata,
    .tf_count(tf_cnt), .tf_re, .cf_rdata, .cf_count(cf_cnt), .cf_re, .drop_pending, .drop_ack, .df_rdata, .df_re,
    .out_valid, .out_data, .out_last, .out_ready, .pkt_normal, .pkt_null, .pkt_test, .fsm_upset);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef logic [15:0] pkt_t[$];
  pkt_t expq[$];
  // ------------- producer: writes events and their expected packets -------------
  task automatic push_t(input logic [26:0] w); @(negedge clk); tf_wd = w; tf_we = 1; @(negedge clk); tf_we = 0; endtask
  task automatic push_c(input logic [26:0] w); @(negedge clk); cf_wd = w; cf_we = 1; @(negedge clk); cf_we = 0; endtask
  task automatic add_event(input int n, input int kind);  // 0 normal 1 cal 2 pace ovf 3 dropped
    trig_w0_t w0; trig_w1_t w1; col_stat_t st; col_word_t cw[4]; pkt_t p;
    logic [7:0] cols[12]; logic [3:0] serr; logic [1:0] ty;
    p.delete();
    w0 = '{ev_type: (kind == 1) ? EV_CALIB : EV_NORMAL, pace_ovf: (kind == 2), lost: (n % 4 == 1),
           rsv: 0, ec: 8'(n), bc: 12'(n * 13)};
    w1 = '{lost_cnt: 8'(n % 4 == 1), inhib_cnt: 8'(n % 5 == 0), rsv: 0};
    if (kind != 2) begin
      for (int s = 0; s < 4; s++) begin
        cw[s] = '{err_j: (n % 3 == 0 && s == 1), col_j: 8'($urandom), err_k: 0, col_k: 8'($urandom),
                  err_l: 0, col_l: 8'($urandom)};
        cols[3*s] = cw[s].col_j; cols[3*s+1] = cw[s].col_k; cols[3*s+2] = cw[s].col_l;
      end
      st = '{dv_err: 4'(n % 7 == 0 ? 4'b1000 : 0), af_err: 0, ro_cnt: 7'(n), bc: 12'(n)};
    end
    if (kind == 0 || kind == 1) begin
      for (int s = 0; s < 4; s++) serr[s] = cw[s].err_j | st.dv_err[s];
      ty = (kind == 1) ? 2'd1 : 2'd0;
    end else begin
      serr = live_err; ty = 2'd2;
    end
    p.push_back({ty, (serr != 0), (kind == 2), (kind == 3), (n % 4 == 1), (n % 5 == 0), 1'b0, 8'(n)});
    p.push_back({serr, 12'(n * 13)});
    p.push_back(kid);
    if (kind <= 1) for (int k = 0; k < 6; k++) p.push_back({cols[2*k], cols[2*k+1]});
    // data values are appended to the expectation as they are written below
    expq.push_back(p);
    push_t(w0); push_t(w1);
    if (kind == 3) begin
      if ((n / 4) % 2 == 0) begin attach_cnt++; n_attach++; end
      else begin @(negedge clk); drop_pending++; n_live++; end
    end
    if (kind <= 1) begin
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < 96; i++) begin
          logic [11:0] v; v = 12'($urandom);
          expq[expq.size()-1].push_back({2'(s), 2'(i / 32), v});
          @(negedge clk); df_wd[s] = {1'b0, 5'(i % 32), v}; df_we[s] = 1;
          @(negedge clk); df_we[s] = 0;
        end
      for (int s = 0; s < 4; s++) push_c(cw[s]);
      push_c(st);
      push_c({8'(attach_cnt), ~st.ro_cnt, ~st.bc});
      attach_cnt = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 24; n++) add_event(n, n % 4);
    wait (expq.size() == 0);
    repeat (20) @(negedge clk);
    // link test packets
    for (int k = 0; k < 5; k++) begin
      pkt_t p; p.delete();
      p.push_back({2'd3, 6'd0, 8'(k + 1)}); p.push_back(16'h0777); p.push_back(kid);
      for (int i = 0; i < 16; i++) p.push_back(16'(1 << i));
      expq.push_back(p);
    end
    link_test = 1;
    wait (expq.size() == 0);
    link_test = 0;
    repeat (30) @(negedge clk);
    chk(n_norm == 12 && n_cal == 6 && n_null == 12 && n_test >= 5, "packet kinds");
    chk(n_live > 0 && n_attach > 0 && drop_pending == 0, "both ways of reporting drops");
    $display("normal+cal %0d cal %0d null %0d test %0d", n_norm, n_cal, n_null, n_test);
    if (n_seu == 0) begin failures++; $display("FAIL no state upset injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------- consumer -------------
  pkt_t got;
  always @(negedge clk) out_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (drop_ack) drop_pending <= drop_pending - 1;
  always @(posedge clk) if (rst_n) begin
    if (pkt_normal) n_norm++;
    if (pkt_null) n_null++;
    if (pkt_test) n_test++;
    if (out_valid && out_ready) begin
      got.push_back(out_data);
      if (out_last) begin
        if (expq.size() == 0) chk(got[0][15:14] == 2'd3 && got.size() == 19, "unexpected packet");
        else begin
          pkt_t e; e = expq.pop_front();
          if (got[0][15:14] == 2'd1) n_cal++;
          chk(got.size() == e.size(), $sformatf("length %0d exp %0d", got.size(), e.size()));
          for (int i = 0; i < e.size() && i < got.size(); i++)
            chk(got[i] == e[i], $sformatf("word %0d %h exp %h", i, got[i], e[i]));
        end
        got.delete();
      end
    end
  end
endmodule
