// tb_kchip_top: end-to-end test of the Kchip core at its default sizes.
//
// Around the core: four behavioural PACE3+ADC chips (pace3_model), a T1
// command driver, a bit-banged I2C master and a GOL-side receiver that
// deframes the link (CIMT or 8b/10b), checks every CRC and decodes packets.
// For normal and calibration packets every column address and every one of
// the 384 samples is compared with the values the PACE3 model produced for
// that readout; EC must advance by one per packet unless the packet says that
// triggers were lost before it.
// Scenario: register access and defaults; single LV1As; a calibration
// sequence (pulse width and latency measured); a dense LV1A burst with the
// trigger inhibit disabled (PACE3 overflow, Data FIFO overflow and Trigger
// FIFO overflow); a burst with the inhibit enabled; a DataValid glitch
// (out of sync); ReSync; BC0; masked commands; idle insertion; 8b/10b mode;
// Link Test mode and the I2C FIFO window; an injected register upset.
// Back-to-back frames are counted separately after event packets.
// Each of these mechanisms is counted and must have happened at least once.
// Timing: 40 MHz clock (25 ns); the I2C bit takes 20 clocks; the calibration
// trigger is checked to reach the PACE3s LATENCY+1 cycles after CalPulse.
// The PACE3 model's FIFO depth and delays are this design's assumptions; the
// command patterns, FIFO sizes and packet checks follow the chip.
module tb_kchip_top;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, t1 = 0;
  logic [1:0] chip_id = 2'b01;
  logic [3:0] pace_dv, pace_af, glitch_dv = 0, force_af = 0;
  logic [3:0][11:0] adc_data; logic [3:0][7:0] pace_col;
  logic pace_trig, cal_req; logic [3:0] dll_tap;
  logic scl = 1, sda_m = 1, sda_oe, sda;
  logic [15:0] gol_data; logic [1:0] gol_k;
  int n_readouts, n_pdrop;
  int checks = 0, failures = 0;

  assign sda = sda_m & !sda_oe;
  kchip_top dut (.clk, .rst_n, .chip_id, .t1, .pace_dv, .pace_af, .adc_data, .pace_col,
    .pace_trig, .cal_req, .dll_tap, .scl, .sda_in(sda), .sda_oe, .gol_data, .gol_k);
  pace3_model #(.DEPTH(32), .DEPTH_AF(28), .RO_DELAY(4)) pace (.clk, .rst_n, .trig(pace_trig),
    .resync(dut.resync), .glitch_dv, .force_af, .dv(pace_dv), .af(pace_af), .adc(adc_data),
    .col(pace_col), .n_readouts, .n_dropped(n_pdrop));

  always #12.5 clk = !clk;   // 40 MHz

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_normal = 0, n_cal = 0, n_null_pace = 0, n_null_data = 0, n_lostflag = 0;
  int n_b2b_ev = 0; logic [1:0] last_type = 0;
  int n_inhib = 0, n_b2b = 0, n_idle_ins = 0, n_oos = 0, n_test = 0, n_8b10b = 0;
  int n_resync = 0, n_bc0 = 0, n_masked = 0, n_seu = 0, n_window = 0, n_calpulse = 0;
  int n_pkts = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ev_inhibited) n_inhib++;
    if (dut.idle_inserted) n_idle_ins++;
  end

  // ---------------- T1 commands ----------------
  task automatic t1_cmd(input logic [2:0] p);
    @(negedge clk); t1 = p[2]; @(negedge clk); t1 = p[1]; @(negedge clk); t1 = p[0];
    @(negedge clk); t1 = 0;
  endtask
  task automatic lv1a(); t1_cmd(3'b100); endtask

  // ---------------- I2C master ----------------
  task automatic q(); repeat (5) @(negedge clk); endtask
  task automatic i2c_start(); sda_m = 1; scl = 1; q(); sda_m = 0; q(); scl = 0; q(); endtask
  task automatic i2c_stop();  sda_m = 0; q(); scl = 1; q(); sda_m = 1; q(); q(); endtask
  task automatic send_bit(input logic b); sda_m = b; q(); scl = 1; q(); q(); scl = 0; q(); endtask
  task automatic get_bit(output logic b); sda_m = 1; q(); scl = 1; q(); b = sda; q(); scl = 0; q(); endtask
  task automatic send_byte(input logic [7:0] v, output logic ack);
    for (int i = 7; i >= 0; i--) send_bit(v[i]);
    get_bit(ack);
  endtask
  task automatic reg_write(input logic [4:0] a, input logic [7:0] d);
    logic a1, a2;
    i2c_start(); send_byte({chip_id, a, 1'b0}, a1); send_byte(d, a2); i2c_stop();
    chk(!a1 && !a2, "I2C write acknowledged");
  endtask
  task automatic reg_read(input logic [4:0] a, output logic [7:0] d);
    logic a1, b;
    i2c_start(); send_byte({chip_id, a, 1'b1}, a1);
    for (int i = 7; i >= 0; i--) begin get_bit(b); d[i] = b; end
    send_bit(1'b1); i2c_stop();
    chk(!a1, "I2C read acknowledged");
  endtask

  // ---------------- link receiver ----------------
  typedef logic [15:0] pkt_t[$];
  int rx_state = 0, ro_seen = 0;   // ro_seen: readouts accounted for by packets
  logic [15:0] crc; pkt_t cur;
  logic [7:0] last_ec = 0; logic ec_valid = 0;
  int pkt_words = 0;

  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [15:0] d);
    for (int i = 15; i >= 0; i--) begin
      logic fb; fb = c[15] ^ d[i];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  task automatic check_packet(input pkt_t p);
    logic [1:0] ty; logic [5:0] fl; logic [7:0] ec;
    n_pkts++;
    ty = p[0][15:14]; fl = p[0][13:8]; ec = p[0][7:0];
    chk(p.size() >= 3, "packet length");
    chk(p[2] == dut.kid, "Kchip ID in header");
    if (dut.cfg.enc_8b10b) n_8b10b++;
    if (ty == 2'd3) begin
      n_test++;
      chk(p.size() == 19, "test packet length");
      for (int i = 0; i < 16; i++) chk(p[3+i] == 16'(1 << i), "test pattern");
      return;
    end
    // EC sequence
    if (ec_valid) begin
      if (fl[2]) chk(ec != 8'(last_ec + 1), "EC jump after lost triggers");
      else       chk(ec == 8'(last_ec + 1), $sformatf("EC %0d after %0d", ec, last_ec));
    end
    last_ec = ec; ec_valid = 1;
    if (fl[2]) n_lostflag++;
    if (fl[5]) n_oos++;
    if (ty == 2'd2) begin
      chk(p.size() == 3, "null packet length");
      chk(fl[4] != fl[3], "null reason: PACE3 or Data FIFO overflow");
      if (fl[4]) n_null_pace++;
      if (fl[3]) begin n_null_data++; ro_seen++; end
      return;
    end
    if (ty == 2'd1) n_cal++; else n_normal++;
    chk(p.size() == 393, $sformatf("normal packet length %0d", p.size()));
    if (p.size() != 393) return;
    for (int s = 0; s < 4; s++)
      for (int sl = 0; sl < 3; sl++) begin
        int k; logic [7:0] c;
        k = 3 * s + sl;
        c = (k % 2 == 0) ? p[3 + k / 2][15:8] : p[3 + k / 2][7:0];
        chk(c == pace.column(s, ro_seen, sl), "column address");
      end
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 96; i++) begin
        logic [15:0] w; w = p[9 + 96 * s + i];
        if (w != {2'(s), 2'(i / 32), pace.sample(s, ro_seen, i)}) begin
          chk(0, $sformatf("sample s%0d i%0d ro%0d: %h", s, i, ro_seen, w));
          break;
        end
      end
    checks++;
    ro_seen++;
  endtask

  always @(posedge clk) if (rst_n) begin
    logic e8, is_sof, is_fill;
    e8 = dut.cfg.enc_8b10b;
    is_sof  = e8 ? (gol_data == 16'hF7F7 && gol_k == 2'b11) : (gol_data == 16'h3F80 && gol_k == 0);
    is_fill = e8 ? (gol_k == 2'b10 && gol_data[15:8] == 8'hBC)
                 : (gol_k == 0 && (gol_data == 16'hFF1A || gol_data == 16'hFF1B));
    case (rx_state)
      0, 3: if (is_sof) begin
              if (rx_state == 3) begin n_b2b++; if (last_type != 2'd3) n_b2b_ev++; end
              cur.delete(); crc = 16'hFFFF; rx_state = 1;
            end else begin
              if (!is_fill) chk(0, $sformatf("fill word %h/%b", gol_data, gol_k));
              rx_state = 0;
            end
      default: begin
        // words until the CRC: the length follows from the header
        if (cur.size() > 0 && gol_data == crc && cur.size() == expected_len(cur[0])) begin
          check_packet(cur); last_type = cur[0][15:14]; rx_state = 3;
        end else begin
          cur.push_back(gol_data); crc = crc_ref(crc, gol_data);
          if (cur.size() > expected_len(cur[0])) begin
            chk(0, "CRC or length error"); rx_state = 0;
          end
        end
      end
    endcase
  end
  function automatic int expected_len(input logic [15:0] h0);
    case (h0[15:14]) 2'd2: return 3; 2'd3: return 19; default: return 393; endcase
  endfunction

  // ---------------- scenario ----------------
  task automatic drain(input int cycles = 3000);
    int idle; idle = 0;
    while (idle < 200 && cycles > 0) begin
      @(negedge clk); cycles--;
      if (rx_state == 0 && !dut.pk_valid && dut.u_tf.empty && !dut.ro_active && dut.pend == 0) idle++;
      else idle = 0;
    end
  endtask

  initial begin
    logic [7:0] v;
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    // --- registers
    reg_read(R_CONFIG, v);  chk(v == 8'h0F, "CONFIG default");
    reg_read(R_LATENCY, v); chk(v == 8'd128, "LATENCY default");
    reg_read(R_KID_L, v);   chk(v == 8'h01, "KID default from pins");
    reg_write(R_KID_H, 8'hA5); reg_write(R_KID_L, 8'h3C);
    chk(dut.kid == 16'hA53C, "KID written");
    // --- single events
    for (int i = 0; i < 5; i++) begin lv1a(); repeat (150) @(negedge clk); end
    drain();
    chk(n_normal == 5, "five normal events");
    reg_read(R_EVCNT, v); chk(v == 8'd5, "EVCNT");
    // --- calibration: width 3, latency 20
    reg_write(R_CWIDTH, 8'd3); reg_write(R_LATENCY, 8'd20); reg_write(R_CDELAY, 8'd9);
    chk(dll_tap == 4'd9, "DLL tap from CalPulse_DELAY");
    begin
      int t0, w, tt; w = 0; tt = -1;
      t1_cmd(3'b110); t0 = 0;
      for (int c = 0; c < 40; c++) begin
        if (cal_req) w++;
        if (pace_trig && tt < 0) tt = c;
        @(negedge clk);
      end
      chk(w == 3, $sformatf("calibration pulse width %0d", w));
      chk(tt == 20 + 1, $sformatf("calibration trigger after %0d cycles", tt));
      n_calpulse++;
    end
    drain();
    chk(n_cal == 1, "calibration event");
    // --- dense burst, inhibit disabled: PACE3, Data FIFO and Trigger FIFO overflow
    reg_write(R_CONFIG, 8'h4F);
    repeat (110) begin lv1a(); @(negedge clk); end
    drain(120000);
    chk(n_null_pace > 0 && n_null_data > 0 && n_lostflag > 0, "overflow handling");
    chk(ro_seen == n_readouts, "every PACE3 readout accounted for");
    // --- burst with inhibit enabled
    reg_write(R_CONFIG, 8'h0F);
    repeat (60) begin lv1a(); @(negedge clk); end
    drain(120000);
    chk(n_inhib > 0, "trigger inhibit");
    chk(ro_seen == n_readouts, "readouts after inhibit burst");
    // --- out of sync: DataValid glitch on stream 1
    lv1a(); repeat (8) @(negedge clk);
    glitch_dv = 4'b0010; @(negedge clk); glitch_dv = 0;
    drain();
    reg_read(R_STAT0, v); chk(v == 8'h02, "STATUS_0 shows stream 1 out of sync");
    chk(n_oos > 0, "out-of-sync flagged in packet");
    // --- ReSync
    t1_cmd(3'b101); n_resync++; repeat (5) @(negedge clk);
    reg_read(R_STAT0, v); chk(v == 8'h00, "ReSync clears error flags");
    reg_read(R_EVCNT, v); chk(v == 8'h00, "ReSync clears EC");
    ro_seen = 0; ec_valid = 1; last_ec = 0;
    lv1a(); lv1a(); drain();
    chk(last_ec == 8'd2, "EC restarts after ReSync");
    // --- BC0
    t1_cmd(3'b111); n_bc0++; last_ec = 0;
    lv1a(); drain();
    chk(last_ec == 8'd1, "EC restarts after BC0");
    // --- mask LV1A
    reg_write(R_MASK, 8'h01);
    begin int np; np = n_pkts; lv1a(); drain(); chk(n_pkts == np, "masked LV1A ignored"); n_masked++; end
    reg_read(R_LAST, v); chk(v == 8'b100, "last command register");
    reg_write(R_MASK, 8'h00);
    // --- idle insertion: every 16 busy cycles insert 4 idles
    reg_write(R_GBUSY, 8'd1); reg_write(R_GIDLE, 8'd4);
    repeat (6) begin lv1a(); repeat (3) @(negedge clk); end
    drain(20000);
    chk(n_idle_ins > 0, "idle insertion");
    reg_write(R_GBUSY, 8'd0);
    // --- 8b/10b control characters
    reg_write(R_CONFIG, 8'h2F);
    repeat (3) begin lv1a(); repeat (4) @(negedge clk); end
    drain(20000);
    chk(n_8b10b >= 3, "packets in 8b/10b mode");
    // --- Link Test mode and FIFO window
    reg_write(R_CONFIG, 8'h1F);
    repeat (200) @(negedge clk);
    reg_write(R_FIFOMAP, 8'd0);
    reg_write(R_FDATA_L, 8'h34); reg_write(R_FDATA_H, 8'h12);
    reg_read(R_FDATA_L, v); chk(v == 8'h34, "FIFO window low byte");
    reg_read(R_FDATA_H, v); chk(v == 8'h12, "FIFO window high byte");
    repeat (5) @(negedge clk);
    chk(dut.u_cap.dfifo_free[0] == 11'd1024, "window read pops the word");
    n_window++;
    reg_write(R_CONFIG, 8'h0F);
    drain();
    chk(n_test > 0, "link test packets");
    // --- register upset
    @(negedge clk); dut.u_regs.u_lat.r1 = ~dut.u_regs.u_lat.r1; @(negedge clk);
    reg_read(R_SEU, v); chk(v == 8'd1, "SEU counter"); if (v == 8'd1) n_seu++;
    reg_read(R_LATENCY, v); chk(v == 8'd20, "upset corrected");
    // --- summary
    chk(n_b2b > 0, "back-to-back packets");
    $display("back-to-back after an event packet %0d", n_b2b_ev);
    $display("normal %0d cal %0d null(pace) %0d null(data) %0d lost-flag %0d inhibited %0d",
             n_normal, n_cal, n_null_pace, n_null_data, n_lostflag, n_inhib);
    $display("b2b %0d idle-ins %0d oos %0d test %0d 8b10b %0d resync %0d bc0 %0d masked %0d seu %0d window %0d calpulse %0d",
             n_b2b, n_idle_ins, n_oos, n_test, n_8b10b, n_resync, n_bc0, n_masked, n_seu, n_window, n_calpulse);
    begin
      int mech[18];
      mech = '{n_b2b_ev, n_normal, n_cal, n_null_pace, n_null_data, n_lostflag, n_inhib, n_b2b, n_idle_ins,
               n_oos, n_test, n_8b10b, n_resync, n_bc0, n_masked, n_seu, n_window, n_calpulse};
      foreach (mech[i]) chk(mech[i] > 0, $sformatf("mechanism %0d happened", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
