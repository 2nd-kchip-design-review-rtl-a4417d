// tb_trigger_control: drives random LV1A / calibration triggers, BC0 and
// ReSync, toggles the PACE3-full and Trigger-FIFO-free inputs, and checks
// against a reference model: the EC/BC values, the two Trigger FIFO words per
// stored trigger, the PACE3 trigger pulse, inhibited and lost triggers.
// Timing: pace_trig and Trigger FIFO word 0 one clock after the trigger,
// word 1 the clock after; the actions follow the chip, the word layout and
// the handling of lost triggers are this design's.
module tb_trigger_control;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, lv1a = 0, cal_trig = 0, resync = 0, bc0 = 0;
  logic inhibit_en = 1, pace_full = 0;
  logic [7:0] tfifo_free = 8'd100;
  logic pace_trig, tfifo_we, fifo_clr, ev_stored, ev_lost, ev_inhibited;
  logic [TFIFO_W-1:0] tfifo_wdata;
  logic [7:0] ec; logic [11:0] bc, last_bc;
  int checks = 0, failures = 0, n_st = 0, n_lost = 0, n_inh = 0, n_cal = 0;
  trigger_control dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference model
  logic [7:0] m_ec; logic [11:0] m_bc; logic [7:0] m_lost, m_inh;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    m_ec = 0; m_bc = 0; m_lost = 0; m_inh = 0;
    @(negedge clk);
    // after reset release one edge passed: bc advanced once
    m_bc = bc;
    for (int n = 0; n < 3000; n++) begin
      int kind; logic is_cal;
      kind = $urandom % 20;
      pace_full  = ($urandom % 6) == 0;
      inhibit_en = ($urandom % 4) != 0;
      tfifo_free = (($urandom % 8) == 0) ? 8'd1 : 8'd50;
      lv1a = 0; cal_trig = 0; bc0 = 0; resync = 0;
      if (kind < 10) lv1a = 1; else if (kind < 13) cal_trig = 1;
      else if (kind == 13) bc0 = 1; else if (kind == 14 && n % 50 == 0) resync = 1;
      is_cal = cal_trig;
      @(negedge clk);
      lv1a = 0; cal_trig = 0; bc0 = 0;
      if (resync) begin
        resync = 0;
        chk(fifo_clr, "fifo clear on ReSync");
        chk(ec == 0 && bc == 0, "ReSync clears EC/BC");
        m_ec = 0; m_bc = 0; m_lost = 0; m_inh = 0;
      end else if (kind == 13) begin
        chk(ec == 0 && bc == 1, "BC0 clears EC/BC");
        m_ec = 0; m_bc = 1;
      end else if (kind < 13) begin
        logic [11:0] tag_bc; tag_bc = m_bc;
        m_bc++;
        if (inhibit_en && pace_full) begin
          chk(ev_inhibited && !pace_trig && !tfifo_we, "inhibited");
          m_inh++; n_inh++;
        end else if (tfifo_free < 2) begin
          m_ec++;
          chk(ev_lost && !pace_trig && !tfifo_we, "lost");
          m_lost++; n_lost++;
        end else begin
          trig_w0_t w0; trig_w1_t w1;
          m_ec++;
          w0 = tfifo_wdata;
          chk(pace_trig && tfifo_we && ev_stored, "stored");
          chk(w0.ec == m_ec && w0.bc == tag_bc, $sformatf("tags ec %0d/%0d bc %0d/%0d", w0.ec, m_ec, w0.bc, tag_bc));
          chk(w0.ev_type == (is_cal ? EV_CALIB : EV_NORMAL), "type");
          chk(w0.pace_ovf == pace_full, "pace_ovf flag");
          chk(w0.lost == (m_lost != 0), "lost flag");
          chk(last_bc == tag_bc, "last BC");
          @(negedge clk); m_bc++;
          w1 = tfifo_wdata;
          chk(tfifo_we && !pace_trig, "second word");
          chk(w1.lost_cnt == m_lost && w1.inhib_cnt == m_inh, "counts");
          m_lost = 0; m_inh = 0; n_st++; if (is_cal) n_cal++;
        end
        chk(ec == m_ec, "EC");
      end else begin
        m_bc++;
      end
      chk(bc == m_bc, $sformatf("BC %0d exp %0d", bc, m_bc));
      @(negedge clk); m_bc++;
      chk(!tfifo_we && !pace_trig, "quiet");
    end
    chk(n_st > 100 && n_lost > 20 && n_inh > 20 && n_cal > 20, "all cases reached");
    $display("stored %0d lost %0d inhibited %0d cal %0d", n_st, n_lost, n_inh, n_cal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
