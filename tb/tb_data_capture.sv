// tb_data_capture: plays readout sequences (96 cycles) with known samples and
// column addresses, and checks every Data FIFO write, the six Column FIFO
// words that follow each stored event, and that an event is dropped (no data
// writes, no record) when a Data FIFO reports too little room; dropped events
// are counted in drop_pending and then carried in the next record.
// Timing: one sample per clock during the 96-cycle readout, the record in the
// six cycles after it. The 96 and 6 words per event follow the chip; word
// contents are this design's.
module tb_data_capture;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  logic ro_active = 0, ro_first = 0, ro_last = 0;
  logic [1:0] ro_slot = 0; logic [4:0] ro_chan = 0;
  logic [3:0] dv_mis = 0, dv_err = 0, af_err = 0;
  logic [7:0] ro_cnt = 0; logic [11:0] bc = 0;
  logic [3:0][11:0] adc = '0; logic [3:0][7:0] col = '0;
  logic [3:0][10:0] dfifo_free = '{default: 11'd1024};
  logic [7:0] cfifo_free = 8'd128;
  logic [3:0] dfifo_we; logic [3:0][17:0] dfifo_wdata;
  logic cfifo_we; logic [26:0] cfifo_wdata;
  logic ev_dropped, col_ovf, drop_ack = 0; logic [7:0] drop_pending;
  int m_pending = 0;
  int checks = 0, failures = 0, n_drop = 0, n_keep = 0;
  data_capture dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int ev = 0; ev < 40; ev++) begin
      logic drop; logic [3:0] mis_s; int mis_i;
      logic [3:0][2:0][7:0] cexp; logic [3:0][2:0] eexp;
      col_word_t cw; col_stat_t st;
      drop = (ev % 5 == 3);
      mis_s = (ev % 7 == 2) ? 4'b0010 : 4'b0000; mis_i = 40;
      bc = 12'(ev * 100); ro_cnt = 8'(ev);
      @(negedge clk);
      drop = (ev % 5 == 3) || (ev % 11 == 4);
      dfifo_free[ev % 4] = drop ? 11'd95 : 11'd96;
      eexp = '0;
      for (int i = 0; i < 96; i++) begin
        ro_active = 1; ro_first = (i == 0); ro_last = (i == 95);
        ro_slot = 2'(i / 32); ro_chan = 5'(i % 32);
        dv_mis = (i == mis_i) ? mis_s : 4'b0;
        for (int s = 0; s < 4; s++) begin
          adc[s] = 12'($urandom); col[s] = 8'($urandom);
          if (i % 32 == 0) cexp[s][i / 32] = col[s];
          if (i == mis_i && mis_s[s]) eexp[s][i / 32] = 1'b1;
        end
        #1;
        for (int s = 0; s < 4; s++) begin
          chk(dfifo_we[s] == !drop, "data write enable");
          if (!drop) chk(dfifo_wdata[s] == {dv_mis[s], 5'(i % 32), adc[s]}, "data word");
        end
        @(negedge clk);
        if (i == 0) begin
          chk(ev_dropped == drop, "drop pulse");
          bc = 12'hFFF;   // BC must have been captured on the first cycle
        end
      end
      ro_active = 0; ro_first = 0; ro_last = 0; dv_mis = 0;
      dfifo_free = '{default: 11'd1024};
      if (drop) begin
        m_pending++; n_drop++;
        chk(!cfifo_we && int'(drop_pending) == m_pending, "dropped event: no record, pending count");
        // the builder takes every second drop directly
        if (ev % 2 == 1) begin
          drop_ack = 1; @(negedge clk); drop_ack = 0; m_pending--;
          chk(int'(drop_pending) == m_pending, "drop acknowledged");
        end
        continue;
      end
      for (int w = 0; w < 6; w++) begin
        chk(cfifo_we, "column write");
        if (w < 4) begin
          cw = cfifo_wdata;
          chk(cw.col_j == cexp[w][0] && cw.col_k == cexp[w][1] && cw.col_l == cexp[w][2], "column addresses");
          chk({cw.err_j, cw.err_k, cw.err_l} == {eexp[w][0], eexp[w][1], eexp[w][2]}, "slot error flags");
        end else if (w == 4) begin
          st = cfifo_wdata;
          chk(st.bc == 12'(ev * 100) && st.ro_cnt == 7'(ev), "status word");
        end else begin
          col_chk_t ck; ck = cfifo_wdata;
          chk(ck.bc_n == ~st.bc && ck.ro_cnt_n == ~st.ro_cnt, "check word");
          chk(int'(ck.drop_cnt) == m_pending, "drops carried in the record");
          m_pending = 0;
        end
        @(negedge clk);
      end
      chk(!cfifo_we, "record done");
      if (drop) n_drop++; else n_keep++;
      repeat ($urandom % 5) @(negedge clk);
    end
    chk(n_drop > 5 && n_keep > 20 && !col_ovf, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
