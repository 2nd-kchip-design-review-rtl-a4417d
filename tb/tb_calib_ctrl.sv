// tb_calib_ctrl: for random widths and latencies checks the calibration
// request length, the calibration trigger delay (in cycles from the
// command), the disable bit and that overlapping commands are ignored.
// Timing checked to the cycle: cal_req from the cycle after CalPulse for
// `width` cycles, cal_trig exactly `latency` cycles after it. The 1-256 width
// range follows the chip; the 0 = 256 encoding is this design's.
module tb_calib_ctrl;
  logic clk = 0, rst_n = 0, calpulse = 0, resync = 0, cal_trig_en = 1;
  logic [7:0] width = 1, latency = 128;
  logic cal_req, cal_trig, busy, ignored;
  int checks = 0, failures = 0;
  calib_ctrl dut (.*);
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
    for (int n = 0; n < 60; n++) begin
      int w, l, t, req_len, trig_at, nign;
      width   = (n == 0) ? 8'd1 : (n == 1) ? 8'd0 : 8'($urandom);
      latency = (n == 0) ? 8'd128 : (n == 2) ? 8'd0 : 8'(1 + $urandom % 255);
      cal_trig_en = (n % 7 != 3);
      w = (width == 0) ? 256 : width;
      l = (latency == 0) ? 256 : latency;
      @(negedge clk); calpulse = 1;
      @(negedge clk); calpulse = 0;
      req_len = 0; trig_at = -1; nign = 0;
      // t counts cycles after the command cycle
      for (t = 1; t <= 600; t++) begin
        if (cal_req) req_len++;
        if (cal_req) chk(t <= w, "request inside window");
        if (cal_trig) trig_at = t;
        if (t == 5) begin calpulse = 1; #1 if (ignored) nign++; end
        @(negedge clk); calpulse = 0;
      end
      chk(req_len == w, $sformatf("pulse width %0d exp %0d", req_len, w));
      if (cal_trig_en) chk(trig_at == l, $sformatf("latency %0d exp %0d", trig_at, l));
      else             chk(trig_at == -1, "calibration trigger disabled");
      chk(nign == 1, "overlapping command ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
