// tb_pace_supervisor: runs the supervisor beside a behavioural PACE3 model
// under bursts of triggers; checks that the emulated sequence (expected
// DataValid, slot, channel, pending count, full) tracks the real chips,
// that no error is flagged while they agree, that a DataValid glitch or a
// wrong AlmostFull on an enabled stream is flagged on that stream only, that
// a disabled stream is ignored, and that ReSync clears the flags.
// Timing: readout starts RO_DELAY+1 cycles after a trigger and lasts 96
// cycles; PACE3 depth and delays are this design's assumptions.
// Also injects upsets into one copy of the triplicated state register.
module tb_pace_supervisor;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, resync = 0, pace_trig = 0;
  logic [3:0] stream_en = 4'hF, glitch_dv = 0, force_af = 0;
  logic [3:0] pace_dv, pace_af, dv_mis, dv_err, af_err;
  logic [3:0][11:0] adc; logic [3:0][7:0] col;
  logic pace_full, ro_active, ro_first, ro_last, pace_ovf;
  logic [1:0] ro_slot; logic [4:0] ro_chan; logic [7:0] ro_cnt;
  logic [5:0] pend;
  int n_readouts, n_dropped;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0, pos = 0;

  // State-register upsets: now and then one copy of the triplicated state is
  // moved to another state. The voter must hide it (every other check keeps passing) and
  // fsm_upset must show it until the next clock scrubs the copy.
  logic fsm_upset; int n_seu = 0;
  always @(negedge clk) if (rst_n && ($urandom % 97) == 0) begin
    automatic int k = $urandom % 3;
    dut.st_r[k] = dut.st_r[k].next();
    #1 checks++;
    if (!fsm_upset) begin failures++; $display("FAIL state upset not flagged"); end
    n_seu++;
  end
  pace_supervisor dut (.*);
  pace3_model pace (.clk, .rst_n, .trig(pace_trig), .resync, .glitch_dv, .force_af,
    .dv(pace_dv), .af(pace_af), .adc, .col, .n_readouts, .n_dropped);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // per-cycle comparison
  always @(negedge clk) if (rst_n) begin
    if (glitch_dv == 0 && force_af == 0 && !resync) begin
      chk(ro_active == pace_dv[0], "expected DataValid");
      chk(int'(pend) == pace.cnt, "pending count");
    end
    if (ro_active) begin
      chk(ro_first == (pos == 0) && ro_last == (pos == 95), "first/last");
      chk(ro_slot == 2'(pos / 32) && ro_chan == 5'(pos % 32), "slot/channel");
      pos = (pos == 95) ? 0 : pos + 1;
    end
    if (pace_full) n_full++;
    if (pace_ovf) n_ovf++;
  end
  task automatic burst(input int n, input int gap);
    repeat (n) begin
      @(negedge clk); pace_trig = 1; @(negedge clk); pace_trig = 0;
      repeat (gap) @(negedge clk);
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    burst(10, 30);
    repeat (1500) @(negedge clk);
    chk(dv_err == 0 && af_err == 0, "no error while in sync");
    burst(45, 2);                      // overflows the PACE3 FIFO
    repeat (6000) @(negedge clk);
    chk(dv_err == 0 && af_err == 0, "no error after overflow");
    chk(n_full > 0 && n_ovf == n_dropped && n_ovf > 0, "full and overflow seen");
    chk(int'(ro_cnt) == n_readouts, "readout count");
    // glitch stream 2
    burst(1, 0);
    repeat (50) @(negedge clk);
    glitch_dv = 4'b0100; @(negedge clk); glitch_dv = 0;
    chk(dv_err == 4'b0100 && af_err == 0, "DataValid mismatch on stream 2");
    // disabled stream 0: no flag
    stream_en = 4'b1110; glitch_dv = 4'b0001; @(negedge clk); glitch_dv = 0;
    chk(dv_err == 4'b0100, "disabled stream ignored");
    force_af = 4'b1000; @(negedge clk); force_af = 0;
    chk(af_err == 4'b1000, "AlmostFull mismatch on stream 3");
    repeat (300) @(negedge clk);
    resync = 1; @(negedge clk); resync = 0;
    chk(dv_err == 0 && af_err == 0 && pend == 0, "ReSync clears");
    burst(5, 10);
    repeat (1000) @(negedge clk);
    chk(dv_err == 0 && af_err == 0, "in sync after ReSync");
    if (n_seu == 0) begin failures++; $display("FAIL no state upset injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
