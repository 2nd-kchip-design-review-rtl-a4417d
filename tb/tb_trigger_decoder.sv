// tb_trigger_decoder: sends random 3-bit commands with random gaps and masks
// and checks that exactly the expected pulse appears on the cycle after the
// third bit, and that the last-command register follows.
// The command patterns follow the chip; the one-clock decode latency and
// the mask bit order are this design's.
// Also injects upsets into one copy of the triplicated state register.
module tb_trigger_decoder;
  logic clk = 0, rst_n = 0, t1 = 0;
  logic [3:0] mask = '0;
  logic lv1a, calpulse, resync, bc0;
  logic [2:0] last_cmd;
  int checks = 0, failures = 0;

  // State-register upsets: now and then one copy of the triplicated state is
  // inverted. The voter must hide it (every other check keeps passing) and
  // fsm_upset must show it until the next clock scrubs the copy.
  logic fsm_upset; int n_seu = 0;
  always @(negedge clk) if (rst_n && ($urandom % 97) == 0) begin
    automatic int k = $urandom % 3;
    dut.bitcnt_r[k] = $bits(dut.bitcnt_r[k])'(~dut.bitcnt_r[k]);
    #1 checks++;
    if (!fsm_upset) begin failures++; $display("FAIL state upset not flagged"); end
    n_seu++;
  end
  int seen[4] = '{0, 0, 0, 0};
  trigger_decoder dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [2:0] pats[4] = '{3'b100, 3'b110, 3'b101, 3'b111};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int k; logic [3:0] exp;
      k = $urandom % 4;
      mask = (n < 100) ? 4'b0 : 4'($urandom);
      @(negedge clk); t1 = 1;
      @(negedge clk); t1 = pats[k][1];
      @(negedge clk); t1 = pats[k][0];
      @(negedge clk); t1 = 0;
      exp = 4'b0; exp[k] = !mask[k];
      chk({bc0, resync, calpulse, lv1a} == exp, "decoded pulse");
      chk(last_cmd == pats[k], "last command");
      if (exp != 0) seen[k]++;
      @(negedge clk);
      chk({bc0, resync, calpulse, lv1a} == 4'b0, "single-cycle pulse");
      repeat ($urandom % 3) begin
        @(negedge clk); chk({bc0, resync, calpulse, lv1a} == 4'b0, "quiet line");
      end
    end
    for (int k = 0; k < 4; k++) chk(seen[k] > 10, "each command seen");
    if (n_seu == 0) begin failures++; $display("FAIL no state upset injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
