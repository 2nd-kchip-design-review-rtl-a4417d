// tb_tmr_reg: checks writes, reset value, and that a single upset in any of
// the three copies is outvoted at once, flagged, and scrubbed on the next clock.
// Runs with an 8-bit register and reset value 5A; triplication
// follows the chip, scrubbing every clock is this design's.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0, we = 0, upset;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;
  tmr_reg #(.W(8), .INIT(8'h5A)) dut (.clk, .rst_n, .we, .d, .q, .upset);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    chk(q == 8'h5A, "reset value"); chk(!upset, "no upset after reset");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v; v = 8'($urandom);
      d = v; we = 1; @(negedge clk); we = 0; d = ~v;
      chk(q == v, "write");
      // upset one copy
      case (i % 3)
        0: dut.r0 = dut.r0 ^ 8'(1 << (i % 8));
        1: dut.r1 = dut.r1 ^ 8'(1 << (i % 8));
        default: dut.r2 = ~dut.r2;
      endcase
      #1 chk(q == v, "voted value unaffected by upset");
      chk(upset, "upset flagged");
      @(negedge clk);
      chk(q == v && !upset, "copy scrubbed");
      chk(dut.r0 == v && dut.r1 == v && dut.r2 == v, "all copies equal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
