// tb_kchip_fifo: random push/pop against a queue model at a small depth,
// checking head data, count, free, full/empty, overflow and clear.
// Runs at depth 16 (the block default is the 1K Data FIFO) so that full and
// empty are reached often; show-ahead reads, one push and one pop per clock.
module tb_kchip_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, clr = 0, we = 0, re = 0, empty, full, ovf;
  logic [17:0] wdata = '0, rdata;
  logic [4:0] count, free;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  logic [17:0] model[$];
  kchip_fifo #(.DEPTH(D), .W(18)) dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == 5'(model.size()), "count");
      chk(free == 5'(D - model.size()), "free");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      if (model.size() != 0) chk(rdata == model[0], "head data");
      if (full) n_full++;
      // phase-dependent bias to reach both full and empty
      we = ($urandom % 100) < ((i / 300) % 2 ? 70 : 30);
      re = ($urandom % 100) < ((i / 300) % 2 ? 30 : 70);
      clr = (i == 2500);
      wdata = 18'($urandom);
      #1 chk(ovf == (we && full), "ovf");
      if (ovf) n_ovf++;
      begin
        bit do_pop, do_push;
        do_pop  = re && model.size() != 0;
        do_push = we && model.size() != D;
        @(posedge clk);
        if (clr) model.delete();
        else begin
          if (do_pop) void'(model.pop_front());
          if (do_push) model.push_back(wdata);
        end
      end
    end
    chk(n_full > 0 && n_ovf > 0, "full and overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
