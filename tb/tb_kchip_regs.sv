// tb_kchip_regs: checks the register defaults, write/read-back of every R/W
// register, the read-only sources, the Kchip ID default from the pins, the
// sticky STATUS_1 bits and their clearing by ReSync, and that upsets injected
// into the triplicated registers are corrected and counted in SEU_COUNTER,
// together with upsets reported by the state machines (fsm_upset).
// Writes act on the clock after reg_we, reads are combinational. Addresses
// and defaults follow the chip; the bit fields are this design's.
module tb_kchip_regs;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, resync = 0, reg_we = 0;
  logic [1:0] chip_id = 2'b11;
  logic [4:0] reg_addr = 0; logic [7:0] reg_wdata = 0, reg_rdata;
  logic [2:0] last_cmd = 3'b101; logic [7:0] evcnt = 8'h42; logic [11:0] last_bc = 12'hABC;
  logic [7:0] status0 = 8'h96, status1_set = 0; logic [15:0] fifo_word = 16'hBEEF;
  config_t cfg; logic idle_d56; logic [15:0] kid; logic [3:0] t1_mask;
  logic [7:0] latency, gint_busy, gint_idle, fifomap, cal_delay, cal_width, status1, seu_count;
  logic fsm_upset = 0;
  int checks = 0, failures = 0;
  kchip_regs dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  task automatic ex(input logic [4:0] a, input logic [7:0] v, input string m);
    reg_addr = a; #1 chk(reg_rdata == v, $sformatf("%s: reg %h = %h, expected %h", m, a, reg_rdata, v));
  endtask
  task automatic wr(input logic [4:0] a, input logic [7:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_we = 1; @(negedge clk); reg_we = 0;
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [4:0] rw[$] = '{R_CONFIG, R_KID_L, R_KID_H, R_LATENCY, R_GBUSY, R_GIDLE, R_FIFOMAP, R_CDELAY, R_CWIDTH};
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    ex(R_CONFIG, 8'h0F, "default"); ex(R_ECONFIG, 0, "default"); ex(R_MASK, 0, "default");
    ex(R_LATENCY, 8'd128, "default"); ex(R_GBUSY, 0, "default"); ex(R_GIDLE, 0, "default");
    ex(R_CDELAY, 8'd1, "default"); ex(R_CWIDTH, 8'd1, "default");
    ex(R_KID_L, 8'h03, "ID from pins"); ex(R_KID_H, 0, "ID from pins"); chk(kid == 16'h0003, "ID");
    ex(R_LAST, 8'b101, "RO"); ex(R_EVCNT, 8'h42, "RO"); ex(R_BC_L, 8'hBC, "RO"); ex(R_BC_H, 8'h0A, "RO");
    ex(R_STAT0, 8'h96, "RO"); ex(R_FDATA_L, 8'hEF, "window"); ex(R_FDATA_H, 8'hBE, "window");
    ex(5'h1F, 0, "reserved"); ex(5'h0A, 0, "reserved");
    chk(cfg.stream_en == 4'hF && !cfg.link_test && !cfg.enc_8b10b, "config fields");
    foreach (rw[i]) begin
      logic [7:0] v; v = 8'($urandom);
      wr(rw[i], v); ex(rw[i], v, "read back");
    end
    wr(R_ECONFIG, 8'hFF); ex(R_ECONFIG, 8'h03, "ECONFIG"); chk(idle_d56, "idle_d56");
    wr(R_MASK, 8'hFA); ex(R_MASK, 8'h0A, "mask"); chk(t1_mask == 4'hA, "mask out");
    wr(R_LAST, 8'h00); ex(R_LAST, 8'b101, "read-only not writable");
    wr(R_CONFIG, 8'b1011_0101);
    chk(cfg.cal_trig_dis && !cfg.inhibit_dis && cfg.enc_8b10b && cfg.link_test && cfg.stream_en == 4'b0101, "config decode");
    // sticky status
    @(negedge clk); status1_set = 8'h21; @(negedge clk); status1_set = 0; @(negedge clk);
    ex(R_STAT1, 8'h21, "status sticky");
    resync = 1; @(negedge clk); resync = 0;
    ex(R_STAT1, 8'h00, "status cleared by ReSync");
    // SEU injection
    chk(seu_count == 0, "no upsets");
    begin
      logic [7:0] lat; lat = latency;
      for (int k = 0; k < 5; k++) begin
        @(negedge clk);
        case (k % 3)
          0: dut.u_lat.r0 = ~dut.u_lat.r0;
          1: dut.u_cfg.r2 = dut.u_cfg.r2 ^ 8'h10;
          default: dut.u_kidh.r1 = ~dut.u_kidh.r1;
        endcase
        @(negedge clk);
      end
      chk(latency == lat, "upsets corrected"); ex(R_CONFIG, 8'b1011_0101, "upset corrected");
      ex(R_SEU, 8'd5, "SEU counter");
      // an upset reported by a triplicated state machine elsewhere
      @(negedge clk); fsm_upset = 1; repeat (3) @(negedge clk); fsm_upset = 0;
      ex(R_SEU, 8'd8, "SEU counter counts state-machine upsets");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
