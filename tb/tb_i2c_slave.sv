// tb_i2c_slave: a bit-banged I2C master (SCL period 40 clocks) writes and
// reads random registers of the slave; checks the register strobes, address
// and data, the acknowledge bits, the read data on SDA, and that a transfer
// addressed to another chip is neither acknowledged nor executed.
// Timing: the master changes SDA only while SCL is low, as the I2C standard
// requires; the address split {chip_id, register} is this design's.
// Also injects upsets into one copy of the triplicated state register.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic [1:0] chip_id = 2'd2;
  logic scl = 1, sda_m = 1, sda_oe, sda;
  logic reg_we, reg_rd; logic [4:0] reg_addr; logic [7:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0, n_we = 0, n_rd = 0;

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
  logic [4:0] we_addr; logic [7:0] we_data;
  assign sda = sda_m & !sda_oe;
  i2c_slave dut (.clk, .rst_n, .chip_id, .scl, .sda_in(sda), .sda_oe, .reg_we, .reg_rd,
                 .reg_addr, .reg_wdata, .reg_rdata, .fsm_upset);
  always_comb reg_rdata = {reg_addr, 3'b101} ^ 8'h3C;   // register contents model
  always #5 clk = !clk;
  always @(posedge clk) begin
    if (reg_we) begin n_we++; we_addr = reg_addr; we_data = reg_wdata; end
    if (reg_rd) n_rd++;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  task automatic q(); repeat (10) @(negedge clk); endtask
  task automatic i2c_start(); sda_m = 1; scl = 1; q(); sda_m = 0; q(); scl = 0; q(); endtask
  task automatic i2c_stop();  sda_m = 0; q(); scl = 1; q(); sda_m = 1; q(); q(); endtask
  task automatic send_bit(input logic b); sda_m = b; q(); scl = 1; q(); q(); scl = 0; q(); endtask
  task automatic get_bit(output logic b); sda_m = 1; q(); scl = 1; q(); b = sda; q(); scl = 0; q(); endtask
  task automatic send_byte(input logic [7:0] v, output logic ack);
    for (int i = 7; i >= 0; i--) send_bit(v[i]);
    get_bit(ack);
  endtask
  task automatic i2c_write(input logic [1:0] c, input logic [4:0] a, input logic [7:0] d, output logic ok);
    logic a1, a2;
    i2c_start(); send_byte({c, a, 1'b0}, a1);
    if (!a1) send_byte(d, a2); else a2 = 1;
    i2c_stop(); ok = !a1 && !a2;
  endtask
  task automatic i2c_read(input logic [1:0] c, input logic [4:0] a, output logic [7:0] d, output logic ok);
    logic a1, b;
    i2c_start(); send_byte({c, a, 1'b1}, a1);
    d = '0;
    if (!a1) begin
      for (int i = 7; i >= 0; i--) begin get_bit(b); d[i] = b; end
      send_bit(1'b1);
    end
    i2c_stop(); ok = !a1;
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1; q();
    for (int n = 0; n < 60; n++) begin
      logic ok; logic [4:0] a; logic [7:0] d, rd; int nw, nr;
      a = 5'($urandom); d = 8'($urandom);
      nw = n_we; i2c_write(chip_id, a, d, ok);
      chk(ok, "write acknowledged");
      chk(n_we == nw + 1 && we_addr == a && we_data == d, "register write");
      nr = n_rd; i2c_read(chip_id, a, rd, ok);
      chk(ok && n_rd == nr + 1, "read acknowledged");
      chk(rd == ({a, 3'b101} ^ 8'h3C), $sformatf("read data %h", rd));
      nw = n_we; i2c_write(chip_id ^ 2'd1, a, d, ok);
      chk(!ok && n_we == nw, "other chip ignored");
    end
    if (n_seu == 0) begin failures++; $display("FAIL no state upset injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
