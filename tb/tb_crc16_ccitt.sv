// tb_crc16_ccitt: compares the word-wide CRC step with a byte-wise reference
// (checked itself against the standard check value 0x29B1 of "123456789").
// Combinational block: no clock; each check applies one random word. The
// polynomial follows the chip, the FFFF preset is this design's.
module tb_crc16_ccitt;
  logic [15:0] crc_in, data, crc_out;
  int checks = 0, failures = 0;
  crc16_ccitt dut (.*);
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction
  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] r;
    string s = "123456789";
    r = 16'hFFFF;
    for (int i = 0; i < 9; i++) r = ref_byte(r, s[i]);
    chk(r == 16'h29B1, "reference check value");
    // "12345678" as four words, then compare chains
    r = 16'hFFFF; crc_in = 16'hFFFF;
    for (int i = 0; i < 4; i++) begin
      data = {s[2*i], s[2*i+1]};
      #1;
      r = ref_byte(ref_byte(r, data[15:8]), data[7:0]);
      chk(crc_out == r, "string word");
      crc_in = crc_out;
    end
    for (int n = 0; n < 2000; n++) begin
      crc_in = 16'($urandom); data = 16'($urandom);
      #1 chk(crc_out == ref_byte(ref_byte(crc_in, data[15:8]), data[7:0]), "random word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
