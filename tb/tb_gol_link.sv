// tb_gol_link: sends random packets (random length, random gaps, often back
// to back) through the link layer in CIMT and in 8b/10b mode, parses the
// transmitted words independently and checks fill words, SOF, data, the CRC
// (bit-serial reference), back-to-back framing and forced idle insertion.
// One word per clock; a frame is SOF, data, CRC. The control characters and
// polynomial follow the chip, the CIMT values and CRC preset are this design's.
// Also injects upsets into one copy of the triplicated state register.
module tb_gol_link;
  import kchip_pkg::*;
  logic clk = 0, rst_n = 0, enc_8b10b = 0, idle_d56 = 0;
  logic [7:0] gint_busy = 0, gint_idle = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  logic [15:0] in_data = 0, tx_data; logic [1:0] tx_k;
  logic tx_sof, idle_inserted;
  int checks = 0, failures = 0, n_pkt = 0, n_b2b = 0, n_ins = 0, n_rx = 0;

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
  gol_link dut (.*);
  always #5 clk = !clk;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [15:0] d);
    for (int i = 15; i >= 0; i--) begin
      logic fb; fb = c[15] ^ d[i];
      c = {c[14:0], 1'b0};
      if (fb) begin c[0] ^= 1; c[5] ^= 1; c[12] ^= 1; end
    end
    return c;
  endfunction
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- source ----------------
  typedef logic [15:0] pkt_t[$];
  pkt_t sent[$];
  int mode_pkts = 300;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      enc_8b10b = (m == 1); idle_d56 = (m == 1);
      gint_busy = (m == 2) ? 8'd2 : 8'd0; gint_idle = (m == 2) ? 8'd5 : 8'd0;
      for (int p = 0; p < mode_pkts; p++) begin
        pkt_t pk; int len;
        pk.delete();
        len = (m == 2) ? 20 + $urandom % 30 : 1 + $urandom % 12;
        for (int i = 0; i < len; i++) pk.push_back(16'($urandom));
        sent.push_back(pk);
        for (int i = 0; i < len; i++) begin
          in_valid = 1; in_data = pk[i]; in_last = (i == len - 1);
          #1 while (!in_ready) begin @(negedge clk); #1; end
          @(negedge clk);
        end
        in_valid = 0; in_last = 0;
        #1;
        if ($urandom % 3 == 0) repeat ($urandom % 6) @(negedge clk);
      end
      while (sent.size() != 0) @(negedge clk);
      repeat (10) @(negedge clk);
    end
    chk(n_rx == 3 * mode_pkts, "all packets received");
    chk(n_b2b > 50 && n_ins > 10, "back-to-back and idle insertion seen");
    $display("packets %0d back-to-back %0d inserted idles %0d", n_rx, n_b2b, n_ins);
    if (n_seu == 0) begin failures++; $display("FAIL no state upset injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- receiver ----------------
  int state = 0, idx = 0, fill_run = 0, ins_pending = 0;   // 0 fill, 1 data, 2 crc
  logic [15:0] crc, last_fill;
  pkt_t cur;
  always @(posedge clk) if (rst_n) begin
    logic is_sof, is_fill;
    is_sof  = enc_8b10b ? (tx_data == 16'hF7F7 && tx_k == 2'b11) : (tx_data == 16'h3F80 && tx_k == 0);
    is_fill = enc_8b10b ? (tx_k == 2'b10 && tx_data == (idle_d56 ? 16'hBCC5 : 16'hBC50))
                        : (tx_k == 0 && (tx_data == 16'hFF1A || tx_data == 16'hFF1B));
    if (idle_inserted) ins_pending = 1;
    case (state)
      0, 3: begin
        if (is_sof) begin
          if (state == 3) n_b2b++;
          if (ins_pending) begin chk(fill_run >= 5, "inserted idle length"); n_ins++; ins_pending = 0; end
          chk(sent.size() != 0, "SOF with a packet");
          cur = sent.pop_front(); idx = 0; crc = 16'hFFFF; state = 1; fill_run = 0;
        end else begin
          chk(is_fill, $sformatf("fill word %h", tx_data));
          if (!enc_8b10b && fill_run > 0) chk(tx_data != last_fill, "CIMT fill alternates");
          last_fill = tx_data; fill_run++; state = 0;
        end
      end
      1: begin
        chk(tx_data == cur[idx], "data word");
        crc = crc_ref(crc, tx_data);
        idx++;
        if (idx == cur.size()) state = 2;
      end
      default: begin
        chk(tx_data == crc, "CRC");
        n_rx++; state = 3;
      end
    endcase
  end
endmodule
