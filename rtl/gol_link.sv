// gol_link: character-level link layer towards the GOL serializer.
//
// Sends one 16-bit word per 40 MHz clock. Between packets it sends fill
// words so that the receiver keeps bit and character synchronization; each
// packet is framed as  SOF, data words..., CRC  and packets may follow each
// other back to back (the next SOF directly after a CRC).
// Two encodings of the control words are supported:
//   CIMT  : fill words alternate FF1A / FF1B, SOF is 3F80 (plain data);
//   8b/10b: fill is the IDLE <K28.5,D16.2> (or <K28.5,D5.6> when idle_d56),
//           SOF is the carrier extend <K23.7,K23.7>; tx_k flags the bytes
//           that must be sent as K characters.
// CRC-CCITT (preset FFFF) covers the data words. Periodic re-synchronization:
// if gint_busy != 0 and gint_idle != 0, once the link has sent no fill word
// for gint_busy x 16 cycles, gint_idle fill words are inserted after the
// current packet. Upstream handshake: a word is taken when in_valid && in_ready;
// in_last marks the last data word. The source must not pause inside a packet:
// if in_valid drops there (ReSync clears the event builder), the CRC of the
// words sent so far is sent at once in place of the missing word.
// Control words, framing and the CRC polynomial follow the chip; the CRC
// preset, the x16 unit of gint_busy and the port names are this design's.
// SEU protection: the state register (st) is kept in three copies; the
// logic uses their bitwise majority, every clock reloads all three with the
// voted (or next) state, and fsm_upset is high while a copy disagrees. The
// triplication follows the chip; the scrubbing is this design's choice.
module gol_link
  import kchip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enc_8b10b,
  input  logic        idle_d56,
  input  logic [7:0]  gint_busy,
  input  logic [7:0]  gint_idle,
  input  logic        in_valid,
  input  logic [15:0] in_data,
  input  logic        in_last,
  output logic        in_ready,
  output logic [15:0] tx_data,
  output logic [1:0]  tx_k,
  output logic        tx_sof,         // this word is a SOF (for monitoring)
  output logic        idle_inserted,  // pulse: a forced fill period started
  output logic        fsm_upset      // the copies of the state register disagree
);
  typedef enum logic [1:0] {L_FILL, L_SOF, L_DATA, L_CRC} lstate_e;
  lstate_e     st;
  lstate_e st_r [3];   // three copies of the state (TMR)
  always_comb begin
    st = lstate_e'((st_r[0] & st_r[1]) | (st_r[1] & st_r[2]) | (st_r[0] & st_r[2]));
    fsm_upset = (st_r[0] != st_r[1]) || (st_r[1] != st_r[2]);
  end
  logic        alt;          // CIMT fill alternation
  logic [15:0] crc, crc_nxt;
  logic [7:0]  idle_left;
  logic [11:0] busy_cnt;
  logic        insert_due;

  crc16_ccitt u_crc (.crc_in(crc), .data(in_data), .crc_out(crc_nxt));

  always_comb begin
    insert_due = (gint_busy != 8'd0) && (gint_idle != 8'd0) &&
                 (busy_cnt >= {gint_busy, 4'b0000});
    in_ready = (st == L_DATA);
    tx_sof   = (st == L_SOF);
    tx_k     = 2'b00;
    unique case (st)
      L_FILL: if (enc_8b10b) begin
                tx_data = {K28_5, idle_d56 ? D5_6 : D16_2};
                tx_k    = 2'b10;
              end else begin
                tx_data = alt ? CIMT_FF1B : CIMT_FF1A;
              end
      L_SOF:  if (enc_8b10b) begin
                tx_data = {K23_7, K23_7};
                tx_k    = 2'b11;
              end else begin
                tx_data = CIMT_SOF;
              end
      L_DATA: tx_data = in_valid ? in_data : crc;   // CRC closes an aborted frame
      default: tx_data = crc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_r <= '{L_FILL, L_FILL, L_FILL}; alt <= 1'b0; crc <= CRC_INIT; idle_left <= '0;
      busy_cnt <= '0; idle_inserted <= 1'b0;
    end else begin
      st_r <= '{st, st, st};   // scrub
      idle_inserted <= 1'b0;
      if (st == L_FILL) begin
        alt      <= !alt;
        busy_cnt <= '0;
      end else if (busy_cnt != 12'hFFF) begin
        busy_cnt <= busy_cnt + 12'd1;
      end
      unique case (st)
        L_FILL: begin
          if (idle_left != 8'd0) idle_left <= idle_left - 8'd1;
          if (in_valid && idle_left <= 8'd1) st_r <= '{L_SOF, L_SOF, L_SOF};
        end
        L_SOF: begin
          crc <= CRC_INIT;
          st_r <= '{L_DATA, L_DATA, L_DATA};
        end
        L_DATA: if (in_valid) begin
          crc <= crc_nxt;
          if (in_last) st_r <= '{L_CRC, L_CRC, L_CRC};
        end else begin
          st_r <= '{L_FILL, L_FILL, L_FILL};    // source aborted (ReSync): CRC sent this cycle
        end
        default: begin   // L_CRC
          if (insert_due) begin
            st_r <= '{L_FILL, L_FILL, L_FILL};
            idle_left     <= gint_idle;
            idle_inserted <= 1'b1;
          end else if (in_valid) begin
            st_r <= '{L_SOF, L_SOF, L_SOF};
          end else begin
            st_r <= '{L_FILL, L_FILL, L_FILL};
          end
        end
      endcase
    end
  end

endmodule
