// i2c_slave: I2C slave for 7-bit addressing, single-byte transfers.
//
// Runs entirely on the 40 MHz system clock: SCL and SDA pass through a
// two-flop synchronizer against metastability and are then edge-detected, so
// the bus may run at any rate well below clk/8. The 7-bit address is
// {chip_id(2), register(5)}: the bus master reaches one of 32 registers of one
// of four chips directly with the address byte, and each transfer moves one
// byte:
//   write: S, {addr, 0}, ACK, data, ACK, P  -> reg_we pulse with reg_addr/reg_wdata
//   read : S, {addr, 1}, ACK, data(slave), NACK, P  -> reg_rd pulse when the
//          byte is loaded (reg_rdata is sampled in that cycle)
// The slave only pulls SDA low (sda_oe = 1); the pad is open drain.
// The addressing mode, single-byte transfers and the synchronous design with
// synchronizers follow the chip; the split of the address into chip and
// register bits is this design's choice.
// SEU protection: the state register (st) is kept in three copies; the
// logic uses their bitwise majority, every clock reloads all three with the
// voted (or next) state, and fsm_upset is high while a copy disagrees. The
// triplication follows the chip; the scrubbing is this design's choice.
module i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] chip_id,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,      // 1: pull SDA low
  output logic       reg_we,
  output logic       reg_rd,
  output logic [4:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata,
  output logic        fsm_upset      // the copies of the state register disagree
);
  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_AACK, I_WR, I_WACK, I_RD, I_RACK} istate_e;
  istate_e    st;
  istate_e st_r [3];   // three copies of the state (TMR)
  always_comb begin
    st = istate_e'((st_r[0] & st_r[1]) | (st_r[1] & st_r[2]) | (st_r[0] & st_r[2]));
    fsm_upset = (st_r[0] != st_r[1]) || (st_r[1] != st_r[2]);
  end
  logic [1:0] scl_sy, sda_sy;
  logic       scl_q, sda_q;
  logic       scl_rise, scl_fall, start, stop;
  logic [7:0] sh;
  logic [2:0] cnt;
  logic       got8, rw;

  always_comb begin
    scl_rise = scl_sy[1] && !scl_q;
    scl_fall = !scl_sy[1] && scl_q;
    start    = scl_sy[1] && scl_q && sda_q && !sda_sy[1];
    stop     = scl_sy[1] && scl_q && !sda_q && sda_sy[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sy <= 2'b11; sda_sy <= 2'b11; scl_q <= 1'b1; sda_q <= 1'b1;
      st_r <= '{I_IDLE, I_IDLE, I_IDLE}; sh <= '0; cnt <= '0; got8 <= 1'b0; rw <= 1'b0;
      sda_oe <= 1'b0; reg_we <= 1'b0; reg_rd <= 1'b0; reg_addr <= '0; reg_wdata <= '0;
    end else begin
      st_r <= '{st, st, st};   // scrub
      scl_sy <= {scl_sy[0], scl};
      sda_sy <= {sda_sy[0], sda_in};
      scl_q  <= scl_sy[1];
      sda_q  <= sda_sy[1];
      reg_we <= 1'b0;
      reg_rd <= 1'b0;
      if (start) begin
        st_r <= '{I_ADDR, I_ADDR, I_ADDR}; cnt <= '0; got8 <= 1'b0; sda_oe <= 1'b0;
      end else if (stop) begin
        st_r <= '{I_IDLE, I_IDLE, I_IDLE}; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          I_ADDR, I_WR: begin
            if (scl_rise) begin
              sh  <= {sh[6:0], sda_sy[1]};
              cnt <= cnt + 3'd1;
              if (cnt == 3'd7) got8 <= 1'b1;
            end else if (scl_fall && got8) begin
              got8 <= 1'b0;
              if (st == I_ADDR) begin
                if (sh[7:6] == chip_id) begin
                  sda_oe   <= 1'b1;
                  rw       <= sh[0];
                  reg_addr <= sh[5:1];
                  st_r <= '{I_AACK, I_AACK, I_AACK};
                end else begin
                  st_r <= '{I_IDLE, I_IDLE, I_IDLE};
                end
              end else begin
                sda_oe    <= 1'b1;
                reg_wdata <= sh;
                reg_we    <= 1'b1;
                st_r <= '{I_WACK, I_WACK, I_WACK};
              end
            end
          end
          I_AACK: if (scl_fall) begin
            cnt <= '0;
            if (rw) begin
              sh     <= reg_rdata;
              reg_rd <= 1'b1;
              sda_oe <= !reg_rdata[7];
              st_r <= '{I_RD, I_RD, I_RD};
            end else begin
              sda_oe <= 1'b0;
              st_r <= '{I_WR, I_WR, I_WR};
            end
          end
          I_WACK: if (scl_fall) begin
            sda_oe <= 1'b0;
            st_r <= '{I_IDLE, I_IDLE, I_IDLE};
          end
          I_RD: if (scl_fall) begin
            cnt <= cnt + 3'd1;
            sh  <= {sh[6:0], 1'b0};
            if (cnt == 3'd7) begin
              sda_oe <= 1'b0;
              st_r <= '{I_RACK, I_RACK, I_RACK};
            end else begin
              sda_oe <= !sh[6];
            end
          end
          I_RACK: if (scl_fall) st_r <= '{I_IDLE, I_IDLE, I_IDLE};
          default: ;
        endcase
      end
    end
  end
endmodule
