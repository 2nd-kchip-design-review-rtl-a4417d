// pace3_model: behavioural model of four PACE3 front-end chips and their ADCs,
// as seen from the Kchip pins (testbench only, not synthesizable).
//
// Each trigger is stored if fewer than DEPTH events are waiting. When the
// readout sequencer is idle and an event waits, it waits RO_DELAY+1 cycles
// and then drives DataValid for 3 x 32 cycles with one 12-bit sample per
// cycle on every stream; AlmostFull is high while DEPTH_AF or more events wait.
// Sample and column-address values are a function of stream, readout number
// and position (see sample()/column()), so a receiver can check them.
// glitch_dv[s] inverts DataValid of stream s for one cycle; force_af[s]
// inverts AlmostFull of stream s while high.
module pace3_model #(
  parameter int DEPTH = 32,
  parameter int DEPTH_AF = 28,
  parameter int RO_DELAY = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic             resync,
  input  logic [3:0]       glitch_dv,
  input  logic [3:0]       force_af,
  output logic [3:0]       dv,
  output logic [3:0]       af,
  output logic [3:0][11:0] adc,
  output logic [3:0][7:0]  col,
  output int               n_readouts,
  output int               n_dropped
);
  int cnt = 0, phase = 0, idx = 0, wait_left = 0;  // phase 0 idle, 1 wait, 2 read
  int ro = 0;

  function automatic logic [11:0] sample(input int s, input int r, input int i);
    return 12'((s * 1000 + r * 37 + i * 5) & 32'hFFF);
  endfunction
  function automatic logic [7:0] column(input int s, input int r, input int slot);
    return 8'((r * 3 + slot + s * 50) & 32'hFF);
  endfunction

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      dv[s]  = (phase == 2) ^ glitch_dv[s];
      af[s]  = (cnt >= DEPTH_AF) ^ force_af[s];
      adc[s] = (phase == 2) ? sample(s, ro, idx) : 12'h000;
      col[s] = (phase == 2) ? column(s, ro, idx / 32) : 8'h00;
    end
  end

  always @(posedge clk) begin
    if (!rst_n || resync) begin
      cnt <= 0; phase <= 0; idx <= 0; ro <= 0;
      if (!rst_n) begin n_readouts <= 0; n_dropped <= 0; end
    end else begin
      int c; c = cnt;
      if (phase == 2 && idx == 95) c = c - 1;
      if (trig) begin
        if (cnt < DEPTH) c = c + 1; else n_dropped <= n_dropped + 1;
      end
      cnt <= c;
      case (phase)
        0: if (cnt > 0) begin phase <= 1; wait_left <= RO_DELAY; end
        1: if (wait_left == 0) begin phase <= 2; idx <= 0; end
           else wait_left <= wait_left - 1;
        default: if (idx == 95) begin
                   phase <= 0; ro <= ro + 1; n_readouts <= n_readouts + 1;
                 end else idx <= idx + 1;
      endcase
    end
  end
endmodule
