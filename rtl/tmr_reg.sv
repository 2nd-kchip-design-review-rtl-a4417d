// tmr_reg: SEU-hardened register, three copies and a majority voter.
//
// Each bit is stored three times. The output is the bitwise majority of the
// copies, and every cycle all three copies are rewritten with the voted value
// (or with the new data on a write), so a single upset is corrected on the next
// clock edge. `upset` is high for one cycle whenever the copies disagree; the
// register file counts these events. Triplicating configuration registers
// follows the SEU protection scheme of the chip; the scrubbing every cycle and
// the upset flag are this design's way of doing it.
// Interface: synchronous write (we, d), voted output q, reset to INIT.
module tmr_reg #(
  parameter int unsigned W = 8,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         upset
);
  logic [W-1:0] r0, r1, r2;
  logic [W-1:0] nxt;

  always_comb begin
    q     = (r0 & r1) | (r1 & r2) | (r0 & r2);
    upset = (r0 != r1) || (r1 != r2);
    nxt   = we ? d : q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= INIT; r1 <= INIT; r2 <= INIT;
    end else begin
      r0 <= nxt; r1 <= nxt; r2 <= nxt;
    end
  end
endmodule
