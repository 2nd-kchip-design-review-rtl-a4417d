// kchip_fifo: synchronous single-clock FIFO used for the Data, Column Address
// and Trigger FIFOs.
//
// A DEPTH x W memory array with write and read pointers one bit wider than
// the address. The head word is presented combinationally on rdata (show-ahead),
// so `re` pops the word that is already visible. `free` and `count` let writers
// reserve room for a whole event (96 data words, 6 column words, 2 trigger
// words) before they start. `clr` empties the FIFO in one cycle (ReSync).
// A write to a full FIFO is ignored and raises `ovf` for that cycle; a read
// from an empty FIFO is ignored. Native sizes (1K x 18, 128 x 27) follow the
// chip's FIFO table; the show-ahead read and the clear port are this design's.
module kchip_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 18,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         we,
  input  logic [W-1:0] wdata,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count,
  output logic [AW:0]  free,
  output logic         ovf
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  always_comb begin
    count = wptr - rptr;
    free  = (AW+1)'(DEPTH) - count;
    empty = (count == '0);
    full  = (count == (AW+1)'(DEPTH));
    rdata = mem[rptr[AW-1:0]];
    ovf   = we && full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (we && !full)  wptr <= wptr + 1'b1;
      if (re && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !full && !clr) mem[wptr[AW-1:0]] <= wdata;
  end
endmodule
