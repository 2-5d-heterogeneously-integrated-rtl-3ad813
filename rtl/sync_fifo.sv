// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of W bits in a register array with read and write pointers
// one bit wider than the address, so full and empty are told apart by the
// top bit. dout shows the oldest word combinationally; pop removes it.
// A push to a full FIFO is dropped and sets the sticky ovf flag. A helper
// of this design (DWT result queues); nothing in it comes from the source.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count,
  output logic         ovf
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; ovf <= 1'b0;
    end else begin
      if (push) begin
        if (!full || pop) wp <= wp + 1'b1;
        else              ovf <= 1'b1;
      end
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && (!full || pop)) mem[wp[AW-1:0]] <= din;
  end
endmodule
