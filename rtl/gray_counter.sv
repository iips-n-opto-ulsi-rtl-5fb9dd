// gray_counter: free-running reflected-Gray-code counter.
//
// The count register itself holds the Gray code, so exactly one output bit
// changes per step; this count is broadcast to every pixel of the n-phase array,
// where a binary count would toggle up to W lines at once. Each step decodes the
// register to binary, adds one and re-encodes it. clear forces the count to zero
// on the next edge (used to align a frame to the external clock); en gates
// counting. Active-low asynchronous reset to zero.
//
// Interface: gray (W) is the registered count; wrap is high in the cycle where
// the count is about to go from its last code back to zero.
module gray_counter import oup_pkg::*; #(
  parameter int unsigned W = PN_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clear,
  output logic [W-1:0] gray,
  output logic         wrap
);
  logic [W-1:0] bin, bin_next;

  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = W - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray[i];
    bin_next = bin + 1'b1;
  end

  assign wrap = en && (&bin);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     gray <= '0;
    else if (clear) gray <= '0;
    else if (en)    gray <= bin_next ^ (bin_next >> 1);

endmodule
