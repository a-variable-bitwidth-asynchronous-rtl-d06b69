// madd_datapath: the two adders of the MADD algorithm.
//
//   height <- height + memory[i]      (first adder, height register)
//   acc    <- acc + height            (second adder, accumulator)
//
// Walking the array from index MAXVAL down to 1, height after visiting index
// j is the sum of all entries at indices >= j, and acc sums those heights, so
// entry[j] is counted exactly j times: acc = sum_j j*entry[j], the dot product
// with the index as multiplier. No multiplier is needed.
//
// HEIGHT_TAP selects what the accumulator adds:
//   0: the first adder's output (height + din), as in the algorithm. acc is
//      final in the same clock as the last height update.
//   1: the height register. This removes the two adders in series from the
//      critical path, at the cost of one extra accumulate-only clock (acc_en
//      without height_en) after the last entry.
//
// Interface: clear zeroes both registers; height_en/acc_en enable the updates;
// din is the current entry. Results are registered: visible the clock after
// the enable. Widths come from madd_pkg and cannot overflow.
//
// The adder structure and the HEIGHT_TAP option follow the published MADD design; register
// widths and the synchronous reset are this design's choices.
module madd_datapath
  import madd_pkg::*;
#(
  parameter int unsigned W_BITS     = 8,
  parameter int unsigned ENTRY_BITS = 8,
  parameter bit          HEIGHT_TAP = 1'b0,
  localparam int unsigned H_BITS    = height_bits(W_BITS, ENTRY_BITS),
  localparam int unsigned ACC_BITS  = acc_bits(W_BITS, ENTRY_BITS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  height_en,
  input  logic                  acc_en,
  input  logic [ENTRY_BITS-1:0] din,
  output logic [H_BITS-1:0]     height,
  output logic [ACC_BITS-1:0]   acc
);

  logic [H_BITS-1:0] height_sum;   // first adder
  logic [H_BITS-1:0] acc_addend;

  assign height_sum = height + H_BITS'(din);
  assign acc_addend = HEIGHT_TAP ? height : height_sum;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      height <= '0;
      acc    <= '0;
    end else begin
      if (height_en) height <= height_sum;
      if (acc_en)    acc    <= acc + ACC_BITS'(acc_addend);
    end
  end

endmodule
