// madd_array: the MADD memory, a shift register of multiplicands indexed by
// the multiplier.
//
// Loading: each accepted tuple (w, a) adds a into entry[w], so the entry at
// index w holds the sum of all multiplicands whose multiplier is w. The
// largest index written so far is kept as MAXVAL; it fixes how many clocks
// the next computation takes. A tuple with w = 0 contributes nothing to a
// dot product and is dropped.
//
// Reading: `start` latches MAXVAL as the read tap and clears MAXVAL for the
// next load. Each `shift` then moves every entry one place up (entry[k] <=
// entry[k-1], zero into entry[1]), so the tap position shows entry[MAXVAL],
// entry[MAXVAL-1], ..., entry[1] on consecutive clocks - the descending
// walk of the algorithm. The entry just above the tap takes zero instead of
// the value leaving the tap, so nothing read climbs past it; entries above
// MAXVAL were zero to begin with. After MAXVAL shifts every entry is zero and
// the array is empty again without a separate clear.
//
// Interface: wr_en/wr_w/wr_a write one tuple per clock; start, shift come
// from the controller; rd_data is combinational from the tap. ovf is a sticky
// flag set when an entry wraps modulo 2^ENTRY_BITS. It belongs to one
// operation: it stays valid through the computation and its result, and is
// cleared by the first write after a start. ENTRY_BITS must be >= A_BITS.
//
// Timing: a write is visible one clock later. The caller must not write and
// shift in the same clock (the controller only allows writes while idle).
//
// From the published MADD design: a shift register holds the multiplicands, tuples
// are added at their w index, MAXVAL is established while loading, the size is
// 2^n entries for n-bit operands. This design's own choices: the shift
// direction and fixed tap, accumulate-on-write with wrap flag, and the
// synchronous active-low reset.
module madd_array #(
  parameter int unsigned W_BITS     = 8,
  parameter int unsigned A_BITS     = 8,
  parameter int unsigned ENTRY_BITS = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [W_BITS-1:0]     wr_w,
  input  logic [A_BITS-1:0]     wr_a,
  input  logic                  start,
  input  logic                  shift,
  output logic [W_BITS-1:0]     maxval,
  output logic [ENTRY_BITS-1:0] rd_data,
  output logic                  ovf
);

  localparam int unsigned DEPTH = 1 << W_BITS;  // entry 0 is never written

  logic [ENTRY_BITS-1:0] mem [DEPTH];
  logic [W_BITS-1:0]     tap;
  logic                  fresh;   // no tuple written since the last start
  logic [ENTRY_BITS:0]   wr_sum;

  // Add the multiplicand into the addressed entry; one guard bit detects wrap.
  assign wr_sum = {1'b0, mem[wr_w]} + (ENTRY_BITS+1)'(wr_a);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (shift) begin
      mem[0] <= '0;
      for (int k = 1; k < DEPTH; k++)
        mem[k] <= (W_BITS'(k - 1) == tap) ? '0 : mem[k-1];
    end else if (wr_en && wr_w != '0) begin
      mem[wr_w] <= wr_sum[ENTRY_BITS-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      maxval <= '0;
      tap    <= '0;
      ovf    <= 1'b0;
      fresh  <= 1'b1;
    end else if (start) begin
      tap    <= maxval;
      maxval <= '0;
      fresh  <= 1'b1;
    end else if (wr_en && wr_w != '0) begin
      if (wr_w > maxval) maxval <= wr_w;
      ovf   <= wr_sum[ENTRY_BITS] | (ovf & ~fresh);
      fresh <= 1'b0;
    end
  end

  assign rd_data = mem[tap];

  // Loading and shifting are exclusive phases of an operation.
  a_no_write_while_shift: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && shift));

  if (ENTRY_BITS < A_BITS) begin : g_bad_width
    $error("madd_array: ENTRY_BITS must be at least A_BITS");
  end

endmodule
