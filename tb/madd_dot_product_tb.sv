// madd_dot_product_tb: end-to-end test of the MADD dot product unit.
//
// Two units receive the same stimulus: one at its default parameters (the
// algorithm's adder tap) and one with HEIGHT_TAP = 1 (accumulator fed from the
// height register). Each round loads a random set of tuples through the
// valid/ready port, runs the four-phase req/ack handshake and compares the
// result with sum(w*a) computed here with multiplications (entries wrapping
// modulo 2^ENTRY_BITS when the round deliberately overflows one). It also
// checks MAXVAL, the ovf flag and the number of clocks from request to
// acknowledge (1 + MAXVAL, and 2 + MAXVAL with the height-register tap).
//
// Mechanisms counted, each of which must occur at least once: an empty
// operation (MAXVAL = 0, loop skipped), repeated indices adding into one
// entry, w = 0 tuples, an entry wrapping (ovf), tuples refused while busy,
// the extra drain clock of the height-register tap, a full-length operation
// (MAXVAL = 2^W_BITS - 1) and operations loaded straight after the previous
// one (the array empties itself while computing).
module madd_dot_product_tb;
  import madd_pkg::*;
  localparam int W_BITS = 8, A_BITS = 8, ENTRY_BITS = 8;
  localparam int ACC_BITS = acc_bits(W_BITS, ENTRY_BITS);
  localparam int DEPTH = 1 << W_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, req = 1'b0;
  logic [W_BITS-1:0] in_w = '0;
  logic [A_BITS-1:0] in_a = '0;
  logic in_ready [2], ack [2], ovf [2];
  logic [ACC_BITS-1:0] result [2];
  logic [W_BITS-1:0] maxval [2];

  int checks = 0, failures = 0;
  int n_empty = 0, n_repeat = 0, n_zero_w = 0, n_wrap = 0, n_refused = 0;
  int n_drain = 0, n_full = 0, n_back_to_back = 0;

  madd_dot_product dut0 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[0]), .in_w, .in_a, .req, .ack(ack[0]),
    .result(result[0]), .maxval(maxval[0]), .ovf(ovf[0]));
  madd_dot_product #(.HEIGHT_TAP(1'b1)) dut1 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready[1]), .in_w, .in_a, .req, .ack(ack[1]),
    .result(result[1]), .maxval(maxval[1]), .ovf(ovf[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int ref_entry [DEPTH];
  bit ref_seen [DEPTH];
  int ref_max;
  bit ref_ovf;

  task automatic ref_clear();
    for (int k = 0; k < DEPTH; k++) begin ref_entry[k] = 0; ref_seen[k] = 1'b0; end
    ref_max = 0; ref_ovf = 1'b0;
  endtask

  // Offer one tuple; both units are idle so both take it.
  task automatic load(int w, int a);
    @(negedge clk);
    check("in_ready while idle", in_ready[0] && in_ready[1], 1);
    in_valid = 1'b1; in_w = W_BITS'(w); in_a = A_BITS'(a);
    @(negedge clk);
    in_valid = 1'b0;
    if (w == 0) n_zero_w++;
    else begin
      if (ref_seen[w]) n_repeat++;
      ref_seen[w] = 1'b1;
      if (ref_entry[w] + a >= (1 << ENTRY_BITS)) ref_ovf = 1'b1;
      ref_entry[w] = (ref_entry[w] + a) % (1 << ENTRY_BITS);
      if (w > ref_max) ref_max = w;
    end
  endtask

  // Request, wait for both acknowledges, check, release.
  task automatic compute(string tag);
    longint expect_sum = 0;
    int clocks = 0, lat [2];
    bit got [2];
    for (int j = 1; j < DEPTH; j++) expect_sum += longint'(j) * ref_entry[j];
    check({tag, " maxval0"}, maxval[0], ref_max);
    check({tag, " maxval1"}, maxval[1], ref_max);
    if (ref_max == 0) n_empty++;
    if (ref_max == DEPTH - 1) n_full++;
    got[0] = 1'b0; got[1] = 1'b0; lat[0] = -1; lat[1] = -1;
    @(negedge clk);
    req = 1'b1;
    while (!(got[0] && got[1]) && clocks < 2 * DEPTH) begin
      // A tuple offered while busy must be refused and leave no trace.
      in_valid = (clocks == 2);
      in_w = W_BITS'(DEPTH - 1); in_a = A_BITS'(1);
      @(negedge clk);
      clocks++;
      if (in_valid && !in_ready[0] && !in_ready[1]) n_refused++;
      in_valid = 1'b0;
      for (int g = 0; g < 2; g++) if (!got[g] && ack[g]) begin got[g] = 1'b1; lat[g] = clocks; end
    end
    check({tag, " latency tap0"}, lat[0], 1 + ref_max);
    check({tag, " latency tap1"}, lat[1], 1 + ref_max + (ref_max != 0));
    if (lat[1] == lat[0] + 1) n_drain++;
    check({tag, " result tap0"}, result[0], expect_sum);
    check({tag, " result tap1"}, result[1], expect_sum);
    if (ovf[0]) n_wrap++;
    check({tag, " ovf0"}, ovf[0], ref_ovf);
    check({tag, " ovf1"}, ovf[1], ref_ovf);
    check({tag, " busy"}, in_ready[0] || in_ready[1], 0);
    req = 1'b0;
    @(negedge clk);
    check({tag, " ack released"}, ack[0] || ack[1], 0);
    check({tag, " result held"}, result[0], expect_sum);
    ref_clear();
  endtask

  initial begin
    ref_clear();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Empty operation: nothing loaded, loop skipped.
    compute("empty");

    // The example from the algorithm: three tuples, one index repeated.
    load(3, 4); load(1, 7); load(3, 2); load(0, 50);
    compute("small");   // 3*6 + 1*7 = 25
    n_back_to_back++;

    // Full-length operation: every index with the largest multiplicand.
    for (int w = 1; w < DEPTH; w++) load(w, (1 << A_BITS) - 1);
    compute("full");
    n_back_to_back++;

    // Wrap of one entry.
    load(10, 200); load(10, 100); load(20, 1);
    compute("wrap");

    // Random rounds of varying size and index range.
    for (int r = 0; r < 30; r++) begin
      int n, wmax;
      n = $urandom_range(40, 1);
      wmax = $urandom_range(DEPTH - 1, 1);
      for (int t = 0; t < n; t++) load($urandom_range(wmax), $urandom_range(120));
      compute($sformatf("rand%0d", r));
      n_back_to_back++;
    end

    check("mechanism empty operation", n_empty > 0, 1);
    check("mechanism repeated index", n_repeat > 0, 1);
    check("mechanism w = 0 tuple", n_zero_w > 0, 1);
    check("mechanism entry wrap", n_wrap > 0, 1);
    check("mechanism refused while busy", n_refused > 0, 1);
    check("mechanism drain clock", n_drain > 0, 1);
    check("mechanism full-length operation", n_full > 0, 1);
    check("mechanism back-to-back operations", n_back_to_back > 0, 1);
    $display("mechanisms: empty=%0d repeat=%0d zero_w=%0d wrap=%0d refused=%0d drain=%0d full=%0d back_to_back=%0d",
             n_empty, n_repeat, n_zero_w, n_wrap, n_refused, n_drain, n_full, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
