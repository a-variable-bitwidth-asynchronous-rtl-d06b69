// madd_array_tb: self-checking test of the MADD shift-register array.
//
// Loads random tuples (with repeated indices, index 0 and wrap-around cases)
// while a reference array of integers records entry[w] += a. It checks MAXVAL,
// the wrap flag, then starts a read-out and checks that the tap presents
// entry[MAXVAL], entry[MAXVAL-1], ..., entry[1] on consecutive shifts, and that
// the array reads back as empty for the next round. Stimulus changes on the
// falling clock edge; outputs are sampled just before it.
module madd_array_tb;
  localparam int W_BITS = 8, A_BITS = 8, ENTRY_BITS = 8;
  localparam int DEPTH = 1 << W_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, start = 1'b0, shift = 1'b0;
  logic [W_BITS-1:0] wr_w = '0;
  logic [A_BITS-1:0] wr_a = '0;
  logic [W_BITS-1:0] maxval;
  logic [ENTRY_BITS-1:0] rd_data;
  logic ovf;

  int checks = 0, failures = 0;
  int ref_mem [DEPTH];
  int ref_max;
  bit ref_ovf;

  madd_array #(.W_BITS(W_BITS), .A_BITS(A_BITS), .ENTRY_BITS(ENTRY_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  task automatic write(int w, int a);
    @(negedge clk);
    wr_en = 1'b1; wr_w = W_BITS'(w); wr_a = A_BITS'(a);
    @(negedge clk);
    wr_en = 1'b0;
    if (w != 0) begin
      if (ref_mem[w] + a >= (1 << ENTRY_BITS)) ref_ovf = 1'b1;
      ref_mem[w] = (ref_mem[w] + a) % (1 << ENTRY_BITS);
      if (w > ref_max) ref_max = w;
    end
  endtask

  // Read out the whole array through the tap and compare.
  task automatic readout(string tag);
    check({tag, " maxval"}, maxval, ref_max);
    check({tag, " ovf"}, ovf, ref_ovf);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    check({tag, " maxval cleared"}, maxval, 0);
    check({tag, " ovf kept through start"}, ovf, ref_ovf);
    for (int i = ref_max; i >= 1; i--) begin
      check($sformatf("%s entry[%0d]", tag, i), rd_data, ref_mem[i]);
      shift = 1'b1;
      @(negedge clk);
      shift = 1'b0;
    end
    for (int k = 0; k < DEPTH; k++) ref_mem[k] = 0;
    ref_max = 0;
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) ref_mem[k] = 0;
    ref_max = 0; ref_ovf = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("reset maxval", maxval, 0);

    // Round 1: a few hand-picked tuples, including index 0 and a repeat.
    write(3, 10); write(0, 99); write(7, 1); write(3, 5); write(1, 200);
    readout("r1");

    // Round 2: random tuples into all indices, no wrap (small multiplicands).
    ref_ovf = 1'b0;
    for (int n = 0; n < 300; n++) write($urandom_range(DEPTH-1), $urandom_range(40));
    readout("r2");

    // Round 3: after the read-out the array must be empty: a single tuple at
    // a low index must read back alone, and the top entry must be zero.
    ref_ovf = 1'b0;
    write(2, 77);
    readout("r3");
    ref_ovf = 1'b0;
    write(DEPTH-1, 1);
    readout("r4");

    // Round 5: wrap-around of one entry raises ovf.
    ref_ovf = 1'b0;
    write(5, 200); write(5, 100); write(9, 3);
    readout("r5");

    // Round 6: the next load clears ovf.
    ref_ovf = 1'b0;
    write(4, 4);
    readout("r6");

    // Round 7: every index once with its maximum value (full-size array).
    ref_ovf = 1'b0;
    for (int w = 1; w < DEPTH; w++) write(w, (1 << A_BITS) - 1);
    readout("r7");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
