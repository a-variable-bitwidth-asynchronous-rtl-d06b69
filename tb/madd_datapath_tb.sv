// madd_datapath_tb: self-checking test of the MADD height/accumulator adders.
//
// Two instances run side by side: HEIGHT_TAP = 0 (accumulator adds the first
// adder's output) and HEIGHT_TAP = 1 (accumulator adds the height register,
// one extra accumulate-only clock). Each is fed the entries of a random array
// from index M down to 1; the final accumulator must equal sum_j j*entry[j],
// computed here directly with multiplications. Register values are also
// compared clock by clock with a behavioural model of each variant.
module madd_datapath_tb;
  import madd_pkg::*;
  localparam int W_BITS = 8, ENTRY_BITS = 8;
  localparam int H_BITS = height_bits(W_BITS, ENTRY_BITS);
  localparam int ACC_BITS = acc_bits(W_BITS, ENTRY_BITS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, height_en = 1'b0, acc_en0 = 1'b0, acc_en1 = 1'b0;
  logic [ENTRY_BITS-1:0] din = '0;
  logic [H_BITS-1:0] height0, height1;
  logic [ACC_BITS-1:0] acc0, acc1;

  int checks = 0, failures = 0;

  madd_datapath #(.W_BITS(W_BITS), .ENTRY_BITS(ENTRY_BITS), .HEIGHT_TAP(1'b0)) dut0 (
    .clk, .rst_n, .clear, .height_en, .acc_en(acc_en0), .din, .height(height0), .acc(acc0));
  madd_datapath #(.W_BITS(W_BITS), .ENTRY_BITS(ENTRY_BITS), .HEIGHT_TAP(1'b1)) dut1 (
    .clk, .rst_n, .clear, .height_en, .acc_en(acc_en1), .din, .height(height1), .acc(acc1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int entry [1 << W_BITS];

  // One dot product over entries M..1, then compare with the direct sum.
  task automatic run(int m);
    longint expect_sum = 0, h = 0, a0 = 0, a1 = 0, h_prev;
    for (int j = 1; j <= m; j++) expect_sum += longint'(j) * entry[j];
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check("cleared acc", acc0 + acc1, 0);
    check("cleared height", height0 + height1, 0);
    for (int i = m; i >= 1; i--) begin
      din = ENTRY_BITS'(entry[i]); height_en = 1'b1; acc_en0 = 1'b1; acc_en1 = 1'b1;
      h_prev = h;
      h += entry[i];
      a0 += h;
      a1 += h_prev;
      @(negedge clk);
      check("height0", height0, h);
      check("height1", height1, h);
      check("acc0 step", acc0, a0);
      check("acc1 step", acc1, a1);
    end
    height_en = 1'b0; acc_en0 = 1'b0;
    // HEIGHT_TAP = 1 needs one accumulate-only clock.
    check("acc1 one short before drain", acc1, expect_sum - h);
    @(negedge clk); acc_en1 = 1'b0; din = '0;
    check($sformatf("acc0 M=%0d", m), acc0, expect_sum);
    check($sformatf("acc1 M=%0d", m), acc1, expect_sum);
    check("height after drain", height1, h);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      int m;
      m = (t == 0) ? 1 : (t == 1) ? (1 << W_BITS) - 1 : $urandom_range((1 << W_BITS) - 1, 1);
      for (int j = 0; j < (1 << W_BITS); j++)
        entry[j] = (t == 1) ? (1 << ENTRY_BITS) - 1 : $urandom_range((1 << ENTRY_BITS) - 1);
      run(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
