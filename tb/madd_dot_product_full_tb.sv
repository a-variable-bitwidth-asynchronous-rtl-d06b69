// madd_dot_product_full_tb: one complete operation of the MADD unit at its
// default size (8-bit index operand, 255 usable entries, 8-bit multiplicands).
//
// It loads 255 tuples with distinct random indices covering the whole index
// range in random order plus a few repeated indices, requests the dot product,
// and checks the result against sum(w*a) computed with multiplications, MAXVAL
// and the 1 + MAXVAL clocks from request to acknowledge.
module madd_dot_product_full_tb;
  import madd_pkg::*;
  localparam int W_BITS = 8, A_BITS = 8, ENTRY_BITS = 8;
  localparam int ACC_BITS = acc_bits(W_BITS, ENTRY_BITS);
  localparam int DEPTH = 1 << W_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, req = 1'b0;
  logic [W_BITS-1:0] in_w = '0;
  logic [A_BITS-1:0] in_a = '0;
  logic in_ready, ack, ovf;
  logic [ACC_BITS-1:0] result;
  logic [W_BITS-1:0] maxval;

  int checks = 0, failures = 0;

  madd_dot_product dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  int order [DEPTH-1];
  int a_of [DEPTH];
  longint expect_sum;
  int clocks;

  initial begin
    for (int k = 0; k < DEPTH - 1; k++) order[k] = k + 1;
    order.shuffle();
    for (int k = 0; k < DEPTH; k++) a_of[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < DEPTH - 1; k++) begin
      int a;
      a = $urandom_range(100);
      @(negedge clk);
      check("ready", in_ready, 1);
      in_valid = 1'b1; in_w = W_BITS'(order[k]); in_a = A_BITS'(a);
      a_of[order[k]] += a;
      if (k % 50 == 0) begin   // a repeated index
        @(negedge clk);
        in_a = A_BITS'(a);
        a_of[order[k]] += a;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    expect_sum = 0;
    for (int w = 1; w < DEPTH; w++) expect_sum += longint'(w) * a_of[w];
    check("maxval", maxval, DEPTH - 1);
    req = 1'b1;
    clocks = 0;
    do begin
      @(negedge clk);
      clocks++;
    end while (!ack && clocks < 4 * DEPTH);
    check("latency", clocks, DEPTH);
    check("result", result, expect_sum);
    check("ovf", ovf, 0);
    req = 1'b0;
    @(negedge clk);
    check("ack released", ack, 0);
    $display("dot product of %0d tuples = %0d in %0d clocks", DEPTH - 1 + 6, result, clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
