// madd_workloads_tb: the dot product workloads the MADD unit is evaluated on.
//
//   - Ten random dot products of eight terms with 8-bit operands, the switching
//     activity used for the power comparison of the 8-bit unit.
//   - Dot products of 10, 100, 200 and 255 tuples with 8-bit operands, each
//     tuple at its own index (up to the 255 usable entries of the array).
//   - "Square" n-bit units for n = 6, 7 and 8: n-bit index and multiplicand
//     with a 2^n-entry array, each running ten eight-term dot products and one
//     full-array dot product.
//
// Every result is compared with sum(w*a) computed with multiplications, and
// every latency with 1 + MAXVAL clocks. Each unit has its own driver; the test
// ends when all of them have finished.
module madd_workloads_tb;
  import madd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, finished = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  localparam int NBITS [3] = '{6, 7, 8};

  for (genvar g = 0; g < 3; g++) begin : g_unit
    localparam int N = NBITS[g];
    localparam int DEPTH = 1 << N;
    localparam int ACC_BITS = acc_bits(N, N);

    logic in_valid = 1'b0, req = 1'b0;
    logic [N-1:0] in_w = '0, in_a = '0;
    logic in_ready, ack, ovf;
    logic [ACC_BITS-1:0] result;
    logic [N-1:0] maxval;

    madd_dot_product #(.W_BITS(N), .A_BITS(N), .ENTRY_BITS(N)) dut (.*);

    int tw [$], ta [$];   // tuples of the current dot product

    task automatic run(string tag);
      longint expect_sum = 0;
      int wmax = 0, clocks = 0;
      foreach (tw[k]) begin
        expect_sum += longint'(tw[k]) * ta[k];
        if (tw[k] > wmax) wmax = tw[k];
        @(negedge clk);
        in_valid = 1'b1; in_w = N'(tw[k]); in_a = N'(ta[k]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      req = 1'b1;
      do begin
        @(negedge clk);
        clocks++;
      end while (!ack && clocks < 4 * DEPTH);
      check($sformatf("%0d-bit %s result", N, tag), result, expect_sum);
      check($sformatf("%0d-bit %s latency", N, tag), clocks, 1 + wmax);
      check($sformatf("%0d-bit %s ovf", N, tag), ovf, 0);
      req = 1'b0;
      @(negedge clk);
      tw.delete(); ta.delete();
    endtask

    // n distinct random indices with random multiplicands.
    task automatic make_distinct(int n);
      int idx [$];
      for (int w = 1; w < DEPTH; w++) idx.push_back(w);
      idx.shuffle();
      for (int k = 0; k < n; k++) begin
        tw.push_back(idx[k]);
        ta.push_back($urandom_range(DEPTH - 1));
      end
    endtask

    initial begin
      @(posedge rst_n);
      for (int r = 0; r < 10; r++) begin
        make_distinct(8);
        run($sformatf("8-term #%0d", r));
      end
      make_distinct(DEPTH - 1);
      run("full array");
      if (N == 8) begin
        foreach (NTUPLES[k]) begin
          make_distinct(NTUPLES[k]);
          run($sformatf("%0d tuples", NTUPLES[k]));
        end
      end
      finished++;
    end
  end

  localparam int NTUPLES [4] = '{10, 100, 200, 255};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
