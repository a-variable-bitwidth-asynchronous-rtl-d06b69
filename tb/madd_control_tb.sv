// madd_control_tb: self-checking test of the MADD loop controller.
//
// For a range of MAXVAL values (0, 1, the maximum and random ones) it runs the
// four-phase handshake on two controllers, HEIGHT_TAP = 0 and 1, and checks:
// one start pulse per request, exactly MAXVAL step clocks with the loop index
// counting MAXVAL, MAXVAL-1, ..., 1, the drain clock only with HEIGHT_TAP,
// ack rising 1 + MAXVAL (2 + MAXVAL) clocks after req is sampled, ack held
// while req is high, ack falling one clock after req falls, and idle.
module madd_control_tb;
  localparam int W_BITS = 8;

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [W_BITS-1:0] maxval = '0;
  logic ack [2], idle [2], start [2], step [2], drain [2];
  logic [W_BITS-1:0] count [2];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    madd_control #(.W_BITS(W_BITS), .HEIGHT_TAP(g == 1)) dut (
      .clk, .rst_n, .req, .ack(ack[g]), .maxval, .idle(idle[g]), .start(start[g]),
      .step(step[g]), .drain(drain[g]), .count(count[g]));
  end

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

  task automatic run(int m);
    int clocks [2], starts [2], steps [2], drains [2];
    bit done [2], order_ok [2];
    int expect_i [2];
    for (int g = 0; g < 2; g++) begin
      clocks[g] = 0; starts[g] = 0; steps[g] = 0; drains[g] = 0;
      done[g] = 1'b0; order_ok[g] = 1'b1; expect_i[g] = m;
    end
    @(negedge clk);
    maxval = W_BITS'(m);
    check("idle before req", idle[0] && idle[1], 1);
    req = 1'b1;
    #1 check("not idle with req", idle[0] || idle[1], 0);
    while (!(done[0] && done[1])) begin
      // Sample the outputs that are about to be registered at this edge.
      for (int g = 0; g < 2; g++) if (!done[g]) begin
        if (start[g]) starts[g]++;
        if (step[g]) begin
          steps[g]++;
          if (count[g] != W_BITS'(expect_i[g])) order_ok[g] = 1'b0;
          expect_i[g]--;
        end
        if (drain[g]) drains[g]++;
      end
      @(negedge clk);
      maxval = W_BITS'($urandom);   // must not matter once latched
      for (int g = 0; g < 2; g++) if (!done[g]) begin
        clocks[g]++;
        if (ack[g]) done[g] = 1'b1;
      end
      if (clocks[0] > 600) break;
    end
    for (int g = 0; g < 2; g++) begin
      check($sformatf("tap%0d M=%0d ack latency", g, m), clocks[g], 1 + m + g * (m != 0));
      check($sformatf("tap%0d starts", g), starts[g], 1);
      check($sformatf("tap%0d steps", g), steps[g], m);
      check($sformatf("tap%0d drains", g), drains[g], g * (m != 0));
      check($sformatf("tap%0d index order", g), order_ok[g], 1);
    end
    // ack stays while req stays.
    repeat ($urandom_range(3)) begin
      @(negedge clk);
      check("ack held", ack[0] && ack[1], 1);
      check("no start while done", start[0] || start[1], 0);
    end
    req = 1'b0;
    #1 check("ack still high as req falls", ack[0] && ack[1], 1);
    @(negedge clk);
    check("ack falls after req", ack[0] || ack[1], 0);
    check("idle again", idle[0] && idle[1], 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset ack", ack[0] || ack[1], 0);
    run(0); run(1); run(2); run((1 << W_BITS) - 1);
    for (int t = 0; t < 20; t++) run($urandom_range((1 << W_BITS) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
