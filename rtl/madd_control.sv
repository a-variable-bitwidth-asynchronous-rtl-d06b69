// madd_control: loop controller and completion handshake of the MADD unit.
//
// It runs the while loop of the MADD algorithm: when a request is seen it
// loads i <- MAXVAL, then for each clock with i > 0 it issues `step` (one
// height/accumulate update and one array shift) and decrements i. The number
// of clocks therefore depends on the data - on the largest multiplier
// loaded - and cannot be known in advance by the circuits around the unit.
// Completion is signalled instead, on a four-phase handshake:
//
//   req  ____/~~~~~~~~~~~~~~~~~~~~~~~~~~~\________
//   ack  ______________________/~~~~~~~~~~~~~\____
//             |<- 1 + MAXVAL (+1) clocks ->|
//
// With req sampled high in IDLE the controller pulses `start` (datapath clear,
// array tap latch), runs MAXVAL `step` clocks, with HEIGHT_TAP one `drain`
// clock more, and then holds ack high until req falls. ack rises 1 + MAXVAL
// clocks (2 + MAXVAL with HEIGHT_TAP) after the clock edge that sampled req.
// MAXVAL = 0 skips the loop. `idle` is high while no request is pending or in
// progress; tuples may only be loaded then.
//
// The data-dependent loop length and the "operation finished" signal follow
// the published MADD design; the four-phase protocol is this design's choice for that
// signal.
module madd_control
  import madd_pkg::*;
#(
  parameter int unsigned W_BITS     = 8,
  parameter bit          HEIGHT_TAP = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  output logic              ack,
  input  logic [W_BITS-1:0] maxval,
  output logic              idle,
  output logic              start,
  output logic              step,
  output logic              drain,
  output logic [W_BITS-1:0] count
);

  madd_state_e state, state_next;
  logic [W_BITS-1:0] count_next;

  always_comb begin
    state_next = state;
    count_next = count;
    unique case (state)
      S_IDLE: if (req) begin
        count_next = maxval;
        state_next = (maxval == '0) ? S_DONE : S_RUN;
      end
      S_RUN: begin
        count_next = count - 1'b1;
        if (count == W_BITS'(1)) state_next = HEIGHT_TAP ? S_DRAIN : S_DONE;
      end
      S_DRAIN: state_next = S_DONE;
      S_DONE:  if (!req) state_next = S_IDLE;
      default: state_next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      count <= '0;
    end else begin
      state <= state_next;
      count <= count_next;
    end
  end

  assign idle  = (state == S_IDLE) && !req;
  assign start = (state == S_IDLE) && req;
  assign step  = (state == S_RUN);
  assign drain = (state == S_DRAIN);
  assign ack   = (state == S_DONE);

  // Four-phase rules: req falls only once ack is high, req rises only once
  // ack is low again, ack is held until req falls.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(req) |-> ack);
  a_req_rises_after_ack: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(req) |-> !ack);
  a_ack_held: assert property (@(posedge clk) disable iff (!rst_n)
    (ack && req) |=> ack);
  a_step_counts: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> count != '0);

endmodule
