// madd_dot_product: variable-bitwidth asynchronous dot product unit (MADD).
//
// Computes S = sum_i w_i * a_i without a multiplier. Each tuple (w, a) is
// added into the entry at index w of a 2^W_BITS-entry array (madd_array), so
// the multiplier w is represented by position, not stored. On a request the
// array is walked from the largest index loaded (MAXVAL) down to 1, one entry
// per clock, through two adders (madd_datapath): height accumulates the
// entries seen so far and acc accumulates the heights, which weights entry j
// by j. The computation takes MAXVAL clocks, so its length follows the
// magnitude of the index operand actually present: small weights finish
// early. The controller (madd_control) reports completion on a four-phase
// req/ack handshake rather than after a fixed latency.
//
// Interface
//   in_valid/in_ready/in_w/in_a  tuple input, one per clock while in_ready
//                                (unit idle). Tuples with equal w add up.
//   req/ack                      four-phase: raise req after the last tuple,
//                                wait for ack, read result, drop req, and
//                                ack falls the clock after req is seen low.
//   result                       the dot product, valid while ack is high
//                                and until the next request.
//   maxval                       MAXVAL of the tuples loaded so far.
//   ovf                          an entry wrapped modulo 2^ENTRY_BITS during
//                                loading; result is then wrong. Valid with
//                                result, cleared by the next load.
// Timing: ack rises 1 + MAXVAL clocks after req is sampled (2 + MAXVAL with
// HEIGHT_TAP = 1). The array is empty again when ack rises, so the next
// operation can be loaded straight away.
//
// From the published MADD design: the MADD algorithm, the shift-register array of
// 2^n entries for n-bit operands (255 usable entries at 8 bits), the
// MAXVAL-dependent clock count with a completion signal, and the optional
// height-register tap. This design's choices: the load and handshake
// protocols, accumulation of repeated indices, register widths and reset.
module madd_dot_product
  import madd_pkg::*;
#(
  parameter int unsigned W_BITS     = 8,
  parameter int unsigned A_BITS     = 8,
  parameter int unsigned ENTRY_BITS = 8,
  parameter bit          HEIGHT_TAP = 1'b0,
  localparam int unsigned ACC_BITS  = acc_bits(W_BITS, ENTRY_BITS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [W_BITS-1:0]   in_w,
  input  logic [A_BITS-1:0]   in_a,
  input  logic                req,
  output logic                ack,
  output logic [ACC_BITS-1:0] result,
  output logic [W_BITS-1:0]   maxval,
  output logic                ovf
);

  logic                  start, step, drain, idle;
  logic [ENTRY_BITS-1:0] entry;

  madd_control #(
    .W_BITS    (W_BITS),
    .HEIGHT_TAP(HEIGHT_TAP)
  ) u_control (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (req),
    .ack   (ack),
    .maxval(maxval),
    .idle  (idle),
    .start (start),
    .step  (step),
    .drain (drain),
    .count ()  // loop index, observation only
  );

  madd_array #(
    .W_BITS    (W_BITS),
    .A_BITS    (A_BITS),
    .ENTRY_BITS(ENTRY_BITS)
  ) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (in_valid && idle),
    .wr_w   (in_w),
    .wr_a   (in_a),
    .start  (start),
    .shift  (step),
    .maxval (maxval),
    .rd_data(entry),
    .ovf    (ovf)
  );

  madd_datapath #(
    .W_BITS    (W_BITS),
    .ENTRY_BITS(ENTRY_BITS),
    .HEIGHT_TAP(HEIGHT_TAP)
  ) u_datapath (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start),
    .height_en(step),
    .acc_en   (step || drain),
    .din      (entry),
    .height   (),  // observation only
    .acc      (result)
  );

  assign in_ready = idle;

endmodule
