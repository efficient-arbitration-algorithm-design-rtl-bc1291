// Weighted round-robin (WRR) arbiter for a shared bus with four masters.
//
// Idea: a plain round-robin arbiter passes the grant on after every slot; a
// WRR arbiter lets each master keep the bus for up to weight_i acknowledged
// slots per round, so masters get bus shares in proportion to their weights
// while no one can starve.
//
// Structure: the request vector hbusreq first passes the weight logic, which
// removes the current holder's request once its weight is used up. The result
// is ANDed with the round mask (thermometer code of the last grant, holder
// included) and fed to the masked priority arbiter; the raw request vector
// feeds the unmasked priority arbiter. When the masked vector is zero the
// round is over and the unmasked arbiter's grant is taken, which restarts
// the round at the lowest-indexed requester. Both priority arbiters give bit 0
// the highest priority.
//
// Interface (AHB-style names): hclk; hrst, asynchronous reset, active low;
// t, the slot timer: a 1 acknowledges one bus slot of the current grant;
// hbusreq[3:0] bus requests; hgrant[3:0] one-hot bus grant, zero when nobody
// requests. Parameters WEIGHT_1..WEIGHT_4 are the 4-bit weights of
// requesters 0..3 (weight 0 acts as 1).
// Timing: hgrant is registered. A request seen in cycle k is granted from
// cycle k+1. With all four requesting and t held at 1, the grant sequence
// repeats every WEIGHT_1+WEIGHT_2+WEIGHT_3+WEIGHT_4 cycles.
//
// The ports, the four 4-bit weight generics and the masking / weight-logic /
// two-arbiter structure follow the arbiter description. The reset polarity,
// the meaning of t as the acknowledge of a slot, the LSB-first priority, the
// registered grant and the default weights 15, 7, 3, 1 (chosen to fill the
// 4-, 3-, 2- and 1-bit grant counters of the reference waveform) are this
// design's choices.
module arbiter_wrr
  import wrr_pkg::*;
#(
  parameter weight_t WEIGHT_1 = 4'd15,
  parameter weight_t WEIGHT_2 = 4'd7,
  parameter weight_t WEIGHT_3 = 4'd3,
  parameter weight_t WEIGHT_4 = 4'd1
) (
  input  logic     hclk,
  input  logic     hrst,
  input  logic     t,
  input  req_vec_t hbusreq,
  output req_vec_t hgrant
);

  logic [NUM_REQ-1:0][WEIGHT_W-1:0] weight;
  req_vec_t   block, req_w, mask, masked;
  req_vec_t   gnt_masked, gnt_unmasked, gnt_d;
  logic       exhausted;

  assign weight = {WEIGHT_4, WEIGHT_3, WEIGHT_2, WEIGHT_1};

  wrr_weight_logic #(.N(NUM_REQ), .WEIGHT_W(WEIGHT_W)) u_weight (
    .clk       (hclk),
    .rst_n     (hrst),
    .weight    (weight),
    .gnt_q     (hgrant),
    .gnt_d     (gnt_d),
    .ack       (t),
    .block     (block),
    .exhausted (exhausted),
    .count     ()
  );

  assign req_w  = hbusreq & ~block;
  assign masked = req_w & mask;

  ppc_priority_arbiter #(.N(NUM_REQ)) u_masked_arb (
    .req (masked),
    .gnt (gnt_masked)
  );

  ppc_priority_arbiter #(.N(NUM_REQ)) u_unmasked_arb (
    .req (hbusreq),
    .gnt (gnt_unmasked)
  );

  // Masked == 0 selects the unmasked arbiter (start of a new round).
  assign gnt_d = (masked == '0) ? gnt_unmasked : gnt_masked;

  wrr_mask_reg #(.N(NUM_REQ)) u_mask (
    .clk   (hclk),
    .rst_n (hrst),
    .load  (1'b1),
    .gnt   (gnt_d),
    .mask  (mask)
  );

  always_ff @(posedge hclk or negedge hrst) begin
    if (!hrst) hgrant <= '0;
    else       hgrant <= gnt_d;
  end

  // Bus rules: at most one master granted, and only one that requested.
  a_onehot: assert property (@(posedge hclk) disable iff (!hrst) $onehot0(hgrant));
  a_req:    assert property (@(posedge hclk) disable iff (!hrst)
                             (gnt_d & ~hbusreq) == '0);
  // A holder whose weight is used up keeps the bus only by winning a new
  // round through the unmasked arbiter.
  a_weight: assert property (@(posedge hclk) disable iff (!hrst)
                             (exhausted && gnt_d == hgrant) |-> (masked == '0));

endmodule
