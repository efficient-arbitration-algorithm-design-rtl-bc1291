// Weight logic of the WRR arbiter: counts the acknowledged slots of the
// current grant holder and blocks its request once its weight is used up.
//
// How it works: one counter serves all requesters, because only the current
// holder is ever counted. Whenever a new tenure starts (the next grant differs
// from the current one, or the holder is granted again after using up its
// weight, which starts a new round for it), the counter is cleared and the
// holder's weight is captured in a register for the comparison. Each cycle in
// which the current grant is acknowledged (ack = 1) adds one. The holder is
// "exhausted" in the cycle in which its acknowledged slots, counting the one
// of this cycle, reach the captured weight; block then carries its grant bit,
// which the arbiter clears from the request vector ahead of the masked
// priority arbiter.
//
// Interface: clk, rst_n (asynchronous, active low); weight[i] = weight of
// requester i; gnt_q = registered one-hot grant now on the bus; gnt_d = grant
// for the next cycle; ack = the current grant used one bus slot. Outputs:
// block (request bits to remove), exhausted, count (slots already counted in
// this tenure, before this cycle).
// Timing: block and exhausted are combinational from the registers and ack;
// count and the captured weight update on the rising clock edge. A holder
// with weight W therefore keeps the bus for exactly W acknowledged slots when
// others are waiting.
//
// The counter, the captured weight and the rule that an acknowledge in the
// first cycle of a grant counts as 1 follow the arbiter description. A weight
// of 0 is read as 1 (every grant lasts at least one slot); this, the
// saturation of the counter and the restart after an exhausted holder is
// granted again are this design's choices.
module wrr_weight_logic #(
  parameter int unsigned N        = 4,
  parameter int unsigned WEIGHT_W = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0][WEIGHT_W-1:0]   weight,
  input  logic [N-1:0]                 gnt_q,
  input  logic [N-1:0]                 gnt_d,
  input  logic                         ack,
  output logic [N-1:0]                 block,
  output logic                         exhausted,
  output logic [WEIGHT_W-1:0]          count
);

  logic [WEIGHT_W-1:0] wgt_q;      // weight of the current holder
  logic [WEIGHT_W-1:0] wgt_sel;    // weight of the next holder
  logic [WEIGHT_W:0]   used;       // slots used including this cycle
  logic                holding;
  logic                new_tenure;

  assign holding   = |gnt_q;
  assign used      = {1'b0, count} + {{WEIGHT_W{1'b0}}, ack};
  assign exhausted = holding && (used >= {1'b0, wgt_q});
  assign block     = exhausted ? gnt_q : '0;

  assign new_tenure = (|gnt_d) && ((gnt_d != gnt_q) || exhausted);

  always_comb begin
    wgt_sel = '0;
    for (int i = 0; i < N; i++)
      if (gnt_d[i]) wgt_sel = weight[i];
    if (wgt_sel == '0) wgt_sel = WEIGHT_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      wgt_q <= '0;
    end else if (new_tenure) begin
      count <= '0;
      wgt_q <= wgt_sel;
    end else if (holding && ack && (count != '1)) begin
      count <= count + 1'b1;
    end
  end

endmodule
