// Round-robin mask register of the WRR arbiter.
//
// After every grant the register is loaded with the thermometer code of the
// grant vector: all bits at and above the granted position are 1, the bits
// below are 0 (grant 0100 gives mask 1100). Masking the request vector with
// it keeps the requesters already served in this round out of the masked
// priority arbiter. Because the granted bit itself stays in the mask, the
// current holder can be granted again until its weight logic blocks it.
//
// Interface: clk, rst_n (asynchronous, active low), load, gnt (one-hot) in;
// mask out.
// Timing: mask changes on the rising clock edge after a cycle with load = 1
// and a non-zero gnt. Reset sets the mask to all ones, so the first round
// starts at requester 0.
// The thermometer-coded mask equal to the grant follows the arbiter
// description. Keeping the old mask while no one is granted, and the reset
// value, are this design's choices.
module wrr_mask_reg #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] gnt,
  output logic [N-1:0] mask
);

  logic [N-1:0] therm;

  // therm[i] = OR of gnt[i:0]
  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int i = 0; i < N; i++) begin
      seen     = seen | gnt[i];
      therm[i] = seen;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                mask <= '1;
    else if (load && (|gnt))   mask <= therm;
  end

endmodule
