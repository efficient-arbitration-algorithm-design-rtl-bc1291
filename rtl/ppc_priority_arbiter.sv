// Fixed-priority (find-first-set) arbiter built on a parallel prefix OR.
//
// The grant goes to the lowest-indexed asserted request: bit 0 has the
// highest priority. A parallel-prefix computation (PPC) forms, for every bit
// i, the OR of all request bits below it in ceil(log2(N)) levels of OR gates
// (Kogge-Stone pattern); a request wins when nothing below it is asserted.
// The WRR arbiter uses two of these: one on the masked request vector and one
// on the raw request vector.
//
// Interface: req (N bits) in, gnt (N bits, one-hot or zero) out.
// Timing: purely combinational, depth ceil(log2(N)) + 1 gates.
// The find-first-set function and its PPC structure follow the arbiter
// description; the Kogge-Stone wiring and the choice of bit 0 as the highest
// priority (the mask is shifted towards the upper bits) are this design's.
module ppc_priority_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  // pre[l][i] = OR of req[i .. i-2^l+1] (clipped at bit 0) after level l.
  logic [N-1:0] pre [LEVELS+1];
  // below[i] = OR of req[i-1:0].
  logic [N-1:0] below;

  assign pre[0] = req;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_or
        assign pre[l+1][i] = pre[l][i] | pre[l][i-(1<<l)];
      end else begin : g_pass
        assign pre[l+1][i] = pre[l][i];
      end
    end
  end

  assign below = {pre[LEVELS][N-2:0], 1'b0};
  assign gnt   = req & ~below;

endmodule
