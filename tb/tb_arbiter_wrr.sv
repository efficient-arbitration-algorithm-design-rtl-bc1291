// End-to-end testbench of the weighted round-robin arbiter at its default
// weights (15, 7, 3, 1).
//
// A behavioural model in the testbench walks the requesters in round order
// with plain loops (holder first while it has weight left, then the higher
// indices, then a new round from index 0) and predicts hgrant every cycle.
// The stimulus has three phases:
//   1. latency: one request from idle must be granted on the next cycle;
//   2. full load: all four masters request and t = 1 every cycle; each
//      PERIOD-cycle round (26 cycles) must give exactly 15, 7, 3 and 1 slots;
//   3. random traffic: masters raise and drop requests, t is random, and an
//      asynchronous reset is applied once in the middle.
// Every mechanism of the arbiter is counted and must occur at least once:
// hand-over after the weight is used up, a new round through the unmasked
// arbiter, re-grant of a lone exhausted holder, hand-over because the holder
// dropped its request, idle bus, a slot without acknowledge (t = 0), and an
// acknowledge / no acknowledge in the first cycle of a grant.
module tb_arbiter_wrr;

  localparam int N = 4;
  localparam int WGT [N] = '{15, 7, 3, 1};
  // one full round under full load (a weight of 0 acts as 1)
  localparam int PERIOD = (WGT[0] != 0 ? WGT[0] : 1) + (WGT[1] != 0 ? WGT[1] : 1)
                        + (WGT[2] != 0 ? WGT[2] : 1) + (WGT[3] != 0 ? WGT[3] : 1);

  int checks = 0, failures = 0;

  logic           hclk = 0, hrst = 0, t = 0;
  logic [N-1:0]   hbusreq = '0;
  logic [N-1:0]   hgrant;

  arbiter_wrr dut (.hclk(hclk), .hrst(hrst), .t(t), .hbusreq(hbusreq), .hgrant(hgrant));

  always #5 hclk = ~hclk;

  initial begin
    repeat (30000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int m_h = -1, m_u = 0, m_p = 0;

  // mechanism counters
  int n_weight_handover = 0, n_new_round = 0, n_regrant = 0, n_drop = 0;
  int n_idle = 0, n_stall = 0, n_first_ack = 0, n_first_noack = 0;

  function automatic int eff_w(input int i);
    return (WGT[i] == 0) ? 1 : WGT[i];
  endfunction

  function automatic void model_reset();
    m_h = -1; m_u = 0; m_p = 0;
  endfunction

  // Advance the model by one clock; returns the expected grant after it.
  function automatic logic [N-1:0] model_step(input logic [N-1:0] req, input logic ack);
    bit exh;
    int start, n;
    bit wrapped;
    exh = (m_h >= 0) && (m_u + int'(ack) >= eff_w(m_h));
    if (m_h >= 0 && ack == 0) n_stall++;
    if (req == '0) n_idle++;
    start = exh ? m_h + 1 : (m_h >= 0 ? m_h : m_p);
    n = -1;
    wrapped = 0;
    for (int i = start; i < N; i++) if (req[i] && n < 0) n = i;
    if (n < 0) begin
      wrapped = 1;
      for (int i = 0; i < N; i++) if (req[i] && n < 0) n = i;
    end
    if (n >= 0) begin
      if (wrapped) n_new_round++;
      if (exh && n != m_h) n_weight_handover++;
      if (exh && n == m_h) n_regrant++;
      if (m_h >= 0 && !exh && !req[m_h]) n_drop++;
    end
    if (n >= 0 && (n != m_h || exh)) begin
      m_u = 0;
    end else if (m_h >= 0 && ack && m_u < 15) begin
      m_u++;
    end
    m_h = n;
    if (n >= 0) m_p = n;
    return (n >= 0) ? (N'(1) << n) : '0;
  endfunction

  // First-cycle acknowledge bookkeeping: the cycle after a grant change.
  logic [N-1:0] prev_grant = '0;

  // One clock: apply inputs at the falling edge, compare after the rising edge.
  // With at_neg = 0 the inputs are applied at once (used right after reset
  // is released on a falling edge).
  task automatic cycle(input logic [N-1:0] req, input logic ack, input bit at_neg = 1);
    logic [N-1:0] exp;
    if (at_neg) @(negedge hclk);
    hbusreq = req;
    t       = ack;
    if (hgrant != '0 && hgrant != prev_grant) begin
      if (ack) n_first_ack++; else n_first_noack++;
    end
    prev_grant = hgrant;
    exp = model_step(req, ack);
    @(posedge hclk); #1;
    checks++;
    if (hgrant !== exp) begin
      failures++;
      if (failures < 20)
        $display("%0t req=%b t=%b hgrant=%b expected %b", $time, req, ack, hgrant, exp);
    end
  endtask

  task automatic check_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("%-28s %0d", what, n);
    end
  endtask

  int slots [N];
  logic [N-1:0] req;

  initial begin
    // reset
    repeat (2) @(posedge hclk);
    #1;
    checks++;
    if (hgrant !== '0) begin failures++; $display("grant during reset"); end
    @(negedge hclk) hrst = 1;
    model_reset();

    // ---- phase 1: latency from idle ----
    cycle('0, 1'b1);
    cycle(4'b0100, 1'b1);
    checks++;
    if (hgrant !== 4'b0100) begin failures++; $display("request not granted after one cycle"); end
    cycle('0, 1'b0);
    checks++;
    if (hgrant !== '0) begin failures++; $display("grant not released after one cycle"); end

    // ---- phase 2: full load, t = 1 ----
    // restart from reset so the round starts at requester 0
    @(negedge hclk) hrst = 0;
    @(negedge hclk) hrst = 1;
    model_reset();
    prev_grant = '0;
    cycle(4'b1111, 1'b1);            // first grant appears
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) slots[i] = 0;
      for (int c = 0; c < PERIOD; c++) begin
        for (int i = 0; i < N; i++) if (hgrant[i]) slots[i]++;
        cycle(4'b1111, 1'b1);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (slots[i] != eff_w(i)) begin
          failures++;
          $display("round %0d: requester %0d got %0d slots, expected %0d", r, i, slots[i], eff_w(i));
        end
      end
    end

    // ---- phase 3: random traffic ----
    req = '0;
    for (int k = 0; k < 6000; k++) begin
      for (int i = 0; i < N; i++) begin
        // holder drops now and then; others toggle with a small probability
        if (hgrant[i] && $urandom_range(0, 19) == 0) req[i] = 1'b0;
        else if ($urandom_range(0, 9) == 0) req[i] = ~req[i];
      end
      // a stretch in which only requester 3 asks, to force re-grants
      if (k >= 3000 && k < 3050) req = 4'b1000;
      if (k >= 4000 && k < 4010) req = '0;
      if (k == 5000) begin
        // asynchronous reset in the middle of a cycle
        @(negedge hclk);
        #2 hrst = 0;
        #1;
        checks++;
        if (hgrant !== '0) begin failures++; $display("async reset did not clear hgrant"); end
        @(negedge hclk) hrst = 1;
        model_reset();
        prev_grant = '0;
        cycle(req, ($urandom_range(0, 3) != 0), 0);
      end else begin
        cycle(req, ($urandom_range(0, 3) != 0));
      end
    end

    check_count("weight used up, hand-over", n_weight_handover);
    check_count("new round (unmasked path)", n_new_round);
    check_count("lone holder re-granted", n_regrant);
    check_count("holder dropped request", n_drop);
    check_count("idle bus", n_idle);
    check_count("slot without acknowledge", n_stall);
    check_count("ack in first grant cycle", n_first_ack);
    check_count("no ack in first cycle", n_first_noack);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
