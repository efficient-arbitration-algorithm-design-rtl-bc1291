// Self-checking testbench of wrr_weight_logic.
// Drives random current / next grants, acknowledges and weights, and follows
// the expected slot count of the current holder in the testbench: a new
// tenure (grant change, or re-grant after the weight is used up) restarts
// the count, an acknowledge adds one, weight 0 counts as 1. Checks block,
// exhausted and count every cycle, and that a holder with weight W is
// exhausted exactly on its W-th acknowledged slot.
module tb_wrr_weight_logic;

  localparam int N = 4, W = 4;
  int checks = 0, failures = 0;

  logic                   clk = 0, rst_n = 0, ack = 0;
  logic [N-1:0][W-1:0]    weight;
  logic [N-1:0]           gnt_q = '0, gnt_d = '0, block;
  logic                   exhausted;
  logic [W-1:0]           count;

  wrr_weight_logic #(.N(N), .WEIGHT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .weight(weight), .gnt_q(gnt_q), .gnt_d(gnt_d),
    .ack(ack), .block(block), .exhausted(exhausted), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt = 0, m_w = 0, exp_used;
  logic exp_exh;
  int n_exh = 0;

  function automatic int idx(input logic [N-1:0] g);
    for (int i = 0; i < N; i++) if (g[i]) return i;
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) weight[i] = W'(i * 3);
    #12 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      gnt_q = gnt_d;
      if (k % 500 == 0)
        for (int i = 0; i < N; i++) weight[i] = W'($urandom_range(0, 15));
      ack = ($urandom_range(0, 3) != 0);
      // Mostly keep the holder, sometimes change it or drop it.
      case ($urandom_range(0, 9))
        0:       gnt_d = '0;
        1, 2:    gnt_d = N'(1) << $urandom_range(0, N-1);
        default: gnt_d = gnt_q;
      endcase
      #1;
      exp_used = m_cnt + int'(ack);
      exp_exh  = (gnt_q != '0) && (exp_used >= m_w);
      checks++;
      if (exhausted !== exp_exh || block !== (exp_exh ? gnt_q : '0) || count !== W'(m_cnt)) begin
        failures++;
        $display("k=%0d gnt_q=%b ack=%b cnt=%0d exh=%b blk=%b, expected cnt=%0d exh=%b w=%0d",
                 k, gnt_q, ack, count, exhausted, block, m_cnt, exp_exh, m_w);
      end
      if (exp_exh) n_exh++;
      // Model update
      if (gnt_d != '0 && (gnt_d != gnt_q || exp_exh)) begin
        m_cnt = 0;
        m_w   = int'(weight[idx(gnt_d)]);
        if (m_w == 0) m_w = 1;
      end else if (gnt_q != '0 && ack && m_cnt < 15) begin
        m_cnt++;
      end
      @(posedge clk);
    end
    checks++;
    if (n_exh == 0) begin failures++; $display("weight never used up"); end
    $display("exhausted %0d times", n_exh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
