// Self-checking testbench of wrr_mask_reg.
// Checks the reset value (all ones), then loads random one-hot or zero grant
// vectors with random load enables and compares the mask after each clock
// edge with a thermometer code computed by a loop in the testbench.
module tb_wrr_mask_reg;

  localparam int N = 4;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] gnt = '0, mask, exp_mask;

  wrr_mask_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .load(load), .gnt(gnt), .mask(mask));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] therm(input logic [N-1:0] g);
    logic [N-1:0] m = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j <= i; j++)
        if (g[j]) m[i] = 1'b1;
    return m;
  endfunction

  initial begin
    #12;
    checks++;
    if (mask !== '1) begin failures++; $display("reset mask %b", mask); end
    rst_n = 1;
    exp_mask = '1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) != 0);
      gnt  = ($urandom_range(0, 4) == 0) ? '0 : N'(1) << $urandom_range(0, N-1);
      if (load && gnt != '0) exp_mask = therm(gnt);
      @(posedge clk); #1;
      checks++;
      if (mask !== exp_mask) begin
        failures++;
        $display("load=%b gnt=%b mask=%b expected %b", load, gnt, mask, exp_mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
