// Self-checking testbench of ppc_priority_arbiter.
// Applies every request vector to a 4-input and a 7-input instance and
// compares the grant with a find-lowest-set-bit search written as a loop.
module tb_ppc_priority_arbiter;

  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4, exp4;
  logic [6:0] req7, gnt7, exp7;

  ppc_priority_arbiter #(.N(4)) dut4 (.req(req4), .gnt(gnt4));
  ppc_priority_arbiter #(.N(7)) dut7 (.req(req7), .gnt(gnt7));

  function automatic logic [6:0] lowest(input logic [6:0] r);
    for (int i = 0; i < 7; i++) if (r[i]) return 7'(1) << i;
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      req4 = 4'(v);
      #1;
      exp4 = 4'(lowest({3'b0, req4}));
      checks++;
      if (gnt4 !== exp4) begin
        failures++;
        $display("N=4 req=%b gnt=%b expected %b", req4, gnt4, exp4);
      end
    end
    for (int v = 0; v < 128; v++) begin
      req7 = 7'(v);
      #1;
      exp7 = lowest(req7);
      checks++;
      if (gnt7 !== exp7) begin
        failures++;
        $display("N=7 req=%b gnt=%b expected %b", req7, gnt7, exp7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
