// Test of the rollback-amount arbitration: three arbiters share wired-OR
// lines; after settling, the lines must carry the largest requested amount,
// and only winners may still drive bits the lines carry.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_rb_arbiter;
  localparam int M = 3;
  logic       req  [M];
  logic [2:0] amt  [M];
  logic [2:0] drv  [M];
  logic [2:0] line;
  int checks = 0, failures = 0;

  assign line = drv[0] | drv[1] | drv[2];

  for (genvar g = 0; g < M; g++) begin : g_arb
    rb_arbiter #(.W(3)) u (.req(req[g]), .amt(amt[g]), .line(line), .drive(drv[g]));
  end

  initial begin
    int mx;
    for (int k = 0; k < 5000; k++) begin
      mx = 0;
      for (int i = 0; i < M; i++) begin
        req[i] = $urandom_range(0, 2) != 0;
        amt[i] = 3'($urandom_range(1, 7));
        if (req[i] && int'(amt[i]) > mx) mx = int'(amt[i]);
      end
      #1;
      checks++;
      if (int'(line) != mx) begin
        failures++;
        if (failures < 10) $display("FAIL req=%b%b%b amt=%0d,%0d,%0d line=%0d exp %0d",
                                    req[0], req[1], req[2], amt[0], amt[1], amt[2], line, mx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
