// Test of the interleaved-parity signature: random inputs against a count of
// ones per residue class, plus the detection properties (every single-bit
// error and every adjacent two-bit error changes the signature).
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_sig_gen;
  localparam int W = 55;
  logic [W-1:0] d;
  logic [3:0]   sig;
  sig_gen #(.W(W), .NSIG(4)) dut (.*);
  int checks = 0, failures = 0;

  initial begin
    logic [3:0] s0;
    int cnt [4];
    for (int k = 0; k < 5000; k++) begin
      d = {$urandom, $urandom};
      #1;
      foreach (cnt[i]) cnt[i] = 0;
      for (int j = 0; j < W; j++) if (d[j]) cnt[j % 4]++;
      checks++;
      for (int i = 0; i < 4; i++)
        if (sig[i] !== 1'(cnt[i] % 2)) begin
          failures++; $display("FAIL sig bit %0d for %h", i, d); break;
        end
      s0 = sig;
      d[k % W] = ~d[k % W];
      #1;
      checks++;
      if (sig === s0) begin failures++; $display("FAIL single-bit error undetected"); end
      d[(k + 1) % W] = ~d[(k + 1) % W];
      #1;
      checks++;
      if (k % W != W - 1 && sig === s0) begin failures++; $display("FAIL adjacent error undetected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
