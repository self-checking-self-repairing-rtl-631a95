// Random test of the delayed-write-buffer register against a reference
// that keeps the whole history of cycle slots: a read must return the newest
// slot that was written and not rolled back, or the reset value. A rollback
// of n may only reach back n slots, and slots older than four cycles are
// committed, so rollbacks are limited to what the buffer can still undo.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_dwb_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic         rb_en = 1'b0, we = 1'b0;
  logic [2:0]   rb_n = '0;
  logic [W-1:0] wdata = '0, rdata;

  dwb_reg #(.W(W), .DEPTH(4), .RESET_VAL(16'hA5A5)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] hval [$];
  bit           hv   [$];

  function automatic logic [W-1:0] ref_read();
    for (int i = hv.size() - 1; i >= 0; i--) if (hv[i]) return hval[i];
    return 16'hA5A5;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      checks++;
      if (rdata !== ref_read()) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %h exp %h", cyc, rdata, ref_read());
      end
      if ($urandom_range(0, 9) == 0) begin
        n = $urandom_range(1, 4);
        rb_en = 1'b1; rb_n = 3'(n); we = 1'b0;
        // clear the n newest slots
        for (int i = 0; i < n && i < hv.size(); i++) hv[hv.size() - 1 - i] = 1'b0;
      end else begin
        rb_en = 1'b0;
        we    = $urandom_range(0, 2) != 0;
        wdata = W'($urandom);
        hval.push_back(wdata);
        hv.push_back(we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
