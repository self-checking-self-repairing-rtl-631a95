// Random test of the PC unit against a reference that keeps the full list
// of PC updates: next_PC, PC and last_PC must be the newest, second and third
// newest surviving updates (reset value where fewer exist). Rollbacks clear
// the newest slots, as in the DWB registers.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_pc_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        rb_en = 1'b0, adv = 1'b0;
  logic [2:0]  rb_n = '0;
  logic [31:0] new_pc = '0, next_pc, pc, last_pc;

  pc_unit #(.DEPTH(4), .RESET_PC(32'h100)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] hval [$];
  bit          hv   [$];

  function automatic logic [31:0] nth(input int k);
    int seen = 0;
    for (int i = hv.size() - 1; i >= 0; i--)
      if (hv[i]) begin
        if (seen == k) return hval[i];
        seen++;
      end
    return 32'h100;
  endfunction

  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", s, g, e);
    end
  endtask

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
      chk("next_pc", next_pc, nth(0));
      chk("pc", pc, nth(1));
      chk("last_pc", last_pc, nth(2));
      if ($urandom_range(0, 9) == 0) begin
        n = $urandom_range(1, 4);
        rb_en = 1'b1; rb_n = 3'(n); adv = 1'b0;
        for (int i = 0; i < n && i < hv.size(); i++) hv[hv.size() - 1 - i] = 1'b0;
      end else begin
        rb_en  = 1'b0;
        adv    = $urandom_range(0, 3) != 0;
        new_pc = $urandom & 32'hFFFF_FFFC;
        hval.push_back(new_pc);
        hv.push_back(adv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
