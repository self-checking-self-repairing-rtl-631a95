// Random test of the shifter: each result is built bit by bit.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_shifter;
  import mp_pkg::*;
  sh_op_e      op;
  logic [31:0] a, y;
  logic [4:0]  amt;
  shifter dut (.*);
  int checks = 0, failures = 0;

  initial begin
    logic [31:0] e;
    for (int k = 0; k < 20000; k++) begin
      op = sh_op_e'($urandom_range(0, 3)); a = $urandom; amt = 5'($urandom);
      #1;
      for (int i = 0; i < 32; i++) begin
        case (op)
          SH_SLL:  e[i] = (i >= int'(amt)) ? a[i - int'(amt)] : 1'b0;
          SH_SRL:  e[i] = (i + int'(amt) < 32) ? a[i + int'(amt)] : 1'b0;
          SH_SRA:  e[i] = (i + int'(amt) < 32) ? a[i + int'(amt)] : a[31];
          default: e[i] = a[i];
        endcase
      end
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h amt=%0d y=%h exp %h", op.name(), a, amt, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
