// Random test of bus parity generation and checking: generated words must
// have an even number of ones; a received word with one flipped bit must be
// flagged, an intact one must not, and inv_in must flip the verdict.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_bus_parity;
  logic [31:0] out_data;
  logic [32:0] out_bus, in_bus;
  logic        in_check, inv_in, in_err;
  bus_parity #(.W(32)) dut (.*);
  int checks = 0, failures = 0;

  initial begin
    int ones, flip;
    logic exp_err;
    for (int k = 0; k < 20000; k++) begin
      out_data = $urandom;
      in_check = $urandom_range(0, 3) != 0;
      inv_in   = $urandom_range(0, 3) == 0;
      flip     = int'($urandom_range(0, 33)) - 1;
      #1;
      ones = 0;
      for (int i = 0; i < 33; i++) ones += out_bus[i];
      checks++;
      if (ones % 2 != 0 || out_bus[31:0] !== out_data) begin
        failures++; $display("FAIL generate %h -> %h", out_data, out_bus);
      end
      in_bus = out_bus;
      if (flip >= 0) in_bus[flip] = ~in_bus[flip];
      #1;
      exp_err = in_check && ((flip >= 0) != inv_in);
      checks++;
      if (in_err !== exp_err) begin
        failures++; $display("FAIL check flip=%0d inv=%b en=%b err=%b", flip, inv_in, in_check, in_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
