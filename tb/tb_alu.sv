// Random test of the ALU against arithmetic on wider integers.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_alu;
  import mp_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        cin, z, n, v, c;
  alu dut (.*);
  int checks = 0, failures = 0;

  initial begin
    logic [32:0] s;
    logic [31:0] ey;
    logic        ec, ev;
    logic [31:0] nb;
    for (int k = 0; k < 20000; k++) begin
      op  = alu_op_e'($urandom_range(0, 6));
      a   = $urandom; b = $urandom; cin = $urandom_range(0, 1) != 0;
      if (k % 7 == 0) b = a;
      #1;
      nb = ~b;
      ec = 0; ev = 0;
      case (op)
        ALU_ADD:  begin s = 33'(a) + 33'(b);          ey = s[31:0]; ec = s[32];
                        ev = ($signed(a) + $signed(b)) != 64'($signed(ey)); end
        ALU_ADDC: begin s = 33'(a) + 33'(b) + 33'(cin); ey = s[31:0]; ec = s[32];
                        ev = (64'($signed(a)) + 64'($signed(b)) + 64'(cin)) != 64'($signed(ey)); end
        ALU_SUB:  begin ey = a - b; ec = a >= b;
                        ev = (64'($signed(a)) - 64'($signed(b))) != 64'($signed(ey)); end
        ALU_SUBC: begin s = 33'(a) + 33'(nb) + 33'(cin); ey = s[31:0]; ec = s[32];
                        ev = (64'($signed(a)) - 64'($signed(b)) - 64'(!cin)) != 64'($signed(ey)); end
        ALU_AND:  ey = a & b;
        ALU_OR:   ey = a | b;
        default:  ey = a ^ b;
      endcase
      checks++;
      if ({y, z, n, v, c} !== {ey, ey == 0, ey[31], ev, ec}) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h/%h flags=%b%b%b%b exp v=%b c=%b",
                                    op.name(), a, b, y, ey, z, n, v, c, ev, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
