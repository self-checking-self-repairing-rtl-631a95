// Test of the master/slave comparator: identical values never mismatch; a
// difference in any compared field mismatches when enabled, store data only
// counts on write cycles, and a disabled comparator never reports.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. The block is
// combinational: inputs change every time unit, with no clock. A watchdog
// ends the run with a failure if the test hangs.
module tb_ms_compare;
  logic        en;
  logic [32:0] own_addr, own_data, bus_addr, bus_data;
  logic        own_rd, own_wr, own_mode, bus_rd, bus_wr, bus_mode;
  logic [3:0]  own_sig, bus_sig;
  logic        mismatch;
  ms_compare #(.W(33), .S(4)) dut (.*);
  int checks = 0, failures = 0;

  initial begin
    int field;
    logic exp;
    for (int k = 0; k < 20000; k++) begin
      en = $urandom_range(0, 4) != 0;
      own_addr = {1'($urandom), 32'($urandom)}; own_data = {1'($urandom), 32'($urandom)};
      own_rd = $urandom_range(0, 1) != 0; own_wr = !own_rd && ($urandom_range(0, 1) != 0);
      own_mode = $urandom_range(0, 1) != 0; own_sig = 4'($urandom);
      bus_addr = own_addr; bus_data = own_data; bus_rd = own_rd; bus_wr = own_wr;
      bus_mode = own_mode; bus_sig = own_sig;
      field = $urandom_range(0, 6);
      exp = 1'b0;
      case (field)
        1: begin bus_addr[$urandom_range(0, 32)] ^= 1'b1; exp = own_rd || own_wr; end
        2: begin bus_data[$urandom_range(0, 32)] ^= 1'b1; exp = own_wr; end
        3: begin bus_rd = !bus_rd; exp = 1'b1; end
        4: begin bus_wr = !bus_wr; exp = 1'b1; end
        5: begin bus_mode = !bus_mode; exp = 1'b1; end
        6: begin bus_sig[$urandom_range(0, 3)] ^= 1'b1; exp = 1'b1; end
        default: ;
      endcase
      exp = exp && en;
      #1;
      checks++;
      if (mismatch !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL field %0d en=%b got %b", field, en, mismatch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
