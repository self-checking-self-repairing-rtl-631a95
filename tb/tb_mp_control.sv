// Test of the control unit: decode of representative instructions
// (including the master/slave-dependent diagnostic instructions and the
// privilege rule), and the controller states: a load enters the second
// cycle and returns to normal, a rollback into the middle of the load
// restores the second-cycle state, a repair runs REP1 then REP2 and returns
// to the restored state, and a shutdown cycle squashes the fetched
// instruction.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_mp_control;
  import mp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic master_pin = 1'b1, rb_cycle = 1'b0, shut_cycle = 1'b0, repair = 1'b0;
  logic rep_bus_b = 1'b0, rep_send = 1'b0, rbit = 1'b0;
  logic [2:0] rb_amt = '0;
  logic [31:0] ir = '0;
  psw_t psw;
  ctrl_t ctrl;
  mp_state_e state;
  ctl_state_t csr;
  logic rep_bus_b_q, rep_send_q;

  mp_control dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input string s, input int g, input int e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", s, g, e);
    end
  endtask

  function automatic logic [31:0] enc(opcode_e op, int rd, int rs1, bit imm, int s2);
    return {op, 1'b0, 5'(rd), 5'(rs1), imm, 13'(s2)};
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psw = '0;
    psw.s = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // decode
    ir = enc(OP_SUB, 3, 1, 0, 2); #1;
    chk("sub alu op", int'(ctrl.alu_op), int'(ALU_SUB));
    chk("sub reads b", int'(ctrl.reads_b), 1);
    chk("sub writes rd", int'(ctrl.rd_we), 1);
    ir = enc(OP_STL, 3, 1, 1, 8); #1;
    chk("stl store", int'(ctrl.store), 1);
    chk("stl port b = rd", int'(ctrl.b_is_rd), 1);
    chk("stl no rd write", int'(ctrl.rd_we), 0);
    ir = enc(OP_ADDBPM, 3, 1, 1, 8); master_pin = 1'b1; #1;
    chk("addbpm on master: bad parity", int'(ctrl.bad_par), 1);
    master_pin = 1'b0; #1;
    chk("addbpm on slave: good parity", int'(ctrl.bad_par), 0);
    ir = enc(OP_JMPRBM, 3, 1, 0, 2); rbit = 1'b0; #1;
    chk("jmprbm slave, bit clear: Rs2", int'(ctrl.dsel), int'(D_RS2));
    master_pin = 1'b1; #1;
    chk("jmprbm master, bit clear: Rs1", int'(ctrl.dsel), int'(D_RS1));
    ir = enc(OP_JMPRBS, 3, 1, 0, 2); #1;
    chk("jmprbs master, bit clear: Rs2", int'(ctrl.dsel), int'(D_RS2));
    rbit = 1'b1; #1;
    chk("jmprbs, bit set: Rs1", int'(ctrl.dsel), int'(D_RS1));
    ir = enc(OP_STRBDS, 3, 0, 1, 8); rbit = 1'b0; master_pin = 1'b0; #1;
    chk("strbds on slave: bad data", int'(ctrl.bad_store), 1);
    rbit = 1'b1; #1;
    chk("strbds, bit set: good data", int'(ctrl.bad_store), 0);
    ir = enc(OP_CLRRBS, 0, 0, 0, 0); #1;
    chk("clrrbs on slave", int'(ctrl.clr_rbit), 1);
    psw.s = 1'b0; #1;
    chk("clrrbs in user mode: no-op", int'(ctrl.clr_rbit), 0);
    psw.s = 1'b1; master_pin = 1'b1; rbit = 1'b0;
    // load: normal -> second -> normal
    @(negedge clk);
    ir = enc(OP_LDL, 7, 1, 1, 4); #1;
    chk("ldl state normal", int'(state), int'(ST_NORMAL));
    @(negedge clk);
    chk("ldl second cycle", int'(state), int'(ST_SECOND));
    chk("ldl pending dest", int'(csr.pend_phys), int'(phys_reg(2'd0, 5'd7)));
    chk("ldl pending load", int'(csr.pend_store), 0);
    ir = enc(OP_ADD, 1, 1, 1, 1);
    @(negedge clk);
    chk("after ldl: normal", int'(state), int'(ST_NORMAL));
    // rollback of one cycle: back to the second cycle of the load
    rb_cycle = 1'b1; rb_amt = 3'd1;
    @(negedge clk);
    rb_cycle = 1'b0;
    chk("rollback restores second cycle", int'(state), int'(ST_SECOND));
    @(negedge clk);
    chk("then normal", int'(state), int'(ST_NORMAL));
    // rollback with repair of busB, this chip sends
    rb_cycle = 1'b1; rb_amt = 3'd1; repair = 1'b1; rep_bus_b = 1'b1; rep_send = 1'b1;
    @(negedge clk);
    rb_cycle = 1'b0; repair = 1'b0;
    chk("repair 1", int'(state), int'(ST_REP1));
    chk("repair bus", int'(rep_bus_b_q), 1);
    chk("repair sender", int'(rep_send_q), 1);
    @(negedge clk);
    chk("repair 2", int'(state), int'(ST_REP2));
    @(negedge clk);
    chk("after repair: restored state", int'(state), int'(ST_SECOND));
    @(negedge clk);
    // shutdown: next instruction squashed
    shut_cycle = 1'b1;
    @(negedge clk);
    shut_cycle = 1'b0;
    ir = enc(OP_ADD, 1, 1, 1, 1); #1;
    chk("shutdown squashes IR", int'(ctrl.rd_we), 0);
    @(negedge clk);
    chk("squash lasts one cycle", int'(ctrl.rd_we), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
