// Directed test of the rollback and repair controller. A single controller
// shares its rollback lines with a testbench driver standing for the rest of
// the rollback domain. The test checks: shutdown when an error comes before
// rollback is enabled; a one-cycle rollback with busA repair for a busA
// parity error; the extra cycle added when a rollback would land on the
// state restored by the previous one; the translation of cycles into buffer
// entries past rolled-back slots; the shutdown at the fourth rollback in a
// 16-cycle frame; arbitration against a larger amount from elsewhere; the
// repair decision table; and the rollback bit.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_rb_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic normal_cycle = 1'b0, err_cmp = 1'b0, err_par_in = 1'b0, err_par_out = 1'b0;
  logic err_par_a = 1'b0, err_par_b = 1'b0, clr_rbit = 1'b0;
  logic rb_n_o, shut_n_o, rb_n_i, shut_n_i;
  logic [2:0] amt_n_o, amt_n_i;
  logic [1:0] rep_o, rep_i = 2'b00;
  logic rb_cycle, shut_cycle, repair, rep_bus_b, rep_send, rollback_bit;
  logic [2:0] rb_amt;
  logic ext_rb_n = 1'b1;
  logic [2:0] ext_amt_n = 3'b111;

  assign rb_n_i   = rb_n_o & ext_rb_n;
  assign amt_n_i  = amt_n_o & ext_amt_n;
  assign shut_n_i = shut_n_o;

  rb_controller #(.DEPTH(4), .AW(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input string s, input int g, input int e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", s, g, e, $time);
    end
  endtask

  task automatic normal(input int n);
    normal_cycle = 1'b1;
    {err_cmp, err_par_in, err_par_out, err_par_a, err_par_b} = '0;
    repeat (n) @(negedge clk);
  endtask

  // Raise one error for a cycle; return in the following (line) cycle.
  task automatic error(input int kind);
    normal_cycle = 1'b1;
    case (kind)
      0: err_cmp = 1'b1;
      1: err_par_in = 1'b1;
      2: err_par_a = 1'b1;
      3: err_par_b = 1'b1;
      default: err_par_out = 1'b1;
    endcase
    @(negedge clk);
    {err_cmp, err_par_in, err_par_out, err_par_a, err_par_b} = '0;
    normal_cycle = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 1. error before rollback is enabled -> shutdown
    normal(1);
    error(0);
    chk("early error: shutdown", int'(shut_cycle), 1);
    chk("early error: no rollback", int'(rb_cycle), 0);
    @(negedge clk);
    normal(8);
    // 2. busA parity error: roll back one, this chip receives busA
    error(2);
    chk("par_a: rollback", int'(rb_cycle), 1);
    chk("par_a: amount", int'(rb_amt), 1);
    chk("par_a: repair pins", int'(rep_o), 1);
    chk("par_a: repair", int'(repair), 1);
    chk("par_a: bus A", int'(rep_bus_b), 0);
    chk("par_a: receive", int'(rep_send), 0);
    @(negedge clk);
    chk("rollback bit set", int'(rollback_bit), 1);
    // 3. mismatch two cycles after that rollback: 2 == post counter -> 3
    //    cycles, which span the rolled-back slot: 4 entries
    normal(1);
    error(0);
    chk("post-rollback: rollback", int'(rb_cycle), 1);
    chk("post-rollback: extended amount", int'(rb_amt), 4);
    chk("post-rollback: no repair", int'(repair), 0);
    @(negedge clk);
    // 4. plain two-cycle rollback with a full history
    normal(20);
    error(1);
    chk("par_in: amount", int'(rb_amt), 2);
    @(negedge clk);
    // 5. fourth rollback within one frame -> shutdown
    normal(4);
    while (dut.frame_cnt != 4'd1) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      error(3);
      chk("frame: rollback", int'(rb_cycle), 1);
      @(negedge clk);
      normal(2);
    end
    error(3);
    chk("frame: fourth is shutdown", int'(shut_cycle), 1);
    @(negedge clk);
    normal(30);
    // 6. arbitration: another module asks for 3 while this one asks for 1
    normal_cycle = 1'b1;
    err_par_out = 1'b1;
    @(negedge clk);
    err_par_out = 1'b0;
    ext_rb_n = 1'b0; ext_amt_n = ~3'd3;
    #1;
    chk("arbitration: own drive released", int'(3'(~amt_n_o)), 0);
    chk("arbitration: amount", int'(rb_amt), 3);
    @(negedge clk);
    ext_rb_n = 1'b1; ext_amt_n = 3'b111;
    normal(30);
    // 7. repair table
    rep_i = 2'b01;               // other chip: busA error; this chip clean
    error(3);                    // this chip: busB error -> repair A, send
    chk("table: repair", int'(repair), 1);
    chk("table: bus A", int'(rep_bus_b), 0);
    chk("table: send", int'(rep_send), 1);
    @(negedge clk);
    normal(30);
    rep_i = 2'b10;               // both chips: busB error -> no repair
    error(3);
    chk("table: both B, rollback", int'(rb_cycle), 1);
    chk("table: both B, no repair", int'(repair), 0);
    @(negedge clk);
    normal(30);
    rep_i = 2'b00;               // only this chip: busB -> receive B
    error(3);
    chk("table: B repair", int'(repair), 1);
    chk("table: bus B", int'(rep_bus_b), 1);
    chk("table: receive", int'(rep_send), 0);
    @(negedge clk);
    // 8. clear the rollback bit
    clr_rbit = 1'b1;
    normal(1);
    clr_rbit = 1'b0;
    chk("rollback bit cleared", int'(rollback_bit), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
