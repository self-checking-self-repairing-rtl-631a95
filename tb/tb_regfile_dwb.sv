// Random test of the register file with delayed write buffer and parity.
// The reference keeps every write slot (valid, register, data, bad-parity);
// a read of register r returns the newest surviving write to r, or zero,
// and reports a parity error exactly when that write had bad parity.
// Register 0 always reads zero without error.
//
// The expected values are computed in the testbench, independently of the
// design; stimulus and checks are this testbench's own choice. It has no
// ports, runs a 10-time-unit clock and a watchdog that ends the run with a
// failure if the test hangs.
module tb_regfile_dwb;
  localparam int NREG = 74;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        rb_en = 1'b0, we = 1'b0, wbad = 1'b0;
  logic [2:0]  rb_n = '0;
  logic [6:0]  waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [31:0] wdata = '0, rdata_a, rdata_b;
  logic        perr_a, perr_b;

  regfile_dwb #(.NREG(NREG), .W(32), .AW(7), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { bit v; int r; logic [31:0] d; bit bad; } slot_t;
  slot_t hist [$];

  task automatic ref_read(input int r, output logic [31:0] d, output bit bad);
    d = '0; bad = 0;
    if (r == 0) return;
    for (int i = hist.size() - 1; i >= 0; i--)
      if (hist[i].v && hist[i].r == r) begin
        d = hist[i].d; bad = hist[i].bad; return;
      end
  endtask

  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", s, g, e);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [31:0] ed;
    bit eb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // use a few registers often so that buffered values are hit
      raddr_a = 7'($urandom_range(0, 3) == 0 ? $urandom_range(0, NREG - 1) : $urandom_range(0, 5));
      raddr_b = 7'($urandom_range(0, NREG - 1));
      #1;
      ref_read(int'(raddr_a), ed, eb);
      chk("rdata_a", rdata_a, ed);
      chk("perr_a", 32'(perr_a), 32'(eb));
      ref_read(int'(raddr_b), ed, eb);
      chk("rdata_b", rdata_b, ed);
      chk("perr_b", 32'(perr_b), 32'(eb));
      if ($urandom_range(0, 9) == 0) begin
        n = $urandom_range(1, 4);
        rb_en = 1'b1; rb_n = 3'(n); we = 1'b0;
        for (int i = 0; i < n && i < hist.size(); i++) hist[hist.size() - 1 - i].v = 0;
      end else begin
        slot_t s;
        rb_en = 1'b0;
        we    = $urandom_range(0, 3) != 0;
        waddr = 7'($urandom_range(0, 3) == 0 ? $urandom_range(0, NREG - 1) : $urandom_range(0, 5));
        wdata = $urandom;
        wbad  = $urandom_range(0, 7) == 0;
        s.v = we && waddr != 0; s.r = int'(waddr); s.d = wdata; s.bad = wbad;
        hist.push_back(s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
