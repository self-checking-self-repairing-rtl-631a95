// Behavioural model of the node's external memory: 33-bit words (data plus
// even parity), combinational read, and a four-stage delayed write buffer
// for stores so that stores of the last four cycles can be rolled back with
// the processors. Each cycle that is not a rollback cycle the store buffer
// shifts (the store of this cycle, if any, enters stage 0; the oldest valid
// store is written to the array); a rollback clears the n most recent
// stages. Reads see the newest matching buffered store. bad_par_i inverts the
// parity of every word read, modelling a permanent memory fault.
//
// Behavioural model, used only by testbenches. That the memory needs a store
// DWB follows the described node; word size, combinational reads and the
// fault input are this model's choices. Interface: address, read/write
// strobes and write data in; read data out the same cycle; the wired
// rollback and shutdown lines in.
module mem_dwb_model #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [32:0] addr_i,
  input  logic        rd_i,
  input  logic        wr_i,
  input  logic [32:0] wdata_i,
  output logic [32:0] rdata_o,
  input  logic        rb_n_i,
  input  logic [2:0]  amt_n_i,
  input  logic        shut_n_i,
  input  logic        bad_par_i
);
  localparam int AW = $clog2(WORDS);
  logic [32:0]   mem [WORDS];
  logic [32:0]   sd  [4];
  logic [AW-1:0] sa  [4];
  logic [3:0]    sv;
  logic          rb;
  logic [2:0]    amt;

  assign rb  = !rb_n_i && shut_n_i;
  assign amt = ~amt_n_i;

  function automatic logic [AW-1:0] widx(input logic [32:0] a);
    return a[AW+1:2];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv <= '0;
    end else if (rb) begin
      for (int i = 0; i < 4; i++) if (i < int'(amt)) sv[i] <= 1'b0;
    end else begin
      if (sv[3]) mem[sa[3]] <= sd[3];
      for (int i = 3; i > 0; i--) begin
        sd[i] <= sd[i-1];
        sa[i] <= sa[i-1];
        sv[i] <= sv[i-1];
      end
      sd[0] <= wdata_i;
      sa[0] <= widx(addr_i);
      sv[0] <= wr_i;
    end
  end

  always_comb begin
    logic [32:0] v;
    v = mem[widx(addr_i)];
    for (int i = 3; i >= 0; i--)
      if (sv[i] && sa[i] == widx(addr_i)) v = sd[i];
    rdata_o = v ^ {bad_par_i, 32'h0};
  end

endmodule
