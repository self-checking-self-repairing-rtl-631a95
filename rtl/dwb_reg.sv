// Register with delayed commitment of updates through a delayed write
// buffer (DWB).
//
// Every cycle that is not a rollback cycle the DWB shifts one stage to the
// right: stage 0 takes the new value and its valid bit (we), and the value
// leaving the last stage is copied into the permanent register if its valid
// bit is set. A read returns the most recent (leftmost) valid stage, or the
// permanent register if no stage is valid. A rollback of n cycles clears the
// n leftmost valid bits in one cycle, without shifting, so that later reads
// see the older value. With the default depth of four, updates are held
// back four cycles before they become permanent, which is the rollback range
// of the chip. The same structure serves the MAR, IR, SDR, PSW and the
// control-state register.
//
// Interface: rb_en/rb_n come from the rollback controller (rb_n in 1..DEPTH);
// rdata is combinational from the current contents, so a write is visible
// in the cycle after it is made. Reset clears the valid bits and loads
// RESET_VAL into the permanent register (the reset value is this design's
// choice).
module dwb_reg #(
  parameter int               W         = 32,
  parameter int               DEPTH     = 4,
  parameter logic [W-1:0]     RESET_VAL = '0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         rb_en,
  input  logic [$clog2(DEPTH+1)-1:0]   rb_n,
  input  logic                         we,
  input  logic [W-1:0]                 wdata,
  output logic [W-1:0]                 rdata
);

  logic [W-1:0]     stage [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [W-1:0]     perm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      perm  <= RESET_VAL;
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (rb_en) begin
      for (int i = 0; i < DEPTH; i++)
        if (i < int'(rb_n)) valid[i] <= 1'b0;
    end else begin
      if (valid[DEPTH-1]) perm <= stage[DEPTH-1];
      for (int i = DEPTH-1; i > 0; i--) begin
        stage[i] <= stage[i-1];
        valid[i] <= valid[i-1];
      end
      stage[0] <= wdata;
      valid[0] <= we;
    end
  end

  // Select: most recent valid stage, else the permanent register.
  always_comb begin
    rdata = perm;
    for (int i = DEPTH-1; i >= 0; i--)
      if (valid[i]) rdata = stage[i];
  end

endmodule
