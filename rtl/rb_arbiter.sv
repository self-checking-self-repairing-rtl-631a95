// Rollback-amount arbitration, Futurebus style.
//
// All modules of a rollback domain share W open-drain rollback-amount lines.
// A module that requests a rollback drives its amount on the lines; where it
// sees a line asserted in a more significant position than the first
// position in which its own amount has a zero, it has lost and releases all
// less significant bits. The lines then settle to the largest requested
// amount. Here the lines are seen active high (line = OR of the drivers);
// the pads invert to the active-low open-drain pins. Drive of bit i depends
// only on line bits above i, so the settling is loop-free bit by bit.
// Purely combinational.
//
// Arbitrating the maximum amount with the Futurebus protocol follows the
// described node; the bit-by-bit formulation is this design's. Interface:
// req and amt from the requesting controller, line from the wired lines,
// drive to the pads.
module rb_arbiter #(
  parameter int W = 3
) (
  input  logic         req,
  input  logic [W-1:0] amt,
  input  logic [W-1:0] line,
  output logic [W-1:0] drive
);

  always_comb begin
    logic lost;
    lost  = !req;
    drive = '0;
    for (int i = W-1; i >= 0; i--) begin
      drive[i] = !lost && amt[i];
      if (line[i] && !amt[i]) lost = 1'b1;
    end
  end

endmodule
