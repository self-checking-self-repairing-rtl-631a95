// Master/slave comparator (CMP).
//
// A chip strapped as slave does not drive the external bus. Every execution
// cycle it reads the values the master put on the pins and compares them
// with its own: the 33-bit address (with parity), the memory read and write
// strobes, the system/user mode bit, the 4-bit signature of internal state
// and, when the cycle writes memory, the 33-bit store data. Any difference
// raises mismatch, which requests a two-cycle rollback. The master's
// comparator is idle (en low). The interrupt acknowledge pin of the chip is
// not modelled, as this design has no interrupt logic. Purely combinational.
//
// The list of compared signals follows the described chip; comparing the
// address only in cycles with a strobe and the data only on writes is this
// design's choice. Interface: own_* from this chip, bus_* from the pins.
module ms_compare #(
  parameter int W = 33,
  parameter int S = 4
) (
  input  logic         en,
  input  logic [W-1:0] own_addr,
  input  logic         own_rd,
  input  logic         own_wr,
  input  logic [W-1:0] own_data,
  input  logic         own_mode,
  input  logic [S-1:0] own_sig,
  input  logic [W-1:0] bus_addr,
  input  logic         bus_rd,
  input  logic         bus_wr,
  input  logic [W-1:0] bus_data,
  input  logic         bus_mode,
  input  logic [S-1:0] bus_sig,
  output logic         mismatch
);

  always_comb begin
    mismatch = 1'b0;
    if (en) begin
      if (own_rd != bus_rd || own_wr != bus_wr)     mismatch = 1'b1;
      if ((own_rd || own_wr) && own_addr != bus_addr) mismatch = 1'b1;
      if (own_wr && own_data != bus_data)           mismatch = 1'b1;
      if (own_mode != bus_mode)                     mismatch = 1'b1;
      if (own_sig != bus_sig)                       mismatch = 1'b1;
    end
  end

endmodule
