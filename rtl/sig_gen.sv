// Signature of internal state by interleaved parity.
//
// Signature bit k is the parity of every NSIG-th bit of the input starting
// at bit k (bits k, k+NSIG, k+2*NSIG, ...). With four bits any single-bit
// error and any error in adjacent bits changes the signature. In the chip
// the input is the 32-bit value on busD, the 7-bit destination register
// number, the register-file write valid bit, the 11-bit PSW and the four
// controller state bits; the master drives the signature on pins every cycle
// and the slave compares it with its own. Purely combinational.
//
// The interleaved-parity rule and the list of compressed signals follow the
// described chip; running all 55 bits through one four-way interleave is
// this design's choice. Interface: d (W bits) in, sig (NSIG bits) out.
module sig_gen #(
  parameter int W    = 55,
  parameter int NSIG = 4
) (
  input  logic [W-1:0]    d,
  output logic [NSIG-1:0] sig
);

  always_comb begin
    sig = '0;
    for (int j = 0; j < W; j++)
      sig[j % NSIG] = sig[j % NSIG] ^ d[j];
  end

endmodule
