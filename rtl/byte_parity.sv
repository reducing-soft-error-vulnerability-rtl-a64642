// byte_parity: even parity generator, one parity bit per data byte.
//
// The cache protects its data array with one parity bit per byte (4 KB of parity for
// 32 KB of data). The same block generates the bits when a line is filled or a word is
// written, and checks them when a word is read: the checker compares the stored bits
// with the ones generated again from the data read out.
// Purely combinational: par[i] = XOR of data[8*i+7 : 8*i]. Even parity is a choice of
// this design; the scheme only asks for byte-level parity.
module byte_parity #(
  parameter int unsigned NBYTES = 8
) (
  input  logic [NBYTES*8-1:0] data,
  output logic [NBYTES-1:0]   par
);
  always_comb begin
    for (int i = 0; i < NBYTES; i++) par[i] = ^data[i*8 +: 8];
  end
endmodule
