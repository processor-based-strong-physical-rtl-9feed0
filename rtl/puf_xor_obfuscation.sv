// puf_xor_obfuscation -- optional XOR obfuscation of a PUF response.
//
// Output bit i is response bit i XOR response bit i + WIDTH/2, so a WIDTH-bit
// response shrinks to WIDTH/2 bits and two queries with different challenges
// are needed for one full-width output. This raises the Hamming distance
// between responses to different challenges. Purely combinational.
`timescale 1ps/1ps
module puf_xor_obfuscation
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH
) (
  input  logic [WIDTH-1:0]   resp,
  output logic [WIDTH/2-1:0] obf
);

  assign obf = resp[WIDTH/2-1:0] ^ resp[WIDTH-1:WIDTH/2];

endmodule
