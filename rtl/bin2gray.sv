// bin2gray: binary to Gray code converter (combinational).
// g[i] = b[i] ^ b[i+1], with the top bit passed through, so successive binary
// values differ in one Gray bit. Used at the input of the Link II encoder.
module bin2gray #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] gray
);
  assign gray = bin ^ (bin >> 1);
endmodule
