// gray2bin: Gray code to binary converter (combinational).
// b[W-1] = g[W-1] and b[i] = b[i+1] ^ g[i], a prefix XOR from the top bit
// down. Used at the output of the Link II decoder.
module gray2bin #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] gray,
  output logic [W-1:0] bin
);
  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray[i];
  end
endmodule
