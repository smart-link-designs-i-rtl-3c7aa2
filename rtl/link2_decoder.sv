// link2_decoder: Link Design II receive-side decoder for an 8-bit payload.
//
// Bits 4 and 5 of the bus carry Gray bits 4 and 5 unchanged; their AND is the
// select of the inverting multiplexer, as in the encoder. The six coded bits
// are XORed with the six coded bits of the previous word, kept in a register;
// the multiplexer inverts the result when the select is 1. The recovered Gray
// word is converted back to binary.
//
//   g_six = (coded_new ^ coded_old) ^ {6{sel}},  dout = gray2bin(g)
//
// Interface: dout is combinational from bus and the register. When en is 1
// the current word is consumed and its coded bits are stored for the next one;
// en must be pulsed once per word, in step with the encoder's en. Reset clears
// the register to zero, matching the encoder's reset value.
//
// From the design: XOR with a register, AND of bits 4 and 5 driving an
// inverting multiplexer, Gray-to-binary conversion to 8 output bits. Own
// choice: the register holds the previous received coded word (not the
// multiplexer output), which is what makes this the inverse of the encoder.
module link2_decoder
  import link_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] bus,
  output logic [DATA_W-1:0] dout
);

  localparam logic [DATA_W-1:0] PLAIN = 8'b0011_0000;  // bits 4 and 5

  logic [DATA_W-1:0] prev_q;
  logic              sel;
  logic [DATA_W-1:0] x, g;

  assign sel = bus[4] & bus[5];
  assign x   = (bus ^ prev_q) & ~PLAIN;
  assign g   = (sel ? (~x & ~PLAIN) : x) | (bus & PLAIN);

  gray2bin #(.W(DATA_W)) u_g2b (.gray(g), .bin(dout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  prev_q <= '0;
    else if (en) prev_q <= bus & ~PLAIN;
  end

endmodule
