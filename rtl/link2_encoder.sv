// link2_encoder: Link Design II transmit-side coder for an 8-bit payload.
//
// The payload is first turned into Gray code. Gray bits 4 and 5 go onto the
// bus unchanged and their AND is the select of a 2:1 multiplexer. The other
// six Gray bits are XORed with the six coded bits now on the bus (the stored
// previous output); the multiplexer passes that XOR result inverted when the
// select is 1 and as it is when it is 0, and the result is stored as the new
// coded bits. The bus needs no line beyond the eight payload lines.
//
//   sel       = g[4] & g[5]
//   coded_new = (g_six ^ coded_old) ^ {6{sel}}
//   bus       = coded bits at positions 7,6,3,2,1,0; g[5], g[4] at 5,4
//
// Interface: din is taken when en is 1; bus is registered and changes one
// cycle after en. Reset clears the bus to zero; the decoder resets the same way.
//
// From the design: Gray conversion, AND of bits 4 and 5, the XOR with the
// stored output, the inverting multiplexer and the storage element. Own
// choices: the bit numbering (bit 0 is the least significant), that the six
// coded bits are the six other than 4 and 5, the enable and the reset value.
module link2_encoder
  import link_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] bus
);

  localparam logic [DATA_W-1:0] PLAIN = 8'b0011_0000;  // bits 4 and 5

  logic [DATA_W-1:0] g;
  logic              sel;
  logic [DATA_W-1:0] x, coded;

  bin2gray #(.W(DATA_W)) u_b2g (.bin(din), .gray(g));

  assign sel   = g[4] & g[5];
  assign x     = (g ^ bus) & ~PLAIN;          // XOR with stored coded bits
  assign coded = sel ? (~x & ~PLAIN) : x;     // inverting 2:1 multiplexer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  bus <= '0;
    else if (en) bus <= coded | (g & PLAIN);
  end

endmodule
