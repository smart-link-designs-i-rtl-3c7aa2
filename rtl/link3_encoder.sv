// link3_encoder: Link Design III multi-coding encoder.
//
// Each word from the router is transformed eight ways:
//   code 0 rotate right by one      code 1 rotate left by one
//   code 2 rotate right, inverted   code 3 rotate left, inverted
//   code 4 swap the two halves      code 5 invert all bits
//   code 6 invert even lines        code 7 invert odd lines
// Four Hamming distance comparators each take one pair (0/1, 2/3, 4/5, 6/7)
// and keep the candidate that differs from the word now on the bus in fewer
// bits; a final comparator, here two further comparator stages, keeps the best
// of the four. That candidate is registered onto the bus, so each new word
// costs as few bus transitions as these eight codes allow.
//
// "Swap" exchanges the lower W/2 bits with the upper W/2 bits; for odd W the
// middle bit stays. "Even lines" are bit positions 0, 2, 4, ...
//
// Interface: din is taken when en is 1; bus and code are registered and change
// one cycle after en. code names the transform used, which a receiver needs to
// undo it; it is brought out as a separate 3-bit output. Ties go to the lower
// code. Reset clears bus and code to zero.
//
// From the design: the eight transforms, their pairing into four Hamming
// distance comparators and the final comparator. Own choices: rotation by one
// bit, the swap and even/odd definitions, tie-breaking, the code numbering and
// output, and comparing against the previous bus word.
module link3_encoder
  import link_pkg::*;
#(
  parameter int unsigned W = FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] bus,
  output logic [2:0]   code
);

  localparam int unsigned H  = W / 2;

  function automatic logic [W-1:0] even_mask();
    logic [W-1:0] m;
    for (int i = 0; i < W; i++) m[i] = (i % 2 == 0);
    return m;
  endfunction

  function automatic logic [W-1:0] swap_halves(input logic [W-1:0] d);
    logic [W-1:0] s;
    s = d;                                   // middle bit of an odd width stays
    for (int i = 0; i < H; i++) begin
      s[i]         = d[W - H + i];
      s[W - H + i] = d[i];
    end
    return s;
  endfunction

  localparam logic [W-1:0] EVEN = even_mask();

  logic [7:0][W-1:0] cand;
  always_comb begin
    cand[0] = {din[0], din[W-1:1]};
    cand[1] = {din[W-2:0], din[W-1]};
    cand[2] = ~{din[0], din[W-1:1]};
    cand[3] = ~{din[W-2:0], din[W-1]};
    cand[4] = swap_halves(din);
    cand[5] = ~din;
    cand[6] = din ^ EVEN;
    cand[7] = din ^ ~EVEN;
  end

  logic [3:0][W-1:0]  pw;
  logic [3:0][2:0]    pc;

  for (genvar p = 0; p < 4; p++) begin : g_pair
    hd_compare #(.W(W), .CW(3)) u_hd (
      .ref_word(bus),
      .a(cand[2*p]),   .a_code(3'(2*p)),
      .b(cand[2*p+1]), .b_code(3'(2*p+1)),
      .y(pw[p]), .y_code(pc[p])
    );
  end

  // Final comparator: best of the four pair winners.
  logic [1:0][W-1:0] fw;
  logic [1:0][2:0]   fc;
  logic [W-1:0]      best;
  logic [2:0]        best_code;
  for (genvar q = 0; q < 2; q++) begin : g_final
    hd_compare #(.W(W), .CW(3)) u_hd (
      .ref_word(bus),
      .a(pw[2*q]),   .a_code(pc[2*q]),
      .b(pw[2*q+1]), .b_code(pc[2*q+1]),
      .y(fw[q]), .y_code(fc[q])
    );
  end
  hd_compare #(.W(W), .CW(3)) u_hd_last (
    .ref_word(bus),
    .a(fw[0]), .a_code(fc[0]),
    .b(fw[1]), .b_code(fc[1]),
    .y(best), .y_code(best_code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus  <= '0;
      code <= '0;
    end else if (en) begin
      bus  <= best;
      code <= best_code;
    end
  end

endmodule
