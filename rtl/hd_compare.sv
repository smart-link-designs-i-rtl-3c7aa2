// hd_compare: Hamming distance comparator of the Link III encoder.
//
// Takes two candidate bus words with their transform codes and the word now on
// the bus. It counts the bits each candidate would change (its Hamming
// distance to the bus word) and passes on the candidate with the smaller
// count, with its code. On a tie the first candidate (a) wins.
// Purely combinational. The same block, fed with earlier winners, serves as a
// stage of the final comparator.
module hd_compare #(
  parameter int unsigned W  = 11,
  parameter int unsigned CW = 3
) (
  input  logic [W-1:0]           ref_word,
  input  logic [W-1:0]           a,
  input  logic [CW-1:0]          a_code,
  input  logic [W-1:0]           b,
  input  logic [CW-1:0]          b_code,
  output logic [W-1:0]           y,
  output logic [CW-1:0]          y_code
);
  localparam int unsigned HW = $clog2(W + 1);

  logic [HW-1:0] hd_a, hd_b;

  always_comb begin
    hd_a = '0;
    hd_b = '0;
    for (int i = 0; i < W; i++) begin
      hd_a = hd_a + HW'(a[i] ^ ref_word[i]);
      hd_b = hd_b + HW'(b[i] ^ ref_word[i]);
    end
    if (hd_b < hd_a) begin
      y = b; y_code = b_code;
    end else begin
      y = a; y_code = a_code;
    end
  end
endmodule
