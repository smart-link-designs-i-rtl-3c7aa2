// link_transitions_tb: bit transitions on a link for the three link designs.
//
// The metric the design is judged by is the number of line transitions per
// word sent. This testbench sends the same stream of NWORDS words from the
// west input to the north output of each of the three routers in
// smart_link_top, one word per cycle, for three kinds of payload:
//   random    - uniformly random 8-bit payloads,
//   counter   - 0, 1, 2, ... (highly correlated data),
//   sparse    - mostly-zero payloads with one or two bits set.
// It counts transitions on the north output link: all 11 lines for Link I and
// Link III (Link III's 3 code lines counted apart), the 8 payload lines for
// Link II, and prints transitions per word. Every word is also decoded at the
// output and compared with what was sent, and the stream must flow at one
// word per cycle, the output connection being renewed every HOLD_CYCLES + 1
// cycles (it is free for one cycle between connections).
module link_transitions_tb;
  import link_pkg::*;

  localparam int NWORDS = 4000;
  localparam int W      = FLIT_W;
  localparam int WEST   = 2;
  localparam int NORTH  = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0][FLIT_W-1:0] l1_in_data = '0, l2_in_data = '0, l3_in_data = '0;
  logic [NPORTS-1:0]             in_valid = '0;
  logic [NPORTS-1:0]             l1_in_ack, l2_in_ack, l3_in_ack;
  logic [NPORTS-1:0][FLIT_W-1:0] l1_out_data, l2_out_data, l3_out_data;
  logic [NPORTS-1:0][2:0]        l3_out_code;
  logic [NPORTS-1:0]             l1_out_valid, l2_out_valid, l3_out_valid;
  logic [NPORTS-1:0]             l1_out_free, l2_out_free, l3_out_free;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  smart_link_top dut (
    .clk, .rst_n,
    .l1_in_data, .l1_in_valid(in_valid), .l1_in_ack, .l1_out_data, .l1_out_valid, .l1_out_free,
    .l2_in_data, .l2_in_valid(in_valid), .l2_in_ack, .l2_out_data, .l2_out_valid, .l2_out_free,
    .l3_in_data, .l3_in_valid(in_valid), .l3_in_ack, .l3_out_data, .l3_out_code,
    .l3_out_valid, .l3_out_free
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t FAIL: %s", $time, msg);
  endtask

  function automatic logic [7:0] enc2(input logic [7:0] d, input logic [7:0] prev);
    logic [7:0] g, r;
    g = d ^ (d >> 1);
    for (int i = 0; i < 8; i++)
      r[i] = (i == 4 || i == 5) ? g[i] : (g[i] ^ prev[i] ^ (g[4] & g[5]));
    return r;
  endfunction

  function automatic logic [7:0] dec2(input logic [7:0] c, input logic [7:0] prev);
    logic [7:0] g, b;
    for (int i = 0; i < 8; i++)
      g[i] = (i == 4 || i == 5) ? c[i] : (c[i] ^ prev[i] ^ (c[4] & c[5]));
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Inverse of the Link III transforms (see link3_encoder for the numbering).
  function automatic logic [W-1:0] undo3(input logic [W-1:0] e, input int c);
    logic [W-1:0] r, em;
    for (int i = 0; i < W; i++) em[i] = ~i[0];
    case (c)
      0: for (int i = 0; i < W; i++) r[i] = e[(i + W - 1) % W];   // undo rotate right
      1: for (int i = 0; i < W; i++) r[i] = e[(i + 1) % W];       // undo rotate left
      2: for (int i = 0; i < W; i++) r[i] = ~e[(i + W - 1) % W];
      3: for (int i = 0; i < W; i++) r[i] = ~e[(i + 1) % W];
      4: begin
           r = e;
           for (int i = 0; i < W / 2; i++) begin
             r[i] = e[W - W / 2 + i];
             r[W - W / 2 + i] = e[i];
           end
         end
      5: r = ~e;
      6: r = e ^ em;
      default: r = e ^ ~em;
    endcase
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] payload(input int pattern, input int n);
    case (pattern)
      0: return 8'($urandom);
      1: return 8'(n);
      default: return (8'(1) << $urandom_range(0, 7)) | (($urandom_range(0, 3) == 0) ? (8'(1) << $urandom_range(0, 7)) : 8'(0));
    endcase
  endfunction

  initial begin
    static string name [3] = '{"random", "counter", "sparse"};
    for (int pat = 0; pat < 3; pat++) begin
      logic [7:0] l2_prev, l2_out_prev;
      logic [FLIT_W-1:0] p1, p3;
      logic [7:0] p2;
      logic [2:0] pc;
      int t1, t2, t3, t3c, n_out1, n_out2, n_out3, cycles, acks, releases;
      logic [7:0] sent_a [NWORDS];
      t1 = 0; t2 = 0; t3 = 0; t3c = 0; n_out1 = 0; n_out2 = 0; n_out3 = 0;
      cycles = 0; acks = 0; releases = 0;
      l2_prev = '0; l2_out_prev = '0;
      rst_n = 1'b0; in_valid = '0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      p1 = l1_out_data[NORTH]; p2 = l2_out_data[NORTH][7:0]; p3 = l3_out_data[NORTH]; pc = l3_out_code[NORTH];
      for (int n = 0; n < NWORDS; n++) sent_a[n] = payload(pat, n);
      // Stream: a new word every cycle it is taken.
      begin
        int k;
        k = 0;
        while (n_out3 < NWORDS) begin
          @(negedge clk);
          if (k < NWORDS) begin
            l1_in_data[WEST] = {3'(NORTH), sent_a[k]};
            l3_in_data[WEST] = {3'(NORTH), sent_a[k]};
            in_valid[WEST] = 1'b1;
          end else in_valid[WEST] = 1'b0;
          // Link II coding of the word offered now (coder state steps per word).
          l2_in_data[WEST] = {3'(NORTH), enc2(sent_a[(k < NWORDS) ? k : NWORDS - 1], l2_prev)};
          @(posedge clk);
          cycles++;
          if (in_valid[WEST] && l1_in_ack[WEST]) begin
            acks++;
            l2_prev = l2_in_data[WEST][7:0];
            k++;
          end
          if (l1_out_free[NORTH] && in_valid[WEST]) releases++;
          // Outputs at this edge (values from the previous cycles).
          if (l1_out_valid[NORTH]) begin
            t1 += $countones(l1_out_data[NORTH] ^ p1);
            p1 = l1_out_data[NORTH];
            checks++;
            if (l1_out_data[NORTH][7:0] !== sent_a[n_out1]) fail($sformatf("%s: link I word %0d wrong", name[pat], n_out1));
            n_out1++;
          end
          if (l2_out_valid[NORTH]) begin
            t2 += $countones(l2_out_data[NORTH][7:0] ^ p2);
            p2 = l2_out_data[NORTH][7:0];
            checks++;
            if (dec2(l2_out_data[NORTH][7:0], l2_out_prev) !== sent_a[n_out2])
              fail($sformatf("%s: link II word %0d wrong", name[pat], n_out2));
            l2_out_prev = l2_out_data[NORTH][7:0];
            n_out2++;
          end
          if (l3_out_valid[NORTH]) begin
            t3  += $countones(l3_out_data[NORTH] ^ p3);
            t3c += $countones(l3_out_code[NORTH] ^ pc);
            p3 = l3_out_data[NORTH]; pc = l3_out_code[NORTH];
            checks++;
            if (undo3(l3_out_data[NORTH], int'(l3_out_code[NORTH])) !== {3'(NORTH), sent_a[n_out3]})
              fail($sformatf("%s: link III word %0d wrong", name[pat], n_out3));
            n_out3++;
          end
        end
      end
      // Throughput: one word per cycle; the held connection passes every word
      // without waiting, so the stream takes NWORDS cycles plus the pipeline.
      checks++;
      if (releases < NWORDS / 9 - 2) fail($sformatf("%s: only %0d connection renewals", name[pat], releases));
      checks++;
      if (acks != NWORDS) fail($sformatf("%s: %0d words taken", name[pat], acks));
      checks++;
      if (cycles > NWORDS + 3) fail($sformatf("%s: %0d cycles for %0d words", name[pat], cycles, NWORDS));
      $display("%-8s transitions per word: link I %0.3f (11 lines), link II %0.3f (8 lines), link III %0.3f (11 lines) + %0.3f (code lines)",
               name[pat], real'(t1) / NWORDS, real'(t2) / NWORDS, real'(t3) / NWORDS, real'(t3c) / NWORDS);
      in_valid = '0;
      repeat (4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
