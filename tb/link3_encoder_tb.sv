// link3_encoder_tb: self-checking test of the Link Design III encoder.
//
// For every random 11-bit word the testbench builds the eight transforms
// itself, measures each one's Hamming distance to the previous bus word and
// expects the lowest distance, lowest code on ties. It checks bus and code one
// cycle after en, checks that undoing the reported transform gives back the
// word, that the bus holds while en is low, and that every one of the eight
// codes is chosen at least once.
module link3_encoder_tb;
  import link_pkg::*;

  localparam int W = 11;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, bus;
  logic [2:0] code;
  int checks = 0, failures = 0;
  int used [8];

  always #5 clk = ~clk;

  link3_encoder #(.W(W)) dut (.clk, .rst_n, .en, .din, .bus, .code);

  function automatic logic [W-1:0] xform(input logic [W-1:0] d, input int c);
    logic [W-1:0] r, em;
    for (int i = 0; i < W; i++) em[i] = ~i[0];
    case (c)
      0: for (int i = 0; i < W; i++) r[i] = d[(i + 1) % W];
      1: for (int i = 0; i < W; i++) r[i] = d[(i + W - 1) % W];
      2: for (int i = 0; i < W; i++) r[i] = ~d[(i + 1) % W];
      3: for (int i = 0; i < W; i++) r[i] = ~d[(i + W - 1) % W];
      4: begin
           r = d;
           for (int i = 0; i < W / 2; i++) begin
             r[i] = d[W - W / 2 + i];
             r[W - W / 2 + i] = d[i];
           end
         end
      5: r = ~d;
      6: r = d ^ em;
      default: r = d ^ ~em;
    endcase
    return r;
  endfunction

  function automatic logic [W-1:0] undo(input logic [W-1:0] e, input int c);
    logic [W-1:0] r;
    case (c)
      0: r = xform(e, 1);
      1: r = xform(e, 0);
      2: r = xform(e, 3);
      3: r = xform(e, 2);
      default: r = xform(e, c);  // swap and inversions are their own inverse
    endcase
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev, best;
    int bc, bh, h;
    logic e;
    prev = '0;
    foreach (used[c]) used[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      din = W'($urandom);
      en  = ($urandom_range(0, 4) != 0);
      bh = W + 1; bc = 0; best = '0;
      for (int c = 0; c < 8; c++) begin
        h = $countones(xform(din, c) ^ prev);
        if (h < bh) begin bh = h; bc = c; best = xform(din, c); end
      end
      e = en;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (bus !== (e ? best : prev)) begin
        failures++;
        if (failures < 10) $display("bus mismatch n=%0d got %h exp %h", n, bus, e ? best : prev);
      end
      if (e) begin
        checks++;
        if (code !== 3'(bc)) begin
          failures++;
          if (failures < 10) $display("code mismatch n=%0d got %0d exp %0d", n, code, bc);
        end
        checks++;
        if (undo(bus, int'(code)) !== din) failures++;
        used[bc]++;
        prev = best;
      end
    end
    foreach (used[c]) begin
      checks++;
      if (used[c] == 0) begin failures++; $display("code %0d never chosen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
