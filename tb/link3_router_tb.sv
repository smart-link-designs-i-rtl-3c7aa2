// link3_router_tb: end-to-end test of the router with Link Design III outputs.
//
// Eight sources send NFLITS plain flits each to random directions. At every
// output the testbench undoes the transform named by out_code and checks: the
// flit equals the one acknowledged two cycles before (router register plus
// encoder register), the coded word is the candidate with the fewest changed
// lines against the previous word on that output, idle outputs hold their
// value, and every flit arrives. It fails if any of the eight codes is never
// used.
module link3_router_tb;
  import link_pkg::*;

  localparam int HOLD   = 8;
  localparam int NFLITS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0][FLIT_W-1:0] in_data = '0;
  logic [NPORTS-1:0]             in_valid = '0;
  logic [NPORTS-1:0]             in_ack, out_valid, out_free;
  logic [NPORTS-1:0][FLIT_W-1:0] out_data;
  logic [NPORTS-1:0][2:0]        out_code;

  int checks = 0, failures = 0;
  int used [8];

  always #5 clk = ~clk;

  link3_router #(.HOLD_CYCLES(HOLD)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ack, .out_data, .out_code, .out_valid, .out_free
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t FAIL: %s", $time, msg);
  endtask

  localparam int W = FLIT_W;

  // The eight transforms, numbered as the encoder reports them.
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
    case (c)
      0: return xform(e, 1);
      1: return xform(e, 0);
      2: return xform(e, 3);
      3: return xform(e, 2);
      default: return xform(e, c);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sources ----------------
  int sent [NPORTS];
  int last_dir [NPORTS];
  logic [NPORTS-1:0] acked_last;
  logic [NPORTS-1:0][FLIT_W-1:0] in_plain;     // flit on each input

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++) begin
      if (in_valid[i] && !acked_last[i]) continue;
      if (in_valid[i]) sent[i]++;
      in_valid[i] = 1'b0;
      if (sent[i] < NFLITS && $urandom_range(0, 3) != 0) begin
        int d;
        logic [7:0] p;
        d = ($urandom_range(0, 1) == 0) ? last_dir[i] : int'($urandom_range(0, NPORTS - 1));
        last_dir[i] = d;
        p = {3'(i), 5'(sent[i])};
        if ($urandom_range(0, 1) == 0) p[4:0] = 5'($urandom);   // vary the payload
        in_plain[i] = {3'(d), p};
        in_data[i]  = {3'(d), p};
        in_valid[i] = 1'b1;
      end
    end
  end

  // ---------------- checker ----------------
  logic [NPORTS-1:0]             exp_v1, exp_v2;
  logic [NPORTS-1:0][FLIT_W-1:0] exp_d1, exp_d2, prev_out;
  int                            got [NPORTS];

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (out_valid[o] !== exp_v2[o]) fail($sformatf("out_valid[%0d]=%b exp %b", o, out_valid[o], exp_v2[o]));
      if (out_valid[o]) begin
        logic [FLIT_W-1:0] f;
        int hmin;
        f = undo(out_data[o], int'(out_code[o]));
        hmin = W + 1;
        for (int c = 0; c < 8; c++)
          if ($countones(xform(f, c) ^ prev_out[o]) < hmin) hmin = $countones(xform(f, c) ^ prev_out[o]);
        checks++;
        if ($countones(out_data[o] ^ prev_out[o]) != hmin)
          fail($sformatf("output %0d changed %0d lines, best is %0d", o, $countones(out_data[o] ^ prev_out[o]), hmin));
        used[int'(out_code[o])]++;
        checks++;
        if (f !== exp_d2[o]) fail($sformatf("output %0d decoded %h exp %h", o, f, exp_d2[o]));
        checks++;
        if (int'(f[10:8]) != o) fail($sformatf("flit for %0d left on %0d", f[10:8], o));
        got[int'(f[7:5])]++;
      end else begin
        checks++;
        if (out_data[o] !== prev_out[o]) fail($sformatf("idle output %0d toggled", o));
      end
      prev_out[o] = out_data[o];
    end
    exp_v2 = exp_v1; exp_d2 = exp_d1;
    exp_v1 = '0;
    for (int i = 0; i < NPORTS; i++) if (in_ack[i]) begin
      exp_v1[int'(in_plain[i][10:8])] = 1'b1;
      exp_d1[int'(in_plain[i][10:8])] = in_plain[i];
    end
    acked_last = in_ack;
  end

  initial begin
    exp_v1 = '0; exp_v2 = '0; exp_d1 = '0; exp_d2 = '0; prev_out = '0;
    in_plain = '0; acked_last = '0;
    for (int i = 0; i < NPORTS; i++) begin sent[i] = 0; last_dir[i] = 0; got[i] = 0; end
    for (int c = 0; c < 8; c++) used[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (sent.sum() == NPORTS * NFLITS);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (got[i] != NFLITS) fail($sformatf("source %0d: %0d of %0d flits arrived", i, got[i], NFLITS));
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (used[c] == 0) fail($sformatf("code %0d never used", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
