// smart_link_top_tb: end-to-end test of the three link designs together, at
// the top's default parameters.
//
// The same traffic, eight sources of NFLITS flits each to random directions,
// is offered to all three routers: plain flits to Link I and Link III, and the
// same flits coded by a reference Link II coder to Link II. Since the
// direction field is never coded, the three routers must make the same
// decisions, so the testbench checks that their acknowledgements and free
// flags agree cycle by cycle. At the outputs it checks:
//   Link I   - the acknowledged flit one cycle later, idle outputs unchanged;
//   Link II  - after reference decoding, the flit two cycles later;
//   Link III - after undoing out_code, the flit two cycles later.
// It counts each mechanism of the design and fails if one never happened:
// connections made, flits kept waiting by a held connection, arbitration
// between inputs, connection release, traffic on diagonal ports, the Link II
// inverting multiplexer in both settings, and each of the eight Link III codes.
module smart_link_top_tb;
  import link_pkg::*;

  localparam int NFLITS = 400;
  localparam int W      = FLIT_W;
  localparam int HOLD   = 8;        // smart_link_top's default HOLD_CYCLES

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0][FLIT_W-1:0] l1_in_data = '0, l2_in_data = '0, l3_in_data = '0;
  logic [NPORTS-1:0]             in_valid = '0;
  logic [NPORTS-1:0]             l1_in_ack, l2_in_ack, l3_in_ack;
  logic [NPORTS-1:0][FLIT_W-1:0] l1_out_data, l2_out_data, l3_out_data;
  logic [NPORTS-1:0][2:0]        l3_out_code;
  logic [NPORTS-1:0]             l1_out_valid, l2_out_valid, l3_out_valid;
  logic [NPORTS-1:0]             l1_out_free, l2_out_free, l3_out_free;

  int checks = 0, failures = 0;
  int n_grant = 0, n_wait_conn = 0, n_arb = 0, n_release = 0, n_diag = 0;
  int n_inv = 0, n_plain = 0;
  int used [8];

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

  function automatic logic [W-1:0] undo3(input logic [W-1:0] e, input int c);
    case (c)
      0: return xform(e, 1);
      1: return xform(e, 0);
      2: return xform(e, 3);
      3: return xform(e, 2);
      default: return xform(e, c);
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sources ----------------
  int sent [NPORTS];
  int last_dir [NPORTS];
  logic [NPORTS-1:0] acked_last;
  logic [NPORTS-1:0][7:0] l2_prev;

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
        p = {3'(i), 5'($urandom)};
        if (((p ^ (p >> 1)) & 8'h30) == 8'h30) n_inv++; else n_plain++;
        l1_in_data[i] = {3'(d), p};
        l3_in_data[i] = {3'(d), p};
        l2_prev[i]    = enc2(p, l2_prev[i]);
        l2_in_data[i] = {3'(d), l2_prev[i]};
        in_valid[i]   = 1'b1;
      end
    end
  end

  // ---------------- checker ----------------
  logic [NPORTS-1:0]             conn_m, ev1, ev2, ev3;
  logic [NPORTS-1:0][FLIT_W-1:0] ed1, ed2, ed3, l1_prev_out, l3_prev_out;
  logic [NPORTS-1:0][7:0]        l2_out_prev;
  int                            cnt_m [NPORTS];
  int                            src_m [NPORTS];
  int                            got1 = 0, got2 = 0, got3 = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (l1_in_ack !== l2_in_ack || l1_in_ack !== l3_in_ack) fail("routers disagree on acknowledgements");
    checks++;
    if (l1_out_free !== l2_out_free || l1_out_free !== l3_out_free) fail("routers disagree on free outputs");
    for (int o = 0; o < NPORTS; o++) begin
      // Link I: latency 1
      checks++;
      if (l1_out_valid[o] !== ev1[o]) fail($sformatf("l1 out_valid[%0d]", o));
      else if (ev1[o]) begin
        checks++;
        if (l1_out_data[o] !== ed1[o]) fail($sformatf("l1 out %0d = %h exp %h", o, l1_out_data[o], ed1[o]));
        got1++;
        if (o >= 4) n_diag++;
      end else begin
        checks++;
        if (l1_out_data[o] !== l1_prev_out[o]) fail($sformatf("l1 idle output %0d toggled", o));
      end
      l1_prev_out[o] = l1_out_data[o];
      // Link II: latency 2, decode
      checks++;
      if (l2_out_valid[o] !== ev3[o]) fail($sformatf("l2 out_valid[%0d]", o));
      else if (ev3[o]) begin
        logic [FLIT_W-1:0] f;
        f = {l2_out_data[o][10:8], dec2(l2_out_data[o][7:0], l2_out_prev[o])};
        l2_out_prev[o] = l2_out_data[o][7:0];
        checks++;
        if (f !== ed3[o]) fail($sformatf("l2 out %0d decoded %h exp %h", o, f, ed3[o]));
        got2++;
      end
      // Link III: latency 2, undo transform
      checks++;
      if (l3_out_valid[o] !== ev3[o]) fail($sformatf("l3 out_valid[%0d]", o));
      else if (ev3[o]) begin
        checks++;
        if (undo3(l3_out_data[o], int'(l3_out_code[o])) !== ed3[o])
          fail($sformatf("l3 out %0d code %0d does not decode", o, l3_out_code[o]));
        used[int'(l3_out_code[o])]++;
        got3++;
      end
      l3_prev_out[o] = l3_out_data[o];
    end
    ev3 = ev2; ed3 = ed2;
    ev2 = '0;
    ev1 = '0;
    // Connection model: an output connects on its first grant and is held
    // for HOLD cycles (the top's default), then is free again.
    for (int o = 0; o < NPORTS; o++) begin
      logic [NPORTS-1:0] rq;
      for (int i = 0; i < NPORTS; i++) rq[i] = in_valid[i] && (int'(l1_in_data[i][10:8]) == o);
      checks++;
      if (l1_out_free[o] !== !conn_m[o]) fail($sformatf("out_free[%0d] disagrees with the model", o));
      if (!conn_m[o] && $countones(rq) > 1) n_arb++;
      if (conn_m[o] && (rq & ~(NPORTS'(1) << src_m[o])) != '0) n_wait_conn++;
      for (int i = 0; i < NPORTS; i++) if (l1_in_ack[i] && rq[i]) begin
        ev1[o] = 1'b1; ed1[o] = l1_in_data[i];
        ev2[o] = 1'b1; ed2[o] = l1_in_data[i];
        if (!conn_m[o]) begin conn_m[o] = 1'b1; cnt_m[o] = HOLD + 1; src_m[o] = i; n_grant++; end
      end
      if (conn_m[o]) begin
        cnt_m[o]--;
        if (cnt_m[o] == 0) begin conn_m[o] = 1'b0; n_release++; end
      end
    end
    acked_last = l1_in_ack;
  end

  initial begin
    conn_m = '0; ev1 = '0; ev2 = '0; ev3 = '0; ed1 = '0; ed2 = '0; ed3 = '0;
    l1_prev_out = '0; l3_prev_out = '0; l2_out_prev = '0; l2_prev = '0; acked_last = '0;
    for (int i = 0; i < NPORTS; i++) begin sent[i] = 0; last_dir[i] = 0; cnt_m[i] = 0; src_m[i] = 0; end
    for (int c = 0; c < 8; c++) used[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (sent.sum() == NPORTS * NFLITS);
    repeat (5) @(posedge clk);
    checks++;
    if (got1 != NPORTS * NFLITS || got2 != NPORTS * NFLITS || got3 != NPORTS * NFLITS)
      fail($sformatf("flits delivered: l1=%0d l2=%0d l3=%0d of %0d", got1, got2, got3, NPORTS * NFLITS));
    $display("connections=%0d waits_on_connection=%0d arbitrations=%0d releases=%0d diagonal_flits=%0d",
             n_grant, n_wait_conn, n_arb, n_release, n_diag);
    $display("link2 inverted=%0d plain=%0d", n_inv, n_plain);
    $display("link3 codes used: %0d %0d %0d %0d %0d %0d %0d %0d",
             used[0], used[1], used[2], used[3], used[4], used[5], used[6], used[7]);
    checks++;
    if (n_grant == 0 || n_wait_conn == 0 || n_arb == 0 || n_release == 0 || n_diag == 0)
      fail("a router mechanism was never exercised");
    checks++;
    if (n_inv == 0 || n_plain == 0) fail("a Link II multiplexer setting was never used");
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (used[c] == 0) fail($sformatf("Link III code %0d never used", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
