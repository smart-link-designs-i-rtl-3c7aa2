// link2_router_tb: end-to-end test of the router with Link Design II links.
//
// Eight sources send NFLITS flits each to random directions. Each source codes
// its payload with a reference model of the Link II encoder before putting it
// on its input link, as the neighbouring router would. At every output the
// testbench decodes the coded payload with a reference decoder model and
// checks: the flit equals the one acknowledged two cycles before (router
// register plus encoder register), the direction field is passed plain, idle
// outputs hold their value, and every flit arrives.
// It counts flits coded with and without the inversion and fails if either
// never occurs.
module link2_router_tb;
  import link_pkg::*;

  localparam int HOLD   = 8;
  localparam int NFLITS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0][FLIT_W-1:0] in_data = '0;
  logic [NPORTS-1:0]             in_valid = '0;
  logic [NPORTS-1:0]             in_ack, out_valid, out_free;
  logic [NPORTS-1:0][FLIT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int n_inv = 0, n_plain = 0;

  always #5 clk = ~clk;

  link2_router #(.HOLD_CYCLES(HOLD)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ack, .out_data, .out_valid, .out_free
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t FAIL: %s", $time, msg);
  endtask

  // Reference Link II coder: Gray bits 4 and 5 plain, the other six sent as
  // Gray XOR previous coded bits, inverted when Gray bits 4 and 5 are both 1.
  function automatic logic [7:0] enc(input logic [7:0] d, input logic [7:0] prev);
    logic [7:0] g, r;
    g = d ^ (d >> 1);
    for (int i = 0; i < 8; i++)
      r[i] = (i == 4 || i == 5) ? g[i] : (g[i] ^ prev[i] ^ (g[4] & g[5]));
    return r;
  endfunction

  function automatic logic [7:0] dec(input logic [7:0] c, input logic [7:0] prev);
    logic [7:0] g, b;
    for (int i = 0; i < 8; i++)
      g[i] = (i == 4 || i == 5) ? c[i] : (c[i] ^ prev[i] ^ (c[4] & c[5]));
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
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
  logic [NPORTS-1:0][7:0] in_prev;             // coder state of each input link
  logic [NPORTS-1:0][FLIT_W-1:0] in_plain;     // uncoded flit on each input

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
        if ($urandom_range(0, 1) == 0) p[4:0] = 5'($urandom);   // vary the coded bits
        if (((p ^ (p >> 1)) & 8'h30) == 8'h30) n_inv++; else n_plain++;
        in_plain[i] = {3'(d), p};
        in_prev[i]  = enc(p, in_prev[i]);
        in_data[i]  = {3'(d), in_prev[i]};
        in_valid[i] = 1'b1;
      end
    end
  end

  // ---------------- checker ----------------
  logic [NPORTS-1:0]             exp_v1, exp_v2;
  logic [NPORTS-1:0][FLIT_W-1:0] exp_d1, exp_d2, prev_out;
  logic [NPORTS-1:0][7:0]        out_prev;     // decoder state of each output link
  int                            got [NPORTS];

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (out_valid[o] !== exp_v2[o]) fail($sformatf("out_valid[%0d]=%b exp %b", o, out_valid[o], exp_v2[o]));
      if (out_valid[o]) begin
        logic [FLIT_W-1:0] f;
        f = {out_data[o][10:8], dec(out_data[o][7:0], out_prev[o])};
        out_prev[o] = out_data[o][7:0];
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
    exp_v1 = '0; exp_v2 = '0; exp_d1 = '0; exp_d2 = '0; prev_out = '0; out_prev = '0;
    in_prev = '0; in_plain = '0; acked_last = '0;
    for (int i = 0; i < NPORTS; i++) begin sent[i] = 0; last_dir[i] = 0; got[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (sent.sum() == NPORTS * NFLITS);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (got[i] != NFLITS) fail($sformatf("source %0d: %0d of %0d flits arrived", i, got[i], NFLITS));
    end
    $display("inverted=%0d plain=%0d", n_inv, n_plain);
    checks++;
    if (n_inv == 0 || n_plain == 0) fail("an encoder setting was never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
