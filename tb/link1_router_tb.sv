// link1_router_tb: self-checking test of the Link Design I router.
//
// Eight sources each send NFLITS flits to random directions, often several in
// a row to the same direction, with random idle cycles. A flit's payload
// carries its source number and a sequence number. The testbench keeps its own
// model of every output's connection (free, connected to which input, cycles
// left) and checks at every clock edge:
//   - out_free agrees with the model; a connection lasts exactly HOLD cycles;
//   - a free output that is asked for grants exactly one asking input;
//   - a connected output serves only its input, and serves it whenever asked;
//   - every acknowledged flit appears on its output one cycle later, and an
//     output shows valid only then (latency 1);
//   - an output holds its value in cycles without a flit (MUX gating);
//   - every flit of every source arrives, in order per source.
// It counts connections made, requests kept waiting by a connection or by
// another winner, releases, and flits over diagonal ports, and fails if any of
// these never happened.
module link1_router_tb;
  import link_pkg::*;

  localparam int HOLD   = 8;
  localparam int NFLITS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0][FLIT_W-1:0] in_data = '0;
  logic [NPORTS-1:0]             in_valid = '0;
  logic [NPORTS-1:0]             in_ack, out_valid, out_free;
  logic [NPORTS-1:0][FLIT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int n_grant = 0, n_wait_conn = 0, n_wait_arb = 0, n_release = 0, n_diag = 0;

  always #5 clk = ~clk;

  link1_router #(.HOLD_CYCLES(HOLD)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ack, .out_data, .out_valid, .out_free
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t FAIL: %s", $time, msg);
  endtask

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
  logic [NPORTS-1:0] acked_last;   // acknowledged at the last edge

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NPORTS; i++) begin
      if (in_valid[i] && !acked_last[i]) continue;   // hold until acknowledged
      if (in_valid[i]) sent[i]++;
      in_valid[i] = 1'b0;
      if (sent[i] < NFLITS && $urandom_range(0, 3) != 0) begin
        int d;
        d = ($urandom_range(0, 1) == 0) ? last_dir[i] : int'($urandom_range(0, NPORTS - 1));
        last_dir[i] = d;
        in_data[i]  = {3'(d), 3'(i), 5'(sent[i])};
        in_valid[i] = 1'b1;
      end
    end
  end

  // ---------------- checker ----------------
  logic [NPORTS-1:0]             conn_m;
  int                            src_m [NPORTS];
  int                            cnt_m [NPORTS];
  logic [NPORTS-1:0]             exp_valid;
  logic [NPORTS-1:0][FLIT_W-1:0] exp_data, prev_out;
  int                            got [NPORTS];   // flits received per source

  always @(posedge clk) if (rst_n) begin
    // Outputs now show what was acknowledged at the previous edge.
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (out_valid[o] !== exp_valid[o]) fail($sformatf("out_valid[%0d]=%b exp %b", o, out_valid[o], exp_valid[o]));
      else if (out_valid[o] && out_data[o] !== exp_data[o])
        fail($sformatf("out_data[%0d]=%h exp %h", o, out_data[o], exp_data[o]));
      if (!out_valid[o]) begin
        checks++;
        if (out_data[o] !== prev_out[o]) fail($sformatf("idle output %0d toggled", o));
      end else begin
        int s, q;
        s = int'(out_data[o][7:5]);
        q = int'(out_data[o][4:0]);
        checks++;
        if (q != (got[s] % 32)) fail($sformatf("source %0d flit out of order: %0d exp %0d", s, q, got[s] % 32));
        got[s]++;
        if (o >= 4) n_diag++;
      end
      prev_out[o] = out_data[o];
    end
    // Connection rules for the acknowledgements of this edge.
    exp_valid = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (in_ack[i] && !in_valid[i]) fail($sformatf("ack without valid on %0d", i));
    end
    for (int o = 0; o < NPORTS; o++) begin
      logic [NPORTS-1:0] rq, ak;
      for (int i = 0; i < NPORTS; i++) begin
        rq[i] = in_valid[i] && (int'(in_data[i][10:8]) == o);
        ak[i] = in_ack[i] && rq[i];
      end
      checks++;
      if (out_free[o] !== !conn_m[o]) fail($sformatf("out_free[%0d]=%b, model connected=%b", o, out_free[o], conn_m[o]));
      checks++;
      if (!conn_m[o]) begin
        if (rq != '0 && $countones(ak) != 1) fail($sformatf("free output %0d: %0d grants", o, $countones(ak)));
        if (rq == '0 && ak != '0) fail("grant without request");
        if ($countones(rq) > 1) n_wait_arb++;
      end else begin
        if (ak != (rq & (NPORTS'(1) << src_m[o]))) fail($sformatf("connected output %0d served wrong input", o));
        if ((rq & ~(NPORTS'(1) << src_m[o])) != '0) n_wait_conn++;
      end
      for (int i = 0; i < NPORTS; i++) if (ak[i]) begin
        exp_valid[o] = 1'b1;
        exp_data[o]  = in_data[i];
      end
      // Advance the model.
      if (!conn_m[o]) begin
        for (int i = 0; i < NPORTS; i++) if (ak[i]) begin
          conn_m[o] = 1'b1; src_m[o] = i; cnt_m[o] = HOLD; n_grant++;
        end
      end else begin
        cnt_m[o]--;
        if (cnt_m[o] == 0) begin conn_m[o] = 1'b0; n_release++; end
      end
    end
    acked_last = in_ack;
  end

  initial begin
    conn_m = '0; exp_valid = '0; exp_data = '0; prev_out = '0; acked_last = '0;
    for (int i = 0; i < NPORTS; i++) begin
      sent[i] = 0; last_dir[i] = 0; got[i] = 0; src_m[i] = 0; cnt_m[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (sent.sum() == NPORTS * NFLITS);
    repeat (4) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (got[i] != NFLITS) fail($sformatf("source %0d: %0d of %0d flits arrived", i, got[i], NFLITS));
    end
    $display("connections=%0d waits_on_connection=%0d arbitrations=%0d releases=%0d diagonal_flits=%0d",
             n_grant, n_wait_conn, n_wait_arb, n_release, n_diag);
    checks++;
    if (n_grant == 0 || n_wait_conn == 0 || n_wait_arb == 0 || n_release == 0 || n_diag == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
