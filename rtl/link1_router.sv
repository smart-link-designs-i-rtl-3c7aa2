// link1_router: Link Design I, an eight-direction router with MUX-gated outputs.
//
// The router has eight ports, the four straight directions (S, N, W, E) and the
// four diagonals (NW, NE, SW, SE). The diagonal ports let a path across a mesh
// take a diagonal step where a plain mesh needs two, which shortens the route
// and so the wire switched per flit.
//
// Each output is driven by an 8:1 multiplexer whose select is held in a
// connection register. An idle output is free (out_free = 1). When an input
// offers a flit whose direction field names a free output, the output connects
// to that input for HOLD_CYCLES cycles, then disconnects by itself and becomes
// free again: data, once received, is cut off from its source. While connected,
// only the connected input can send on that output; others wait. Among inputs
// asking for the same free output a round-robin pointer picks one.
//
// MUX gating: the output register loads only when a flit passes, so an idle or
// unused output holds its last value and its wires do not toggle.
//
// Interface: per input, in_data/in_valid with in_ack (valid/ack handshake: the
// sender holds data and valid until in_ack is seen high in a cycle). Per
// output, out_data/out_valid, one-cycle valid per flit, and out_free.
// Timing: a flit acknowledged in cycle t appears on its output in cycle t+1.
// A new connection passes its first flit in the cycle it is made.
//
// From the design: eight directions with diagonals, per-output MUX, release of
// the connection after a predefined interval, 11-bit links, free and valid
// signals. This implementation's own choices: the direction field in the flit,
// the valid/ack handshake, round-robin choice, the HOLD_CYCLES value, and that
// a connection lasts a fixed time from when it is made.
module link1_router
  import link_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_data,
  input  logic [NPORTS-1:0]             in_valid,
  output logic [NPORTS-1:0]             in_ack,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_data,
  output logic [NPORTS-1:0]             out_valid,
  output logic [NPORTS-1:0]             out_free
);

  localparam int unsigned PW = $clog2(NPORTS);
  localparam int unsigned TW = (HOLD_CYCLES > 1) ? $clog2(HOLD_CYCLES) : 1;

  // Connection state per output.
  logic [NPORTS-1:0]          conn_q;
  logic [NPORTS-1:0][PW-1:0]  src_q;
  logic [NPORTS-1:0][TW-1:0]  timer_q;
  logic [NPORTS-1:0][PW-1:0]  rr_q;     // round-robin: first input to look at

  // req[o][i]: input i offers a flit for output o.
  logic [NPORTS-1:0][NPORTS-1:0] req;
  logic [NPORTS-1:0]             grant_new;  // output o makes a connection now
  logic [NPORTS-1:0][PW-1:0]     winner;
  logic [NPORTS-1:0]             xfer;       // a flit passes through o now
  logic [NPORTS-1:0][PW-1:0]     xsrc;       // from this input

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = in_valid[i] && (flit_dir(in_data[i]) == DIRW'(o));
      end
    end
  end

  // Round-robin choice among requesters of each free output.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      logic found;
      found     = 1'b0;
      winner[o] = '0;
      for (int k = 0; k < NPORTS; k++) begin
        logic [PW-1:0] idx;
        idx = PW'((int'(rr_q[o]) + k) % NPORTS);
        if (!found && req[o][idx]) begin
          found     = 1'b1;
          winner[o] = idx;
        end
      end
      grant_new[o] = !conn_q[o] && found;
      xfer[o]      = conn_q[o] ? req[o][src_q[o]] : found;
      xsrc[o]      = conn_q[o] ? src_q[o] : winner[o];
    end
  end

  always_comb begin
    in_ack = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (xfer[o]) in_ack[xsrc[o]] = 1'b1;
    end
  end

  assign out_free = ~conn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_q    <= '0;
      src_q     <= '0;
      timer_q   <= '0;
      rr_q      <= '0;
      out_data  <= '0;
      out_valid <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        out_valid[o] <= xfer[o];
        // Gated output register: loads only when a flit passes.
        if (xfer[o]) out_data[o] <= in_data[xsrc[o]];
        if (grant_new[o]) begin
          if (HOLD_CYCLES > 1) begin
            conn_q[o]  <= 1'b1;
            timer_q[o] <= TW'(HOLD_CYCLES - 1);
          end
          src_q[o] <= winner[o];
          rr_q[o]  <= PW'((int'(winner[o]) + 1) % NPORTS);
        end else if (conn_q[o]) begin
          if (timer_q[o] == '0) conn_q[o] <= 1'b0;  // interval over: disconnect
          else                  timer_q[o] <= timer_q[o] - 1'b1;
        end
      end
    end
  end

  // Handshake rule: an offered flit stays, unchanged, until it is acknowledged.
  for (genvar i = 0; i < NPORTS; i++) begin : g_hs
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] && !in_ack[i] |=> in_valid[i] && $stable(in_data[i]))
      else $error("input %0d dropped or changed an unacknowledged flit", i);
  end

endmodule
