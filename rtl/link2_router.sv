// link2_router: the Link Design I router with Link Design II coded links.
//
// Every one of the eight inputs arrives coded: its payload bits [7:0] went
// through a link2_encoder at the sending end. A link2_decoder per input
// recovers the payload, which enters the router with the direction field
// [10:8]; the decoder steps to the next word when the router acknowledges the
// flit. Every output payload passes through a link2_encoder before it leaves,
// so all links of this router carry coded data. The direction field is sent
// uncoded.
//
// Interface: as link1_router, with coded in_data and coded out_data.
// Timing: a flit acknowledged in cycle t is on the coded output in cycle t+2
// (router register, then encoder register), with out_valid high in that cycle.
// out_free is the router's free flag and is not delayed.
//
// From the design: encoder and decoder on the router's links. Own choices:
// which flit bits are coded, and the stepping of decoder and encoder per flit.
module link2_router
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

  logic [NPORTS-1:0][FLIT_W-1:0] dec_data, r_data;
  logic [NPORTS-1:0]             r_valid;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    assign dec_data[i][FLIT_W-1:DATA_W] = in_data[i][FLIT_W-1:DATA_W];
    link2_decoder u_dec (
      .clk, .rst_n,
      .en  (in_ack[i]),
      .bus (in_data[i][DATA_W-1:0]),
      .dout(dec_data[i][DATA_W-1:0])
    );
  end

  link1_router #(.HOLD_CYCLES(HOLD_CYCLES)) u_router (
    .clk, .rst_n,
    .in_data  (dec_data),
    .in_valid (in_valid),
    .in_ack   (in_ack),
    .out_data (r_data),
    .out_valid(r_valid),
    .out_free (out_free)
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    link2_encoder u_enc (
      .clk, .rst_n,
      .en (r_valid[o]),
      .din(r_data[o][DATA_W-1:0]),
      .bus(out_data[o][DATA_W-1:0])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_data[o][FLIT_W-1:DATA_W] <= '0;
        out_valid[o]                 <= 1'b0;
      end else begin
        out_valid[o] <= r_valid[o];
        if (r_valid[o]) out_data[o][FLIT_W-1:DATA_W] <= r_data[o][FLIT_W-1:DATA_W];
      end
    end
  end

endmodule
