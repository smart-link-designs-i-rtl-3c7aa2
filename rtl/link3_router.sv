// link3_router: the Link Design I router with Link Design III coded outputs.
//
// Every one of the eight router outputs passes through a link3_encoder, which
// puts on the output link whichever of its eight transforms of the whole
// 11-bit flit changes the fewest lines. The transform used is given on
// out_code. Inputs are plain flits.
//
// Interface: as link1_router, plus out_code per output. Timing: a flit
// acknowledged in cycle t is on the coded output in cycle t+2, with out_valid
// high in that cycle. out_free is the router's free flag and is not delayed.
//
// From the design: the multi-coding encoder on the router output. Own
// choices: inputs are uncoded, the whole flit is coded, out_code is a port.
module link3_router
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
  output logic [NPORTS-1:0][2:0]        out_code,
  output logic [NPORTS-1:0]             out_valid,
  output logic [NPORTS-1:0]             out_free
);

  logic [NPORTS-1:0][FLIT_W-1:0] r_data;
  logic [NPORTS-1:0]             r_valid;

  link1_router #(.HOLD_CYCLES(HOLD_CYCLES)) u_router (
    .clk, .rst_n,
    .in_data, .in_valid, .in_ack,
    .out_data (r_data),
    .out_valid(r_valid),
    .out_free
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    link3_encoder #(.W(FLIT_W)) u_enc (
      .clk, .rst_n,
      .en  (r_valid[o]),
      .din (r_data[o]),
      .bus (out_data[o]),
      .code(out_code[o])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid[o] <= 1'b0;
      else        out_valid[o] <= r_valid[o];
    end
  end

endmodule
