// smart_link_top: the three smart-link router designs side by side.
//
//   l1_*  Link Design I   - eight-direction router with MUX-gated outputs
//   l2_*  Link Design II  - the same router, links Gray/transition coded
//   l3_*  Link Design III - the same router, outputs multi-coded (8 transforms)
//
// The three share clock and reset and nothing else; each has its own eight
// input and eight output links, with the handshake and timing of its module
// (see link1_router, link2_router, link3_router). They are the three
// alternatives the design compares for link power, kept together so that all
// can be built and exercised at once.
module smart_link_top
  import link_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Link Design I
  input  logic [NPORTS-1:0][FLIT_W-1:0] l1_in_data,
  input  logic [NPORTS-1:0]             l1_in_valid,
  output logic [NPORTS-1:0]             l1_in_ack,
  output logic [NPORTS-1:0][FLIT_W-1:0] l1_out_data,
  output logic [NPORTS-1:0]             l1_out_valid,
  output logic [NPORTS-1:0]             l1_out_free,
  // Link Design II
  input  logic [NPORTS-1:0][FLIT_W-1:0] l2_in_data,
  input  logic [NPORTS-1:0]             l2_in_valid,
  output logic [NPORTS-1:0]             l2_in_ack,
  output logic [NPORTS-1:0][FLIT_W-1:0] l2_out_data,
  output logic [NPORTS-1:0]             l2_out_valid,
  output logic [NPORTS-1:0]             l2_out_free,
  // Link Design III
  input  logic [NPORTS-1:0][FLIT_W-1:0] l3_in_data,
  input  logic [NPORTS-1:0]             l3_in_valid,
  output logic [NPORTS-1:0]             l3_in_ack,
  output logic [NPORTS-1:0][FLIT_W-1:0] l3_out_data,
  output logic [NPORTS-1:0][2:0]        l3_out_code,
  output logic [NPORTS-1:0]             l3_out_valid,
  output logic [NPORTS-1:0]             l3_out_free
);

  link1_router #(.HOLD_CYCLES(HOLD_CYCLES)) u_link1 (
    .clk, .rst_n,
    .in_data(l1_in_data), .in_valid(l1_in_valid), .in_ack(l1_in_ack),
    .out_data(l1_out_data), .out_valid(l1_out_valid), .out_free(l1_out_free)
  );

  link2_router #(.HOLD_CYCLES(HOLD_CYCLES)) u_link2 (
    .clk, .rst_n,
    .in_data(l2_in_data), .in_valid(l2_in_valid), .in_ack(l2_in_ack),
    .out_data(l2_out_data), .out_valid(l2_out_valid), .out_free(l2_out_free)
  );

  link3_router #(.HOLD_CYCLES(HOLD_CYCLES)) u_link3 (
    .clk, .rst_n,
    .in_data(l3_in_data), .in_valid(l3_in_valid), .in_ack(l3_in_ack),
    .out_data(l3_out_data), .out_code(l3_out_code),
    .out_valid(l3_out_valid), .out_free(l3_out_free)
  );

endmodule
