// link_pkg: constants and types shared by the smart-link router family.
//
// A flit is FLIT_W = 11 bits wide. Its three upper bits name the output
// direction the flit asks for; its eight lower bits are the payload that the
// Link II coder works on. The eleven-bit width, the eight-bit coder width and
// the eight directions (four straight, four diagonal) follow the design; the
// split of the flit into a 3-bit direction field and an 8-bit payload, and the
// numbering of the directions, are this implementation's choice.
package link_pkg;

  parameter int unsigned FLIT_W = 11;  // link width, bits [10:0]
  parameter int unsigned DATA_W = 8;   // payload width coded by Link II
  parameter int unsigned NPORTS = 8;   // S, N, W, E and the four diagonals
  parameter int unsigned DIRW   = 3;   // width of a direction number

  // Direction numbers, used both as port index and as flit header value.
  typedef enum logic [DIRW-1:0] {
    DIR_S  = 3'd0,
    DIR_N  = 3'd1,
    DIR_W  = 3'd2,
    DIR_E  = 3'd3,
    DIR_NW = 3'd4,
    DIR_NE = 3'd5,
    DIR_SW = 3'd6,
    DIR_SE = 3'd7
  } dir_e;

  typedef logic [FLIT_W-1:0] flit_t;

  // Direction field of a flit.
  function automatic logic [DIRW-1:0] flit_dir(input flit_t f);
    return f[FLIT_W-1 -: DIRW];
  endfunction

endpackage
