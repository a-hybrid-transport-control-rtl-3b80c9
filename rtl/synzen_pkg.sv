// synzen_pkg: types and constants shared by the synZEN processor modules.
//
// A synZEN core is steered by two kinds of operations issued together in one
// instruction: a transport operation (TO) per bus of the interconnection
// network, and a 16-bit control operation (CO) per synZEN unit. The CO layout
// follows the architecture: from least to most significant bit it holds the
// data transfer mode of the left input (CO[1:0]) and of the right input
// (CO[3:2]), the result register file write address (CO[7:4]), the read address
// (CO[11:8]) and the function unit opcode (CO[15:12]).
//
// Own choices (the architecture fixes the fields but not their codes): the
// numeric codes of the four transfer modes and of the opcodes, the TO layout
// {valid, dst, src} with a valid bit on top, and the regular sparse connection
// pattern of the buses computed by bus_src()/bus_dst().
package synzen_pkg;

  // Data transfer mode of one function-unit input register.
  typedef enum logic [1:0] {
    MODE_NET = 2'd0,  // load from the interconnection network when addressed
    MODE_ACC = 2'd1,  // load the unit's own accumulator entry (Re)
    MODE_LNK = 2'd2,  // load the link entry (Rf) of the unit linked to this one
    MODE_HLD = 2'd3   // keep the current content
  } xfer_mode_e;

  // Function unit operation codes.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_ADD   = 4'd1,
    OP_SUB   = 4'd2,
    OP_MUL   = 4'd3,
    OP_AND   = 4'd4,
    OP_OR    = 4'd5,
    OP_XOR   = 4'd6,
    OP_SHL   = 4'd7,
    OP_SHR   = 4'd8,
    OP_PASSA = 4'd9,
    OP_PASSB = 4'd10
  } opcode_e;

  // Control operation: packed so that mode_l sits in bits [1:0].
  typedef struct packed {
    opcode_e    op;       // [15:12]
    logic [3:0] rd_addr;  // [11:8]
    logic [3:0] wr_addr;  // [7:4]
    xfer_mode_e mode_r;   // [3:2]
    xfer_mode_e mode_l;   // [1:0]
  } ctrl_op_t;

  localparam int unsigned RF_ENTRIES = 16;
  localparam int unsigned RF_AW      = 4;
  localparam logic [3:0]  ACC_IDX    = 4'd14;  // entry Re
  localparam logic [3:0]  LNK_IDX    = 4'd15;  // entry Rf

  // Width of a field that must address n items (at least one bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // Global source index reached by local source address j of bus b.
  function automatic int unsigned bus_src(input int unsigned b, input int unsigned j,
                                          input int unsigned nsrc);
    return (b + j) % nsrc;
  endfunction

  // Global destination index reached by local destination address j of bus b.
  // Destination 2u is the left input of unit u, 2u+1 its right input.
  function automatic int unsigned bus_dst(input int unsigned b, input int unsigned j,
                                          input int unsigned ndst, input int unsigned dpb);
    return (b * dpb + j) % ndst;
  endfunction

endpackage
