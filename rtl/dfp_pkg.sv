// dfp_pkg: types and constants shared by the dataflow processor.
//
// A token carries a 16-bit signed data word and a destination. A destination
// names a node of the dataflow graph (7 bits, so 128 nodes) and the input of
// that node, left or right. The extended token that the matcher hands to the
// ALU carries both operands, the opcode of the node and up to four optional
// destinations, each with a valid bit (the "Maybe" of the original design).
//
// Word width, node count, the L/R side, the three operations and the four
// destinations follow the design. The to_out flag that marks a destination
// leaving the processor, and the opcode encoding, are this implementation's
// own choices.
package dfp_pkg;

  localparam int unsigned WORD_W   = 16;   // data word (signed 16 bit)
  localparam int unsigned NUM_NODES = 128;  // graph nodes = token store / program memory entries
  localparam int unsigned NODE_W   = $clog2(NUM_NODES);
  localparam int unsigned MAX_DEST = 4;    // destinations per node

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic [NODE_W-1:0]        node_t;

  typedef enum logic { SIDE_L = 1'b0, SIDE_R = 1'b1 } side_t;

  typedef enum logic [1:0] { OP_ADD = 2'd0, OP_SUB = 2'd1, OP_MUL = 2'd2 } op_t;

  // Destination of a token. With to_out set the token leaves the processor and
  // node carries a free output tag instead of a node number.
  typedef struct packed {
    logic  to_out;
    node_t node;
    side_t side;
  } dest_t;

  typedef struct packed {
    word_t value;
    dest_t dest;
  } token_t;

  // Optional destination ("Maybe Dest").
  typedef struct packed {
    logic  valid;
    dest_t dest;
  } mdest_t;

  // One program memory entry: opcode and up to four destinations.
  typedef struct packed {
    op_t                   op;
    mdest_t [MAX_DEST-1:0] dests;
  } instr_t;

  // Extended token, matcher to ALU: op1 op2 opcode d1..d4 (d1 = dests[0]).
  typedef struct packed {
    word_t                 op1;
    word_t                 op2;
    op_t                   op;
    mdest_t [MAX_DEST-1:0] dests;
  } extoken_t;

  function automatic dest_t mk_dest(input node_t node, input side_t side);
    dest_t d;
    d.to_out = 1'b0;
    d.node   = node;
    d.side   = side;
    return d;
  endfunction

  function automatic dest_t mk_out(input node_t tag);
    dest_t d;
    d.to_out = 1'b1;
    d.node   = tag;
    d.side   = SIDE_L;
    return d;
  endfunction

endpackage
