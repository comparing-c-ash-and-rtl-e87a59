// processor: a small static dataflow processor with an explicit token store.
//
// A program is a dataflow graph of up to 128 two-input nodes (add, subtract,
// multiply), each with up to four destinations. Tokens (16-bit value plus
// destination node and side) enter on in_*. They circulate router -> matcher
// -> ALU -> router: the matcher stores the first token of a node and fires
// the node when the second arrives, the ALU computes and sends one result
// token per destination back to the router, which forwards tokens whose
// destination is marked "out" to out_*. There is no program counter: the
// arrival of operands alone drives execution.
//
// Interface: in_valid/in_token with in_full as back pressure; out_valid/
// out_token with out_full from the environment; prog_we/prog_addr/prog_data
// load the program memory before tokens are sent in. The status outputs
// pulse once per event (a store, a firing, a stall, etc.) for observation.
// All state is reset synchronously by rst, except the memories' data.
//
// The structure (router + core of matcher and ALU, FIFOs on every input)
// follows the design; the program load port, the out flag and the FIFO depths
// are this implementation's choices. FIFO_DEPTH sizes the external input,
// matcher and ALU FIFOs; INT_FIFO_DEPTH sizes the router's internal FIFO,
// which by default holds one token per possible arc (512) so that the ring
// cannot deadlock on a program in which each node fires once (see router).
module processor
  import dfp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 4,
  parameter int unsigned INT_FIFO_DEPTH = dfp_pkg::NUM_NODES * dfp_pkg::MAX_DEST,
  parameter int unsigned NODES          = dfp_pkg::NUM_NODES,
  localparam int unsigned AW        = $clog2(NODES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  token_t        in_token,
  output logic          in_full,
  output logic          out_valid,
  output token_t        out_token,
  input  logic          out_full,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  instr_t        prog_data,
  output logic          st_int_over_ext,
  output logic          st_stored,
  output logic          st_fired,
  output logic          st_match_stall,
  output logic          st_multi_dest,
  output logic          st_alu_stall
);

  logic   r2c_valid, r2c_full;
  token_t r2c_token;
  logic   c2r_valid, c2r_full;
  token_t c2r_token;

  router #(.EXT_FIFO_DEPTH(FIFO_DEPTH), .INT_FIFO_DEPTH(INT_FIFO_DEPTH)) u_router (
    .clk, .rst,
    .ext_valid  (in_valid),  .ext_token  (in_token),  .ext_full (in_full),
    .int_valid  (c2r_valid), .int_token  (c2r_token), .int_full (c2r_full),
    .core_valid (r2c_valid), .core_token (r2c_token), .core_full (r2c_full),
    .out_valid, .out_token, .out_full,
    .int_over_ext (st_int_over_ext)
  );

  core #(.FIFO_DEPTH(FIFO_DEPTH), .NODES(NODES)) u_core (
    .clk, .rst,
    .in_valid  (r2c_valid), .in_token  (r2c_token), .in_full  (r2c_full),
    .out_valid (c2r_valid), .out_token (c2r_token), .out_full (c2r_full),
    .prog_we, .prog_addr, .prog_data,
    .m_stored (st_stored), .m_fired (st_fired), .m_stalled (st_match_stall),
    .a_multi_dest (st_multi_dest), .a_stalled (st_alu_stall)
  );

endmodule
