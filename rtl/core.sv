// core: the matcher and the ALU joined by the ALU's input FIFO.
//
// Tokens from the router enter the matcher; fired nodes travel as extended
// tokens to the ALU; results leave on out_* towards the router's internal
// FIFO. The ALU FIFO's full line is the matcher's back pressure, out_full the
// ALU's. This follows the design's core block; the status outputs only expose
// internal events for observation.
module core
  import dfp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned NODES      = dfp_pkg::NUM_NODES,
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
  // status, for observation
  output logic          m_stored,
  output logic          m_fired,
  output logic          m_stalled,
  output logic          a_multi_dest,
  output logic          a_stalled
);

  logic     ex_valid, ex_full;
  extoken_t ex_token;

  matcher #(.FIFO_DEPTH(FIFO_DEPTH), .NODES(NODES)) u_matcher (
    .clk, .rst,
    .in_valid, .in_token, .in_full,
    .ex_valid, .ex_token, .ex_full,
    .prog_we, .prog_addr, .prog_data,
    .stored (m_stored), .fired (m_fired), .stalled (m_stalled)
  );

  alu #(.FIFO_DEPTH(FIFO_DEPTH)) u_alu (
    .clk, .rst,
    .in_valid (ex_valid), .in_ex (ex_token), .in_full (ex_full),
    .out_valid, .out_token, .out_full,
    .multi_dest (a_multi_dest), .stalled (a_stalled)
  );

endmodule
