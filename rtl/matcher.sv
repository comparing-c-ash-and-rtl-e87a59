// matcher: the firing rule of the processor (explicit token store matching).
//
// Tokens from the router wait in the matcher's input FIFO. Each cycle the
// control looks at the head token (value v for input side s of node u):
//   * slot u of the token store is empty: v is stored there, the FIFO entry
//     is consumed. This needs no space downstream.
//   * slot u holds a value: the node fires. The matcher emits an extended
//     token to the ALU FIFO with both operands (the left-side operand as op1,
//     the right-side one as op2), the opcode and the four optional
//     destinations of node u from the program memory, clears slot u and
//     consumes the FIFO entry. If the ALU FIFO is full it waits, consuming
//     nothing.
// One token is handled per clock cycle; an extended token appears on ex_* in
// the cycle the matching token is at the FIFO head, combinationally from the
// FIFO output and the two memories.
//
// Interface: in_valid/in_token/in_full is the write side of the input FIFO;
// ex_valid/ex_token go to the ALU FIFO, whose full line is ex_full. The
// prog_* port loads the program memory before a run.
//
// Store-or-fire, deleting the stored token, the single-cycle operation and the
// memories follow the design. Which operand becomes op1, storing while the ALU
// is full, and the FIFO depth are this implementation's choices.
module matcher
  import dfp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned NODES      = dfp_pkg::NUM_NODES,
  localparam int unsigned AW        = $clog2(NODES)
) (
  input  logic          clk,
  input  logic          rst,
  // from the router
  input  logic          in_valid,
  input  token_t        in_token,
  output logic          in_full,
  // to the ALU
  output logic          ex_valid,
  output extoken_t      ex_token,
  input  logic          ex_full,
  // program load
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  instr_t        prog_data,
  // status, for observation
  output logic          stored,
  output logic          fired,
  output logic          stalled
);

  logic   hd_valid, hd_read;
  token_t hd;

  fifo #(.T(token_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_valid (in_valid), .wr_data (in_token), .full (in_full),
    .rd_valid (hd_valid), .rd_data (hd),       .rd   (hd_read)
  );

  logic [AW-1:0] node;
  logic          ts_present;
  word_t         ts_value;
  instr_t        instr;

  assign node = AW'(hd.dest.node);

  token_store #(.NODES(NODES), .VALUE_W(WORD_W)) u_tst (
    .clk, .rst,
    .rd_addr  (node),  .rd_present (ts_present), .rd_value (ts_value),
    .wr_en    (stored), .wr_addr   (node),       .wr_value (hd.value),
    .clr_en   (fired),  .clr_addr  (node)
  );

  program_memory #(.NODES(NODES)) u_pmem (
    .clk,
    .rd_addr (node), .rd_instr (instr),
    .we      (prog_we), .wr_addr (prog_addr), .wr_instr (prog_data)
  );

  always_comb begin
    stored  = hd_valid && !ts_present;
    fired   = hd_valid &&  ts_present && !ex_full;
    stalled = hd_valid &&  ts_present &&  ex_full;
    hd_read = stored || fired;

    ex_valid       = fired;
    ex_token.op    = instr.op;
    ex_token.dests = instr.dests;
    if (hd.dest.side == SIDE_L) begin
      ex_token.op1 = hd.value;
      ex_token.op2 = ts_value;
    end else begin
      ex_token.op1 = ts_value;
      ex_token.op2 = hd.value;
    end
  end

  // The router never sends an outgoing token here.
  a_no_out_token: assert property (@(posedge clk) disable iff (rst)
                                   hd_valid |-> !hd.dest.to_out)
    else $error("matcher: token with out destination");

endmodule
