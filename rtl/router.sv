// router: entry and exit of the processor.
//
// Two input FIFOs: the external one takes tokens from outside the processor,
// the internal one takes result tokens from the ALU. Each cycle the router
// looks at one head token, the internal FIFO's if it holds one, else the
// external FIFO's (internal tokens have priority). A token whose destination
// has the to_out flag leaves the processor on out_*; any other goes to the
// matcher on core_*. The token is sent, and its FIFO entry consumed, only if
// the chosen output is not full; otherwise the router waits (priority is
// strict, so an external token never overtakes a waiting internal one).
// One token per cycle; the outputs are combinational from the FIFO heads.
//
// Interface: ext_*/int_* are the write sides of the two FIFOs with their full
// lines; core_*/out_* are the two outputs with the full lines of their
// receivers.
//
// Buffer sizing: the internal FIFO (INT_FIFO_DEPTH) defaults to one entry per
// possible arc of a program, NUM_NODES * MAX_DEST = 512. The router, matcher
// and ALU form a ring of bounded buffers, and a node with several
// destinations turns one ALU entry into several tokens; with small buffers
// everywhere the ring can fill completely (router waits for the matcher, the
// matcher for the ALU, the ALU for the router) and deadlock. A program in
// which every node fires once has at most one live token per arc, so an
// internal FIFO of that size never fills and the ALU can always drain. The
// external FIFO (EXT_FIFO_DEPTH) only needs to be small.
//
// The two FIFOs, the internal priority and sending tokens out follow the
// design. The out flag, strict priority and both FIFO depths are this
// implementation's choices.
module router
  import dfp_pkg::*;
#(
  parameter int unsigned EXT_FIFO_DEPTH = 4,
  parameter int unsigned INT_FIFO_DEPTH = dfp_pkg::NUM_NODES * dfp_pkg::MAX_DEST
) (
  input  logic   clk,
  input  logic   rst,
  // external input
  input  logic   ext_valid,
  input  token_t ext_token,
  output logic   ext_full,
  // internal input (from the ALU)
  input  logic   int_valid,
  input  token_t int_token,
  output logic   int_full,
  // to the matcher
  output logic   core_valid,
  output token_t core_token,
  input  logic   core_full,
  // out of the processor
  output logic   out_valid,
  output token_t out_token,
  input  logic   out_full,
  // status, for observation
  output logic   int_over_ext
);

  logic   e_valid, e_read, i_valid, i_read;
  token_t e_head, i_head, head;
  logic   head_valid, send;

  fifo #(.T(token_t), .DEPTH(EXT_FIFO_DEPTH)) u_ext_fifo (
    .clk, .rst,
    .wr_valid (ext_valid), .wr_data (ext_token), .full (ext_full),
    .rd_valid (e_valid),   .rd_data (e_head),    .rd   (e_read)
  );

  fifo #(.T(token_t), .DEPTH(INT_FIFO_DEPTH)) u_int_fifo (
    .clk, .rst,
    .wr_valid (int_valid), .wr_data (int_token), .full (int_full),
    .rd_valid (i_valid),   .rd_data (i_head),    .rd   (i_read)
  );

  always_comb begin
    head       = i_valid ? i_head : e_head;
    head_valid = i_valid || e_valid;
    send       = head_valid && (head.dest.to_out ? !out_full : !core_full);

    out_valid  = send &&  head.dest.to_out;
    core_valid = send && !head.dest.to_out;
    out_token  = head;
    core_token = head;

    i_read = send &&  i_valid;
    e_read = send && !i_valid;
  end

  assign int_over_ext = i_valid && e_valid;

endmodule
